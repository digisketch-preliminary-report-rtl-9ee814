// tb_video_sig_gen: runs the generator at its 720p defaults for two frames
// and checks, against counts worked out from the standard timing, the line
// length (1650), frame length (750 lines), active area (1280 x 720 pixels per
// frame), sync pulse widths (40 pixels, 5 lines), sync positions, and that
// new_frame fires once per frame at (1280, 720).
module tb_video_sig_gen;
  logic clk = 0, rst = 1;
  logic [10:0] hc;
  logic [9:0]  vc;
  logic hs, vs, act, nf;
  int checks = 0, failures = 0;

  video_sig_gen dut (.clk, .rst, .hcount(hc), .vcount(vc), .hsync(hs), .vsync(vs),
                     .active_draw(act), .new_frame(nf));

  always #5 clk = ~clk;

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    int active_n, hs_n, vs_lines, nf_n, cyc, nf_cycle0, nf_cycle1, bad;
    logic [10:0] hprev;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    check(hc == 0 && vc == 0, "reset counters");
    active_n = 0; hs_n = 0; vs_lines = 0; nf_n = 0; cyc = 0; bad = 0;
    nf_cycle0 = -1; nf_cycle1 = -1;
    // run 2 frames + a bit
    while (cyc < 2 * 1650 * 750) begin
      @(posedge clk); #1;
      cyc++;
      if (hc >= 1650 || vc >= 750) bad++;
      if (act != (hc < 1280 && vc < 720)) bad++;
      if (hs != (hc >= 1390 && hc < 1430)) bad++;
      if (vs != (vc >= 725 && vc < 730)) bad++;
      if (act) active_n++;
      if (hs && vc == 3) hs_n++;
      if (vs && hc == 0) vs_lines++;
      if (nf) begin
        nf_n++;
        if (hc != 1280 || vc != 720) bad++;
        if (nf_cycle0 < 0) nf_cycle0 = cyc; else if (nf_cycle1 < 0) nf_cycle1 = cyc;
      end
    end
    check(bad == 0, $sformatf("%0d cycles with wrong flags or counts", bad));
    check(active_n == 2 * 1280 * 720, $sformatf("active pixels %0d", active_n));
    check(hs_n == 2 * 40, $sformatf("hsync width %0d", hs_n / 2));
    check(vs_lines == 2 * 5, $sformatf("vsync lines %0d", vs_lines / 2));
    check(nf_n == 2, $sformatf("new_frame count %0d", nf_n));
    check(nf_cycle1 - nf_cycle0 == 1650 * 750, $sformatf("frame period %0d", nf_cycle1 - nf_cycle0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
