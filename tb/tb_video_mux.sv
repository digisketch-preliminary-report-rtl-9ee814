// tb_video_mux: random inputs; checks one-cycle registered selection (black
// outside active video, sprite over canvas inside) and sync pass-through.
module tb_video_mux;
  logic clk = 0, rst = 1;
  logic act, hs, vs, son;
  logic [23:0] crgb, srgb, rgb;
  logic aout, hout, vout;
  int checks = 0, failures = 0;

  video_mux dut (.clk, .rst, .active_in(act), .hsync_in(hs), .vsync_in(vs), .canvas_rgb(crgb),
    .sprite_on(son), .sprite_rgb(srgb), .rgb, .active_out(aout), .hsync_out(hout), .vsync_out(vout));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [23:0] exp_rgb;
    logic ea, eh, ev;
    act = 0; hs = 0; vs = 0; son = 0; crgb = 0; srgb = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      act = 1'($urandom); hs = 1'($urandom); vs = 1'($urandom); son = 1'($urandom);
      crgb = 24'($urandom); srgb = 24'($urandom);
      exp_rgb = !act ? 24'h0 : son ? srgb : crgb;
      ea = act; eh = hs; ev = vs;
      @(negedge clk);
      checks++;
      if (rgb !== exp_rgb || aout !== ea || hout !== eh || vout !== ev) begin
        failures++;
        if (failures < 5) $display("FAIL n=%0d rgb %h exp %h", n, rgb, exp_rgb);
      end
      act = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
