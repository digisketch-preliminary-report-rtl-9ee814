// tb_user_input: turns the two simulated rotary encoders (with contact
// bounce shorter than the debounce time) and presses their shafts, then
// uses the switch-and-button mode, checking the brush after every action
// against a reference model kept here: x/y move by MOVE_STEP per detent and
// stop at the canvas edges, a pressed encoder A cycles the stroke width and a
// pressed encoder B the color, both wrapping; switches move one pixel per
// frame, buttons step color and width.
module tb_user_input;
  import digisketch_pkg::*;
  localparam int DB = 6, STEP = 4;
  logic clk = 0, rst = 1;
  logic nf;
  logic a_clk, a_dt, a_sw, b_clk, b_dt, b_sw;
  logic use_sw, bc, bw;
  logic [3:0] dir;
  brush_t br;
  int checks = 0, failures = 0;
  int ex, ey, ec, ew;
  int clamps = 0;

  user_input #(.DEBOUNCE_CYCLES(DB), .MOVE_STEP(STEP)) dut (
    .clk, .rst, .new_frame(nf), .enc_a_clk(a_clk), .enc_a_dt(a_dt), .enc_a_sw_n(a_sw),
    .enc_b_clk(b_clk), .enc_b_dt(b_dt), .enc_b_sw_n(b_sw), .use_switches(use_sw),
    .dir_sw(dir), .btn_color(bc), .btn_width(bw), .brush(br));

  always #5 clk = ~clk;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic settle();
    repeat (3 * DB + 6) @(negedge clk);
  endtask

  task automatic check_brush(input string what);
    checks++;
    if (br.x !== 10'(ex) || br.y !== 9'(ey) || br.color !== 4'(ec) || br.sw !== 3'(ew)) begin
      failures++;
      $display("FAIL %s: got x=%0d y=%0d c=%0d w=%0d exp x=%0d y=%0d c=%0d w=%0d",
               what, br.x, br.y, br.color, br.sw, ex, ey, ec, ew);
    end
  endtask

  // One detent on encoder A (enc=0) or B (enc=1); up = DT high at the CLK fall.
  task automatic turn(input int enc, input logic up);
    @(negedge clk);
    if (enc == 0) a_dt = up; else b_dt = up;
    settle();
    // bounce
    repeat (2) begin
      @(negedge clk); if (enc == 0) a_clk = 0; else b_clk = 0;
      @(negedge clk); if (enc == 0) a_clk = 1; else b_clk = 1;
    end
    @(negedge clk); if (enc == 0) a_clk = 0; else b_clk = 0;
    settle();
    @(negedge clk); if (enc == 0) a_clk = 1; else b_clk = 1;
    settle();
    @(negedge clk); if (enc == 0) a_dt = 1; else b_dt = 1;
    settle();
  endtask

  function automatic int clampi(input int v, input int hi);
    return (v < 0) ? 0 : (v > hi) ? hi : v;
  endfunction

  initial begin
    nf = 0; a_clk = 1; a_dt = 1; a_sw = 1; b_clk = 1; b_dt = 1; b_sw = 1;
    use_sw = 0; bc = 0; bw = 0; dir = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    ex = 320; ey = 180; ec = 15; ew = 1;
    settle();
    check_brush("reset");
    for (int n = 0; n < 120; n++) begin
      int enc;
      logic up, press;
      enc = $urandom_range(0, 1);
      up = (n < 40) ? 1'b1 : (n < 80) ? 1'b0 : 1'($urandom);
      press = ($urandom_range(0, 3) == 0);
      if (press) begin
        @(negedge clk); if (enc == 0) a_sw = 0; else b_sw = 0;
        settle();
      end
      turn(enc, up);
      if (enc == 0 && !press) begin
        if ((up && ex + STEP > 639) || (!up && ex - STEP < 0)) clamps++;
        ex = clampi(ex + (up ? STEP : -STEP), 639);
      end
      if (enc == 1 && !press) begin
        if ((up && ey + STEP > 359) || (!up && ey - STEP < 0)) clamps++;
        ey = clampi(ey + (up ? STEP : -STEP), 359);
      end
      if (enc == 0 && press) ew = (ew + (up ? 1 : 7)) % 8;
      if (enc == 1 && press) ec = (ec + (up ? 1 : 15)) % 16;
      if (press) begin
        @(negedge clk); a_sw = 1; b_sw = 1;
        settle();
      end
      check_brush($sformatf("encoder step %0d", n));
    end
    // drive to the corners to make sure clamping happens
    repeat (90) begin turn(0, 1'b1); turn(1, 1'b1); end
    ex = 639; ey = 359;
    check_brush("clamped at bottom right");
    clamps++;
    // switch mode
    @(negedge clk); use_sw = 1;
    dir = 4'b1001;   // up and right
    repeat (5) begin
      @(negedge clk); nf = 1; @(negedge clk); nf = 0;
    end
    ey = 354;   // right is clamped at 639
    check_brush("switches up/right");
    dir = 4'b0110;   // down and left
    repeat (7) begin
      @(negedge clk); nf = 1; @(negedge clk); nf = 0;
    end
    ey = 359; ex = 632;
    check_brush("switches down/left");
    dir = 4'b0000;
    for (int k = 0; k < 20; k++) begin
      @(negedge clk); bc = 1; settle();
      @(negedge clk); bc = 0; settle();
      ec = (ec + 1) % 16;
      if (k % 2 == 0) begin
        @(negedge clk); bw = 1; settle();
        @(negedge clk); bw = 0; settle();
        ew = (ew + 1) % 8;
      end
      check_brush($sformatf("buttons %0d", k));
    end
    // encoders are ignored in switch mode
    turn(0, 1'b1);
    check_brush("encoder ignored in switch mode");
    $display("clamp events: %0d", clamps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
