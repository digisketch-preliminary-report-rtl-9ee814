// tb_frame_buffer: paints with both brushes during full raster scans of the
// canvas, then reads the whole canvas back through the SD port and compares
// every pixel with a reference canvas computed here (disc of radius sw,
// local brush winning where both cover a pixel, remote brush only when
// enabled). Also checks that nothing is painted while draw is low, that SD
// port writes land, the two-cycle read latency of both ports, and the
// palette output for every color ID.
module tb_frame_buffer;
  import digisketch_pkg::*;
  logic clk = 0;
  logic draw;
  logic [9:0] sx;
  logic [8:0] sy;
  logic [FB_AW-1:0] saddr, sd_addr;
  logic sval, remote_en, sd_we;
  brush_t lb, rb;
  logic [3:0] sd_wdata, sd_rdata, pid;
  logic [23:0] prgb;
  int checks = 0, failures = 0;
  logic [3:0] ref_fb [CANVAS_PIXELS];

  frame_buffer dut (.clk, .draw, .scan_x(sx), .scan_y(sy), .scan_addr(saddr), .scan_valid(sval),
    .local_brush(lb), .remote_brush(rb), .remote_en, .sd_addr, .sd_we, .sd_wdata, .sd_rdata,
    .pixel_id(pid), .pixel_rgb(prgb));

  always #5 clk = ~clk;

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic covers(input int x, input int y, input brush_t b);
    int dx = x - int'(b.x), dy = y - int'(b.y);
    return dx * dx + dy * dy <= int'(b.sw) * int'(b.sw);
  endfunction

  function automatic logic [23:0] pal(input logic [3:0] id);
    logic [23:0] t [16] = '{24'h000000, 24'h0000AA, 24'h00AA00, 24'h00AAAA, 24'hAA0000, 24'hAA00AA,
                            24'hAA5500, 24'hAAAAAA, 24'h555555, 24'h5555FF, 24'h55FF55, 24'h55FFFF,
                            24'hFF5555, 24'hFF55FF, 24'hFFFF55, 24'hFFFFFF};
    return t[id];
  endfunction

  // One raster scan over the canvas; optionally update the reference.
  // Also checks pixel_id / pixel_rgb two cycles after each address.
  int lat_bad;
  task automatic scan(input logic paint);
    logic [3:0] pipe [3];
    lat_bad = 0;
    for (int y = 0; y < CANVAS_H; y++) begin
      for (int x = 0; x < CANVAS_W; x++) begin
        @(negedge clk);
        sx = 10'(x); sy = 9'(y); saddr = FB_AW'(y * CANVAS_W + x); sval = 1;
        pipe[2] = pipe[1]; pipe[1] = pipe[0]; pipe[0] = ref_fb[y * CANVAS_W + x];
        if (y * CANVAS_W + x >= 2) begin
          if (pid !== pipe[2] || prgb !== pal(pipe[2])) lat_bad++;
        end
        if (paint) begin
          if (covers(x, y, lb)) ref_fb[y * CANVAS_W + x] = lb.color;
          else if (remote_en && covers(x, y, rb)) ref_fb[y * CANVAS_W + x] = rb.color;
        end
      end
    end
    @(negedge clk); sval = 0;
  endtask

  task automatic readback(input string tag);
    int bad = 0;
    logic [3:0] pipe [3];
    for (int a = 0; a < int'(CANVAS_PIXELS) + 2; a++) begin
      @(negedge clk);
      if (a >= 2 && sd_rdata !== pipe[1]) begin
        bad++;
        if (bad < 5) $display("  %s addr %0d got %h exp %h", tag, a - 2, sd_rdata, pipe[1]);
      end
      pipe[1] = pipe[0];
      pipe[0] = (a < int'(CANVAS_PIXELS)) ? ref_fb[a] : 4'h0;
      sd_addr = FB_AW'(a < int'(CANVAS_PIXELS) ? a : 0);
    end
    checks++;
    if (bad != 0) begin failures++; $display("FAIL %s: %0d pixels differ", tag, bad); end
  endtask

  initial begin
    for (int i = 0; i < int'(CANVAS_PIXELS); i++) ref_fb[i] = 4'h0;
    draw = 1; sval = 0; sx = 0; sy = 0; saddr = 0; remote_en = 1;
    sd_addr = 0; sd_we = 0; sd_wdata = 0;
    lb = '{x: 10'd100, y: 9'd50, color: 4'd5, sw: 3'd3};
    rb = '{x: 10'd102, y: 9'd53, color: 4'd9, sw: 3'd4};
    repeat (3) @(posedge clk);
    // 1: both brushes, overlapping
    scan(1);
    checks++; if (lat_bad != 0) begin failures++; $display("FAIL video read after scan 1: %0d", lat_bad); end
    // 2: brushes at the canvas corners, remote disabled
    lb = '{x: 10'd639, y: 9'd359, color: 4'd12, sw: 3'd7};
    rb = '{x: 10'd0, y: 9'd0, color: 4'd3, sw: 3'd7};
    remote_en = 0;
    scan(1);
    // 3: remote enabled at corner, local zero width
    lb = '{x: 10'd0, y: 9'd359, color: 4'd14, sw: 3'd0};
    remote_en = 1;
    scan(1);
    checks++; if (lat_bad != 0) begin failures++; $display("FAIL video read after scan 3: %0d", lat_bad); end
    // 4: draw low, brushes must not paint
    draw = 0;
    lb = '{x: 10'd300, y: 9'd200, color: 4'd1, sw: 3'd7};
    rb = '{x: 10'd310, y: 9'd200, color: 4'd2, sw: 3'd7};
    scan(0);
    readback("after painting");
    // 5: SD port writes all colors in a pattern
    for (int a = 0; a < 4096; a++) begin
      @(negedge clk);
      sd_addr = FB_AW'(a * 53 + 7); sd_we = 1; sd_wdata = 4'(a ^ (a >> 4));
      ref_fb[a * 53 + 7] = 4'(a ^ (a >> 4));
    end
    @(negedge clk); sd_we = 0;
    readback("after SD writes");
    // video port sees the SD writes, all 16 palette entries exercised
    scan(0);
    checks++; if (lat_bad != 0) begin failures++; $display("FAIL video read after SD writes: %0d", lat_bad); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
