// tb_scale: exhaustive over the screen rows and columns in use (and a margin
// beyond), compares canvas x, y, address y*640+x and the on-canvas flag with
// values computed here.
module tb_scale;
  import digisketch_pkg::*;
  logic [10:0] hc;
  logic [9:0]  vc;
  logic [9:0]  x;
  logic [8:0]  y;
  logic [FB_AW-1:0] addr;
  logic on;
  int checks = 0, failures = 0;

  scale dut (.hcount(hc), .vcount(vc), .x, .y, .addr, .on_canvas(on));

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 750; v += 7) begin
      for (int h = 0; h < 1650; h += 3) begin
        int ex, ey;
        logic eon;
        hc = 11'(h); vc = 10'(v);
        #1;
        ex = h / 2; ey = v / 2;
        eon = (h < 1280) && (v < 720);
        checks++;
        if (on !== eon || (eon && (x !== 10'(ex) || y !== 9'(ey) || addr !== FB_AW'(ey * 640 + ex)))) begin
          failures++;
          if (failures < 10) $display("FAIL h=%0d v=%0d x=%0d y=%0d addr=%0d on=%0d", h, v, x, y, addr, on);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
