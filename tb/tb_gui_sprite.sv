// tb_gui_sprite: sweeps the left part of the screen for several colors and
// widths and compares every pixel with a reference drawing worked out here:
// white frame and color swatch at (16..63, 16..63), gray tile at
// (16..63, 72..119) with a disc of radius 2*sw+1 around (40, 96) in the
// brush color, nothing elsewhere.
module tb_gui_sprite;
  logic [10:0] hc;
  logic [9:0]  vc;
  logic [3:0]  color;
  logic [2:0]  sw;
  logic        on;
  logic [23:0] rgb;
  int checks = 0, failures = 0;

  gui_sprite dut (.hcount(hc), .vcount(vc), .color, .sw, .sprite_on(on), .sprite_rgb(rgb));

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [23:0] pal(input logic [3:0] id);
    logic [23:0] t [16] = '{24'h000000, 24'h0000AA, 24'h00AA00, 24'h00AAAA, 24'hAA0000, 24'hAA00AA,
                            24'hAA5500, 24'hAAAAAA, 24'h555555, 24'h5555FF, 24'h55FF55, 24'h55FFFF,
                            24'hFF5555, 24'hFF55FF, 24'hFFFF55, 24'hFFFFFF};
    return t[id];
  endfunction

  initial begin
    int bad;
    for (int c = 0; c < 16; c += 5) begin
      for (int w = 0; w < 8; w++) begin
        bad = 0;
        color = 4'(c); sw = 3'(w);
        for (int y = 0; y < 140; y++) begin
          for (int x = 0; x < 90; x++) begin
            logic eon;
            logic [23:0] erg;
            int r, dx, dy;
            r = 2 * w + 1; dx = x - 40; dy = y - 96;
            hc = 11'(x); vc = 10'(y);
            #1;
            eon = 0; erg = 0;
            if (x >= 16 && x < 64 && y >= 16 && y < 64) begin
              eon = 1;
              erg = (x == 16 || x == 63 || y == 16 || y == 63) ? 24'hFFFFFF : pal(4'(c));
            end else if (x >= 16 && x < 64 && y >= 72 && y < 120) begin
              eon = 1;
              erg = (dx * dx + dy * dy <= r * r) ? pal(4'(c)) : 24'hC0C0C0;
            end
            if (on !== eon || (eon && rgb !== erg)) bad++;
          end
        end
        checks++;
        if (bad != 0) begin failures++; $display("FAIL color %0d width %0d: %0d pixels", c, w, bad); end
      end
    end
    // far right of the screen: nothing
    hc = 11'd1000; vc = 10'd40; #1;
    checks++; if (on) begin failures++; $display("FAIL sprite on at 1000,40"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
