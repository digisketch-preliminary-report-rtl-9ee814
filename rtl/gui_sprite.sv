// gui_sprite: on-screen indicator of the current color and stroke width.
//
// Drawn in screen pixels on the left side of the picture, over the canvas:
// a BOX x BOX swatch filled with the current color inside a one-pixel white
// frame, and below it a BOX x BOX light-gray tile with a disc in the current
// color whose radius is the brush radius at screen scale, 2 * sw + 1 pixels
// (the canvas is shown at twice its size). The report says only that the
// sprite shows the current color and stroke width on the left of the screen;
// its layout and sizes are this design's choice. Combinational: sprite_on
// and sprite_rgb follow hcount / vcount with no delay.
module gui_sprite #(
  parameter int unsigned X0  = 16,
  parameter int unsigned Y0  = 16,
  parameter int unsigned BOX = 48,
  parameter int unsigned GAP = 8
) (
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  input  logic [3:0]  color,
  input  logic [2:0]  sw,
  output logic        sprite_on,
  output logic [23:0] sprite_rgb
);
  localparam int unsigned Y1 = Y0 + BOX + GAP;   // top of the width tile
  localparam int unsigned CX = X0 + BOX / 2;     // disc centre
  localparam int unsigned CY = Y1 + BOX / 2;

  logic [23:0] brush_rgb;
  color_palette u_palette (.id(color), .rgb(brush_rgb));

  logic in_x, in_swatch, in_tile, on_frame, in_disc;
  logic [10:0] dx, dy;
  logic [21:0] d2;
  logic [4:0]  r;

  always_comb begin
    in_x      = (hcount >= 11'(X0)) && (hcount < 11'(X0 + BOX));
    in_swatch = in_x && (vcount >= 10'(Y0)) && (vcount < 10'(Y0 + BOX));
    in_tile   = in_x && (vcount >= 10'(Y1)) && (vcount < 10'(Y1 + BOX));
    on_frame  = in_swatch && ((hcount == 11'(X0)) || (hcount == 11'(X0 + BOX - 1)) ||
                              (vcount == 10'(Y0)) || (vcount == 10'(Y0 + BOX - 1)));
    dx        = (hcount >= 11'(CX)) ? hcount - 11'(CX) : 11'(CX) - hcount;
    dy        = (11'(vcount) >= 11'(CY)) ? 11'(vcount) - 11'(CY) : 11'(CY) - 11'(vcount);
    d2        = 22'(dx) * 22'(dx) + 22'(dy) * 22'(dy);
    r         = 5'({sw, 1'b1});   // 2 * sw + 1
    in_disc   = in_tile && (d2 <= 22'(r) * 22'(r));

    sprite_on = in_swatch || in_tile;
    if (on_frame)       sprite_rgb = 24'hFFFFFF;
    else if (in_swatch) sprite_rgb = brush_rgb;
    else if (in_disc)   sprite_rgb = brush_rgb;
    else if (in_tile)   sprite_rgb = 24'hC0C0C0;
    else                sprite_rgb = 24'h000000;
  end
endmodule
