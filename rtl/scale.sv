// scale: maps a 1280 x 720 screen position onto the 640 x 360 canvas.
//
// The report stores a half-resolution canvas and shows it scaled up by two,
// so every canvas pixel covers a 2 x 2 block of screen pixels. This block
// divides hcount and vcount by two, forms the frame buffer's linear address
// (row-major, y * CANVAS_W + x; the row-major order is this design's choice)
// and flags whether the position lies on the canvas. Purely combinational.
module scale
  import digisketch_pkg::*;
#(
  parameter int unsigned SHIFT = 1
) (
  input  logic [10:0]      hcount,
  input  logic [9:0]       vcount,
  output logic [9:0]       x,
  output logic [8:0]       y,
  output logic [FB_AW-1:0] addr,
  output logic             on_canvas
);
  logic [10:0] xs;
  logic [9:0]  ys;

  always_comb begin
    xs        = hcount >> SHIFT;
    ys        = vcount >> SHIFT;
    on_canvas = (xs < 11'(CANVAS_W)) && (ys < 10'(CANVAS_H));
    x         = xs[9:0];
    y         = ys[8:0];
    addr      = FB_AW'(ys[8:0]) * FB_AW'(CANVAS_W) + FB_AW'(xs[9:0]);
  end
endmodule
