// frame_buffer: the DigiSketch canvas.
//
// A 640 x 360 array of 4-bit color IDs held in a dual-port block RAM
// (fb_bram). Drawing does not seek out the cursor: as the raster scan passes
// over the canvas (scan_x, scan_y, scan_addr from the scale block), every
// pixel that lies within the brush radius of a cursor is written with that
// brush's color. Port A carries the local user's brush and port B the brush
// received from the other board, so both players draw at once, as the report
// describes. The radius of a brush is its stroke-width index (0..7 canvas
// pixels, a disc: dx^2 + dy^2 <= r^2); the report says only "within the
// stroke width's radius", so the exact mapping is this design's choice.
//
// When draw is low the SD card interface owns port A instead (sd_addr,
// sd_we, sd_wdata, with sd_rdata read back two cycles after sd_addr), to save
// the canvas or load a stored image; this is the multiplexer selected by draw
// in the report's block diagram. Port B always reads at the scan address, and
// its data, expanded by color_palette, leaves as pixel_id / pixel_rgb two
// clock cycles after the scan position (one cycle to write, two to read).
module frame_buffer
  import digisketch_pkg::*;
(
  input  logic             clk,
  input  logic             draw,
  // raster scan position on the canvas
  input  logic [9:0]       scan_x,
  input  logic [8:0]       scan_y,
  input  logic [FB_AW-1:0] scan_addr,
  input  logic             scan_valid,
  // brushes
  input  brush_t           local_brush,
  input  brush_t           remote_brush,
  input  logic             remote_en,
  // SD card interface port, used while draw is low
  input  logic [FB_AW-1:0] sd_addr,
  input  logic             sd_we,
  input  logic [3:0]       sd_wdata,
  output logic [3:0]       sd_rdata,
  // video output, two cycles after the scan position
  output logic [3:0]       pixel_id,
  output logic [23:0]      pixel_rgb
);
  logic             local_hit, remote_hit;
  logic [FB_AW-1:0] addr_a;
  logic             we_a, we_b;
  logic [3:0]       din_a;

  // Is (px,py) inside the disc of radius b.sw around (b.x,b.y)?
  function automatic logic in_brush(input logic [9:0] px, input logic [8:0] py, input brush_t b);
    logic [9:0] dx, dy;
    logic [6:0] d2, r2;
    dx = (px >= b.x) ? px - b.x : b.x - px;
    dy = (10'(py) >= 10'(b.y)) ? 10'(py) - 10'(b.y) : 10'(b.y) - 10'(py);
    d2 = 7'(dx[2:0] * dx[2:0]) + 7'(dy[2:0] * dy[2:0]);
    r2 = 7'(b.sw * b.sw);
    return (dx <= 10'(b.sw)) && (dy <= 10'(b.sw)) && (d2 <= r2);
  endfunction

  always_comb begin
    local_hit  = scan_valid && in_brush(scan_x, scan_y, local_brush);
    remote_hit = scan_valid && remote_en && in_brush(scan_x, scan_y, remote_brush);
    if (draw) begin
      addr_a = scan_addr;
      we_a   = local_hit;
      din_a  = local_brush.color;
    end else begin
      addr_a = sd_addr;
      we_a   = sd_we;
      din_a  = sd_wdata;
    end
    we_b = draw && remote_hit;
  end

  fb_bram #(.WIDTH(4), .DEPTH(CANVAS_PIXELS), .AW(FB_AW)) u_bram (
    .clk,
    .addr_a, .we_a, .din_a, .dout_a(sd_rdata),
    .addr_b(scan_addr), .we_b, .din_b(remote_brush.color), .dout_b(pixel_id)
  );

  color_palette u_palette (.id(pixel_id), .rgb(pixel_rgb));
endmodule
