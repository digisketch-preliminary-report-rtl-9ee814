// video_mux: final pixel selection of the video pipeline.
//
// Outside the visible area the output is black; inside it, the GUI sprite is
// shown where it is on and the canvas color everywhere else. The chosen
// color and the sync and active flags are registered together (one cycle of
// latency), ready for the TMDS encoders. The report names this multiplexer;
// the priority of sprite over canvas follows its description of the sprite
// being rendered "on top of the canvas".
module video_mux (
  input  logic        clk,
  input  logic        rst,
  input  logic        active_in,
  input  logic        hsync_in,
  input  logic        vsync_in,
  input  logic [23:0] canvas_rgb,
  input  logic        sprite_on,
  input  logic [23:0] sprite_rgb,
  output logic [23:0] rgb,
  output logic        active_out,
  output logic        hsync_out,
  output logic        vsync_out
);
  always_ff @(posedge clk) begin
    if (rst) begin
      rgb        <= '0;
      active_out <= 1'b0;
      hsync_out  <= 1'b0;
      vsync_out  <= 1'b0;
    end else begin
      active_out <= active_in;
      hsync_out  <= hsync_in;
      vsync_out  <= vsync_in;
      if (!active_in)     rgb <= '0;
      else if (sprite_on) rgb <= sprite_rgb;
      else                rgb <= canvas_rgb;
    end
  end
endmodule
