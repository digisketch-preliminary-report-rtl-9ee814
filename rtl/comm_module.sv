// comm_module: the link that lets two DigiSketch boards draw on one canvas.
//
// Once per video frame (new_frame) the local brush (cursor x/y, color,
// stroke width, packed as the report's 26-bit packet) is sent to the other
// board; every packet received from it is handed to the frame buffer as the
// remote brush. The link logic runs on the 100 MHz clock: the received line
// passes a two-stage synchronizer and feeds diff_io, which shares the single
// differential pair between diff_tx and diff_rx. The packets cross between
// the pixel clock and the 100 MHz clock through packet_cdc (this design's
// choice; the report does not describe the crossing).
//
// Pad side: line_in is the output of the bidirectional differential buffer,
// io_sel its output enable (high = drive) and line_out the level to drive.
// Pixel side: remote_brush holds the last packet received, remote_seen goes
// high once one has arrived and remote_update pulses for each new one.
module comm_module
  import digisketch_pkg::*;
#(
  parameter int unsigned PERIOD = 20,
  parameter int unsigned MARGIN = 3
) (
  input  logic   clk_pixel,
  input  logic   rst_pixel,
  input  logic   clk_link,
  input  logic   rst_link,
  input  logic   new_frame,
  input  brush_t local_brush,
  output brush_t remote_brush,
  output logic   remote_seen,
  output logic   remote_update,
  input  logic   line_in,
  output logic   io_sel,
  output logic   line_out,
  output logic   transmitting,
  output logic   receiving
);
  logic                line_sync;
  logic                trigger;
  logic [PACKET_W-1:0] tx_word, rx_word, rx_pixel;
  logic                rx_valid;

  synchronizer #(.WIDTH(1), .DEPTH(2), .RESET_VAL(1'b1)) u_line_sync (
    .clk(clk_link), .rst(rst_link), .d(line_in), .q(line_sync)
  );

  packet_cdc #(.WIDTH(PACKET_W)) u_to_link (
    .src_clk(clk_pixel), .src_rst(rst_pixel), .src_valid(new_frame), .src_data(local_brush),
    .dst_clk(clk_link), .dst_rst(rst_link), .dst_valid(trigger), .dst_data(tx_word)
  );

  diff_io #(.PERIOD(PERIOD), .MARGIN(MARGIN)) u_io (
    .clk(clk_link), .rst(rst_link), .trigger_in(trigger), .tx_data(tx_word),
    .line_in(line_sync), .io_sel, .line_out, .rx_data(rx_word), .rx_valid,
    .transmitting, .receiving
  );

  packet_cdc #(.WIDTH(PACKET_W)) u_to_pixel (
    .src_clk(clk_link), .src_rst(rst_link), .src_valid(rx_valid), .src_data(rx_word),
    .dst_clk(clk_pixel), .dst_rst(rst_pixel), .dst_valid(remote_update), .dst_data(rx_pixel)
  );

  always_ff @(posedge clk_pixel) begin
    if (rst_pixel) begin
      remote_seen <= 1'b0;
    end else if (remote_update) begin
      remote_seen <= 1'b1;
    end
  end

  assign remote_brush = brush_t'(rx_pixel);
endmodule
