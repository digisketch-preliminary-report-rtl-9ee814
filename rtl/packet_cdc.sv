// packet_cdc: carries a word with a valid strobe from one clock domain to
// another.
//
// The source side captures src_data on src_valid and flips a toggle bit; the
// destination side passes the toggle through a two-stage synchronizer and,
// on every change, copies the captured word (stable by then) and pulses
// dst_valid for one cycle. Strobes must be further apart than about three
// destination cycles plus three source cycles; in this design they come once
// per video frame or once per received message. This helper is this design's
// own: the report runs the link on a 100 MHz clock and the video on the
// pixel clock without describing the crossing.
module packet_cdc #(
  parameter int unsigned WIDTH = 26
) (
  input  logic             src_clk,
  input  logic             src_rst,
  input  logic             src_valid,
  input  logic [WIDTH-1:0] src_data,
  input  logic             dst_clk,
  input  logic             dst_rst,
  output logic             dst_valid,
  output logic [WIDTH-1:0] dst_data
);
  logic [WIDTH-1:0] held;
  logic             toggle_src, toggle_dst, toggle_seen;

  always_ff @(posedge src_clk) begin
    if (src_rst) begin
      held       <= '0;
      toggle_src <= 1'b0;
    end else if (src_valid) begin
      held       <= src_data;
      toggle_src <= ~toggle_src;
    end
  end

  synchronizer #(.WIDTH(1), .DEPTH(2), .RESET_VAL(1'b0)) u_sync (
    .clk(dst_clk), .rst(dst_rst), .d(toggle_src), .q(toggle_dst)
  );

  always_ff @(posedge dst_clk) begin
    if (dst_rst) begin
      toggle_seen <= 1'b0;
      dst_valid   <= 1'b0;
      dst_data    <= '0;
    end else begin
      toggle_seen <= toggle_dst;
      dst_valid   <= (toggle_dst != toggle_seen);
      if (toggle_dst != toggle_seen) dst_data <= held;
    end
  end
endmodule
