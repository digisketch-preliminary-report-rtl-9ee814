// diff_io: major FSM that shares one differential pair between the
// transmitter and the receiver.
//
// As in the report's major state diagram, the module listens by default
// (IDLE), follows the receiver while it is busy (RECV) and transmits (TRANS)
// when asked and the line is quiet. A trigger_in that arrives while a message
// is being received is remembered (message_waiting) together with its packet,
// and the transmission starts as soon as the reception ends. The receiver has
// priority: in IDLE a busy receiver wins over a simultaneous trigger.
// io_sel is high while this board drives the line (the output enable of the
// bidirectional buffer); during TRANS the receiver is fed the idle level so
// that it does not decode the board's own message. Received packets appear on
// rx_data with a one-cycle rx_valid. line_in must already be synchronized.
module diff_io
  import digisketch_pkg::*;
#(
  parameter int unsigned PERIOD = 20,
  parameter int unsigned MARGIN = 3
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                trigger_in,
  input  logic [PACKET_W-1:0] tx_data,
  input  logic                line_in,
  output logic                io_sel,
  output logic                line_out,
  output logic [PACKET_W-1:0] rx_data,
  output logic                rx_valid,
  output logic                transmitting,
  output logic                receiving
);
  typedef enum logic [1:0] {IO_IDLE, IO_RECV, IO_TRANS} io_state_t;

  io_state_t           state;
  logic                message_waiting;
  logic [PACKET_W-1:0] pending;
  logic                tx_start, tx_busy, rx_busy, tx_started;

  diff_tx #(.PERIOD(PERIOD)) u_tx (
    .clk, .rst, .trigger_in(tx_start), .data_in(pending),
    .data_out(line_out), .busy(tx_busy)
  );

  diff_rx #(.PERIOD(PERIOD), .MARGIN(MARGIN)) u_rx (
    .clk, .rst, .signal_in(line_in | (state == IO_TRANS)),
    .data_out(rx_data), .valid(rx_valid), .busy(rx_busy)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state           <= IO_IDLE;
      message_waiting <= 1'b0;
      pending         <= '0;
      tx_start        <= 1'b0;
      tx_started      <= 1'b0;
    end else begin
      tx_start <= 1'b0;
      // A new request always replaces an older one that has not gone out.
      if (trigger_in) begin
        pending <= tx_data;
      end
      unique case (state)
        IO_IDLE:
          if (rx_busy) begin
            state <= IO_RECV;
            if (trigger_in) message_waiting <= 1'b1;
          end else if (trigger_in || message_waiting) begin
            state           <= IO_TRANS;
            tx_start        <= 1'b1;
            tx_started      <= 1'b0;
            message_waiting <= 1'b0;
          end
        IO_RECV: begin
          if (trigger_in) message_waiting <= 1'b1;
          if (!rx_busy) begin
            if (message_waiting || trigger_in) begin
              state           <= IO_TRANS;
              tx_start        <= 1'b1;
              tx_started      <= 1'b0;
              message_waiting <= 1'b0;
            end else begin
              state <= IO_IDLE;
            end
          end
        end
        IO_TRANS: begin
          if (trigger_in) message_waiting <= 1'b1;
          if (tx_busy) tx_started <= 1'b1;
          if (tx_started && !tx_busy) state <= IO_IDLE;
        end
        default: state <= IO_IDLE;
      endcase
    end
  end

  assign io_sel       = (state == IO_TRANS);
  assign transmitting = (state == IO_TRANS);
  assign receiving    = (state == IO_RECV);

  // The transmitter is only started while the line is not being received.
  always_ff @(posedge clk) begin
    if (!rst && tx_start) assert (!rx_busy || state == IO_TRANS)
      else $error("diff_io: transmission started during reception");
  end
endmodule
