// diff_rx: receiver for the duty-cycle serial link.
//
// Follows the report's receiving state diagram: IDLE, SL/SH (low and high
// halves of the opening sync), DL (low part of a data bit), DH0/DH1 (high part
// after a short or long low) and DONE. The module measures how many cycles the
// synchronized line stays at each level and accepts an edge only if that
// length lies within MARGIN cycles of the expected fraction of PERIOD:
// 1/2 for the sync halves, 1/4 for a short part and 3/4 for a long part.
// A low part of 1/4 is a 0 bit and of 3/4 a 1 bit; bits arrive MSB first.
// The falling edge that ends the 26th bit's high part (the start of the
// closing sync) completes the message: data_out is updated and valid pulses
// for one cycle. Any length out of range, or a level held longer than
// PERIOD + MARGIN cycles, drops the message and returns to IDLE (the report's
// diagram shows returns to IDLE without printing their conditions; these are
// this design's reading). DONE waits for the line to return high before
// IDLE so that the closing sync is not taken for a new message.
// busy is high whenever the receiver is not in IDLE. MARGIN = 3 is assumed.
module diff_rx
  import digisketch_pkg::*;
#(
  parameter int unsigned PERIOD = 20,
  parameter int unsigned MARGIN = 3
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                signal_in,
  output logic [PACKET_W-1:0] data_out,
  output logic                valid,
  output logic                busy
);
  typedef enum logic [2:0] {RX_IDLE, RX_SL, RX_SH, RX_DL, RX_DH0, RX_DH1, RX_DONE} rx_state_t;

  localparam int unsigned CW = $clog2(2 * PERIOD + 2);
  localparam int unsigned Q1 = PERIOD / 4;
  localparam int unsigned Q2 = PERIOD / 2;
  localparam int unsigned Q3 = (3 * PERIOD) / 4;
  localparam int unsigned LIMIT = PERIOD + MARGIN;

  rx_state_t           state;
  logic                prev;
  logic [CW-1:0]       cnt;       // cycles the previous level has lasted
  logic [4:0]          idx;
  logic [PACKET_W-1:0] shreg;

  function automatic logic near(input logic [CW-1:0] n, input int unsigned target);
    return (int'(n) + int'(MARGIN) >= int'(target)) && (int'(n) <= int'(target + MARGIN));
  endfunction

  logic fall, rise;
  assign fall = prev & ~signal_in;
  assign rise = ~prev & signal_in;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= RX_IDLE;
      prev     <= 1'b1;
      cnt      <= '0;
      idx      <= '0;
      shreg    <= '0;
      data_out <= '0;
      valid    <= 1'b0;
    end else begin
      valid <= 1'b0;
      prev  <= signal_in;
      if (fall || rise) cnt <= CW'(1);
      else if (cnt != '1) cnt <= cnt + 1'b1;

      unique case (state)
        RX_IDLE: begin
          idx <= '0;
          if (fall) state <= RX_SL;
        end
        RX_SL:
          if (rise) state <= near(cnt, Q2) ? RX_SH : RX_IDLE;
          else if (int'(cnt) > int'(LIMIT)) state <= RX_IDLE;
        RX_SH:
          if (fall) state <= near(cnt, Q2) ? RX_DL : RX_IDLE;
          else if (int'(cnt) > int'(LIMIT)) state <= RX_IDLE;
        RX_DL:
          if (rise) begin
            if (near(cnt, Q1))      state <= RX_DH0;
            else if (near(cnt, Q3)) state <= RX_DH1;
            else                    state <= RX_IDLE;
          end else if (int'(cnt) > int'(LIMIT)) state <= RX_IDLE;
        RX_DH0, RX_DH1:
          if (fall) begin
            if (near(cnt, (state == RX_DH0) ? Q3 : Q1)) begin
              shreg <= {shreg[PACKET_W-2:0], (state == RX_DH1)};
              idx   <= idx + 1'b1;
              if (idx == 5'(PACKET_W - 1)) begin
                data_out <= {shreg[PACKET_W-2:0], (state == RX_DH1)};
                valid    <= 1'b1;
                state    <= RX_DONE;
              end else begin
                state <= RX_DL;
              end
            end else begin
              state <= RX_IDLE;
            end
          end else if (int'(cnt) > int'(LIMIT)) state <= RX_IDLE;
        RX_DONE:
          if (signal_in) state <= RX_IDLE;
        default: state <= RX_IDLE;
      endcase
    end
  end

  assign busy = (state != RX_IDLE);
endmodule
