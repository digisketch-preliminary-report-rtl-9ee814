// diff_tx: duty-cycle serial transmitter for the inter-board link.
//
// On trigger_in (accepted only while idle) the 26-bit packet is latched and
// sent on a line that idles high. Every symbol takes PERIOD clock cycles and
// starts with the line driven low; the length of the low part encodes the
// symbol: half a period for the opening sync, a quarter for a 0 bit and three
// quarters for a 1 bit, as the report describes (the "duty cycle" is read as
// the fraction of the period spent low, which is what the receiver's state
// diagram measures). The 26 bits go out MSB first, then a closing sync: the
// line is held low for half a period and then released high, giving the
// receiver the falling edge that ends the last bit.
//
// The report's transmitter diagram has states IDLE, SYNC, ONE and ZERO; the
// END state for the closing sync is added here because the text requires a
// closing sync period. PERIOD = 20 is this design's choice: with it a whole
// message takes 20 + 26*20 + 10 = 550 cycles, the report's figure for one
// message (5.5 us at 100 MHz). busy is high from the cycle after trigger_in
// until the line is released.
module diff_tx
  import digisketch_pkg::*;
#(
  parameter int unsigned PERIOD = 20
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                trigger_in,
  input  logic [PACKET_W-1:0] data_in,
  output logic                data_out,
  output logic                busy
);
  typedef enum logic [2:0] {TX_IDLE, TX_SYNC, TX_ZERO, TX_ONE, TX_END} tx_state_t;

  localparam int unsigned LOW_QUARTER = PERIOD / 4;
  localparam int unsigned LOW_HALF    = PERIOD / 2;
  localparam int unsigned LOW_3Q      = (3 * PERIOD) / 4;
  localparam int unsigned CW = $clog2(PERIOD + 1);

  tx_state_t           state;
  logic [CW-1:0]       cnt;
  logic [4:0]          idx;      // bits already started
  logic [PACKET_W-1:0] shreg;    // MSB is the bit being sent next

  // State for the symbol that follows the current one.
  function automatic tx_state_t bit_state(input logic b);
    return b ? TX_ONE : TX_ZERO;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= TX_IDLE;
      cnt   <= '0;
      idx   <= '0;
      shreg <= '0;
    end else begin
      unique case (state)
        TX_IDLE: begin
          cnt <= '0;
          idx <= '0;
          if (trigger_in) begin
            shreg <= data_in;
            state <= TX_SYNC;
          end
        end
        TX_END: begin
          if (cnt == CW'(LOW_HALF - 1)) begin
            cnt   <= '0;
            state <= TX_IDLE;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: begin   // TX_SYNC, TX_ZERO, TX_ONE
          if (cnt == CW'(PERIOD - 1)) begin
            cnt <= '0;
            if (state != TX_SYNC) idx <= idx + 1'b1;
            if (state != TX_SYNC && idx == 5'(PACKET_W - 1)) begin
              state <= TX_END;
            end else begin
              if (state != TX_SYNC) begin
                state <= bit_state(shreg[PACKET_W-2]);
                shreg <= {shreg[PACKET_W-2:0], 1'b0};
              end else begin
                state <= bit_state(shreg[PACKET_W-1]);
              end
            end
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
      endcase
    end
  end

  always_comb begin
    unique case (state)
      TX_IDLE: data_out = 1'b1;
      TX_SYNC: data_out = (cnt >= CW'(LOW_HALF));
      TX_ZERO: data_out = (cnt >= CW'(LOW_QUARTER));
      TX_ONE:  data_out = (cnt >= CW'(LOW_3Q));
      TX_END:  data_out = 1'b0;
      default: data_out = 1'b1;
    endcase
  end

  assign busy = (state != TX_IDLE);
endmodule
