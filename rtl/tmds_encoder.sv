// tmds_encoder: 8b/10b TMDS encoder for one HDMI/DVI color channel.
//
// During active video (ve high) the byte is first transition-minimised
// (an XOR or XNOR chain, whichever gives fewer transitions, flagged in bit 8)
// and then DC-balanced: bits 7:0 are inverted, flagged in bit 9, when that
// moves the running disparity towards zero. During blanking one of the four
// control words for ctrl (on the blue channel: {vsync, hsync}) is sent and
// the disparity is cleared. The output word is registered, one cycle after
// the inputs. The report only names the TMDS encoders; this is the standard
// DVI 1.0 algorithm.
module tmds_encoder (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] data,
  input  logic [1:0] ctrl,
  input  logic       ve,
  output logic [9:0] tmds
);
  logic [8:0]        q_m;
  logic [3:0]        n1d, n1q;
  logic signed [4:0] cnt, diff, cnt_next;
  logic [9:0]        word;
  logic              chain;

  always_comb begin
    n1d = '0;
    for (int i = 0; i < 8; i++) n1d += 4'(data[i]);
    chain  = data[0];
    q_m[0] = data[0];
    q_m[8] = !(n1d > 4 || (n1d == 4 && !data[0]));   // 1: XOR chain, 0: XNOR chain
    for (int i = 1; i < 8; i++) begin
      chain  = q_m[8] ? (chain ^ data[i]) : ~(chain ^ data[i]);
      q_m[i] = chain;
    end
    n1q = '0;
    for (int i = 0; i < 8; i++) n1q += 4'(q_m[i]);
    diff = 5'(signed'({1'b0, n1q})) - 5'(signed'(5'd8 - {1'b0, n1q}));  // ones - zeros

    if (cnt == 0 || diff == 0) begin
      word     = {~q_m[8], q_m[8], q_m[8] ? q_m[7:0] : ~q_m[7:0]};
      cnt_next = q_m[8] ? cnt + diff : cnt - diff;
    end else if ((cnt > 0 && diff > 0) || (cnt < 0 && diff < 0)) begin
      word     = {1'b1, q_m[8], ~q_m[7:0]};
      cnt_next = cnt + (q_m[8] ? 5'sd2 : 5'sd0) - diff;
    end else begin
      word     = {1'b0, q_m[8], q_m[7:0]};
      cnt_next = cnt - (q_m[8] ? 5'sd0 : 5'sd2) + diff;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      tmds <= '0;
      cnt  <= '0;
    end else if (!ve) begin
      cnt <= '0;
      unique case (ctrl)
        2'b00: tmds <= 10'b1101010100;
        2'b01: tmds <= 10'b0010101011;
        2'b10: tmds <= 10'b0101010100;
        default: tmds <= 10'b1010101011;
      endcase
    end else begin
      tmds <= word;
      cnt  <= cnt_next;
    end
  end
endmodule
