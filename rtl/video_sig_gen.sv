// video_sig_gen: raster timing generator for the 1280 x 720 display.
//
// Counts hcount across each line and vcount down the frame, and derives the
// horizontal and vertical sync pulses, active_draw (inside the visible
// 1280 x 720 area) and new_frame, a one-cycle pulse at the first blanking
// pixel after the last visible line (hcount = H_ACTIVE, vcount = V_ACTIVE),
// when the picture has just been scanned out. All outputs are registered and
// mutually aligned. The report names this module and the 720p resolution but
// not its timing; the defaults are the standard 1280x720 at 60 Hz timing
// (74.25 MHz pixel clock, 1650 x 750 total, positive syncs), taken from
// common practice. Reset holds the counters at zero.
module video_sig_gen #(
  parameter int unsigned H_ACTIVE = 1280,
  parameter int unsigned H_FP     = 110,
  parameter int unsigned H_SYNC   = 40,
  parameter int unsigned H_BP     = 220,
  parameter int unsigned V_ACTIVE = 720,
  parameter int unsigned V_FP     = 5,
  parameter int unsigned V_SYNC   = 5,
  parameter int unsigned V_BP     = 20
) (
  input  logic        clk,
  input  logic        rst,
  output logic [10:0] hcount,
  output logic [9:0]  vcount,
  output logic        hsync,
  output logic        vsync,
  output logic        active_draw,
  output logic        new_frame
);
  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;

  logic [10:0] h_next;
  logic [9:0]  v_next;

  always_comb begin
    h_next = hcount + 11'd1;
    v_next = vcount;
    if (hcount == 11'(H_TOTAL - 1)) begin
      h_next = '0;
      v_next = (vcount == 10'(V_TOTAL - 1)) ? '0 : vcount + 10'd1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount      <= '0;
      vcount      <= '0;
      hsync       <= 1'b0;
      vsync       <= 1'b0;
      active_draw <= 1'b0;
      new_frame   <= 1'b0;
    end else begin
      hcount      <= h_next;
      vcount      <= v_next;
      hsync       <= (h_next >= 11'(H_ACTIVE + H_FP)) && (h_next < 11'(H_ACTIVE + H_FP + H_SYNC));
      vsync       <= (v_next >= 10'(V_ACTIVE + V_FP)) && (v_next < 10'(V_ACTIVE + V_FP + V_SYNC));
      active_draw <= (h_next < 11'(H_ACTIVE)) && (v_next < 10'(V_ACTIVE));
      new_frame   <= (h_next == 11'(H_ACTIVE)) && (v_next == 10'(V_ACTIVE));
    end
  end
endmodule
