// debouncer: filters contact bounce from a switch, button or encoder pin.
//
// The raw input first passes a two-stage synchronizer. The clean output
// takes a new level only after the synchronized input has held that level
// for STABLE_CYCLES consecutive clock cycles; it starts at RESET_VAL.
module debouncer #(
  parameter int unsigned STABLE_CYCLES = 74_250,
  parameter logic        RESET_VAL     = 1'b0
) (
  input  logic clk,
  input  logic rst,
  input  logic raw,
  output logic clean
);
  localparam int unsigned CW = $clog2(STABLE_CYCLES + 1);

  logic          synced;
  logic [CW-1:0] count;

  synchronizer #(.WIDTH(1), .DEPTH(2), .RESET_VAL(RESET_VAL)) u_sync (
    .clk, .rst, .d(raw), .q(synced)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      clean <= RESET_VAL;
      count <= '0;
    end else if (synced == clean) begin
      count <= '0;
    end else if (count == CW'(STABLE_CYCLES - 1)) begin
      clean <= synced;
      count <= '0;
    end else begin
      count <= count + 1'b1;
    end
  end
endmodule
