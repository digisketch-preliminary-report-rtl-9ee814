// synchronizer: brings an asynchronous signal into the local clock domain.
//
// A chain of DEPTH flip-flops; the output is the input delayed by DEPTH clock
// edges. The report shows a synchronizer between the differential input
// buffer and the link logic but gives no depth; two stages are this design's
// choice. The reset value (RESET_VAL) is the idle level of the line, high.
module synchronizer #(
  parameter int unsigned WIDTH     = 1,
  parameter int unsigned DEPTH     = 2,
  parameter logic        RESET_VAL = 1'b1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] stages [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) stages[i] <= {WIDTH{RESET_VAL}};
    end else begin
      stages[0] <= d;
      for (int i = 1; i < DEPTH; i++) stages[i] <= stages[i-1];
    end
  end

  assign q = stages[DEPTH-1];
endmodule
