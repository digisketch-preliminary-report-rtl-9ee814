// fb_bram: true dual-port block RAM with a two-cycle read latency.
//
// Both ports share one clock and can each read and write. A write takes
// effect at the clock edge it is presented on; a read returns the word as it
// was before any write of the same edge (read-first) two edges later, the
// second edge being an output register, which matches the report's "one
// cycle to write, two cycles to read". If both ports write the same address
// on the same edge, port A wins. The contents start at zero. Written so that
// FPGA tools infer a block RAM.
module fb_bram #(
  parameter int unsigned WIDTH = 4,
  parameter int unsigned DEPTH = 230400,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic [AW-1:0]    addr_a,
  input  logic             we_a,
  input  logic [WIDTH-1:0] din_a,
  output logic [WIDTH-1:0] dout_a,
  input  logic [AW-1:0]    addr_b,
  input  logic             we_b,
  input  logic [WIDTH-1:0] din_b,
  output logic [WIDTH-1:0] dout_b
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [WIDTH-1:0] ra, rb;

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    ra     <= mem[addr_a];
    rb     <= mem[addr_b];
    dout_a <= ra;
    dout_b <= rb;
    if (we_b) mem[addr_b] <= din_b;
    if (we_a) mem[addr_a] <= din_a;
  end
endmodule
