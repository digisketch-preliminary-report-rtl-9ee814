// tb_synchronizer: checks that the synchronizer resets to its idle value and
// delays a random input by exactly DEPTH clock edges, for 1- and 3-stage chains.
module tb_synchronizer;
  logic clk = 0, rst = 1;
  logic [3:0] d, q2, q3;
  int checks = 0, failures = 0;
  logic [3:0] hist [8];

  synchronizer #(.WIDTH(4), .DEPTH(2), .RESET_VAL(1'b1)) dut2 (.clk, .rst, .d, .q(q2));
  synchronizer #(.WIDTH(4), .DEPTH(3), .RESET_VAL(1'b0)) dut3 (.clk, .rst, .d, .q(q3));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 4'h0;
    repeat (2) @(posedge clk);
    #1;
    checks += 2;
    if (q2 !== 4'hF) begin failures++; $display("FAIL reset value q2=%h", q2); end
    if (q3 !== 4'h0) begin failures++; $display("FAIL reset value q3=%h", q3); end
    rst = 0;
    for (int i = 0; i < 8; i++) hist[i] = 4'h0;
    for (int n = 0; n < 200; n++) begin
      d = 4'($urandom);
      @(posedge clk);
      #1;
      for (int i = 7; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = d;
      if (n >= 3) begin
        checks += 2;
        if (q2 !== hist[1]) begin failures++; $display("FAIL q2=%h exp %h", q2, hist[1]); end
        if (q3 !== hist[2]) begin failures++; $display("FAIL q3=%h exp %h", q3, hist[2]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
