// tb_tmds_encoder: encodes random and edge-case bytes and decodes each
// 10-bit word independently (undo the optional inversion flagged by bit 9,
// then the XOR/XNOR chain flagged by bit 8) to recover the byte. Also keeps
// its own running disparity of the transmitted words and checks that it
// stays within +/-10 bits during a long active run, that control periods
// send the four DVI control words, and that the output trails the input by
// one cycle.
module tb_tmds_encoder;
  logic clk = 0, rst = 1;
  logic [7:0] data;
  logic [1:0] ctrl;
  logic ve;
  logic [9:0] tmds;
  int checks = 0, failures = 0;

  tmds_encoder dut (.clk, .rst, .data, .ctrl, .ve, .tmds);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] decode(input logic [9:0] w);
    logic [7:0] q, d;
    q = w[9] ? ~w[7:0] : w[7:0];
    d[0] = q[0];
    for (int i = 1; i < 8; i++) d[i] = w[8] ? (q[i] ^ q[i-1]) : ~(q[i] ^ q[i-1]);
    return d;
  endfunction

  initial begin
    int disp, maxabs;
    logic [7:0] sent;
    logic [9:0] cw [4] = '{10'b1101010100, 10'b0010101011, 10'b0101010100, 10'b1010101011};
    data = 0; ctrl = 0; ve = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int c = 0; c < 4; c++) begin
      @(negedge clk); ve = 0; ctrl = 2'(c);
      @(negedge clk);
      checks++;
      if (tmds !== cw[c]) begin failures++; $display("FAIL control %0d: %b", c, tmds); end
    end
    disp = 0; maxabs = 0;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      ve = 1;
      sent = (n < 256) ? 8'(n) : (n % 7 == 0) ? 8'hFF : (n % 11 == 0) ? 8'h00 : 8'($urandom);
      data = sent;
      @(posedge clk); #1;
      checks++;
      if (decode(tmds) !== sent) begin
        failures++;
        if (failures < 5) $display("FAIL data %h word %b decodes to %h", sent, tmds, decode(tmds));
      end
      disp += $countones(tmds) - (10 - $countones(tmds));
      if (disp > maxabs) maxabs = disp;
      if (-disp > maxabs) maxabs = -disp;
    end
    checks++;
    if (maxabs > 10) begin failures++; $display("FAIL running disparity reached %0d", maxabs); end
    $display("max |disparity| = %0d", maxabs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
