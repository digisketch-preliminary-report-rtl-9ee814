// tb_diff_tx: sends random packets and decodes the line independently: each
// symbol starts at a falling edge, and its low time (P/2 sync, P/4 zero,
// 3P/4 one) and period P are measured. Checks the decoded 26 bits (MSB
// first), the closing half-period low, busy, and the total message length of
// P/2 + 27 P = 550 cycles for P = 20.
module tb_diff_tx;
  import digisketch_pkg::*;
  localparam int P = 20;
  logic clk = 0, rst = 1;
  logic trig;
  logic [PACKET_W-1:0] data;
  logic line, busy;
  int checks = 0, failures = 0;

  diff_tx #(.PERIOD(P)) dut (.clk, .rst, .trigger_in(trig), .data_in(data), .data_out(line), .busy);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // Sample the line each cycle; return the lengths of low and high runs.
  task automatic measure(output int lows[$], output int highs[$], output int total);
    int low_n, high_n, t;
    lows = {}; highs = {};
    t = 0;
    // wait for the first falling edge
    while (line) begin @(posedge clk); #1; t++; end
    total = 0;
    forever begin
      low_n = 0; high_n = 0;
      while (!line) begin @(posedge clk); #1; low_n++; total++; end
      while (line && high_n < 3 * P) begin @(posedge clk); #1; high_n++; end
      lows.push_back(low_n);
      if (high_n >= 3 * P) begin highs.push_back(-1); break; end
      highs.push_back(high_n);
      total += high_n;
    end
  endtask

  initial begin
    int lows[$], highs[$], total;
    logic [PACKET_W-1:0] got, sent;
    trig = 0; data = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    @(posedge clk); #1;
    check(line === 1'b1 && busy === 1'b0, "idle line high");
    for (int n = 0; n < 12; n++) begin
      data = (n == 0) ? '0 : (n == 1) ? '1 : PACKET_W'($urandom);
      @(negedge clk);
      sent = data;
      trig = 1;
      @(posedge clk); #1;
      trig = 0;
      data = PACKET_W'($urandom);   // must have been latched already
      check(busy === 1'b1, "busy after trigger");
      measure(lows, highs, total);
      check(lows.size() == 28, $sformatf("symbol count %0d", lows.size()));
      if (lows.size() == 28) begin
        check(lows[0] == P / 2 && highs[0] == P / 2, $sformatf("opening sync %0d %0d", lows[0], highs[0]));
        got = '0;
        for (int i = 1; i <= 26; i++) begin
          check(lows[i] + highs[i] == P, $sformatf("period of bit %0d", i));
          check(lows[i] == P / 4 || lows[i] == 3 * P / 4, $sformatf("duty of bit %0d", i));
          got = {got[PACKET_W-2:0], (lows[i] == 3 * P / 4)};
        end
        check(got === sent, $sformatf("packet %h expected %h", got, sent));
        check(lows[27] == P / 2, "closing sync low");
        check(total == 550, $sformatf("message length %0d cycles", total));
      end
      check(busy === 1'b0, "idle after message");
      repeat ($urandom_range(0, 5)) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
