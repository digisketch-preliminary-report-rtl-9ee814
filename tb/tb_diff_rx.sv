// tb_diff_rx: drives the line with independently generated waveforms and
// checks the receiver: well-formed messages with nominal timing and with
// every low/high part stretched or shrunk by up to the margin are received
// exactly once with the right packet; messages with a bad sync, a bad data
// duty cycle, or cut short are rejected (no valid) and do not disturb the
// next message.
module tb_diff_rx;
  import digisketch_pkg::*;
  localparam int P = 20, M = 3;
  logic clk = 0, rst = 1;
  logic line;
  logic [PACKET_W-1:0] dout;
  logic valid, busy;
  int checks = 0, failures = 0;
  int nvalid = 0;
  logic [PACKET_W-1:0] last;

  diff_rx #(.PERIOD(P), .MARGIN(M)) dut (.clk, .rst, .signal_in(line), .data_out(dout), .valid, .busy);

  always #5 clk = ~clk;
  always @(posedge clk) if (valid) begin nvalid++; last = dout; end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic level(input logic v, input int n);
    line = v;
    repeat (n) @(posedge clk);
  endtask

  function automatic int jit(input int j);
    return (j == 0) ? 0 : $urandom_range(0, 2 * j) - j;
  endfunction

  // mode 0: good; 1: bad sync; 2: bad bit duty (half); 3: truncated
  task automatic send(input logic [PACKET_W-1:0] d, input int j, input int mode);
    level(0, (mode == 1) ? P / 4 : P / 2 + jit(j));
    level(1, P / 2 + jit(j));
    for (int i = PACKET_W - 1; i >= 0; i--) begin
      if (mode == 3 && i == 10) begin level(1, 4 * P); return; end
      if (mode == 2 && i == 13) begin level(0, P / 2); level(1, P / 2); continue; end
      level(0, (d[i] ? 3 * P / 4 : P / 4) + jit(j));
      level(1, (d[i] ? P / 4 : 3 * P / 4) + jit(j));
    end
    level(0, P / 2);
    level(1, 2 * P);
  endtask

  initial begin
    logic [PACKET_W-1:0] d;
    int n_before;
    line = 1;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (5) @(posedge clk);
    for (int n = 0; n < 40; n++) begin
      int mode;
      d = (n == 0) ? '0 : (n == 1) ? '1 : PACKET_W'($urandom);
      mode = (n < 10) ? 0 : (n % 4);
      n_before = nvalid;
      send(d, (n < 5) ? 0 : M, mode);
      if (mode == 0) begin
        check(nvalid == n_before + 1, $sformatf("msg %0d received once (%0d)", n, nvalid - n_before));
        check(last === d, $sformatf("msg %0d data %h expected %h", n, last, d));
      end else begin
        check(nvalid == n_before, $sformatf("msg %0d mode %0d rejected", n, mode));
      end
      check(busy === 1'b0, $sformatf("idle after msg %0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
