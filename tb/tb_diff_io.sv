// tb_diff_io: two diff_io instances on one shared line (pulled high when
// neither drives, like the pull-up on the real pair). Checks that a packet
// from A reaches B and vice versa, that a trigger arriving at B while it
// receives is held (message waiting) and sent right after, within
// 2 x 550 cycles plus a few cycles of synchronisation, that the two sides
// never drive the line at the same time, and that the received data match.
module tb_diff_io;
  import digisketch_pkg::*;
  localparam int P = 20;
  logic clk = 0, rst = 1;
  logic trig_a, trig_b;
  logic [PACKET_W-1:0] tx_a, tx_b, rx_a, rx_b;
  logic sel_a, sel_b, out_a, out_b, v_a, v_b, tr_a, tr_b, rc_a, rc_b;
  logic line, line_a, line_b;
  int checks = 0, failures = 0, collisions = 0, waited = 0;

  assign line = sel_a ? out_a : sel_b ? out_b : 1'b1;

  synchronizer #(.WIDTH(1), .DEPTH(2), .RESET_VAL(1'b1)) sa (.clk, .rst, .d(line), .q(line_a));
  synchronizer #(.WIDTH(1), .DEPTH(2), .RESET_VAL(1'b1)) sb (.clk, .rst, .d(line), .q(line_b));

  diff_io #(.PERIOD(P)) a (.clk, .rst, .trigger_in(trig_a), .tx_data(tx_a), .line_in(line_a),
    .io_sel(sel_a), .line_out(out_a), .rx_data(rx_a), .rx_valid(v_a), .transmitting(tr_a), .receiving(rc_a));
  diff_io #(.PERIOD(P)) b (.clk, .rst, .trigger_in(trig_b), .tx_data(tx_b), .line_in(line_b),
    .io_sel(sel_b), .line_out(out_b), .rx_data(rx_b), .rx_valid(v_b), .transmitting(tr_b), .receiving(rc_b));

  always #5 clk = ~clk;
  always @(posedge clk) if (!rst && sel_a && sel_b) begin collisions++; $display("collision t=%0t A=%0d B=%0d", $time, a.state, b.state); end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    logic [PACKET_W-1:0] da, db;
    int t0, t;
    trig_a = 0; trig_b = 0; tx_a = '0; tx_b = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (5) @(posedge clk);
    for (int n = 0; n < 10; n++) begin
      // A sends alone
      da = PACKET_W'($urandom);
      @(negedge clk); tx_a = da; trig_a = 1; @(negedge clk); trig_a = 0;
      t = 0;
      while (!v_b && t < 2000) begin @(posedge clk); t++; end
      check(v_b && rx_b === da, $sformatf("A->B %h got %h", da, rx_b));
      check(t <= 560, $sformatf("A->B latency %0d", t));
      repeat (50) @(posedge clk);
      // B sends alone
      db = PACKET_W'($urandom);
      @(negedge clk); tx_b = db; trig_b = 1; @(negedge clk); trig_b = 0;
      t = 0;
      while (!v_a && t < 2000) begin @(posedge clk); t++; end
      check(v_a && rx_a === db, $sformatf("B->A %h got %h", db, rx_a));
      repeat (50) @(posedge clk);
      // A sends; B is triggered while receiving and must wait
      da = PACKET_W'($urandom);
      db = PACKET_W'($urandom);
      @(negedge clk); tx_a = da; trig_a = 1; @(negedge clk); trig_a = 0;
      while (!rc_b) @(posedge clk);
      repeat ($urandom_range(10, 400)) @(posedge clk);
      check(rc_b === 1'b1, "B still receiving");
      @(negedge clk); tx_b = db; trig_b = 1; @(negedge clk); trig_b = 0;
      t0 = $time;
      tx_b = PACKET_W'($urandom);     // the held copy must be sent
      if (b.message_waiting) waited++;
      t = 0;
      while (!v_a && t < 3000) begin @(posedge clk); t++; end
      check(v_a && rx_a === db, $sformatf("waiting B->A %h got %h", db, rx_a));
      check(t <= 2 * 550 + 10, $sformatf("waiting latency %0d", t));
      check(rx_b === da, "A->B during wait");
      repeat (100) @(posedge clk);
    end
    check(collisions == 0, $sformatf("%0d cycles with both driving", collisions));
    check(waited > 0, "message_waiting never happened");
    $display("message_waiting occurrences: %0d", waited);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
