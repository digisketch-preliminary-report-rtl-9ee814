// tb_comm_module: two boards' communication modules joined by a shared,
// pulled-up line, each with its own pixel clock (74.25 MHz-like) and link
// clock (100 MHz-like), with different phases. Each new_frame on one side
// must make that side's brush appear as remote_brush on the other side,
// with remote_update pulsing and remote_seen set, and the two sides must
// never drive the line together.
module tb_comm_module;
  import digisketch_pkg::*;
  logic pclk_a = 0, pclk_b = 0, lclk_a = 0, lclk_b = 0;
  logic rst = 1;
  logic nf_a, nf_b;
  brush_t br_a, br_b, rem_a, rem_b;
  logic seen_a, seen_b, upd_a, upd_b;
  logic sel_a, sel_b, out_a, out_b, line;
  logic tr_a, tr_b, rc_a, rc_b;
  int checks = 0, failures = 0, collisions = 0, upd_cnt_a = 0, upd_cnt_b = 0;

  assign line = sel_a ? out_a : sel_b ? out_b : 1'b1;

  always #6.7 pclk_a = ~pclk_a;
  always #6.9 pclk_b = ~pclk_b;
  always #5.0 lclk_a = ~lclk_a;
  always #5.1 lclk_b = ~lclk_b;

  comm_module a (.clk_pixel(pclk_a), .rst_pixel(rst), .clk_link(lclk_a), .rst_link(rst),
    .new_frame(nf_a), .local_brush(br_a), .remote_brush(rem_a), .remote_seen(seen_a),
    .remote_update(upd_a), .line_in(line), .io_sel(sel_a), .line_out(out_a),
    .transmitting(tr_a), .receiving(rc_a));
  comm_module b (.clk_pixel(pclk_b), .rst_pixel(rst), .clk_link(lclk_b), .rst_link(rst),
    .new_frame(nf_b), .local_brush(br_b), .remote_brush(rem_b), .remote_seen(seen_b),
    .remote_update(upd_b), .line_in(line), .io_sel(sel_b), .line_out(out_b),
    .transmitting(tr_b), .receiving(rc_b));

  always @(posedge lclk_a) if (!rst && sel_a && sel_b) collisions++;
  always @(posedge pclk_a) if (upd_a) upd_cnt_a++;
  always @(posedge pclk_b) if (upd_b) upd_cnt_b++;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    brush_t sa, sb;
    int ua, ub;
    nf_a = 0; nf_b = 0; br_a = '0; br_b = '0;
    #200 rst = 0;
    #200;
    check(!seen_a && !seen_b, "nothing seen before any packet");
    for (int n = 0; n < 8; n++) begin
      sa = brush_t'($urandom); sb = brush_t'($urandom);
      ua = upd_cnt_b; ub = upd_cnt_a;
      @(negedge pclk_a); br_a = sa; nf_a = 1; @(negedge pclk_a); nf_a = 0;
      br_a = brush_t'($urandom);   // the sampled copy must be the one sent
      #(200 + 37 * n);
      @(negedge pclk_b); br_b = sb; nf_b = 1; @(negedge pclk_b); nf_b = 0;
      #20000;
      check(upd_cnt_b == ua + 1, $sformatf("B got %0d updates", upd_cnt_b - ua));
      check(upd_cnt_a == ub + 1, $sformatf("A got %0d updates", upd_cnt_a - ub));
      check(rem_b === sa, $sformatf("B remote %h expected %h", rem_b, sa));
      check(rem_a === sb, $sformatf("A remote %h expected %h", rem_a, sb));
      check(seen_a && seen_b, "remote_seen");
    end
    check(collisions == 0, $sformatf("%0d collisions", collisions));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
