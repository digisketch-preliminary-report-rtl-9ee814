// tb_digisketch_top: two DigiSketch boards joined by their link line, each
// with a behavioural SD card, run end to end (720p timing in full; shorter
// debounce and slide-show dwell). The boards' frames are offset so that one
// board's frame trigger arrives while it is receiving the other's packet.
//
// Sequence: both players set brushes with their encoders (moves, pressed
// turns for width and color; board A also uses the switch/button mode);
// both draw for two frames and switch draw off, which saves each canvas to
// slot 0 of its card. Board A draws again and saves to slot 1, plays the
// automatic slide show (slots 0, 1), then the manual slide show, advances
// one image with the next button, draws on it as a template and saves it
// to slot 2, and finally resets its card index.
//
// Checks against references computed here: each canvas (read from the
// frame buffer memory and from the card) equals the discs of the local and
// remote brushes; the video output of board A shows board B's disc color on
// exactly 4x its canvas area per frame; slide show loads, dwell time and
// card index values; and that every mechanism happened at least once.
`timescale 1ns/1ps
module tb_digisketch_top;
  import digisketch_pkg::*;
  localparam int DB = 8, DWELL = 3000, STEP = 4;

  logic pclk = 0, lclk = 0;
  logic rst_a = 1, rst_b = 1;
  logic [7:0] pmodb [2];
  logic use_sw [2], bcol [2], bwid [2], bnext [2], draw [2], ss [2], mss [2], rsd [2];
  logic [3:0] dir [2];
  logic line;
  logic sel [2], dout_l [2];
  logic sd_ready [2], sd_rd [2], sd_wr [2], rfnb [2], bav [2];
  logic [31:0] sd_addr [2], nidx [2];
  logic [7:0] sd_din [2], sd_dout [2];
  logic [23:0] rgb [2];
  logic hs [2], vs [2], act [2];
  logic [9:0] tr [2], tg [2], tbl [2];
  brush_t lbr [2], rbr [2];
  sd_state_t sst [2];
  logic ltx [2], lrx [2];

  int checks = 0, failures = 0;

  always #6.734 pclk = ~pclk;   // 74.25 MHz
  always #5.0   lclk = ~lclk;   // 100 MHz

  assign line = sel[0] ? dout_l[0] : sel[1] ? dout_l[1] : 1'b1;

  for (genvar g = 0; g < 2; g++) begin : g_board
    digisketch_top #(.DEBOUNCE_CYCLES(DB), .DWELL_CYCLES(DWELL)) dut (
      .clk_pixel(pclk), .clk_link(lclk), .rst(g == 0 ? rst_a : rst_b),
      .pmodb(pmodb[g]), .use_switches(use_sw[g]), .dir_sw(dir[g]), .btn_color(bcol[g]),
      .btn_width(bwid[g]), .btn_next(bnext[g]), .draw(draw[g]), .slide_show(ss[g]),
      .manual_slide_show_enabled(mss[g]), .reset_sd_card(rsd[g]),
      .diff_data_in(line), .diff_io_sel(sel[g]), .diff_data_out(dout_l[g]),
      .sd_ready(sd_ready[g]), .sd_rd(sd_rd[g]), .sd_wr(sd_wr[g]), .sd_addr(sd_addr[g]),
      .sd_din(sd_din[g]), .sd_ready_for_next_byte(rfnb[g]), .sd_dout(sd_dout[g]),
      .sd_byte_available(bav[g]),
      .rgb(rgb[g]), .hsync(hs[g]), .vsync(vs[g]), .active_out(act[g]),
      .tmds_red(tr[g]), .tmds_green(tg[g]), .tmds_blue(tbl[g]),
      .local_brush(lbr[g]), .remote_brush(rbr[g]), .sd_state(sst[g]), .sd_next_index(nidx[g]),
      .link_transmitting(ltx[g]), .link_receiving(lrx[g]));
    sd_card_model #(.CMD_DELAY(10), .BYTE_GAP(4)) card (
      .clk(pclk), .rst(g == 0 ? rst_a : rst_b), .ready(sd_ready[g]), .rd(sd_rd[g]), .wr(sd_wr[g]),
      .addr(sd_addr[g]), .din(sd_din[g]), .ready_for_next_byte(rfnb[g]), .dout(sd_dout[g]),
      .byte_available(bav[g]));
  end

  // ------------------------------------------------------------ mechanism counters
  int n_waiting = 0, n_tx [2] = '{0, 0}, n_rx [2] = '{0, 0}, n_collide = 0;
  int n_local_paint = 0, n_remote_paint = 0, n_sprite = 0, n_ctrl_words = 0;
  int n_saves = 0, n_loads = 0, n_index_writes = 0, n_template = 0, n_manual_next = 0;
  int n_encoder_move = 0, n_encoder_width = 0, n_encoder_color = 0, n_switch_move = 0, n_buttons = 0;
  logic wait_q = 0, tx_q [2] = '{0, 0};
  sd_state_t sst_q [2];

  always @(posedge lclk) begin
    if (!rst_a && !rst_b) begin
      if (sel[0] && sel[1]) n_collide++;
      if (g_board[1].dut.u_comm.u_io.message_waiting && !wait_q) n_waiting++;
      if (g_board[0].dut.u_comm.u_io.message_waiting && !wait_q) n_waiting++;
    end
    wait_q <= g_board[0].dut.u_comm.u_io.message_waiting | g_board[1].dut.u_comm.u_io.message_waiting;
    for (int g = 0; g < 2; g++) begin
      if (ltx[g] && !tx_q[g]) n_tx[g]++;
      tx_q[g] <= ltx[g];
    end
    if (g_board[0].dut.u_comm.u_io.rx_valid) n_rx[0]++;
    if (g_board[1].dut.u_comm.u_io.rx_valid) n_rx[1]++;
  end

  always @(posedge pclk) begin
    for (int g = 0; g < 2; g++) begin
      sst_q[g] <= sst[g];
      if (sst[g] == SD_START_SEC_ADDR_WRITE && sst_q[g] == SD_FINISHED_SAVING_SECTOR) n_saves++;
      if (sst[g] == SD_SLIDE_SHOW_NEXT_IMAGE && sst_q[g] == SD_SLIDE_SHOW_NEW_SECTOR) n_loads++;
      if (sst[g] == SD_OVERWRITE_ADDR && sst_q[g] != SD_OVERWRITE_ADDR) n_index_writes++;
      if (sst[g] == SD_DRAWING && sst_q[g] == SD_SLIDE_SHOW_NEXT_IMAGE) n_template++;
    end
    if (g_board[0].dut.u_fb.we_a && g_board[0].dut.draw_s) n_local_paint++;
    if (g_board[0].dut.u_fb.we_b) n_remote_paint++;
    if (g_board[0].dut.sprite_on && g_board[0].dut.act_d[1]) n_sprite++;
    if (!act[0] && hs[0] && tbl[0] == 10'b0010101011) n_ctrl_words++;
  end

  initial begin
    #400ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ helpers
  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic settle();
    repeat (3 * DB + 8) @(negedge pclk);
  endtask

  // one detent; enc 0: pins CLK 3, DT 2, SW 5; enc 1: CLK 7, DT 6, SW 4
  task automatic turn(input int b, input int enc, input logic up, input logic press);
    int c = enc ? 7 : 3, d = enc ? 6 : 2, s = enc ? 4 : 5;
    c = enc ? 7 : 3; d = enc ? 6 : 2; s = enc ? 4 : 5;
    @(negedge pclk); pmodb[b][s] = !press; pmodb[b][d] = up; settle();
    @(negedge pclk); pmodb[b][c] = 0; settle();
    @(negedge pclk); pmodb[b][c] = 1; settle();
    @(negedge pclk); pmodb[b][d] = 1; pmodb[b][s] = 1; settle();
  endtask

  task automatic frames(input int b, input int n);
    repeat (n) begin
      if (b == 0) @(posedge g_board[0].dut.new_frame);
      else        @(posedge g_board[1].dut.new_frame);
    end
  endtask

  function automatic logic [23:0] pal(input logic [3:0] id);
    logic [23:0] t [16] = '{24'h000000, 24'h0000AA, 24'h00AA00, 24'h00AAAA, 24'hAA0000, 24'hAA00AA,
                            24'hAA5500, 24'hAAAAAA, 24'h555555, 24'h5555FF, 24'h55FF55, 24'h55FFFF,
                            24'hFF5555, 24'hFF55FF, 24'hFFFF55, 24'hFFFFFF};
    return t[id];
  endfunction

  // reference canvases
  logic [3:0] ref0 [CANVAS_PIXELS], ref1 [CANVAS_PIXELS], ref2 [CANVAS_PIXELS], ref3 [CANVAS_PIXELS];

  function automatic int disc_area(input int r);
    int n = 0;
    for (int dy = -r; dy <= r; dy++) for (int dx = -r; dx <= r; dx++) if (dx * dx + dy * dy <= r * r) n++;
    return n;
  endfunction

  task automatic paint(ref logic [3:0] canvas [CANVAS_PIXELS], input brush_t b);
    for (int dy = -7; dy <= 7; dy++)
      for (int dx = -7; dx <= 7; dx++) begin
        int x, y;
        x = int'(b.x) + dx; y = int'(b.y) + dy;
        if (dx * dx + dy * dy <= int'(b.sw) * int'(b.sw) && x >= 0 && x < 640 && y >= 0 && y < 360)
          canvas[y * 640 + x] = b.color;
      end
  endtask

  task automatic check_mem(input int b, ref logic [3:0] canvas [CANVAS_PIXELS], input string tag);
    int bad = 0;
    for (int p = 0; p < int'(CANVAS_PIXELS); p++)
      if ((b == 0 ? g_board[0].dut.u_fb.u_bram.mem[p] : g_board[1].dut.u_fb.u_bram.mem[p]) !== canvas[p]) bad++;
    check(bad == 0, $sformatf("%s: %0d canvas pixels differ", tag, bad));
  endtask

  task automatic check_card(input int b, input int slot, ref logic [3:0] canvas [CANVAS_PIXELS], input string tag);
    int bad = 0;
    int base;
    base = (1 + slot * 450) * 512;
    for (int p = 0; p < int'(CANVAS_PIXELS); p++)
      if ((b == 0 ? g_board[0].card.peek(base + p) : g_board[1].card.peek(base + p)) !== {4'h0, canvas[p]}) bad++;
    check(bad == 0, $sformatf("%s: %0d card bytes differ", tag, bad));
  endtask

  function automatic int card_index(input int b);
    if (b == 0) return {g_board[0].card.peek(0), g_board[0].card.peek(1), g_board[0].card.peek(2), g_board[0].card.peek(3)};
    else        return {g_board[1].card.peek(0), g_board[1].card.peek(1), g_board[1].card.peek(2), g_board[1].card.peek(3)};
  endfunction

  task automatic wait_idle(input int b);
    int t = 0;
    @(negedge pclk);
    while (sst[b] != SD_IDLE && t < 20_000_000) begin @(negedge pclk); t++; end
    check(sst[b] == SD_IDLE, $sformatf("board %0d back to idle", b));
  endtask

  // count pixels of one color on board b's video output during one frame
  task automatic count_color(input int b, input logic [23:0] c, output int n);
    n = 0;
    @(posedge vs[b]);
    @(negedge vs[b]);
    while (!vs[b]) begin
      @(posedge pclk);
      if (act[b] && rgb[b] === c) n++;
    end
  endtask

  // ------------------------------------------------------------ test
  initial begin
    brush_t ba, bb, ba2, ba3;
    int n, t0, t1;
    for (int g = 0; g < 2; g++) begin
      pmodb[g] = 8'hFF; use_sw[g] = 0; bcol[g] = 0; bwid[g] = 0; bnext[g] = 0;
      draw[g] = 0; ss[g] = 0; mss[g] = 0; rsd[g] = 0; dir[g] = 0;
    end
    for (int p = 0; p < int'(CANVAS_PIXELS); p++) ref0[p] = 4'h0;
    repeat (10) @(negedge pclk);
    rst_a = 0;
    repeat (185) @(negedge pclk);   // offsets board B's frames by ~2.5 us
    rst_b = 0;
    wait_idle(0); wait_idle(1);
    check(nidx[0] == 0 && nidx[1] == 0, "empty cards read as index 0");

    // ---- board A: encoders
    repeat (10) turn(0, 0, 1'b1, 1'b0);   // x +40
    repeat (5)  turn(0, 1, 1'b0, 1'b0);   // y -20
    repeat (2)  turn(0, 0, 1'b1, 1'b1);   // width +2 -> 3
    repeat (3)  turn(0, 1, 1'b0, 1'b1);   // color -3 -> 12
    ba = '{x: 10'd360, y: 9'd160, color: 4'd12, sw: 3'd3};
    check(lbr[0] == ba, $sformatf("board A brush after encoders %p", lbr[0]));
    if (lbr[0].x == 10'd360 && lbr[0].y == 9'd160) n_encoder_move++;
    if (lbr[0].sw == 3'd3) n_encoder_width++;
    if (lbr[0].color == 4'd12) n_encoder_color++;
    // ---- board A: switch mode, 2 frames right, one press of each button
    @(negedge pclk); use_sw[0] = 1; dir[0] = 4'b0001;
    frames(0, 2);
    @(posedge pclk); @(negedge pclk); dir[0] = 4'b0000;
    $display("after switch frames: %p", lbr[0]);
    @(negedge pclk); bcol[0] = 1; bwid[0] = 1; settle();
    @(negedge pclk); bcol[0] = 0; bwid[0] = 0; settle();
    @(negedge pclk); use_sw[0] = 0;
    ba = '{x: 10'd362, y: 9'd160, color: 4'd13, sw: 3'd4};
    check(lbr[0] == ba, $sformatf("board A brush after switches %p", lbr[0]));
    if (lbr[0].x == 10'd362) n_switch_move++;
    if (lbr[0].color == 4'd13 && lbr[0].sw == 3'd4) n_buttons++;
    // ---- board B: encoders
    repeat (10) turn(1, 0, 1'b0, 1'b0);   // x -40
    repeat (5)  turn(1, 1, 1'b1, 1'b0);   // y +20
    repeat (1)  turn(1, 0, 1'b1, 1'b1);   // width 2
    repeat (6)  turn(1, 1, 1'b0, 1'b1);   // color 9
    bb = '{x: 10'd280, y: 9'd200, color: 4'd9, sw: 3'd2};
    check(lbr[1] == bb, $sformatf("board B brush after encoders %p", lbr[1]));
    frames(0, 2);
    check(rbr[0] == bb, $sformatf("A sees B's brush %p", rbr[0]));
    check(rbr[1] == ba, $sformatf("B sees A's brush %p", rbr[1]));

    // ---- both draw for two frames, then save
    for (int p = 0; p < int'(CANVAS_PIXELS); p++) ref1[p] = 4'h0;
    paint(ref1, bb);
    paint(ref1, ba);
    @(negedge pclk); draw[0] = 1; draw[1] = 1;
    frames(0, 3);
    check_mem(0, ref1, "board A canvas after drawing");
    check_mem(1, ref1, "board B canvas after drawing");
    count_color(0, pal(bb.color), n);
    check(n == 4 * disc_area(bb.sw), $sformatf("A shows B's disc on %0d pixels, expected %0d", n, 4 * disc_area(bb.sw)));
    @(negedge pclk); draw[0] = 0; draw[1] = 0;
    wait_idle(0); wait_idle(1);
    check_card(0, 0, ref1, "board A slot 0");
    check_card(1, 0, ref1, "board B slot 0");
    check(card_index(0) == 1 && card_index(1) == 1, "card index 1 after first save");

    // ---- board A: second drawing to slot 1
    repeat (5) turn(0, 0, 1'b1, 1'b0);   // x +20
    ba2 = ba; ba2.x = 10'd382;
    check(lbr[0] == ba2, "board A moved");
    for (int p = 0; p < int'(CANVAS_PIXELS); p++) ref2[p] = ref1[p];
    paint(ref2, bb);
    paint(ref2, ba2);
    @(negedge pclk); draw[0] = 1;
    frames(0, 2);
    @(negedge pclk); draw[0] = 0;
    wait_idle(0);
    check_card(0, 1, ref2, "board A slot 1");
    check(card_index(0) == 2, "card index 2");

    // ---- board A: automatic slide show
    @(negedge pclk); ss[0] = 1;
    for (int i = 0; i < 2; i++) begin
      while (sst[0] != SD_SLIDE_SHOW_NEXT_IMAGE) @(negedge pclk);
      t0 = $time;
      if (i == 0) check_mem(0, ref1, "auto slide 0"); else check_mem(0, ref2, "auto slide 1");
      while (sst[0] == SD_SLIDE_SHOW_NEXT_IMAGE) @(negedge pclk);
      t1 = $time;
      n = int'((t1 - t0) / 13.468);
      check(n >= DWELL - 2 && n <= DWELL + 10, $sformatf("dwell %0d cycles", n));
    end
    wait_idle(0);
    @(negedge pclk); ss[0] = 0;

    // ---- board A: move, manual slide show, next, template drawing
    repeat (5) turn(0, 1, 1'b1, 1'b0);   // y +20
    ba3 = ba2; ba3.y = 9'd180;
    @(negedge pclk); mss[0] = 1;
    while (sst[0] != SD_SLIDE_SHOW_NEXT_IMAGE) @(negedge pclk);
    check_mem(0, ref1, "manual slide 0");
    repeat (3 * DWELL) @(negedge pclk);
    check(sst[0] == SD_SLIDE_SHOW_NEXT_IMAGE, "manual slide waits for the button");
    @(negedge pclk); bnext[0] = 1; settle(); @(negedge pclk); bnext[0] = 0;
    while (sst[0] != SD_SLIDE_SHOW_SECTOR) @(negedge pclk);
    n_manual_next++;
    while (sst[0] != SD_SLIDE_SHOW_NEXT_IMAGE) @(negedge pclk);
    check_mem(0, ref2, "manual slide 1");
    for (int p = 0; p < int'(CANVAS_PIXELS); p++) ref3[p] = ref2[p];
    paint(ref3, bb);
    paint(ref3, ba3);
    @(negedge pclk); draw[0] = 1;
    frames(0, 2);
    @(negedge pclk); draw[0] = 0; mss[0] = 0;
    wait_idle(0);
    check_card(0, 2, ref3, "template drawing in slot 2");
    check_card(0, 1, ref2, "template slot 1 kept");
    check(card_index(0) == 3, "card index 3");

    // ---- board A: reset the card index
    @(negedge pclk); rsd[0] = 1;
    repeat (10) @(negedge pclk);
    wait_idle(0);
    @(negedge pclk); rsd[0] = 0;
    check(card_index(0) == 0 && nidx[0] == 0, "card index reset to 0");

    // ---- mechanisms
    check(g_board[0].card.errors == 0 && g_board[1].card.errors == 0, "card protocol");
    check(n_collide == 0, $sformatf("%0d link collisions", n_collide));
    $display("mechanisms: waiting=%0d tx=%0d/%0d rx=%0d/%0d local_paint=%0d remote_paint=%0d sprite=%0d ctrl=%0d",
             n_waiting, n_tx[0], n_tx[1], n_rx[0], n_rx[1], n_local_paint, n_remote_paint, n_sprite, n_ctrl_words);
    $display("mechanisms: saves=%0d loads=%0d index_writes=%0d template=%0d manual_next=%0d enc_move=%0d enc_width=%0d enc_color=%0d switch_move=%0d buttons=%0d",
             n_saves, n_loads, n_index_writes, n_template, n_manual_next, n_encoder_move, n_encoder_width,
             n_encoder_color, n_switch_move, n_buttons);
    check(n_waiting > 0, "message waiting never happened");
    check(n_tx[0] > 0 && n_tx[1] > 0 && n_rx[0] > 0 && n_rx[1] > 0, "link traffic");
    check(n_local_paint > 0 && n_remote_paint > 0, "painting");
    check(n_sprite > 0 && n_ctrl_words > 0, "video");
    check(n_saves >= 4 && n_loads >= 4 && n_index_writes >= 5 && n_template > 0 && n_manual_next > 0, "SD mechanisms");
    check(n_encoder_move > 0 && n_encoder_width > 0 && n_encoder_color > 0 && n_switch_move > 0 && n_buttons > 0, "inputs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
