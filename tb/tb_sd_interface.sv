// tb_sd_interface: runs the SD interface against a behavioural SD card and a
// two-cycle-latency frame buffer model, with 3-sector images and a short
// dwell. Starting from a card that already holds two images (index 2), it
// checks: the index read at start-up; saving a drawing into slot 2 and the
// index becoming 3 on the card; the automatic slide show loading images 0, 1
// and 2 in turn, each held for the dwell time, then going idle and not
// restarting; the manual slide show waiting for next-image presses; drawing
// on a shown template and saving it as a new image (slot 3); reset_sd_card
// setting the index to 0 so the next save overwrites slot 0; and that the
// card never sees a request while busy.
module tb_sd_interface;
  import digisketch_pkg::*;
  localparam int IMG = 3, DWELL = 300, NPIX = IMG * 512;
  logic clk = 0, rst = 1;
  logic draw, ss, mss, nxt, rsd;
  logic sd_ready, sd_rd, sd_wr, rfnb, bav;
  logic [31:0] sd_addr, next_index, shown_index;
  logic [7:0] sd_din, sd_dout;
  logic [FB_AW-1:0] fb_addr;
  logic fb_we;
  logic [3:0] fb_wdata, fb_rdata, r1;
  sd_state_t state;
  int checks = 0, failures = 0;
  logic [3:0] fb [NPIX];

  sd_interface #(.DWELL_CYCLES(DWELL), .MAX_IMAGES(5), .IMG_SECTORS(IMG)) dut (
    .clk, .rst, .draw, .slide_show(ss), .manual_slide_show_enabled(mss), .next_image(nxt),
    .reset_sd_card(rsd), .sd_ready, .sd_rd, .sd_wr, .sd_addr, .sd_din,
    .sd_ready_for_next_byte(rfnb), .sd_dout, .sd_byte_available(bav),
    .fb_addr, .fb_we, .fb_wdata, .fb_rdata, .state, .next_index, .shown_index);

  sd_card_model #(.CMD_DELAY(10), .BYTE_GAP(4)) card (
    .clk, .rst, .ready(sd_ready), .rd(sd_rd), .wr(sd_wr), .addr(sd_addr), .din(sd_din),
    .ready_for_next_byte(rfnb), .dout(sd_dout), .byte_available(bav));

  always_ff @(posedge clk) begin
    r1       <= fb[int'(fb_addr) % NPIX];
    fb_rdata <= r1;
    if (fb_we) fb[int'(fb_addr) % NPIX] <= fb_wdata;
  end

  always #5 clk = ~clk;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic logic [3:0] pattern(input int img, input int p);
    return 4'((p * (img + 3) + img * 5 + (p >> 7)) & 15);
  endfunction

  function automatic int slot_byte(input int slot, input int p);
    return (1 + slot * IMG) * 512 + p;
  endfunction

  task automatic wait_state(input sd_state_t s, input int limit);
    int t = 0;
    while (state != s && t < limit) begin @(posedge clk); t++; end
    check(state == s, $sformatf("reached state %s", s.name()));
  endtask

  function automatic int card_index();
    return {card.peek(0), card.peek(1), card.peek(2), card.peek(3)};
  endfunction

  task automatic check_slot(input int slot, input int img, input string tag);
    int bad = 0;
    for (int p = 0; p < NPIX; p++)
      if (card.peek(slot_byte(slot, p)) !== {4'h0, pattern(img, p)}) bad++;
    check(bad == 0, $sformatf("%s: %0d bytes differ", tag, bad));
  endtask

  task automatic check_fb(input int img, input string tag);
    int bad = 0;
    for (int p = 0; p < NPIX; p++) if (fb[p] !== pattern(img, p)) bad++;
    check(bad == 0, $sformatf("%s: %0d pixels differ", tag, bad));
  endtask

  task automatic fill_fb(input int img);
    for (int p = 0; p < NPIX; p++) fb[p] = pattern(img, p);
  endtask

  initial begin
    int t0, t1;
    draw = 0; ss = 0; mss = 0; nxt = 0; rsd = 0;
    // card holds images 0 and 1, index 2
    for (int p = 0; p < NPIX; p++) begin
      card.poke(slot_byte(0, p), {4'h0, pattern(0, p)});
      card.poke(slot_byte(1, p), {4'h0, pattern(1, p)});
    end
    card.poke(3, 8'd2);
    for (int p = 0; p < NPIX; p++) fb[p] = 4'h0;
    repeat (3) @(negedge clk);
    rst = 0;
    wait_state(SD_IDLE, 10000);
    check(next_index == 2, $sformatf("index at start-up %0d", next_index));

    // --- save a drawing
    fill_fb(7);
    @(negedge clk) draw = 1;
    wait_state(SD_DRAWING, 100);
    repeat (50) @(negedge clk);
    draw = 0;
    wait_state(SD_IDLE, 100000);
    check_slot(2, 7, "saved drawing in slot 2");
    check(card_index() == 3 && next_index == 3, $sformatf("index after save %0d", card_index()));
    check_fb(7, "frame buffer untouched by saving");

    // --- automatic slide show
    @(negedge clk) ss = 1;
    for (int i = 0; i < 3; i++) begin
      wait_state(SD_SLIDE_SHOW_NEXT_IMAGE, 100000);
      t0 = $time;
      check(shown_index == i, $sformatf("showing image %0d", shown_index));
      check_fb((i == 2) ? 7 : i, $sformatf("slide %0d loaded", i));
      while (state == SD_SLIDE_SHOW_NEXT_IMAGE) @(posedge clk);
      t1 = $time;
      check((t1 - t0) / 10 >= DWELL && (t1 - t0) / 10 <= DWELL + 5,
            $sformatf("dwell %0d cycles", (t1 - t0) / 10));
    end
    check(state == SD_IDLE, "idle after last slide");
    repeat (2000) @(negedge clk);
    check(state == SD_IDLE, "slide show does not restart while switch stays on");
    ss = 0;
    repeat (5) @(negedge clk);

    // --- manual slide show, then draw on the template
    mss = 1;
    wait_state(SD_SLIDE_SHOW_NEXT_IMAGE, 100000);
    check_fb(0, "manual slide 0");
    repeat (3 * DWELL) @(negedge clk);
    check(state == SD_SLIDE_SHOW_NEXT_IMAGE && shown_index == 0, "manual waits for press");
    nxt = 1; repeat (3) @(negedge clk); nxt = 0;
    wait_state(SD_SLIDE_SHOW_NEXT_IMAGE, 100000);
    check(shown_index == 1, "manual press advanced");
    check_fb(1, "manual slide 1");
    // draw on the template: change part of it, then save
    draw = 1;
    wait_state(SD_DRAWING, 100);
    for (int p = 0; p < NPIX; p++) if (p % 3 == 0) fb[p] = pattern(9, p);
    repeat (20) @(negedge clk);
    draw = 0; mss = 0;
    wait_state(SD_IDLE, 100000);
    begin
      int bad = 0;
      for (int p = 0; p < NPIX; p++)
        if (card.peek(slot_byte(3, p)) !== {4'h0, (p % 3 == 0) ? pattern(9, p) : pattern(1, p)}) bad++;
      check(bad == 0, $sformatf("template drawing saved to slot 3: %0d bytes differ", bad));
    end
    check_slot(1, 1, "template slot 1 not overwritten");
    check(card_index() == 4, $sformatf("index after template save %0d", card_index()));

    // --- reset the card
    @(negedge clk) rsd = 1;
    wait_state(SD_OVERWRITE_ADDR, 1000);
    wait_state(SD_IDLE, 100000);
    check(card_index() == 0 && next_index == 0, $sformatf("index after reset %0d", card_index()));
    repeat (1000) @(negedge clk);
    check(state == SD_IDLE, "reset acts once while held");
    rsd = 0;
    fill_fb(11);
    draw = 1; repeat (20) @(negedge clk); draw = 0;
    wait_state(SD_IDLE, 100000);
    check_slot(0, 11, "save after reset overwrites slot 0");
    check(card_index() == 1, "index after save following reset");

    check(card.errors == 0, $sformatf("%0d card protocol errors", card.errors));
    $display("card reads %0d writes %0d", card.reads, card.writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
