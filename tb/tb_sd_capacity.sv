// tb_sd_capacity: the card-capacity case at the SD interface's default
// parameters (450-sector images, 9320 slots, as sized for a 2 GB card).
// The behavioural card starts with the index at 9319, so one slot is left.
// The test draws and saves a full 640 x 360 canvas, then checks three things:
// every byte landed in the last slot (sectors 1 + 9319 * 450 onward, ending
// at byte 2,147,328,511, inside the 2^31-byte card), the index on the card
// became 9320, and the highest address written is below 2^31. A second save
// attempt is then made; with every slot used the interface must write
// nothing and leave the index at 9320. The frame buffer is modelled here
// with the same two-cycle read latency as the real one. That the card holds
// 9320 images is the report's figure; the slot layout and the skip-when-full
// behaviour are this design's. Last, the automatic slide show is started and
// the first image must be held for the default dwell of 74,250,000 cycles
// (about 1 s, as the report asks) before the next one is fetched.
module tb_sd_capacity;
  import digisketch_pkg::*;
  localparam int unsigned LAST = 9319;
  localparam longint unsigned CARD_BYTES = 64'd1 << 31;
  logic clk = 0, rst = 1;
  logic draw, ss;
  longint unsigned cycle = 0;
  logic sd_ready, sd_rd, sd_wr, rfnb, bav;
  logic [31:0] sd_addr, next_index, shown_index;
  logic [7:0] sd_din, sd_dout;
  logic [FB_AW-1:0] fb_addr;
  logic fb_we;
  logic [3:0] fb_wdata, fb_rdata, r1;
  sd_state_t state;
  int checks = 0, failures = 0;
  logic [3:0] fb [CANVAS_PIXELS];
  longint unsigned max_wr_addr = 0;

  sd_interface dut (
    .clk, .rst, .draw, .slide_show(ss), .manual_slide_show_enabled(1'b0), .next_image(1'b0),
    .reset_sd_card(1'b0), .sd_ready, .sd_rd, .sd_wr, .sd_addr, .sd_din,
    .sd_ready_for_next_byte(rfnb), .sd_dout, .sd_byte_available(bav),
    .fb_addr, .fb_we, .fb_wdata, .fb_rdata, .state, .next_index, .shown_index);

  sd_card_model #(.CMD_DELAY(10), .BYTE_GAP(4)) card (
    .clk, .rst, .ready(sd_ready), .rd(sd_rd), .wr(sd_wr), .addr(sd_addr), .din(sd_din),
    .ready_for_next_byte(rfnb), .dout(sd_dout), .byte_available(bav));

  always_ff @(posedge clk) begin
    r1       <= fb[fb_addr];
    fb_rdata <= r1;
    if (fb_we) fb[fb_addr] <= fb_wdata;
  end

  // highest byte address of any sector written
  always_ff @(posedge clk)
    if (!rst && sd_wr && longint'(sd_addr) + 511 > max_wr_addr) max_wr_addr <= longint'(sd_addr) + 511;

  always #5 clk = ~clk;
  always_ff @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (90_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic logic [3:0] pattern(input int p);
    return 4'((p * 7 + (p >> 9) * 3) & 15);
  endfunction

  task automatic wait_state(input sd_state_t s, input int limit);
    int t = 0;
    while (state != s && t < limit) begin @(posedge clk); t++; end
    check(state == s, $sformatf("reached state %s", s.name()));
  endtask

  function automatic int unsigned card_index();
    return {card.peek(0), card.peek(1), card.peek(2), card.peek(3)};
  endfunction

  task automatic save();
    @(negedge clk) draw = 1;
    wait_state(SD_DRAWING, 100);
    repeat (20) @(negedge clk);
    draw = 0;
    wait_state(SD_IDLE, 2_000_000);
  endtask

  initial begin
    longint unsigned base;
    int bad;
    int unsigned writes_before;
    longint unsigned t0;
    draw = 0; ss = 0;
    card.poke(0, 8'(LAST >> 24));
    card.poke(1, 8'(LAST >> 16));
    card.poke(2, 8'(LAST >> 8));
    card.poke(3, 8'(LAST));
    for (int p = 0; p < int'(CANVAS_PIXELS); p++) fb[p] = pattern(p);
    repeat (3) @(negedge clk);
    rst = 0;
    wait_state(SD_IDLE, 10000);
    check(next_index == LAST, $sformatf("index at start-up %0d", next_index));

    // --- the last free slot
    save();
    base = (1 + longint'(LAST) * 450) * 512;
    bad = 0;
    for (int p = 0; p < int'(CANVAS_PIXELS); p++)
      if (card.peek(32'(base + longint'(p))) !== {4'h0, pattern(p)}) bad++;
    check(bad == 0, $sformatf("last slot: %0d bytes differ", bad));
    check(card_index() == LAST + 1 && next_index == LAST + 1,
          $sformatf("index after the last save %0d", card_index()));
    check(max_wr_addr == base + CANVAS_PIXELS - 1,
          $sformatf("highest byte written %0d, expected %0d", max_wr_addr, base + CANVAS_PIXELS - 1));
    check(max_wr_addr < CARD_BYTES, $sformatf("highest byte %0d inside a 2^31-byte card", max_wr_addr));

    // --- card full: nothing is written
    writes_before = card.writes;
    save();
    check(card.writes == writes_before, $sformatf("%0d sector writes with the card full",
                                                  card.writes - writes_before));
    check(card_index() == LAST + 1 && next_index == LAST + 1, "index stays at 9320 when full");

    // --- automatic slide show: the first image is held for the default
    // dwell of 74,250,000 cycles (1 s at the 74.25 MHz pixel clock)
    @(negedge clk) ss = 1;
    wait_state(SD_SLIDE_SHOW_NEXT_IMAGE, 2_000_000);
    t0 = cycle;
    while (state == SD_SLIDE_SHOW_NEXT_IMAGE && cycle - t0 < 80_000_000) @(posedge clk);
    check(state == SD_SLIDE_SHOW_NEW_SECTOR && shown_index == 1, "second image started after the dwell");
    check(cycle - t0 >= 74_250_000 && cycle - t0 <= 74_250_002,
          $sformatf("first image held %0d cycles", cycle - t0));
    @(negedge clk) ss = 0;
    wait_state(SD_IDLE, 2_000_000);
    check(card.errors == 0, $sformatf("card protocol errors %0d", card.errors));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
