// digisketch_top: a two-player, saving Etch-a-Sketch on an FPGA.
//
// Each player turns two rotary encoders to move a cursor over a 640 x 360
// canvas of 16 colors, shown at 1280 x 720 over HDMI. While draw is on,
// every pixel within the brush radius of the cursor is painted as the video
// raster passes over it. A second board, connected by one differential pair,
// receives this board's brush once per frame and sends its own back, so both
// players' strokes appear on both screens. When draw is switched off the
// canvas is saved to the next free slot of an SD card; the slide-show
// switches load the saved images back into the canvas one after another
// (automatically about once a second, or one per next-image press), and a
// shown image can be drawn on and saved as a new one.
//
// Blocks: user_input (controls to local brush), frame_buffer (canvas RAM,
// brush painting, palette), scale (screen to canvas coordinates),
// video_sig_gen (720p timing), gui_sprite (color and width indicator),
// video_mux, three tmds_encoder channels, sd_interface (card transfers and
// slide show) and comm_module (the inter-board link). The encoder pins follow
// the report's pinout: encoder A CLK/DT/SW on pmodb[3]/[2]/[5], encoder B on
// pmodb[7]/[6]/[4]; pmodb[1:0] are not used.
//
// Clocks: everything runs on clk_pixel (74.25 MHz for 720p) except the link,
// which runs on clk_link (100 MHz, already buffered; the report's global
// clock buffer and the differential I/O buffer are outside this module).
// rst is synchronous to clk_pixel and is passed to the link domain through
// two flip-flops that power up in reset. The switches and the next-image button are synchronized or
// debounced here.
//
// Video latency: the frame buffer read takes two cycles, the video mux one
// and the TMDS encoders one, so rgb / hsync / vsync / active_out trail the
// timing generator by three cycles and the TMDS words by four.
//
// Outside interfaces brought out as ports: the differential buffer
// (diff_data_in from its output, diff_io_sel its drive enable, diff_data_out
// the level to drive), the SD card controller (see sd_interface), and the
// TMDS words for the serializers.
module digisketch_top
  import digisketch_pkg::*;
#(
  parameter int unsigned DEBOUNCE_CYCLES = 74_250,
  parameter int unsigned MOVE_STEP       = 4,
  parameter int unsigned DWELL_CYCLES    = 74_250_000,
  parameter int unsigned LINK_PERIOD     = 20,
  parameter int unsigned LINK_MARGIN     = 3
) (
  input  logic        clk_pixel,
  input  logic        clk_link,
  input  logic        rst,
  // user controls
  input  logic [7:0]  pmodb,
  input  logic        use_switches,
  input  logic [3:0]  dir_sw,
  input  logic        btn_color,
  input  logic        btn_width,
  input  logic        btn_next,
  input  logic        draw,
  input  logic        slide_show,
  input  logic        manual_slide_show_enabled,
  input  logic        reset_sd_card,
  // inter-board link (differential buffer side)
  input  logic        diff_data_in,
  output logic        diff_io_sel,
  output logic        diff_data_out,
  // SD card controller
  input  logic        sd_ready,
  output logic        sd_rd,
  output logic        sd_wr,
  output logic [31:0] sd_addr,
  output logic [7:0]  sd_din,
  input  logic        sd_ready_for_next_byte,
  input  logic [7:0]  sd_dout,
  input  logic        sd_byte_available,
  // video
  output logic [23:0] rgb,
  output logic        hsync,
  output logic        vsync,
  output logic        active_out,
  output logic [9:0]  tmds_red,
  output logic [9:0]  tmds_green,
  output logic [9:0]  tmds_blue,
  // status
  output brush_t      local_brush,
  output brush_t      remote_brush,
  output sd_state_t   sd_state,
  output logic [31:0] sd_next_index,
  output logic        link_transmitting,
  output logic        link_receiving
);
  // ---------------------------------------------------------------- resets, switches
  // Reset for the link domain: rst passed through two flip-flops that
  // power up asserted, so the link logic is held in reset from the start.
  logic [1:0] rst_link_pipe = 2'b11;
  logic       rst_link;
  always_ff @(posedge clk_link) rst_link_pipe <= {rst_link_pipe[0], rst};
  assign rst_link = rst_link_pipe[1];

  logic draw_s, slide_s, manual_s, reset_sd_s, next_s;
  synchronizer #(.WIDTH(4), .DEPTH(2), .RESET_VAL(1'b0)) u_sw_sync (
    .clk(clk_pixel), .rst,
    .d({draw, slide_show, manual_slide_show_enabled, reset_sd_card}),
    .q({draw_s, slide_s, manual_s, reset_sd_s})
  );
  debouncer #(.STABLE_CYCLES(DEBOUNCE_CYCLES), .RESET_VAL(1'b0)) u_next_db (
    .clk(clk_pixel), .rst, .raw(btn_next), .clean(next_s)
  );

  // ---------------------------------------------------------------- timing and scaling
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic        hs0, vs0, act0, new_frame;

  video_sig_gen u_vsg (
    .clk(clk_pixel), .rst, .hcount, .vcount, .hsync(hs0), .vsync(vs0),
    .active_draw(act0), .new_frame
  );

  logic [9:0]       cx;
  logic [8:0]       cy;
  logic [FB_AW-1:0] caddr;
  logic             on_canvas;
  scale u_scale (.hcount, .vcount, .x(cx), .y(cy), .addr(caddr), .on_canvas);

  // ---------------------------------------------------------------- brushes
  user_input #(.DEBOUNCE_CYCLES(DEBOUNCE_CYCLES), .MOVE_STEP(MOVE_STEP)) u_input (
    .clk(clk_pixel), .rst, .new_frame,
    .enc_a_clk(pmodb[3]), .enc_a_dt(pmodb[2]), .enc_a_sw_n(pmodb[5]),
    .enc_b_clk(pmodb[7]), .enc_b_dt(pmodb[6]), .enc_b_sw_n(pmodb[4]),
    .use_switches, .dir_sw, .btn_color, .btn_width, .brush(local_brush)
  );

  logic remote_seen, remote_update;
  comm_module #(.PERIOD(LINK_PERIOD), .MARGIN(LINK_MARGIN)) u_comm (
    .clk_pixel, .rst_pixel(rst), .clk_link, .rst_link,
    .new_frame, .local_brush, .remote_brush, .remote_seen, .remote_update,
    .line_in(diff_data_in), .io_sel(diff_io_sel), .line_out(diff_data_out),
    .transmitting(link_transmitting), .receiving(link_receiving)
  );

  // ---------------------------------------------------------------- SD card
  logic [FB_AW-1:0] sd_fb_addr;
  logic             sd_fb_we;
  logic [3:0]       sd_fb_wdata, sd_fb_rdata;

  sd_interface #(.DWELL_CYCLES(DWELL_CYCLES)) u_sd (
    .clk(clk_pixel), .rst,
    .draw(draw_s), .slide_show(slide_s), .manual_slide_show_enabled(manual_s),
    .next_image(next_s), .reset_sd_card(reset_sd_s),
    .sd_ready, .sd_rd, .sd_wr, .sd_addr, .sd_din, .sd_ready_for_next_byte,
    .sd_dout, .sd_byte_available,
    .fb_addr(sd_fb_addr), .fb_we(sd_fb_we), .fb_wdata(sd_fb_wdata), .fb_rdata(sd_fb_rdata),
    .state(sd_state), .next_index(sd_next_index), .shown_index()
  );

  // ---------------------------------------------------------------- canvas
  logic [3:0]  pixel_id;
  logic [23:0] canvas_rgb;

  frame_buffer u_fb (
    .clk(clk_pixel), .draw(draw_s),
    .scan_x(cx), .scan_y(cy), .scan_addr(caddr), .scan_valid(on_canvas && act0),
    .local_brush, .remote_brush, .remote_en(remote_seen),
    .sd_addr(sd_fb_addr), .sd_we(sd_fb_we), .sd_wdata(sd_fb_wdata), .sd_rdata(sd_fb_rdata),
    .pixel_id, .pixel_rgb(canvas_rgb)
  );

  // ---------------------------------------------------------------- video out
  // Delay the raster position and syncs by the frame buffer's read latency.
  logic [10:0] hcount_d [2];
  logic [9:0]  vcount_d [2];
  logic [1:0]  hs_d, vs_d, act_d;

  always_ff @(posedge clk_pixel) begin
    hcount_d[0] <= hcount;  hcount_d[1] <= hcount_d[0];
    vcount_d[0] <= vcount;  vcount_d[1] <= vcount_d[0];
    hs_d  <= {hs_d[0], hs0};
    vs_d  <= {vs_d[0], vs0};
    act_d <= {act_d[0], act0};
  end

  logic        sprite_on;
  logic [23:0] sprite_rgb;
  gui_sprite u_gui (
    .hcount(hcount_d[1]), .vcount(vcount_d[1]),
    .color(local_brush.color), .sw(local_brush.sw),
    .sprite_on, .sprite_rgb
  );

  video_mux u_mux (
    .clk(clk_pixel), .rst,
    .active_in(act_d[1]), .hsync_in(hs_d[1]), .vsync_in(vs_d[1]),
    .canvas_rgb, .sprite_on, .sprite_rgb,
    .rgb, .active_out, .hsync_out(hsync), .vsync_out(vsync)
  );

  tmds_encoder u_tmds_r (.clk(clk_pixel), .rst, .data(rgb[23:16]), .ctrl(2'b00),
                         .ve(active_out), .tmds(tmds_red));
  tmds_encoder u_tmds_g (.clk(clk_pixel), .rst, .data(rgb[15:8]),  .ctrl(2'b00),
                         .ve(active_out), .tmds(tmds_green));
  tmds_encoder u_tmds_b (.clk(clk_pixel), .rst, .data(rgb[7:0]),   .ctrl({vsync, hsync}),
                         .ve(active_out), .tmds(tmds_blue));
endmodule
