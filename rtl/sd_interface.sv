// sd_interface: moves images between the frame buffer and the SD card.
//
// Card layout: sector 0 holds, in its first 4 bytes (most significant byte
// first), the index of the slot where the next image will be saved; image k
// occupies the IMAGE_SECTORS sectors starting at sector 1 + k * IMAGE_SECTORS,
// one byte per canvas pixel in row-major order with the 4-bit color ID in the
// low nibble. That the index sits in the first 4 bytes of sector 0 and that
// each pixel is widened to a byte are the report's; the byte order and the
// slot placement are this design's choices.
//
// The eleven-state FSM follows the report:
//   START_SEC_ADDR_READ  wait until the controller is ready, read sector 0
//   READ_ADDR            take the index from the first 4 bytes; go to the
//                        slide show if a slide-show switch is on, else IDLE
//   IDLE                 wait for draw, a slide-show switch or reset_sd_card
//   DRAWING              wait for draw to go low (users draw meanwhile)
//   FINISHED_SAVING_SECTOR / SAVING_SECTOR
//                        write the canvas out sector by sector into the slot
//                        given by the index
//   START_SEC_ADDR_WRITE / OVERWRITE_ADDR
//                        write sector 0 with the index incremented (after a
//                        save) or set to 0 (reset_sd_card: lazy deletion)
//   SLIDE_SHOW_NEW_SECTOR / SLIDE_SHOW_SECTOR
//                        read one image into the frame buffer sector by sector
//   SLIDE_SHOW_NEXT_IMAGE
//                        hold the image for DWELL_CYCLES (about 1 s), or until
//                        a next_image press when manual_slide_show_enabled is
//                        on, then read the next image; after the last image,
//                        or once both slide-show switches are off, go to
//                        IDLE; draw here goes straight to DRAWING, so a shown
//                        image becomes the template of a new one, saved to a
//                        new slot.
// This design's own choices: reset_sd_card acts on its rising edge; a slide
// show that has run to its end does not restart until both slide-show
// switches have been off; images are shown from slot 0 upwards; a save is
// skipped once MAX_IMAGES slots are used (the report's capacity for a 2 GB
// card); slide-show switches are checked only between images.
//
// SD controller handshake (the controller itself is not part of this
// design): sd_rd / sd_wr are one-cycle requests issued only while sd_ready
// is high, with sd_addr the byte address of a 512-byte sector. A read
// returns 512 bytes, each on sd_dout with a one-cycle sd_byte_available. A
// write takes 512 bytes; the controller samples sd_din in each cycle in
// which it pulses sd_ready_for_next_byte, and those pulses must be at least
// 4 cycles apart (the frame buffer read takes 2). Frame buffer side: fb_addr,
// fb_we and fb_wdata write a pixel; fb_rdata is the pixel at fb_addr two
// cycles earlier.
module sd_interface
  import digisketch_pkg::*;
#(
  parameter int unsigned DWELL_CYCLES  = 74_250_000,
  parameter int unsigned MAX_IMAGES    = 9320,
  parameter int unsigned IMG_SECTORS   = IMAGE_SECTORS
) (
  input  logic             clk,
  input  logic             rst,
  // control switches and button
  input  logic             draw,
  input  logic             slide_show,
  input  logic             manual_slide_show_enabled,
  input  logic             next_image,
  input  logic             reset_sd_card,
  // SD controller
  input  logic             sd_ready,
  output logic             sd_rd,
  output logic             sd_wr,
  output logic [31:0]      sd_addr,
  output logic [7:0]       sd_din,
  input  logic             sd_ready_for_next_byte,
  input  logic [7:0]       sd_dout,
  input  logic             sd_byte_available,
  // frame buffer
  output logic [FB_AW-1:0] fb_addr,
  output logic             fb_we,
  output logic [3:0]       fb_wdata,
  input  logic [3:0]       fb_rdata,
  // status
  output sd_state_t        state,
  output logic [31:0]      next_index,
  output logic [31:0]      shown_index
);
  localparam int unsigned DW = $clog2(DWELL_CYCLES + 1);

  logic [8:0]  byte_cnt;        // byte within the current sector
  logic [8:0]  sector;          // sector within the current image
  logic [31:0] new_index;       // index to write to sector 0
  logic [31:0] slot_sector;     // first sector of the image being moved
  logic [DW-1:0] dwell;
  logic        show_done;
  logic        reset_q, next_q;
  logic        reset_rise, next_rise, showing;

  assign reset_rise = reset_sd_card & ~reset_q;
  assign next_rise  = next_image & ~next_q;
  assign showing    = slide_show | manual_slide_show_enabled;

  function automatic logic [31:0] slot_of(input logic [31:0] idx);
    return 32'd1 + idx * 32'(IMG_SECTORS);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= SD_START_SEC_ADDR_READ;
      sd_rd       <= 1'b0;
      sd_wr       <= 1'b0;
      sd_addr     <= '0;
      byte_cnt    <= '0;
      sector      <= '0;
      next_index  <= '0;
      new_index   <= '0;
      shown_index <= '0;
      slot_sector <= '0;
      dwell       <= '0;
      show_done   <= 1'b0;
      reset_q     <= 1'b0;
      next_q      <= 1'b0;
    end else begin
      sd_rd   <= 1'b0;
      sd_wr   <= 1'b0;
      reset_q <= reset_sd_card;
      next_q  <= next_image;
      if (!showing) show_done <= 1'b0;

      unique case (state)
        SD_START_SEC_ADDR_READ:
          if (sd_ready && !sd_rd) begin
            sd_rd    <= 1'b1;
            sd_addr  <= '0;
            byte_cnt <= '0;
            state    <= SD_READ_ADDR;
          end

        SD_READ_ADDR:
          if (sd_byte_available) begin
            byte_cnt <= byte_cnt + 1'b1;
            if (byte_cnt < 9'd4) next_index <= {next_index[23:0], sd_dout};
            if (byte_cnt == 9'(SECTOR_BYTES - 1)) begin
              shown_index <= '0;
              sector      <= '0;
              slot_sector <= slot_of(32'd0);
              if (showing && !show_done && next_index != 32'd0) state <= SD_SLIDE_SHOW_NEW_SECTOR;
              else begin
                if (showing) show_done <= 1'b1;
                state <= SD_IDLE;
              end
            end
          end

        SD_IDLE:
          if (draw) begin
            state <= SD_DRAWING;
          end else if (showing && !show_done) begin
            state <= SD_START_SEC_ADDR_READ;
          end else if (reset_rise) begin
            new_index <= '0;
            state     <= SD_START_SEC_ADDR_WRITE;
          end

        SD_DRAWING:
          if (!draw) begin
            sector      <= '0;
            byte_cnt    <= '0;
            slot_sector <= slot_of(next_index);
            state       <= (next_index < 32'(MAX_IMAGES)) ? SD_FINISHED_SAVING_SECTOR : SD_IDLE;
          end

        SD_FINISHED_SAVING_SECTOR:
          if (sector == 9'(IMG_SECTORS)) begin
            new_index <= next_index + 32'd1;
            state     <= SD_START_SEC_ADDR_WRITE;
          end else if (sd_ready && !sd_wr) begin
            sd_wr    <= 1'b1;
            sd_addr  <= (slot_sector + 32'(sector)) << 9;
            byte_cnt <= '0;
            state    <= SD_SAVING_SECTOR;
          end

        SD_SAVING_SECTOR:
          if (sd_ready_for_next_byte) begin
            byte_cnt <= byte_cnt + 1'b1;
            if (byte_cnt == 9'(SECTOR_BYTES - 1)) begin
              sector <= sector + 1'b1;
              state  <= SD_FINISHED_SAVING_SECTOR;
            end
          end

        SD_START_SEC_ADDR_WRITE:
          if (sd_ready && !sd_wr) begin
            sd_wr    <= 1'b1;
            sd_addr  <= '0;
            byte_cnt <= '0;
            state    <= SD_OVERWRITE_ADDR;
          end

        SD_OVERWRITE_ADDR:
          if (sd_ready_for_next_byte) begin
            byte_cnt <= byte_cnt + 1'b1;
            if (byte_cnt == 9'(SECTOR_BYTES - 1)) begin
              next_index <= new_index;
              state      <= SD_IDLE;
            end
          end

        SD_SLIDE_SHOW_NEW_SECTOR:
          if (sector == 9'(IMG_SECTORS)) begin
            dwell <= '0;
            state <= SD_SLIDE_SHOW_NEXT_IMAGE;
          end else if (sd_ready && !sd_rd) begin
            sd_rd    <= 1'b1;
            sd_addr  <= (slot_sector + 32'(sector)) << 9;
            byte_cnt <= '0;
            state    <= SD_SLIDE_SHOW_SECTOR;
          end

        SD_SLIDE_SHOW_SECTOR:
          if (sd_byte_available) begin
            byte_cnt <= byte_cnt + 1'b1;
            if (byte_cnt == 9'(SECTOR_BYTES - 1)) begin
              sector <= sector + 1'b1;
              state  <= SD_SLIDE_SHOW_NEW_SECTOR;
            end
          end

        SD_SLIDE_SHOW_NEXT_IMAGE: begin
          if (dwell != DW'(DWELL_CYCLES)) dwell <= dwell + 1'b1;
          if (draw) begin
            state <= SD_DRAWING;
          end else if (!showing) begin
            state <= SD_IDLE;
          end else if (manual_slide_show_enabled ? next_rise : (dwell == DW'(DWELL_CYCLES))) begin
            if (shown_index + 32'd1 >= next_index) begin
              show_done <= 1'b1;
              state     <= SD_IDLE;
            end else begin
              shown_index <= shown_index + 32'd1;
              slot_sector <= slot_of(shown_index + 32'd1);
              sector      <= '0;
              state       <= SD_SLIDE_SHOW_NEW_SECTOR;
            end
          end
        end

        default: state <= SD_IDLE;
      endcase
    end
  end

  // Frame buffer and card data paths.
  always_comb begin
    fb_addr  = FB_AW'({sector, 9'd0}) + FB_AW'(byte_cnt);
    fb_we    = (state == SD_SLIDE_SHOW_SECTOR) && sd_byte_available;
    fb_wdata = sd_dout[3:0];
    if (state == SD_OVERWRITE_ADDR) begin
      unique case (byte_cnt)
        9'd0:    sd_din = new_index[31:24];
        9'd1:    sd_din = new_index[23:16];
        9'd2:    sd_din = new_index[15:8];
        9'd3:    sd_din = new_index[7:0];
        default: sd_din = 8'h00;
      endcase
    end else begin
      sd_din = {4'h0, fb_rdata};
    end
  end

  // Requests only go out while the controller is ready.
  always_ff @(posedge clk) begin
    if (!rst && (sd_rd || sd_wr)) assert (!(sd_rd && sd_wr))
      else $error("sd_interface: read and write requested together");
  end
endmodule
