// digisketch_pkg: types and constants shared by the DigiSketch blocks.
//
// The canvas is 640 x 360 pixels of 4-bit color IDs, shown at 1280 x 720 by
// doubling each pixel in both directions. A brush is the cursor position, the
// color ID and the stroke-width index; packed, it is exactly the 26-bit packet
// exchanged between the two boards: x [25:16], y [15:7], color [6:3],
// stroke width [2:0]. These field positions and widths follow the report.
// The SD image layout (one byte per pixel, images stored back to back after
// the index sector) is this design's own choice within the report's
// description.
package digisketch_pkg;

  localparam int unsigned CANVAS_W = 640;
  localparam int unsigned CANVAS_H = 360;
  localparam int unsigned CANVAS_PIXELS = CANVAS_W * CANVAS_H;   // 230400
  localparam int unsigned FB_AW = 18;                            // ceil(log2(230400))

  localparam int unsigned PACKET_W = 26;

  typedef struct packed {
    logic [9:0] x;       // packet bits [25:16]
    logic [8:0] y;       // packet bits [15:7]
    logic [3:0] color;   // packet bits [6:3]
    logic [2:0] sw;      // packet bits [2:0], stroke width index
  } brush_t;

  // SD card: 512-byte sectors; an image takes CANVAS_PIXELS bytes = 450 sectors.
  localparam int unsigned SECTOR_BYTES = 512;
  localparam int unsigned IMAGE_SECTORS = CANVAS_PIXELS / SECTOR_BYTES;  // 450

  // States of the SD card interface (the report's eleven states).
  typedef enum logic [3:0] {
    SD_START_SEC_ADDR_READ,
    SD_READ_ADDR,
    SD_IDLE,
    SD_SLIDE_SHOW_SECTOR,
    SD_SLIDE_SHOW_NEW_SECTOR,
    SD_SLIDE_SHOW_NEXT_IMAGE,
    SD_DRAWING,
    SD_SAVING_SECTOR,
    SD_FINISHED_SAVING_SECTOR,
    SD_START_SEC_ADDR_WRITE,
    SD_OVERWRITE_ADDR
  } sd_state_t;

endpackage
