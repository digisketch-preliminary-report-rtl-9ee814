// user_input: turns the physical controls into the local brush.
//
// Two rotary encoders drive the cursor like the knobs of an Etch-a-Sketch:
// encoder A moves it along x and encoder B along y, MOVE_STEP canvas pixels
// per detent, clamped to the 640 x 360 canvas. Turning encoder A while its
// shaft is pressed cycles the stroke width (0..7) instead, and turning
// encoder B while pressed cycles the 16 colors; both wrap around. A detent is
// taken at each falling edge of the debounced CLK pin; DT high at that moment
// means one step up (+1), DT low one step down. The encoder push switches are
// active low (pressed = 0).
//
// With use_switches high the alternative controls of the report are used
// instead: four direction switches (dir_sw = {up, down, left, right}) move
// the cursor one pixel per video frame (new_frame) while held, and two
// buttons step the color and the stroke width by one on each press.
//
// The report gives the function (directions, 16 colors, 8 widths, encoder
// press to switch role, switch/button alternative); which encoder does what,
// the step sizes, the direction sense, the debouncing (all raw inputs
// debounced for DEBOUNCE_CYCLES, 1 ms at 74.25 MHz) and the start position
// (canvas centre, color 15, width 1) are this design's choices. The brush
// output is registered.
module user_input
  import digisketch_pkg::*;
#(
  parameter int unsigned DEBOUNCE_CYCLES = 74_250,
  parameter int unsigned MOVE_STEP       = 4
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       new_frame,
  // rotary encoder A
  input  logic       enc_a_clk,
  input  logic       enc_a_dt,
  input  logic       enc_a_sw_n,
  // rotary encoder B
  input  logic       enc_b_clk,
  input  logic       enc_b_dt,
  input  logic       enc_b_sw_n,
  // alternative controls
  input  logic       use_switches,
  input  logic [3:0] dir_sw,
  input  logic       btn_color,
  input  logic       btn_width,
  output brush_t     brush
);
  localparam int unsigned N_IN = 8;

  // raw / debounced pins, bit 7 down to 0
  logic [N_IN-1:0] raw, clean, clean_q;
  assign raw = {enc_a_clk, enc_a_dt, enc_a_sw_n, enc_b_clk, enc_b_dt, enc_b_sw_n,
                btn_color, btn_width};

  for (genvar g = 0; g < N_IN; g++) begin : g_db
    // encoder pins idle high; buttons idle low
    localparam logic IDLE = (g >= 2);
    debouncer #(.STABLE_CYCLES(DEBOUNCE_CYCLES), .RESET_VAL(IDLE)) u_db (
      .clk, .rst, .raw(raw[g]), .clean(clean[g])
    );
  end

  logic a_clk, a_dt, a_press, b_clk, b_dt, b_press, b_col, b_wid;
  assign {a_clk, a_dt}  = clean[7:6];
  assign a_press        = ~clean[5];
  assign {b_clk, b_dt}  = clean[4:3];
  assign b_press        = ~clean[2];
  assign {b_col, b_wid} = clean[1:0];

  logic a_step, b_step, col_press, wid_press;
  assign a_step    = clean_q[7] & ~a_clk;       // falling edge of encoder A CLK
  assign b_step    = clean_q[4] & ~b_clk;
  assign col_press = ~clean_q[1] & b_col;       // rising edge of a button
  assign wid_press = ~clean_q[0] & b_wid;

  // Move a coordinate by +/- step, clamped to [0, max].
  function automatic logic [9:0] move(input logic [9:0] v, input logic up,
                                      input int unsigned step, input int unsigned max);
    if (up) return (int'(v) + int'(step) > int'(max)) ? 10'(max) : v + 10'(step);
    else    return (int'(v) < int'(step)) ? 10'd0 : v - 10'(step);
  endfunction

  logic [8:0] ny;

  always_ff @(posedge clk) begin
    if (rst) begin
      clean_q     <= 8'b1111_1100;
      brush.x     <= 10'(CANVAS_W / 2);
      brush.y     <= 9'(CANVAS_H / 2);
      brush.color <= 4'hF;
      brush.sw    <= 3'd1;
    end else begin
      clean_q <= clean;
      if (!use_switches) begin
        if (a_step) begin
          if (a_press) brush.sw <= a_dt ? brush.sw + 3'd1 : brush.sw - 3'd1;
          else         brush.x  <= move(brush.x, a_dt, MOVE_STEP, CANVAS_W - 1);
        end
        if (b_step) begin
          if (b_press) brush.color <= b_dt ? brush.color + 4'd1 : brush.color - 4'd1;
          else         brush.y     <= ny;
        end
      end else begin
        if (new_frame) begin
          // up/down are mutually exclusive; so are left/right
          if (dir_sw[3] && !dir_sw[2])      brush.y <= ny;
          else if (dir_sw[2] && !dir_sw[3]) brush.y <= ny;
          if (dir_sw[0] && !dir_sw[1])      brush.x <= move(brush.x, 1'b1, 1, CANVAS_W - 1);
          else if (dir_sw[1] && !dir_sw[0]) brush.x <= move(brush.x, 1'b0, 1, CANVAS_W - 1);
        end
        if (col_press) brush.color <= brush.color + 4'd1;
        if (wid_press) brush.sw    <= brush.sw + 3'd1;
      end
    end
  end

  // Next y: in encoder mode one detent of B; in switch mode one pixel,
  // up (dir_sw[3]) meaning towards the top of the screen (smaller y).
  always_comb begin
    if (!use_switches) ny = 9'(move(10'(brush.y), b_dt, MOVE_STEP, CANVAS_H - 1));
    else               ny = 9'(move(10'(brush.y), dir_sw[2], 1, CANVAS_H - 1));
  end
endmodule
