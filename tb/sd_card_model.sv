// sd_card_model: behavioural model of an SD card controller with its card,
// for simulation only.
//
// Sparse byte storage (an associative array, empty bytes read as zero).
// While idle, ready is high. A one-cycle rd with a 512-aligned byte address
// drops ready, waits CMD_DELAY cycles, then delivers the 512 bytes of that
// sector on dout, each with a one-cycle byte_available, BYTE_GAP cycles
// apart. A one-cycle wr likewise pulses ready_for_next_byte 512 times,
// BYTE_GAP cycles apart, storing din as sampled in each pulse cycle. ready
// returns CMD_DELAY cycles after the last byte. The model counts protocol
// errors (a request while busy, a misaligned address, rd and wr together).
module sd_card_model #(
  parameter int unsigned CMD_DELAY = 8,
  parameter int unsigned BYTE_GAP  = 4
) (
  input  logic        clk,
  input  logic        rst,
  output logic        ready,
  input  logic        rd,
  input  logic        wr,
  input  logic [31:0] addr,
  input  logic [7:0]  din,
  output logic        ready_for_next_byte,
  output logic [7:0]  dout,
  output logic        byte_available
);
  logic [7:0] mem [int unsigned];
  int unsigned errors = 0;
  int unsigned reads = 0, writes = 0;

  typedef enum logic [2:0] {M_IDLE, M_CMD, M_READ, M_WRITE, M_TAIL} m_state_t;
  m_state_t    st;
  int unsigned base, idx, wait_cnt;
  logic        is_read;

  function automatic logic [7:0] peek(input int unsigned a);
    return mem.exists(a) ? mem[a] : 8'h00;
  endfunction

  task automatic poke(input int unsigned a, input logic [7:0] v);
    mem[a] = v;
  endtask

  always @(posedge clk) begin
    byte_available      <= 1'b0;
    ready_for_next_byte <= 1'b0;
    if (rst) begin
      st    <= M_IDLE;
      ready <= 1'b1;
      dout  <= '0;
    end else begin
      if ((rd || wr) && (st != M_IDLE || !ready)) errors <= errors + 1;
      if (rd && wr) errors <= errors + 1;
      unique case (st)
        M_IDLE:
          if (rd || wr) begin
            if (addr[8:0] != 0) errors <= errors + 1;
            base     <= addr;
            is_read  <= rd;
            idx      <= 0;
            wait_cnt <= 0;
            ready    <= 1'b0;
            st       <= M_CMD;
            if (rd) reads <= reads + 1; else writes <= writes + 1;
          end
        M_CMD:
          if (wait_cnt == CMD_DELAY) begin
            wait_cnt <= 0;
            st       <= is_read ? M_READ : M_WRITE;
          end else wait_cnt <= wait_cnt + 1;
        M_READ:
          if (wait_cnt == BYTE_GAP - 1) begin
            wait_cnt       <= 0;
            dout           <= peek(base + idx);
            byte_available <= 1'b1;
            idx            <= idx + 1;
            if (idx == 511) st <= M_TAIL;
          end else wait_cnt <= wait_cnt + 1;
        M_WRITE:
          if (wait_cnt == BYTE_GAP - 1) begin
            wait_cnt            <= 0;
            ready_for_next_byte <= 1'b1;
          end else begin
            wait_cnt <= wait_cnt + 1;
            if (ready_for_next_byte) begin
              mem[base + idx] = din;
              idx <= idx + 1;
              if (idx == 511) begin
                st       <= M_TAIL;
                wait_cnt <= 0;
              end
            end
          end
        M_TAIL:
          if (wait_cnt == CMD_DELAY) begin
            ready <= 1'b1;
            st    <= M_IDLE;
          end else wait_cnt <= wait_cnt + 1;
        default: st <= M_IDLE;
      endcase
    end
  end
endmodule
