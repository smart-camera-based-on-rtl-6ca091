// transpose4: rotates an 8-bit image stored in main memory by a transposition
// (row x of the result is column x of the source), so that images grabbed in
// line-scan mode can be processed along rows.
//
// The image is walked in 4x4 pixel blocks: the four 32-bit words that hold one
// block (same word column, four consecutive rows) are read into four
// registers, and the four transposed words are written to their place in the
// destination image. Source: cfg.width x cfg.height pixels at cfg.src,
// cfg.width/4 words per row. Result: cfg.height x cfg.width pixels at cfg.dst,
// cfg.height/4 words per row. Both sizes must be multiples of 4.
// Timing: 4 reads and 4 writes per block, the last row read being forwarded
// into the first write as it arrives, i.e. 8 cycles per 16 pixels (one memory
// access per cycle) when the memory grants every request; a refused request
// (gnt low) simply waits. done pulses for one cycle at the end.
// The block walk with four registers follows the document; the block order
// (row of blocks by row of blocks) is this design's choice.
module transpose4 import cop_pkg::*; (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  task_t cfg,
  output logic  busy,
  output logic  done,
  mem_if.master m
);
  typedef enum logic [1:0] {S_IDLE, S_READ, S_WRITE} state_e;
  state_e state;

  dim_t  bx, by;          // block column (word index) and block row
  dim_t  wwords, hwords;  // words per source row / per destination row
  logic [2:0] rd_issued, rd_got, wr_cnt;
  word_t blk [4];         // the four block registers
  task_t c;

  wire last_bx = (bx == wwords - 1'b1);
  wire last_by = (by == hwords - 1'b1);

  // transposed word number wr_cnt: byte k = byte wr_cnt of source row k
  word_t tword;
  // row 3 of the block arrives in the first write cycle and is forwarded
  word_t row3;
  assign row3 = (rd_got == 3'd3) ? m.rdata : blk[3];
  always_comb begin
    for (int k = 0; k < 3; k++) tword[8*k +: 8] = blk[k][8*wr_cnt[1:0] +: 8];
    tword[24 +: 8] = row3[8*wr_cnt[1:0] +: 8];
  end

  always_comb begin
    m.req   = 1'b0;
    m.we    = 1'b0;
    m.addr  = '0;
    m.wdata = tword;
    if (state == S_READ && rd_issued < 3'd4) begin
      m.req  = 1'b1;
      m.addr = c.src + addr_t'(({by, 2'b00} + rd_issued[1:0]) * wwords) + addr_t'(bx);
    end else if (state == S_WRITE) begin
      m.req  = 1'b1;
      m.we   = 1'b1;
      m.addr = c.dst + addr_t'(({bx, 2'b00} + wr_cnt[1:0]) * hwords) + addr_t'(by);
    end
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; done <= 1'b0; bx <= '0; by <= '0;
      rd_issued <= '0; rd_got <= '0; wr_cnt <= '0;
      wwords <= '0; hwords <= '0; c <= '0;
      for (int k = 0; k < 4; k++) blk[k] <= '0;
    end else begin
      done <= 1'b0;
      if (m.rvalid) begin
        blk[rd_got[1:0]] <= m.rdata;
        rd_got <= rd_got + 1'b1;
      end
      case (state)
        S_IDLE: if (start) begin
          c <= cfg; bx <= '0; by <= '0;
          wwords <= cfg.width >> 2; hwords <= cfg.height >> 2;
          rd_issued <= '0; rd_got <= '0;
          state <= S_READ;
        end
        S_READ: begin
          if (m.req && m.gnt) rd_issued <= rd_issued + 1'b1;
          if (m.req && m.gnt && rd_issued == 3'd3) begin
            state <= S_WRITE; wr_cnt <= '0;
          end
        end
        S_WRITE: if (m.gnt) begin
          wr_cnt <= wr_cnt + 1'b1;
          if (wr_cnt == 3'd3) begin
            rd_issued <= '0; rd_got <= '0;
            if (last_bx) begin
              bx <= '0;
              if (last_by) begin state <= S_IDLE; done <= 1'b1; end
              else begin by <= by + 1'b1; state <= S_READ; end
            end else begin
              bx <= bx + 1'b1; state <= S_READ;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
