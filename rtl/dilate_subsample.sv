// dilate_subsample: row-wise grey-level dilation fused with a 4 x 4
// subsampling, the stage that merges the bars of a bar code into one bright
// area and divides the image size by 16.
//
// Only every fourth source row (rows 0, 4, 8, ...) is read into a line cache.
// For every fourth pixel x of that row (x = 0, 4, 8, ...) the result pixel is
// the maximum of the 32 pixels x-16 .. x+15 of the row (a 32-pixel
// neighbourhood along the line; pixels outside the row are ignored). One
// result pixel is produced per cycle, and every four of them are written as
// one word. Result image: width/4 x ceil(height/4) pixels at cfg.dst,
// ceil(width/16) words per row (the last word of a row is zero-padded).
// cfg.width must be a multiple of 4 and at most MAX_W.
// Timing per kept row: width/4 reads, one cycle of latency, width/4 compute
// cycles (one of which also writes each finished word).
// Fusing both steps, the 32-pixel maximum and 1-in-4 in both directions
// follow the document; the neighbourhood's placement around x and the edge
// handling are this design's choices.
module dilate_subsample import cop_pkg::*; #(
  parameter int MAX_W = 2048,
  parameter int NB    = 32
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  task_t cfg,
  output logic  busy,
  output logic  done,
  mem_if.master m
);
  localparam int XW = $clog2(MAX_W) + 1;

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_DIL, S_WR} state_e;
  state_e state;
  task_t  c;
  pix_t   line [MAX_W];
  dim_t   row, words, rd_cnt, rd_got, ox, owords;
  addr_t  src_row, dst_row;
  word_t  acc;

  // maximum over the neighbourhood of result pixel ox (source x = 4*ox)
  pix_t dmax;
  always_comb begin
    dmax = '0;
    for (int t = 0; t < NB; t++) begin
      int signed x;
      x = 4 * int'(ox) + t - NB/2;
      if (x >= 0 && x < int'(c.width) && line[x[XW-1:0]] > dmax) dmax = line[x[XW-1:0]];
    end
  end

  wire word_full = (ox[1:0] == 2'd3) || (ox == (c.width >> 2) - 1'b1);
  word_t acc_n;
  always_comb begin
    acc_n = acc;
    acc_n[8*ox[1:0] +: 8] = dmax;
  end

  always_comb begin
    m.req = 1'b0; m.we = 1'b0; m.addr = '0; m.wdata = acc;
    if (state == S_LOAD && rd_cnt < words) begin
      m.req = 1'b1; m.addr = src_row + addr_t'(rd_cnt);
    end else if (state == S_WR) begin
      m.req = 1'b1; m.we = 1'b1; m.addr = dst_row + addr_t'(ox >> 2);
    end
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (m.rvalid && state == S_LOAD)
      for (int l = 0; l < 4; l++) line[4*rd_got + l] <= m.rdata[8*l +: 8];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; done <= 1'b0; c <= '0; row <= '0; words <= '0; owords <= '0;
      rd_cnt <= '0; rd_got <= '0; ox <= '0; src_row <= '0; dst_row <= '0; acc <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          c <= cfg; row <= '0; words <= cfg.width >> 2;
          owords <= (cfg.width + 12'd15) >> 4;
          src_row <= cfg.src; dst_row <= cfg.dst;
          rd_cnt <= '0; rd_got <= '0;
          state <= S_LOAD;
        end
        S_LOAD: begin
          if (m.req && m.gnt) rd_cnt <= rd_cnt + 1'b1;
          if (m.rvalid) rd_got <= rd_got + 1'b1;
          if (m.rvalid && rd_got == words - 1'b1) begin
            state <= S_DIL; ox <= '0; acc <= '0;
          end
        end
        S_DIL: begin
          acc <= acc_n;
          if (word_full) state <= S_WR;
          else ox <= ox + 1'b1;
        end
        S_WR: if (m.gnt) begin
          acc <= '0;
          if (ox == (c.width >> 2) - 1'b1) begin
            rd_cnt <= '0; rd_got <= '0;
            src_row <= src_row + addr_t'(4 * words);
            dst_row <= dst_row + addr_t'(owords);
            row <= row + 12'd4;
            if (row + 12'd4 >= c.height) begin state <= S_IDLE; done <= 1'b1; end
            else state <= S_LOAD;
          end else begin
            ox <= ox + 1'b1; state <= S_DIL;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
