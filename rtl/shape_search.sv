// shape_search: binary shape search by XNOR correlation. For a binary shape
// s1 of M x M pixels and a binary search window s2 of W x H pixels it
// computes, for every placement (i, j) with 0 <= i <= W-M, 0 <= j <= H-M,
//   f(i, j) = sum over x, y < M of  s1(x, y) XNOR s2(x + i, y + j),
// the number of agreeing pixels (M*M for a perfect match), writes all scores
// to memory and reports the best placement.
//
// Binary images are stored 32 pixels per word, bit k = pixel k of the word.
// The shape (at word address cfg.param[AW-1:0], ceil(M/32) words per row,
// pixels in the low M bits when M = 16)
// and the search window (at cfg.src, W/32 words per row) are first read into
// registers. The correlation then runs with D detection blocks in parallel:
// for one row offset j and D neighbouring column offsets i, each cycle takes
// one shape row y and window row j+y and adds the popcount of the XNOR to each
// of the D accumulators; after M cycles the D scores are written, one per
// cycle. Scores are written row by row, (W-M+1) words per row, at cfg.dst.
// best_score/best_i/best_j hold the first placement with the highest score.
// Timing: (H-M+1) * (ceil((W-M+1)/D) * M + (W-M+1)) cycles after the loads
// (M correlation cycles per group of D offsets, one write per score).
// The XNOR criterion, the shape sizes (16, 32 or 64 by the parameter M) and
// the detection-block parallelism follow the document; the memory layout,
// the score map output and the loop order are this design's choices. The
// window is indexed s2(x + i, y + j) so that f is a correlation over the
// placements 0..N-M.
module shape_search import cop_pkg::*; #(
  parameter int M      = 32,   // shape size
  parameter int D      = 8,    // detection blocks working in parallel
  parameter int WMAX   = 128,  // widest search window, pixels
  parameter int HMAX   = 128   // tallest search window, rows
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  task_t cfg,
  output logic  busy,
  output logic  done,
  output logic [15:0] best_score,
  output dim_t  best_i,
  output dim_t  best_j,
  mem_if.master m
);
  localparam int MW = (M + 31) / 32;   // words per shape row
  localparam int SW = 16;              // score width

  typedef enum logic [2:0] {S_IDLE, S_LDS, S_LDW, S_CORR, S_WR} state_e;
  state_e state;
  task_t  c;
  logic [32*MW-1:0] shp [M];   // shape rows, whole words
  logic [WMAX-1:0] win [HMAX];
  dim_t   wwords, rd_cnt, rd_got, ntot;
  dim_t   pi, pj;          // first column offset of the group, row offset
  logic [7:0] y;           // shape row being correlated
  logic [$clog2(D+1)-1:0] wr_k;
  logic [SW-1:0] acc [D];
  dim_t   ni, nj;          // number of column / row offsets

  // loads: shape words then window words, in order
  dim_t  ld_total;
  always_comb ld_total = (state == S_LDS) ? dim_t'(M * MW) : ntot;

  always_comb begin
    m.req = 1'b0; m.we = 1'b0; m.addr = '0; m.wdata = '0;
    if ((state == S_LDS || state == S_LDW) && rd_cnt < ld_total) begin
      m.req  = 1'b1;
      m.addr = (state == S_LDS) ? c.param[AW-1:0] + addr_t'(rd_cnt) : c.src + addr_t'(rd_cnt);
    end else if (state == S_WR) begin
      m.req   = 1'b1; m.we = 1'b1;
      m.addr  = c.dst + addr_t'(pj * ni) + addr_t'(pi + dim_t'(wr_k));
      m.wdata = 32'(acc[wr_k]);
    end
  end

  // D parallel popcounts of XNOR between shape row y and the window row
  logic [SW-1:0] pc [D];
  always_comb begin
    logic [WMAX-1:0] r;
    r = win[pj + dim_t'(y)];
    for (int d = 0; d < D; d++) begin
      logic [M-1:0] seg;
      seg   = M'(r >> (int'(pi) + d));
      pc[d] = SW'($countones(~(shp[y][M-1:0] ^ seg)));
    end
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (m.rvalid && state == S_LDS)
      shp[rd_got / MW][32 * (rd_got % MW) +: 32] <= m.rdata;
    if (m.rvalid && state == S_LDW)
      win[rd_got / wwords][32 * (rd_got % wwords) +: 32] <= m.rdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; done <= 0; c <= '0; wwords <= '0; rd_cnt <= '0; rd_got <= '0;
      ntot <= '0; pi <= '0; pj <= '0; y <= '0; wr_k <= '0; ni <= '0; nj <= '0;
      best_score <= '0; best_i <= '0; best_j <= '0;
      for (int d = 0; d < D; d++) acc[d] <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          c <= cfg; wwords <= cfg.width >> 5;
          ntot <= (cfg.width >> 5) * cfg.height;
          ni <= cfg.width - dim_t'(M) + 1'b1; nj <= cfg.height - dim_t'(M) + 1'b1;
          rd_cnt <= '0; rd_got <= '0; best_score <= '0; best_i <= '0; best_j <= '0;
          state <= S_LDS;
        end
        S_LDS, S_LDW: begin
          if (m.req && m.gnt) rd_cnt <= rd_cnt + 1'b1;
          if (m.rvalid) rd_got <= rd_got + 1'b1;
          if (m.rvalid && rd_got == ld_total - 1'b1) begin
            rd_cnt <= '0; rd_got <= '0;
            if (state == S_LDS) state <= S_LDW;
            else begin
              state <= S_CORR; pi <= '0; pj <= '0; y <= '0;
              for (int d = 0; d < D; d++) acc[d] <= '0;
            end
          end
        end
        S_CORR: begin
          for (int d = 0; d < D; d++) acc[d] <= acc[d] + pc[d];
          y <= y + 1'b1;
          if (y == 8'(M - 1)) begin state <= S_WR; wr_k <= '0; end
        end
        S_WR: if (m.gnt) begin
          if (acc[wr_k] > best_score) begin
            best_score <= acc[wr_k]; best_i <= pi + dim_t'(wr_k); best_j <= pj;
          end
          wr_k <= wr_k + 1'b1;
          if (int'(wr_k) == D - 1 || pi + dim_t'(wr_k) == ni - 1'b1) begin
            y <= '0;
            for (int d = 0; d < D; d++) acc[d] <= '0;
            state <= S_CORR;
            if (pi + dim_t'(D) >= ni) begin
              pi <= '0;
              pj <= pj + 1'b1;
              if (pj == nj - 1'b1) begin state <= S_IDLE; done <= 1'b1; end
            end else pi <= pi + dim_t'(D);
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
