// niblack_binarize: local adaptive binarization of an 8-bit image in main
// memory into a 1 bit per pixel image.
//
// For every pixel P the statistics of its 8x8 or 16x16 neighbourhood NE are
// computed by niblack_stats, and
//   threshold = mean(NE) - 0.1875 * std(NE)
//   B = 0 if var(NE) < STDREF, else B = (P < threshold).
// The comparison is done in sixteenths, 16*P < 16*mean - 3*std, so that the
// factor 0.1875 = 3/16 costs no rounding. NE covers rows y-S/2 .. y+S/2-1 and
// columns x-S/2 .. x+S/2-1 (S = 8 or 16), with coordinates outside the image
// clamped to the edge.
// The module caches 16 image rows (row r in slot r mod 16), loading the rows
// a result row needs before producing it. A cache port reads LANES adjacent
// pixels of the neighbourhood per cycle, so one neighbourhood takes
// S*S/LANES cycles; neighbourhoods are fed back to back and the results are
// collected as they leave the statistics pipeline.
// Interface: cfg.mode[0] selects 16x16 (1) or 8x8 (0), cfg.param[15:0] is
// STDREF, cfg.width is a multiple of 32 (at most MAX_W). The result has
// width/32 words per row, bit i of a word being pixel i of its 32 (bit 1 =
// dark pixel). Timing: about S*S/LANES cycles per pixel plus the row loads.
// The formula, the two neighbourhood sizes and four pixels per cycle follow
// the document; neighbourhood placement, edge clamping, the fixed point form
// and the bit packing are this design's choices.
module niblack_binarize import cop_pkg::*; #(
  parameter int MAX_W = 2048,
  parameter int LANES = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  task_t cfg,
  output logic  busy,
  output logic  done,
  mem_if.master m
);
  localparam int XW = $clog2(MAX_W);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_RUN, S_FLUSH} state_e;
  state_e state;
  task_t  c;
  pix_t   cache [16][MAX_W];
  dim_t   row, nload, words, rd_cnt, rd_got;
  dim_t   fx, ox;              // pixel being fed / pixel whose result is due
  logic [7:0] step, nsteps;    // feed cycle inside one neighbourhood
  logic   big;                 // 16x16
  logic [31:0] bits;
  logic   wr_pend;
  addr_t  wr_addr;

  function automatic pix_t cpx(int signed x, int signed y, int signed w, int signed h);
    int signed xc, yc;
    xc = (x < 0) ? 0 : (x >= w) ? w - 1 : x;
    yc = (y < 0) ? 0 : (y >= h) ? h - 1 : y;
    return cache[yc[3:0]][xc[XW-1:0]];
  endfunction

  // feed side
  logic       feeding, en;
  logic [7:0] px [LANES];
  always_comb begin
    int s, idx, dx, dy;
    s   = big ? 16 : 8;
    idx = int'(step) * LANES;
    dy  = idx / s;
    dx  = idx % s;
    for (int l = 0; l < LANES; l++)
      px[l] = cpx(int'(fx) - s/2 + dx + l, int'(row) - s/2 + dy, int'(c.width), int'(c.height));
  end
  assign feeding = (state == S_RUN) && (fx < c.width);
  assign en      = !(wr_pend && !m.gnt);

  logic        sv;
  logic [7:0]  smean, sstd;
  logic [15:0] svar;
  niblack_stats #(.LANES(LANES)) u_stats (
    .clk, .rst_n, .en, .sel8o16(big),
    .in_valid(feeding), .in_first(step == 0), .in_last(step == nsteps),
    .in_px(px), .out_valid(sv), .mean(smean), .variance(svar), .stdev(sstd));

  // binarization of the pixel whose statistics just arrived
  logic b;
  always_comb begin
    logic [12:0] p16, t16;
    p16 = {1'b0, cpx(int'(ox), int'(row), int'(c.width), int'(c.height)), 4'd0};
    t16 = {1'b0, smean, 4'd0} - 13'(3 * sstd);
    b = (svar >= c.param[15:0]) && !t16[12] && (p16 < t16);
  end

  always_comb begin
    m.req = 1'b0; m.we = 1'b0; m.addr = '0; m.wdata = bits;
    if (state == S_LOAD && rd_cnt < words) begin
      m.req = 1'b1; m.addr = c.src + addr_t'(nload * words) + addr_t'(rd_cnt);
    end else if (wr_pend) begin
      m.req = 1'b1; m.we = 1'b1; m.addr = wr_addr;
    end
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (m.rvalid && state == S_LOAD)
      for (int l = 0; l < 4; l++) cache[nload[3:0]][4*rd_got + l] <= m.rdata[8*l +: 8];
  end

  // last row needed in the cache for result row r
  function automatic dim_t need_of(dim_t r, logic b16, dim_t h);
    dim_t n;
    n = r + (b16 ? 12'd7 : 12'd3);
    return (n >= h) ? h - 1'b1 : n;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; done <= 0; c <= '0; row <= '0; nload <= '0; words <= '0;
      rd_cnt <= '0; rd_got <= '0; fx <= '0; ox <= '0; step <= '0; nsteps <= '0;
      big <= 0; bits <= '0; wr_pend <= 0; wr_addr <= '0;
    end else begin
      done <= 1'b0;
      if (wr_pend && m.gnt) wr_pend <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          c <= cfg; row <= '0; nload <= '0; words <= cfg.width >> 2;
          big <= cfg.mode[0];
          nsteps <= cfg.mode[0] ? 8'(256 / LANES - 1) : 8'(64 / LANES - 1);
          rd_cnt <= '0; rd_got <= '0;
          state <= S_LOAD;
        end
        S_LOAD: begin
          if (m.req && m.gnt) rd_cnt <= rd_cnt + 1'b1;
          if (m.rvalid) rd_got <= rd_got + 1'b1;
          if (m.rvalid && rd_got == words - 1'b1) begin
            rd_cnt <= '0; rd_got <= '0;
            nload <= nload + 1'b1;
            if (nload >= need_of(row, big, c.height)) begin
              state <= S_RUN; fx <= '0; ox <= '0; step <= '0;
            end
          end
        end
        S_RUN: if (en) begin
          if (feeding) begin
            step <= (step == nsteps) ? '0 : step + 1'b1;
            if (step == nsteps) fx <= fx + 1'b1;
          end
          if (sv) begin
            bits[ox[4:0]] <= b;
            ox <= ox + 1'b1;
            if (ox[4:0] == 5'd31) begin
              wr_pend <= 1'b1;
              wr_addr <= c.dst + addr_t'(row * (c.width >> 5)) + addr_t'(ox >> 5);
            end
            if (ox == c.width - 1'b1) state <= S_FLUSH;
          end
        end
        S_FLUSH: if (!wr_pend) begin
          row <= row + 1'b1;
          if (row == c.height - 1'b1) begin state <= S_IDLE; done <= 1'b1; end
          else if (nload > need_of(row + 1'b1, big, c.height)) begin
            state <= S_RUN; fx <= '0; ox <= '0; step <= '0;
          end else state <= S_LOAD;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
