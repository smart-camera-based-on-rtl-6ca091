// median_filter: sliding-window median of an 8-bit image in main memory,
// with a 1x3, 1x5 (along the row) or 3x3 kernel selected by cfg.mode
// (med_mode_e).
//
// The module keeps its own cache of four image rows (row r in slot r mod 4),
// so that each source row is read from memory only once even with the 3x3
// kernel. Before result row y is produced, the rows up to y (1-D kernels) or
// y+1 (3x3) are loaded. The row is then filtered four pixels per cycle by
// four median units, each of which ranks the kernel's pixels and picks the
// one of middle rank, and every result word is written at once. Pixels
// outside the image are replaced by the nearest edge pixel.
// Interface: cfg.src/cfg.dst word addresses, cfg.width (multiple of 4, at
// most MAX_W), cfg.height. Timing: width/4 reads and width/4 writes per row
// plus two cycles, so about half a cycle per pixel when all requests are
// granted.
// The three kernels, the per-processing cache and 32-bit (4-pixel) memory
// words follow the document; the cache organisation and the four parallel
// median units are this design's choices.
module median_filter import cop_pkg::*; #(
  parameter int MAX_W = 2048
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

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_FILT} state_e;
  state_e state;
  task_t  c;
  pix_t   cache [4][MAX_W];
  dim_t   row, nload, words, rd_cnt, rd_got, wr_cnt;
  logic   is2d;

  function automatic pix_t cpx(int signed x, int signed y, int signed w, int signed h);
    int signed xc, yc;
    xc = (x < 0) ? 0 : (x >= w) ? w - 1 : x;
    yc = (y < 0) ? 0 : (y >= h) ? h - 1 : y;
    return cache[yc[1:0]][xc[XW-1:0]];
  endfunction

  // median of v[0..N-1] (N odd): the entry with fewer than N/2+1 smaller
  // entries and at least N/2+1 entries smaller or equal
  function automatic pix_t med3(pix_t v [3]);
    pix_t r;
    r = v[0];
    for (int i = 2; i >= 0; i--) begin
      int lt, le;
      lt = 0; le = 0;
      for (int j = 0; j < 3; j++) begin lt += int'(v[j] < v[i]); le += int'(v[j] <= v[i]); end
      if (lt <= 1 && le > 1) r = v[i];
    end
    return r;
  endfunction
  function automatic pix_t med5(pix_t v [5]);
    pix_t r;
    r = v[0];
    for (int i = 4; i >= 0; i--) begin
      int lt, le;
      lt = 0; le = 0;
      for (int j = 0; j < 5; j++) begin lt += int'(v[j] < v[i]); le += int'(v[j] <= v[i]); end
      if (lt <= 2 && le > 2) r = v[i];
    end
    return r;
  endfunction
  function automatic pix_t med9(pix_t v [9]);
    pix_t r;
    r = v[0];
    for (int i = 8; i >= 0; i--) begin
      int lt, le;
      lt = 0; le = 0;
      for (int j = 0; j < 9; j++) begin lt += int'(v[j] < v[i]); le += int'(v[j] <= v[i]); end
      if (lt <= 4 && le > 4) r = v[i];
    end
    return r;
  endfunction

  word_t res;
  always_comb begin
    for (int l = 0; l < 4; l++) begin
      pix_t v3 [3];
      pix_t v5 [5];
      pix_t v9 [9];
      int   x, y, w, h;
      x = 4 * int'(wr_cnt) + l; y = int'(row); w = int'(c.width); h = int'(c.height);
      for (int i = 0; i < 3; i++) v3[i] = cpx(x + i - 1, y, w, h);
      for (int i = 0; i < 5; i++) v5[i] = cpx(x + i - 2, y, w, h);
      for (int j = 0; j < 3; j++)
        for (int i = 0; i < 3; i++) v9[3*j + i] = cpx(x + i - 1, y + j - 1, w, h);
      case (med_mode_e'(c.mode[1:0]))
        MED_1X5: res[8*l +: 8] = med5(v5);
        MED_3X3: res[8*l +: 8] = med9(v9);
        default: res[8*l +: 8] = med3(v3);
      endcase
    end
  end

  // last row that must be in the cache before row `row` is filtered
  dim_t need;
  always_comb begin
    need = row;
    if (is2d && row != c.height - 1'b1) need = row + 1'b1;
  end

  always_comb begin
    m.req = 1'b0; m.we = 1'b0; m.addr = '0; m.wdata = res;
    if (state == S_LOAD && rd_cnt < words) begin
      m.req = 1'b1; m.addr = c.src + addr_t'(nload * words) + addr_t'(rd_cnt);
    end else if (state == S_FILT) begin
      m.req = 1'b1; m.we = 1'b1; m.addr = c.dst + addr_t'(row * words) + addr_t'(wr_cnt);
    end
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (m.rvalid && state == S_LOAD)
      for (int l = 0; l < 4; l++) cache[nload[1:0]][4*rd_got + l] <= m.rdata[8*l +: 8];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; done <= 1'b0; c <= '0; row <= '0; nload <= '0; words <= '0;
      rd_cnt <= '0; rd_got <= '0; wr_cnt <= '0; is2d <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          c <= cfg; row <= '0; nload <= '0; words <= cfg.width >> 2;
          is2d <= (med_mode_e'(cfg.mode[1:0]) == MED_3X3);
          rd_cnt <= '0; rd_got <= '0;
          state <= S_LOAD;
        end
        S_LOAD: begin
          if (m.req && m.gnt) rd_cnt <= rd_cnt + 1'b1;
          if (m.rvalid) rd_got <= rd_got + 1'b1;
          if (m.rvalid && rd_got == words - 1'b1) begin
            rd_cnt <= '0; rd_got <= '0;
            nload <= nload + 1'b1;
            if (nload >= need) begin state <= S_FILT; wr_cnt <= '0; end
          end
        end
        S_FILT: if (m.gnt) begin
          wr_cnt <= wr_cnt + 1'b1;
          if (wr_cnt == words - 1'b1) begin
            row <= row + 1'b1;
            if (row == c.height - 1'b1) begin state <= S_IDLE; done <= 1'b1; end
            else if (nload > (is2d && row + 12'd1 != c.height - 1'b1 ? row + 12'd2 : row + 12'd1))
              state <= S_FILT;
            else state <= S_LOAD;
            wr_cnt <= '0;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
