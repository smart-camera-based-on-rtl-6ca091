// highpass_filter: row-wise (1-D) FIR filter of an 8-bit image in main
// memory, used to remove the background and lift the bright bar code.
//
// Each source row is first read into a line cache (width/4 words). The row is
// then filtered four pixels at a time: four filter lanes, each an 11-tap
// convolution with the programmable signed coefficients coef[0..10]
// (coef[5] is the centre tap), produce the four pixels of one result word,
// which is written back at once: 44 multipliers in all. The sum is shifted
// right arithmetically by cfg.param[4:0] and saturated to 0..255. Pixels
// beyond the row ends are replaced by the edge pixel.
// Interface: cfg.src/cfg.dst word addresses, cfg.width (multiple of 4,
// <= MAX_W) and cfg.height; result has the source size. Timing per row:
// width/4 reads, one cycle of latency, width/4 writes and one cycle of turn
// around, i.e. about half a cycle per pixel when every request is granted.
// Four lanes and 11 taps follow the document; coefficient width, the shift,
// saturation and edge handling are this design's choices.
module highpass_filter import cop_pkg::*; #(
  parameter int MAX_W = 2048,
  parameter int TAPS  = 11
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  task_t cfg,
  input  logic signed [15:0] coef [TAPS],
  output logic  busy,
  output logic  done,
  mem_if.master m
);
  localparam int HALF = TAPS / 2;
  localparam int XW   = $clog2(MAX_W) + 1;

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_FILT} state_e;
  state_e state;
  task_t  c;
  pix_t   line [MAX_W];
  dim_t   row, words, rd_cnt, rd_got, wr_cnt;
  addr_t  src_row, dst_row;
  logic signed [15:0] k [TAPS];

  function automatic pix_t px(int signed x, int signed w);
    int signed xc;
    xc = (x < 0) ? 0 : (x >= w) ? w - 1 : x;
    return line[xc[XW-1:0]];
  endfunction

  word_t res;
  always_comb begin
    for (int l = 0; l < 4; l++) begin
      logic signed [31:0] acc;
      logic signed [31:0] sh;
      acc = '0;
      for (int t = 0; t < TAPS; t++)
        acc += k[t] * $signed({1'b0, px(4*int'(wr_cnt) + l + t - HALF, int'(c.width))});
      sh = acc >>> c.param[4:0];
      res[8*l +: 8] = (sh < 0) ? 8'd0 : (sh > 255) ? 8'd255 : sh[7:0];
    end
  end

  always_comb begin
    m.req = 1'b0; m.we = 1'b0; m.addr = '0; m.wdata = res;
    if (state == S_LOAD && rd_cnt < words) begin
      m.req = 1'b1; m.addr = src_row + addr_t'(rd_cnt);
    end else if (state == S_FILT) begin
      m.req = 1'b1; m.we = 1'b1; m.addr = dst_row + addr_t'(wr_cnt);
    end
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (m.rvalid && state == S_LOAD)
      for (int l = 0; l < 4; l++) line[4*rd_got + l] <= m.rdata[8*l +: 8];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; done <= 1'b0; c <= '0; row <= '0; words <= '0;
      rd_cnt <= '0; rd_got <= '0; wr_cnt <= '0; src_row <= '0; dst_row <= '0;
      for (int t = 0; t < TAPS; t++) k[t] <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          c <= cfg; row <= '0; words <= cfg.width >> 2;
          src_row <= cfg.src; dst_row <= cfg.dst;
          rd_cnt <= '0; rd_got <= '0;
          for (int t = 0; t < TAPS; t++) k[t] <= coef[t];
          state <= S_LOAD;
        end
        S_LOAD: begin
          if (m.req && m.gnt) rd_cnt <= rd_cnt + 1'b1;
          if (m.rvalid) rd_got <= rd_got + 1'b1;
          if (m.rvalid && rd_got == words - 1'b1) begin
            state <= S_FILT; wr_cnt <= '0;
          end
        end
        S_FILT: if (m.gnt) begin
          wr_cnt <= wr_cnt + 1'b1;
          if (wr_cnt == words - 1'b1) begin
            rd_cnt <= '0; rd_got <= '0;
            src_row <= src_row + addr_t'(words);
            dst_row <= dst_row + addr_t'(words);
            row <= row + 1'b1;
            if (row == c.height - 1'b1) begin state <= S_IDLE; done <= 1'b1; end
            else state <= S_LOAD;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
