// niblack_stats: pipelined neighbourhood statistics for the local adaptive
// (Niblack) binarization: mean, variance and standard deviation of the N
// pixels of an 8x8 (N = 64) or 16x16 (N = 256) neighbourhood.
//
// LANES pixels enter per cycle (In1..In4 for the default of 4). Each lane
// accumulates its pixels X and their squares X^2 over N/LANES cycles
// (in_first marks the first cycle of a neighbourhood, in_last its last).
// Then, one register stage each:
//   1. adder trees: SX = sum X (16 bit), SX2 = sum X^2 (24 bit);
//   2. N*SX2 (a shift, 32 bit), SX^2 (32 bit), mean = SX/N (8 bit);
//   3. D = N*SX2 - SX^2 = N^2 * variance (32 bit);
//   4. variance = D/N^2 (16 bit), std = sqrt(D)/N (8 bit, sqrt 16 bit).
// The divisions by N and N^2 are shifts selected by sel8o16 (0: 8x8,
// 1: 16x16), sampled with in_last. Results appear with out_valid four cycles after the edge that
// takes in_last; all results are truncated integers. en = 0 freezes the whole
// pipeline (used when the result cannot be written).
// The structure, the widths 16/24/32/16/8 and the four inputs are those of
// the accelerator the design is based on; per-lane widths are sized here to
// hold a full-scale 16x16 neighbourhood (22 and 14 bits), and the pipeline
// placement of the square root is this design's choice.
module niblack_stats #(
  parameter int LANES = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       sel8o16,
  input  logic       in_valid,
  input  logic       in_first,
  input  logic       in_last,
  input  logic [7:0] in_px [LANES],
  output logic       out_valid,
  output logic [7:0] mean,
  output logic [15:0] variance,
  output logic [7:0] stdev
);
  localparam int LS2W = $clog2(256 / LANES) + 16;  // lane sum of squares
  localparam int LS1W = $clog2(256 / LANES) + 8;   // lane sum

  logic [LS2W-1:0] lsum2 [LANES];
  logic [LS1W-1:0] lsum  [LANES];
  logic            v0, v1, v2, v3;
  logic [23:0]     sx2;
  logic [15:0]     sx;
  logic [31:0]     nsx2, sxsq, d;
  logic [7:0]      mean1, mean2;
  logic            sel0, sel1, sel2, sel3;

  function automatic logic [15:0] isqrt(logic [31:0] a);
    logic [15:0] r;
    r = '0;
    for (int b = 15; b >= 0; b--) begin
      logic [15:0] t;
      t = r | (16'd1 << b);
      if (32'(t) * 32'(t) <= a) r = t;
    end
    return r;
  endfunction

  // adder trees on the lane sums
  logic [23:0] tsx2;
  logic [15:0] tsx;
  always_comb begin
    tsx2 = '0; tsx = '0;
    for (int l = 0; l < LANES; l++) begin
      tsx2 += 24'(lsum2[l]);
      tsx  += 16'(lsum[l]);
    end
  end

  logic [15:0] root;
  assign root = isqrt(d);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < LANES; l++) begin lsum2[l] <= '0; lsum[l] <= '0; end
      v0 <= 0; v1 <= 0; v2 <= 0; v3 <= 0; out_valid <= 0;
      sx2 <= '0; sx <= '0; nsx2 <= '0; sxsq <= '0; d <= '0;
      mean1 <= '0; mean2 <= '0; mean <= '0; variance <= '0; stdev <= '0;
      sel0 <= 0; sel1 <= 0; sel2 <= 0; sel3 <= 0;
    end else if (en) begin
      // lane accumulators
      if (in_valid)
        for (int l = 0; l < LANES; l++) begin
          lsum2[l] <= (in_first ? '0 : lsum2[l]) + LS2W'(16'(in_px[l]) * 16'(in_px[l]));
          lsum[l]  <= (in_first ? '0 : lsum[l])  + LS1W'(in_px[l]);
        end
      v0 <= in_valid && in_last;
      if (in_valid && in_last) sel0 <= sel8o16;
      // stage 1
      v1 <= v0; sel1 <= sel0;
      if (v0) begin sx2 <= tsx2; sx <= tsx; end
      // stage 2
      v2 <= v1; sel2 <= sel1;
      if (v1) begin
        nsx2  <= sel1 ? {sx2, 8'd0} : {2'b00, sx2, 6'd0};
        sxsq  <= 32'(sx) * 32'(sx);
        mean1 <= sel1 ? sx[15:8] : sx[13:6];
      end
      // stage 3
      v3 <= v2; sel3 <= sel2;
      if (v2) begin d <= nsx2 - sxsq; mean2 <= mean1; end
      // stage 4
      out_valid <= v3;
      if (v3) begin
        variance <= sel3 ? d[31:16] : d[27:12];
        stdev    <= sel3 ? root[15:8] : root[13:6];
        mean     <= mean2;
      end
    end else begin
      out_valid <= 1'b0;
    end
  end
endmodule
