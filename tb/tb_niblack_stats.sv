// tb_niblack_stats: feeds random neighbourhoods of 64 and 256 pixels (four
// per cycle, back to back, with random freezes of the pipeline) and
// compares mean, variance and standard deviation with values computed here
// from the pixel sums. Also checks the latency: results leave four cycles
// after the edge that takes the last pixels, when nothing is frozen.
// The reference is the textbook mean and variance; the widths checked are
// this design's.
module tb_niblack_stats;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic en = 1, sel = 0, iv = 0, ifst = 0, ilst = 0;
  logic [7:0] px [4];
  logic ov;
  logic [7:0] mean, sd;
  logic [15:0] var_;
  niblack_stats dut (.clk, .rst_n, .en, .sel8o16(sel), .in_valid(iv), .in_first(ifst),
                     .in_last(ilst), .in_px(px), .out_valid(ov), .mean, .variance(var_), .stdev(sd));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint exp_q[$];   // {mean, var, std} packed
  int t_last, lat_bad = 0, freezes = 0;

  function automatic longint isqrt(longint a);
    longint r = 0;
    while ((r + 1) * (r + 1) <= a) r++;
    return r;
  endfunction

  always @(posedge clk) if (rst_n && ov) begin
    longint e;
    e = exp_q.pop_front();
    checks++;
    if ({mean, var_, sd} != e[31:0]) begin
      failures++;
      $display("t=%0t got m=%0d v=%0d s=%0d exp m=%0d v=%0d s=%0d", $time, mean, var_, sd, e[31:24], e[23:8], e[7:0]);
    end
  end

  initial begin
    for (int l = 0; l < 4; l++) px[l] = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk);
    for (int win = 0; win < 40; win++) begin
      int n;
      longint s1, s2, d;
      int lo, hi;
      sel = (win % 2);
      n = sel ? 256 : 64;
      // narrow or wide pixel spread
      lo = $urandom_range(0, 200); hi = (win % 3 == 0) ? 255 : lo + $urandom_range(0, 55);
      s1 = 0; s2 = 0;
      for (int t = 0; t < n/4; t++) begin
        for (int l = 0; l < 4; l++) begin
          px[l] = 8'($urandom_range(lo, hi));
          s1 += px[l]; s2 += px[l] * px[l];
        end
        iv = 1; ifst = (t == 0); ilst = (t == n/4 - 1);
        en = (win > 20) ? ($urandom % 5 != 0) : 1'b1;
        if (!en) freezes++;
        @(negedge clk);
        while (!en) begin en = ($urandom % 3 != 0); @(negedge clk); end
      end
      d = n * s2 - s1 * s1;
      exp_q.push_back({32'd0, 8'(s1 / n), 16'(d / (n * n)), 8'(isqrt(d) / n)});
      iv = 0; en = 1;
      if (win == 0) begin
        // latency: out_valid after the 4th further edge
        int c = 0;
        while (!ov) begin @(negedge clk); c++; end
        checks++;
        if (c != 4) begin failures++; $display("latency %0d", c); end
      end
    end
    repeat (10) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || freezes == 0) begin failures++; $display("missing results / no freeze"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
