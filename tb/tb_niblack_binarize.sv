// tb_niblack_binarize: binarizes a 64 x 12 test image (a nearly flat left
// half, a noisy right half) with 8x8 and 16x16 neighbourhoods, first over a
// memory that refuses requests, then with every request granted. Each result
// bit is compared with a reference computed here directly from the
// neighbourhood sums (mean = floor(sum/N), var = floor((N*sum2 - sum^2)/N^2),
// std = floor(sqrt(N*sum2 - sum^2)/N)). Also checks that both the
// low-variance rule and both threshold outcomes occurred, and that a
// stall-free run takes N/4 cycles per pixel plus the row loads.
// The reference follows the source design's threshold formula; sizes are
// reduced to keep the run short.
module tb_niblack_binarize;
  import cop_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_lowvar = 0, n_one = 0, n_zero_thr = 0;
  localparam int W = 64, H = 12, DST = 8192;

  mem_if #(.AW(AW), .DW(DW)) mi ();
  tb_mem_slave #(.AW(AW), .DEPTH(16384), .STALL(1)) mem0 (.clk(clk), .s(mi));
  task_t cfg;
  logic start = 0, busy, done;
  niblack_binarize dut (.clk, .rst_n, .start, .cfg, .busy, .done, .m(mi));

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint spix(int x, int y);
    x = x < 0 ? 0 : x >= W ? W - 1 : x;
    y = y < 0 ? 0 : y >= H ? H - 1 : y;
    return longint'(mem0.mem[y*(W/4) + x/4][8*(x%4) +: 8]);
  endfunction

  function automatic longint isqrt(longint a);
    longint r = 0;
    while ((r + 1) * (r + 1) <= a) r++;
    return r;
  endfunction

  task automatic run(int big, int stdref, output int cycles);
    int s, n;
    s = big ? 16 : 8; n = s * s;
    cfg = '0; cfg.op = OP_NIBLACK; cfg.mode = 4'(big); cfg.src = 0; cfg.dst = DST;
    cfg.width = dim_t'(W); cfg.height = dim_t'(H); cfg.param = stdref;
    @(posedge clk); start <= 1; @(posedge clk); start <= 0;
    cycles = 1;
    while (!done) begin @(posedge clk); cycles++; end
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        longint s1, s2, d, mean, var_, sd, p;
        int e;
        s1 = 0; s2 = 0;
        for (int j = -s/2; j < s/2; j++)
          for (int i = -s/2; i < s/2; i++) begin
            p = spix(x + i, y + j); s1 += p; s2 += p * p;
          end
        d = n * s2 - s1 * s1;
        mean = s1 / n; var_ = d / (n * n); sd = isqrt(d) / n;
        p = spix(x, y);
        if (var_ < stdref) begin e = 0; n_lowvar++; end
        else begin
          e = (16 * p < 16 * mean - 3 * sd) ? 1 : 0;
          if (e == 1) n_one++; else n_zero_thr++;
        end
        checks++;
        if (int'(mem0.mem[DST + y*(W/32) + x/32][x%32]) != e) begin
          failures++;
          if (failures < 5) $display("S=%0d pixel %0d,%0d exp %0d", s, x, y, e);
        end
      end
  endtask

  initial begin
    int cyc;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        mem0.mem[y*(W/4) + x/4][8*(x%4) +: 8] = 8'(x < W/2 ? 100 + $urandom_range(0, 2) : $urandom_range(0, 255));
    repeat (3) @(posedge clk); rst_n = 1;
    run(0, 20, cyc);
    run(1, 20, cyc);
    mem0.stall_en = 0;
    for (int big = 0; big < 2; big++) begin
      int lo;
      run(big, 20, cyc);
      lo = W * H * (big ? 64 : 16);
      checks++;
      if (cyc < lo || cyc > lo + H * (W/4 + 1) * 2 + H * 12 + 40) begin
        failures++; $display("S=%0d: %0d cycles, feed alone is %0d", big ? 16 : 8, cyc, lo);
      end
      $display("S=%0d: %0d cycles for %0d pixels", big ? 16 : 8, cyc, W * H);
    end
    checks++;
    if (n_lowvar == 0 || n_one == 0 || n_zero_thr == 0) begin
      failures++; $display("cases not all covered: %0d %0d %0d", n_lowvar, n_one, n_zero_thr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
