// tb_median_filter: runs the three kernels (1x3, 1x5, 3x3) on a small random
// image over a memory that refuses requests, and on a 128 x 128 image with
// every request granted. Each result pixel is compared with a median
// computed here by sorting the kernel's pixels (edge pixels replicated). The
// 128 x 128 runs must not need more cycles than the times reported for this
// size at 100 MHz: 0.16 ms for the 1-D kernels, 0.32 ms for 3x3.
// The cycle bounds come from the source design's median timings at 100 MHz;
// the images are random.
module tb_median_filter;
  import cop_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  localparam int DST = 32768;

  mem_if #(.AW(AW), .DW(DW)) mi ();
  tb_mem_slave #(.AW(AW), .DEPTH(65536), .STALL(1)) mem0 (.clk(clk), .s(mi));
  task_t cfg;
  logic start = 0, busy, done;
  median_filter dut (.clk, .rst_n, .start, .cfg, .busy, .done, .m(mi));

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int spix(int x, int y, int w, int h);
    x = x < 0 ? 0 : x >= w ? w - 1 : x;
    y = y < 0 ? 0 : y >= h ? h - 1 : y;
    return int'(mem0.mem[y*(w/4) + x/4][8*(x%4) +: 8]);
  endfunction

  task automatic run(int mode, int w, int h, output int cycles);
    cfg = '0; cfg.op = OP_MEDIAN; cfg.mode = 4'(mode); cfg.src = 0; cfg.dst = DST;
    cfg.width = dim_t'(w); cfg.height = dim_t'(h);
    @(posedge clk); start <= 1; @(posedge clk); start <= 0;
    cycles = 1;
    while (!done) begin @(posedge clk); cycles++; end
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        int v[$];
        if (mode == 0) for (int i = -1; i <= 1; i++) v.push_back(spix(x+i, y, w, h));
        if (mode == 1) for (int i = -2; i <= 2; i++) v.push_back(spix(x+i, y, w, h));
        if (mode == 2) for (int j = -1; j <= 1; j++) for (int i = -1; i <= 1; i++)
                         v.push_back(spix(x+i, y+j, w, h));
        v.sort();
        checks++;
        if (int'(mem0.mem[DST + y*(w/4) + x/4][8*(x%4) +: 8]) != v[v.size()/2]) begin
          failures++;
          if (failures < 5) $display("mode %0d pixel %0d,%0d exp %0d", mode, x, y, v[v.size()/2]);
        end
      end
  endtask

  initial begin
    int cyc;
    for (int i = 0; i < 32768; i++) mem0.mem[i] = $urandom;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int md = 0; md < 3; md++) run(md, 20, 7, cyc);
    mem0.stall_en = 0;
    for (int md = 0; md < 3; md++) begin
      run(md, 128, 128, cyc);
      checks++;
      if (cyc > (md == 2 ? 32000 : 16000)) begin
        failures++; $display("mode %0d too slow: %0d cycles", md, cyc);
      end
      $display("mode %0d: 128x128 in %0d cycles", md, cyc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
