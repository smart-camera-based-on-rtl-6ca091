// tb_dilate_subsample: runs the fused dilation/subsampling on a small random
// image over a memory that refuses requests, then on a 1712 x 180 image with
// every request granted. Each result pixel is compared with the maximum of
// the 32 source pixels around every fourth pixel of every fourth row; the
// second run checks that the stage needs no more than the 1.54 ms at
// 100 MHz reported for it.
// The letter-image size and the 1.54 ms bound at 100 MHz come from the source
// design's bar-code timings.
module tb_dilate_subsample;
  import cop_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  localparam int DST = 100000;

  mem_if #(.AW(AW), .DW(DW)) mi ();
  tb_mem_slave #(.AW(AW), .DEPTH(131072), .STALL(1)) mem0 (.clk(clk), .s(mi));
  task_t cfg;
  logic start = 0, busy, done;
  dilate_subsample dut (.clk, .rst_n, .start, .cfg, .busy, .done, .m(mi));

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int w, int h, output int cycles);
    int ow;
    cfg = '0; cfg.op = OP_DILSUB; cfg.src = 0; cfg.dst = DST;
    cfg.width = dim_t'(w); cfg.height = dim_t'(h);
    @(posedge clk); start <= 1; @(posedge clk); start <= 0;
    cycles = 1;
    while (!done) begin @(posedge clk); cycles++; end
    ow = (w + 15) / 16;
    for (int oy = 0; oy < (h + 3) / 4; oy++)
      for (int ox = 0; ox < w / 4; ox++) begin
        int e;
        e = 0;
        for (int x = 4*ox - 16; x < 4*ox + 16; x++)
          if (x >= 0 && x < w) begin
            int p;
            p = int'(mem0.mem[4*oy*(w/4) + x/4][8*(x%4) +: 8]);
            if (p > e) e = p;
          end
        checks++;
        if (int'(mem0.mem[DST + oy*ow + ox/4][8*(ox%4) +: 8]) != e) begin
          failures++;
          if (failures < 5) $display("pixel %0d,%0d exp %0d", ox, oy, e);
        end
      end
  endtask

  initial begin
    int cyc;
    for (int i = 0; i < 100000; i++) mem0.mem[i] = $urandom;
    repeat (3) @(posedge clk); rst_n = 1;
    run(72, 10, cyc);
    mem0.stall_en = 0;
    run(1712, 180, cyc);
    checks++;
    if (cyc > 154000) begin failures++; $display("too slow: %0d cycles", cyc); end
    $display("letter image dilated and subsampled in %0d cycles", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
