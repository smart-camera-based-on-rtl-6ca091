// tb_highpass_filter: filters a small random image with random signed
// coefficients over a memory that refuses requests, then a 1712 x 180 image
// (the size of a transposed letter image) over a memory that grants every
// request. Every output pixel is compared with a reference convolution
// computed here; the second run also checks the cycle count against the
// processing time of 1.54 ms at 100 MHz reported for this stage (within 1%).
// The letter-image size (180 x 1712) and the 1.54 ms bound at 100 MHz come
// from the source design's bar-code timings.
module tb_highpass_filter;
  import cop_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  localparam int DST = 100000;

  mem_if #(.AW(AW), .DW(DW)) mi ();
  tb_mem_slave #(.AW(AW), .DEPTH(262144), .STALL(1)) mem0 (.clk(clk), .s(mi));
  task_t cfg;
  logic start = 0, busy, done;
  logic signed [15:0] coef [HPF_TAPS];
  highpass_filter dut (.clk, .rst_n, .start, .cfg, .coef, .busy, .done, .m(mi));

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int spix(int x, int y, int w);
    if (x < 0) x = 0;
    if (x >= w) x = w - 1;
    return int'(mem0.mem[y*(w/4) + x/4][8*(x%4) +: 8]);
  endfunction

  task automatic run(int w, int h, int shift, output int cycles);
    cfg = '0; cfg.op = OP_HPF; cfg.src = 0; cfg.dst = DST;
    cfg.width = dim_t'(w); cfg.height = dim_t'(h); cfg.param = shift;
    @(posedge clk); start <= 1; @(posedge clk); start <= 0;
    cycles = 1;
    while (!done) begin @(posedge clk); cycles++; end
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        int acc, e;
        acc = 0;
        for (int t = 0; t < HPF_TAPS; t++) acc += int'(coef[t]) * spix(x + t - 5, y, w);
        acc = acc >>> shift;
        e = acc < 0 ? 0 : acc > 255 ? 255 : acc;
        checks++;
        if (int'(mem0.mem[DST + y*(w/4) + x/4][8*(x%4) +: 8]) != e) begin
          failures++;
          if (failures < 5) $display("pixel %0d,%0d got %0d exp %0d", x, y,
                                     mem0.mem[DST + y*(w/4) + x/4][8*(x%4) +: 8], e);
        end
      end
  endtask

  initial begin
    int cyc;
    for (int i = 0; i < 100000; i++) mem0.mem[i] = $urandom;
    for (int t = 0; t < HPF_TAPS; t++) coef[t] = 16'($signed($urandom_range(0, 40)) - 20);
    repeat (3) @(posedge clk); rst_n = 1;
    run(40, 6, 3, cyc);
    // classic high pass: centre 10, others -1, shift 0
    for (int t = 0; t < HPF_TAPS; t++) coef[t] = (t == 5) ? 16'sd10 : -16'sd1;
    mem0.stall_en = 0;
    run(1712, 180, 0, cyc);
    checks++;
    if (cyc > 155540 || cyc < 152460) begin
      failures++; $display("cycles %0d, 1.54 ms at 100 MHz is 154000", cyc);
    end
    $display("letter image filtered in %0d cycles", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
