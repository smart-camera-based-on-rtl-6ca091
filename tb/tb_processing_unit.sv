// tb_processing_unit: checks the opcode decoding and the bus multiplexer of
// the processing unit. Runs, on one memory with random stalls, a
// transposition, a 1x3 median and an identity high pass filter of a 32x16
// image, then an opcode with no module. Each pass must produce its own
// result (the median and the identity filter leave a linear ramp
// unchanged), no module may write outside its destination, and the opcode
// without a module must report done within two cycles without touching
// memory.
// What is checked is this design's own interface behaviour; the stimulus is
// random.
module tb_processing_unit;
  import cop_pkg::*;
  localparam int W = 32, H = 16, NW = W * H / 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, done;
  task_t cfg;
  logic signed [15:0] coef [HPF_TAPS];
  logic [15:0] best_score;
  dim_t best_i, best_j;
  mem_if #(.AW(AW), .DW(DW)) m ();
  processing_unit #(.MAX_W(256), .SHAPE_M(8)) dut (.*);
  tb_mem_slave #(.DEPTH(8192)) mem0 (.clk, .s(m));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic pix_t px(int base, int w, int x, int y);
    return mem0.mem[base + y*(w/4) + x/4][8*(x%4) +: 8];
  endfunction

  task automatic run(op_e op, int mode, int dst, output int cycles);
    cfg = '0; cfg.op = op; cfg.mode = 4'(mode); cfg.src = 0; cfg.dst = addr_t'(dst);
    cfg.width = dim_t'(W); cfg.height = dim_t'(H); cfg.param = 0;
    @(posedge clk); start <= 1; @(posedge clk); start <= 0;
    cycles = 1;
    while (!done) begin @(posedge clk); cycles++; end
  endtask

  // every word outside [lo, lo+n) and outside the source must still be the marker
  task automatic check_untouched(int lo, int n);
    for (int i = NW; i < 8192; i++)
      if ((i < lo || i >= lo + n) && mem0.mem[i] != 32'hDEAD_BEEF) begin
        failures++; $display("stray write at %0d", i); return;
      end
  endtask

  initial begin
    int cyc;
    int unsigned acc;
    for (int k = 0; k < HPF_TAPS; k++) coef[k] = (k == HPF_TAPS / 2) ? 16'sd1 : 16'sd0;
    for (int i = 0; i < 8192; i++) mem0.mem[i] = 32'hDEAD_BEEF;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) mem0.mem[y*(W/4) + x/4][8*(x%4) +: 8] = 8'(x * 3 + y * 5);
    repeat (3) @(posedge clk); rst_n = 1;

    run(OP_TRANSPOSE, 0, 1024, cyc);
    for (int y = 0; y < W; y++)
      for (int x = 0; x < H; x++) begin
        checks++;
        if (px(1024, H, x, y) != px(0, W, y, x)) begin failures++; $display("transpose %0d,%0d", x, y); end
      end
    check_untouched(1024, NW);

    for (int i = 1024; i < 1024 + NW; i++) mem0.mem[i] = 32'hDEAD_BEEF;
    run(OP_MEDIAN, MED_1X3, 2048, cyc);
    for (int i = 0; i < NW; i++) begin
      checks++;
      if (mem0.mem[2048 + i] != mem0.mem[i]) begin failures++; $display("median word %0d", i); end
    end
    check_untouched(2048, NW);

    for (int i = 2048; i < 2048 + NW; i++) mem0.mem[i] = 32'hDEAD_BEEF;
    run(OP_HPF, 0, 3072, cyc);
    for (int i = 0; i < NW; i++) begin
      checks++;
      if (mem0.mem[3072 + i] != mem0.mem[i]) begin failures++; $display("high pass word %0d", i); end
    end
    check_untouched(3072, NW);

    acc = mem0.accesses;
    run(OP_END, 0, 4096, cyc);
    checks++;
    if (cyc > 2 || mem0.accesses != acc) begin failures++; $display("opcode without module: %0d cycles", cyc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
