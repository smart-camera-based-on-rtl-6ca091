// tb_transpose4: fills memory with a W x H image of random pixels, runs the
// transposition twice (memory without and with refused requests), compares
// every destination pixel with the source pixel at the swapped position and
// checks the cycle count of the stall-free run: 8 cycles per 4x4 block.
// The expected cycle count is this design's own (8 cycles per block, four reads and four writes); the
// images are random.
module tb_transpose4;
  import cop_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int W = 24, H = 16;
  int checks = 0, failures = 0;

  mem_if #(.AW(AW), .DW(DW)) mi ();
  tb_mem_slave #(.AW(AW), .DEPTH(4096), .STALL(0)) mem0 (.clk(clk), .s(mi));
  task_t cfg;
  logic start = 0, busy, done;
  transpose4 dut (.clk, .rst_n, .start, .cfg, .busy, .done, .m(mi));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic pix_t src_pix(int x, int y);
    return mem0.mem[y*(W/4) + x/4][8*(x%4) +: 8];
  endfunction
  function automatic pix_t dst_pix(int x, int y); // result is H wide
    return mem0.mem[1024 + y*(H/4) + x/4][8*(x%4) +: 8];
  endfunction

  task automatic run(output int cycles);
    cfg = '0; cfg.op = OP_TRANSPOSE; cfg.src = 0; cfg.dst = 1024;
    cfg.width = dim_t'(W); cfg.height = dim_t'(H);
    @(posedge clk); start <= 1; @(posedge clk); start <= 0;
    cycles = 1;
    while (!done) begin @(posedge clk); cycles++; end
  endtask

  initial begin
    int cyc;
    for (int i = 0; i < 4096; i++) mem0.mem[i] = $urandom;
    repeat (3) @(posedge clk); rst_n = 1;
    run(cyc);
    checks++;
    if (cyc != 8 * (W/4) * (H/4) + 2) begin
      failures++; $display("cycle count %0d, expected %0d", cyc, 8*(W/4)*(H/4)+2);
    end
    for (int i = 1024; i < 4096; i++) mem0.mem[i] = 0;
    mem0.stall_en = 1;
    run(cyc);
    for (int y = 0; y < W; y++)
      for (int x = 0; x < H; x++) begin
        checks++;
        if (dst_pix(x, y) !== src_pix(y, x)) begin
          failures++;
          if (failures < 5) $display("mismatch at %0d,%0d", x, y);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
