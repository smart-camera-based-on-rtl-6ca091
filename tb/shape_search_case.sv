// shape_search_case: one test case of the shape search, used by
// tb_shape_search for each shape size. It plants a random M x M binary shape
// at a known place (PI, PJ) of a random W x H binary search window, runs the
// search over a memory that refuses requests and again with every request
// granted, and compares every score with an XNOR count computed here, the
// reported best placement with the planted one (score M*M), and the
// stall-free cycle count with (H-M+1) * (ceil((W-M+1)/D) * M + (W-M+1))
// plus the loads. It raises fin when done and leaves its counts on checks/failures.
// The XNOR correlation and the shape sizes follow the source design; the
// window sizes are this testbench's own.
module shape_search_case #(
  parameter int M  = 32,
  parameter int W  = 64,
  parameter int H  = 48,
  parameter int PI = 13,
  parameter int PJ = 7
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output bit   fin
);
  import cop_pkg::*;
  localparam int D = 8, MW = (M + 31) / 32, SHP = 3000, DST = 4000;

  logic rst_n = 0;
  mem_if #(.AW(AW), .DW(DW)) mi ();
  tb_mem_slave #(.AW(AW), .DEPTH(16384), .STALL(1)) mem0 (.clk(clk), .s(mi));
  task_t cfg;
  logic start = 0, busy, done;
  logic [15:0] bs;
  dim_t bi, bj;
  shape_search #(.M(M), .D(D)) dut (.clk, .rst_n, .start, .cfg, .busy, .done,
    .best_score(bs), .best_i(bi), .best_j(bj), .m(mi));

  function automatic bit wpix(int x, int y);
    return mem0.mem[y*(W/32) + x/32][x%32];
  endfunction
  function automatic bit spix(int x, int y);
    return mem0.mem[SHP + y*MW + x/32][x%32];
  endfunction

  task automatic run(output int cycles);
    cfg = '0; cfg.op = OP_SHAPE; cfg.src = 0; cfg.dst = DST; cfg.param = SHP;
    cfg.width = dim_t'(W); cfg.height = dim_t'(H);
    @(posedge clk); start <= 1; @(posedge clk); start <= 0;
    cycles = 1;
    while (!done) begin @(posedge clk); cycles++; end
    for (int j = 0; j <= H - M; j++)
      for (int i = 0; i <= W - M; i++) begin
        int f = 0;
        for (int y = 0; y < M; y++)
          for (int x = 0; x < M; x++)
            f += (spix(x, y) == wpix(x + i, y + j)) ? 1 : 0;
        checks++;
        if (mem0.mem[DST + j*(W-M+1) + i] != f) begin
          failures++;
          if (failures < 5) $display("M=%0d: f(%0d,%0d)=%0d exp %0d", M, i, j, mem0.mem[DST + j*(W-M+1) + i], f);
        end
      end
    checks++;
    if (bs != 16'(M*M) || bi != PI || bj != PJ) begin
      failures++; $display("M=%0d: best %0d at %0d,%0d", M, bs, bi, bj);
    end
  endtask

  initial begin
    int cyc, e;
    checks = 0; failures = 0; fin = 0;
    // fill the memory only once reset has taken hold of the search
    repeat (2) @(posedge clk);
    for (int i = 0; i < 16384; i++) mem0.mem[i] = $urandom;
    for (int y = 0; y < M; y++)
      for (int x = 0; x < M; x++) begin
        int a;
        a = (y + PJ) * (W/32) + (x + PI) / 32;
        mem0.mem[a][(x + PI) % 32] = spix(x, y);
      end
    repeat (3) @(posedge clk); rst_n = 1;
    run(cyc);
    mem0.stall_en = 0;
    run(cyc);
    e = (H-M+1) * (((W-M+1 + D-1) / D) * M + (W-M+1));
    checks++;
    if (cyc < e || cyc > e + (M*MW + W/32*H) + 10) begin
      failures++; $display("M=%0d: cycles %0d, correlation alone %0d", M, cyc, e);
    end
    $display("M=%0d, %0dx%0d window: search took %0d cycles", M, W, H, cyc);
    fin = 1;
  end
endmodule
