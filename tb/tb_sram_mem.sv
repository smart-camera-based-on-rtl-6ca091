// tb_sram_mem: writes random words at random addresses of a reduced-depth
// memory, reads them back in a different order and checks data and the
// one-cycle read latency; a disabled cycle must leave the read data alone.
// What is checked is this design's own interface behaviour; the stimulus is
// random.
module tb_sram_mem;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic en = 0, we = 0;
  logic [9:0] addr = 0;
  logic [31:0] wdata = 0, rdata;
  sram_mem #(.AW(10)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] ref_m [1024];
  initial begin
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); en = 1; we = 1; addr = 10'(i); wdata = $urandom; ref_m[i] = wdata;
    end
    for (int i = 0; i < 300; i++) begin
      int a;
      a = $urandom_range(0, 1023);
      @(negedge clk); en = 1; we = 0; addr = 10'(a);
      @(negedge clk); en = 0;
      checks++;
      if (rdata != ref_m[a]) begin failures++; $display("addr %0d", a); end
      addr = 10'(a + 1);
      @(negedge clk);
      checks++;
      if (rdata != ref_m[a]) begin failures++; $display("read data changed while disabled"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
