// tb_shape_search: checks the binary shape search for the three shape sizes
// of the source design, 16 x 16, 32 x 32 and 64 x 64, each in a window of
// twice its width (the block sizes 16 x 32, 32 x 64 and 64 x 128 used for
// these shapes) and a few rows taller than the shape. Each case
// (shape_search_case) compares every score of the score map with an XNOR
// count, the best placement with the planted shape and the cycle count with
// the module's formula; the counts of the three cases are added.
// The shape sizes and the block widths follow the source design; the window
// heights are this testbench's own, kept small for a short run.
module tb_shape_search;
  logic clk = 0;
  always #5 clk = ~clk;
  int c16, f16, c32, f32, c64, f64;
  bit d16, d32, d64;

  shape_search_case #(.M(16), .W(32),  .H(24), .PI(9),  .PJ(5)) u16 (.clk, .checks(c16), .failures(f16), .fin(d16));
  shape_search_case #(.M(32), .W(64),  .H(48), .PI(13), .PJ(7)) u32 (.clk, .checks(c32), .failures(f32), .fin(d32));
  shape_search_case #(.M(64), .W(128), .H(72), .PI(37), .PJ(6)) u64 (.clk, .checks(c64), .failures(f64), .fin(d64));

  initial begin
    repeat (500000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c16 + c32 + c64, f16 + f32 + f64 + 1);
    $finish;
  end

  initial begin
    wait (d16 && d32 && d64);
    $display("TB_RESULT checks=%0d failures=%0d", c16 + c32 + c64, f16 + f32 + f64);
    $finish;
  end
endmodule
