// tb_acq_data_interface: sends random pixels with random gaps and checks
// that they come out four per word, first pixel in bits 7:0, that a flush
// sends a final partial word zero-padded, and that the word count is right.
// What is checked is this design's own interface behaviour; the stimulus is
// random.
module tb_acq_data_interface;
  import cop_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic clear = 0, pix_valid = 0, flush = 0, wr_en;
  pix_t pix = 0;
  word_t wr_data;
  logic [31:0] words;
  acq_data_interface dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_t got[$];
  always @(posedge clk) if (rst_n && wr_en) got.push_back(wr_data);

  initial begin
    pix_t sent[$];
    int n = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 203; i++) begin
      @(negedge clk);
      pix_valid = 1; pix = 8'($urandom); sent.push_back(pix);
      @(negedge clk);
      pix_valid = 0;
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    repeat (3) @(negedge clk);
    while (sent.size() % 4 != 0) sent.push_back(8'd0);
    for (int w = 0; w < sent.size() / 4; w++) begin
      word_t e;
      for (int k = 0; k < 4; k++) e[8*k +: 8] = sent[4*w + k];
      checks++;
      if (w >= got.size() || got[w] != e) begin
        failures++;
        if (failures < 5) $display("word %0d got %h exp %h", w, w < got.size() ? got[w] : 0, e);
      end
    end
    checks++;
    if (words != 51 || got.size() != 51) begin failures++; $display("count %0d/%0d", words, got.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
