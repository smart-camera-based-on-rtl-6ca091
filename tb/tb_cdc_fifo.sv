// tb_cdc_fifo: writes 2000 random words from a 10 ns clock domain into a
// 16-entry FIFO read from a 27 ns domain, with random write and read
// pauses, and checks order and content, that full and afull were both seen,
// that no write was accepted while full and that the FIFO ends empty.
// What is checked is this design's own interface behaviour; the stimulus is
// random.
module tb_cdc_fifo;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  always #5 wclk = ~wclk;
  always #13.5 rclk = ~rclk;
  int checks = 0, failures = 0;

  logic wr_en = 0, rd_en = 0, full, afull, empty;
  logic [31:0] wr_data = 0, rd_data;
  logic [4:0] rd_level;
  cdc_fifo #(.W(32), .AW_F(4)) dut (
    .wr_clk(wclk), .wr_rst_n(wrst_n), .wr_en, .wr_data, .full, .afull,
    .rd_clk(rclk), .rd_rst_n(rrst_n), .rd_en, .rd_data, .empty, .rd_level);

  initial begin
    #500us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] q[$];
  int n_full = 0, n_afull = 0, n_read = 0, sent = 0;
  always @(posedge wclk) if (wrst_n) begin
    if (full) n_full++;
    if (afull) n_afull++;
    if (wr_en && !full) begin q.push_back(wr_data); sent++; end
  end
  always @(posedge rclk) if (rrst_n) begin
    if (rd_en && !empty) begin
      logic [31:0] e;
      e = q.pop_front();
      checks++; n_read++;
      if (rd_data != e) begin failures++; if (failures < 5) $display("got %h exp %h", rd_data, e); end
    end
  end

  initial begin
    #50; wrst_n = 1; rrst_n = 1;
    fork
      begin
        while (sent < 2000) begin
          @(negedge wclk);
          wr_en = ($urandom % 4 != 0);
          wr_data = $urandom;
        end
        wr_en = 0;
      end
      begin
        while (n_read < 2000) begin
          @(negedge rclk);
          rd_en = (sent < 500) ? ($urandom % 8 == 0) : ($urandom % 3 != 0);
        end
        rd_en = 0;
      end
    join
    repeat (5) @(posedge rclk);
    checks++;
    if (!empty || n_full == 0 || n_afull == 0 || q.size() != 0) begin
      failures++; $display("empty %0d full seen %0d afull seen %0d left %0d", empty, n_full, n_afull, q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
