// tb_bus_bridge: the host bridge between a 33 MHz host bus and a 100 MHz
// processing clock. The host writes configuration words (they must come out
// as cfg_we pulses in order, with their address) and data words to REG_DATA
// (they must come out of the host_data stream in order while the processing
// side takes them at random), honouring host_wait. The processing side pushes
// result words whenever out_ready is high; the host polls REG_STATUS and pops
// REG_DATA, and every word must arrive once and in order. busy and done are
// checked in the status word after they cross over, and an empty result FIFO
// must read as 0.
// What is checked is this design's own interface behaviour; the stimulus is
// random.
module tb_bus_bridge;
  import cop_pkg::*;
  logic clk = 0, rst_n = 0, pci_clk = 0, pci_rst_n = 0;
  always #5 clk = ~clk;
  always #15 pci_clk = ~pci_clk;
  int checks = 0, failures = 0;

  logic host_wr = 0, host_rd = 0, host_rvalid, host_wait;
  logic [7:0] host_addr = 0;
  word_t host_wdata = 0, host_rdata;
  logic cfg_we; logic [7:0] cfg_addr; word_t cfg_wdata;
  word_t host_data, out_data = 0;
  logic host_valid, host_ready = 0, out_valid = 0, out_ready;
  logic busy = 0, done = 0;
  bus_bridge dut (.*);

  initial begin
    #3ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // processing side: collect commands and data, produce results
  word_t cmdq[$], dataq[$], exp_out[$];
  logic [7:0] cmda[$];
  int n_out = 0;
  bit produce = 0;
  always @(posedge clk) if (rst_n) begin
    if (cfg_we) begin cmdq.push_back(cfg_wdata); cmda.push_back(cfg_addr); end
    if (host_valid && host_ready) dataq.push_back(host_data);
  end
  always @(negedge clk) begin
    host_ready = ($urandom % 16 == 0);
    if (produce && out_ready && n_out < 600 && $urandom % 2 == 0) begin
      out_valid = 1; out_data = word_t'(n_out * 7919 + 3); exp_out.push_back(out_data); n_out++;
    end else out_valid = 0;
  end

  task automatic hwrite(logic [7:0] a, word_t d);
    @(negedge pci_clk); host_wr = 1; host_addr = a; host_wdata = d;
    @(posedge pci_clk); while (host_wait) @(posedge pci_clk);
    #1; host_wr = 0;
  endtask
  task automatic hread(logic [7:0] a, output word_t d);
    @(negedge pci_clk); host_rd = 1; host_addr = a;
    @(negedge pci_clk); host_rd = 0;
    checks++;
    if (!host_rvalid) begin failures++; $display("no rvalid"); end
    d = host_rdata;
  endtask

  word_t sent_d[$], sent_c[$], got[$], st, d;
  int waits = 0;
  always @(posedge pci_clk) if (host_wr && host_wait) waits++;
  initial begin
    repeat (4) @(posedge pci_clk); rst_n = 1; pci_rst_n = 1;
    repeat (4) @(posedge pci_clk);
    hread(REG_DATA, d);
    checks++; if (d != 0) begin failures++; $display("empty read %h", d); end
    hread(REG_STATUS, st);
    checks++; if (st[2:0] != 3'b100) begin failures++; $display("status idle %h", st); end
    // 20 commands to the task area and 700 data words, mixed
    for (int i = 0; i < 720; i++) begin
      if (i % 36 == 0) begin
        sent_c.push_back($urandom); hwrite(8'(REG_TASK_BASE + i / 36), sent_c[$]);
      end else begin
        sent_d.push_back($urandom); hwrite(REG_DATA, sent_d[$]);
      end
    end
    repeat (12000) @(posedge clk);
    checks++;
    if (cmdq != sent_c) begin failures++; $display("commands: %0d of %0d", cmdq.size(), sent_c.size()); end
    for (int i = 0; i < cmda.size(); i++) begin
      checks++; if (cmda[i] != 8'(REG_TASK_BASE + i)) begin failures++; $display("cmd addr %0d", i); end
    end
    checks++;
    if (dataq != sent_d) begin failures++; $display("data: %0d of %0d", dataq.size(), sent_d.size()); end
    checks++; if (waits == 0) begin failures++; $display("host_wait never seen"); end
    // status bits
    @(negedge clk); busy = 1;
    repeat (4) @(posedge pci_clk);
    hread(REG_STATUS, st);
    checks++; if (st[1:0] != 2'b01) begin failures++; $display("status busy %h", st); end
    @(negedge clk); busy = 0; done = 1;
    repeat (4) @(posedge pci_clk);
    hread(REG_STATUS, st);
    checks++; if (st[1:0] != 2'b10) begin failures++; $display("status done %h", st); end
    // results: producer runs, the host reads slowly
    produce = 1;
    while (got.size() < 600) begin
      hread(REG_STATUS, st);
      if (st[31:16] > 512) begin failures++; $display("level %0d", st[31:16]); end
      if (!st[2]) begin
        hread(REG_DATA, d); got.push_back(d);
      end else repeat (3) @(posedge pci_clk);
      if (got.size() < 100) repeat (10) @(posedge pci_clk);
    end
    checks++;
    if (got != exp_out) begin failures++; $display("results differ"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
