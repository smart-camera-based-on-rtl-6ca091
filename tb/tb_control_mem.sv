// tb_control_mem: drives the memory controller with its three transfers
// and a processing-module client. LOAD puts host words into memory, STORE
// brings them out in order, ACQUIRE stores sensor words and broadcasts them
// when copy_out is set, and a module client reads them back and writes
// results broadcast to the output (pm_copy) while the output stream refuses
// words at random, which must stall the client and the transfers without
// losing or duplicating a word.
// What is checked is this design's own interface behaviour; the stimulus is
// random.
module tb_control_mem;
  import cop_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic xfer_start = 0, xfer_done, xfer_busy, pm_copy = 0;
  task_t cfg;
  word_t host_data = 0, acq_data = 0, out_data;
  logic host_valid = 0, host_ready, acq_valid = 0, acq_ready, out_valid, out_ready = 1;
  mem_if #(.AW(AW), .DW(DW)) pm ();
  control_mem #(.MEM_AW(12)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_t outq[$];
  int stalls = 0, level = 0;
  bit rnd_ready = 0;
  always @(posedge clk) if (rst_n) begin
    // output modelled as an 8-entry FIFO drained at random; ready means at
    // least 4 free entries, as the almost-full flag of the real FIFO
    if (out_valid) begin
      if (level == 8) begin failures++; $display("output FIFO overrun"); end
      else level++;
      outq.push_back(out_data);
    end
    if (level > 0 && (!rnd_ready || $urandom % 3 == 0)) level--;
    if (pm.req && !pm.gnt) stalls++;
  end
  always @(negedge clk) out_ready = (level <= 4);

  task automatic xfer(op_e op, bit copy, int src, int dst, int n);
    cfg = '0; cfg.op = op; cfg.copy_out = copy; cfg.src = addr_t'(src); cfg.dst = addr_t'(dst); cfg.param = n;
    @(negedge clk); xfer_start = 1; @(negedge clk); xfer_start = 0;
  endtask

  word_t hw[$], aw[$];
  initial begin
    pm.req = 0; pm.we = 0; pm.addr = 0; pm.wdata = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    // LOAD 40 host words to 100
    for (int i = 0; i < 40; i++) hw.push_back($urandom);
    xfer(OP_LOAD, 0, 0, 100, 40);
    for (int i = 0; i < 40; i++) begin
      @(negedge clk); host_valid = ($urandom % 2 == 0);
      while (!host_valid) begin @(negedge clk); host_valid = ($urandom % 2 == 0); end
      host_data = hw[i];
      @(posedge clk); #1; host_valid = 0;
    end
    while (xfer_busy) @(negedge clk);
    // STORE them with a random output ready
    rnd_ready = 1;
    outq.delete();
    xfer(OP_STORE, 0, 100, 0, 40);
    while (xfer_busy) @(negedge clk);
    repeat (3) @(negedge clk);
    checks++;
    if (outq != hw) begin failures++; $display("STORE: %0d words", outq.size()); end
    // ACQUIRE 30 sensor words to 500 with broadcast
    outq.delete();
    for (int i = 0; i < 30; i++) aw.push_back($urandom);
    xfer(OP_ACQUIRE, 1, 0, 500, 30);
    for (int i = 0; i < 30; i++) begin
      @(negedge clk); acq_valid = 1; acq_data = aw[i];
      @(posedge clk); while (!acq_ready) @(posedge clk);
      #1; acq_valid = 0;
    end
    while (xfer_busy) @(negedge clk);
    repeat (2) @(negedge clk);
    checks++;
    if (outq != aw) begin failures++; $display("ACQUIRE copy: %0d words", outq.size()); end
    // module client: read 500..529, write +1 to 700.. with broadcast
    outq.delete();
    pm_copy = 1;
    for (int i = 0; i < 30; i++) begin
      word_t d;
      @(negedge clk); pm.req = 1; pm.we = 0; pm.addr = addr_t'(500 + i);
      @(posedge clk); while (!pm.gnt) @(posedge clk);
      #1; pm.req = 0;
      checks++;
      if (!pm.rvalid || pm.rdata != aw[i]) begin failures++; $display("client read %0d", i); end
      d = pm.rdata + 1;
      @(negedge clk); pm.req = 1; pm.we = 1; pm.addr = addr_t'(700 + i); pm.wdata = d;
      @(posedge clk); while (!pm.gnt) @(posedge clk);
      #1; pm.req = 0; pm.we = 0;
    end
    pm_copy = 0;
    repeat (2) @(negedge clk);
    checks++;
    begin
      bit ok;
      ok = (outq.size() == 30);
      for (int i = 0; i < 30 && ok; i++) ok = (outq[i] == aw[i] + 1);
      if (!ok) begin failures++; $display("client broadcast: %0d words", outq.size()); end
    end
    // read the client results back through STORE
    outq.delete();
    xfer(OP_STORE, 0, 700, 0, 30);
    while (xfer_busy) @(negedge clk);
    repeat (3) @(negedge clk);
    checks++;
    if (outq.size() != 30 || outq[29] != aw[29] + 1) begin failures++; $display("client writes not stored"); end
    checks++;
    if (stalls == 0) begin failures++; $display("client never stalled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
