// tb_processing_controller: programs chains of tasks and answers each start
// with a done after a random delay, checking that tasks are issued in order
// to the right unit (transfers to the memory controller, the rest to the
// processing unit), that OP_ACQUIRE also starts the acquisition, that
// copy_out follows the task, that a chain stops at OP_END or after eight
// tasks, and that done pulses once per chain.
// What is checked is this design's own interface behaviour; the stimulus is
// random.
module tb_processing_controller;
  import cop_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, busy, done, xfer_start, xfer_done = 0, proc_start, proc_done = 0, copy_out, acq_start;
  logic [2:0] task_idx;
  task_t tasks [MAX_TASKS];
  task_t cur;
  processing_controller dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  op_e issued[$];
  int n_done = 0, n_acq = 0, bad_copy = 0;
  always @(posedge clk) if (rst_n) begin
    if (xfer_start) begin
      issued.push_back(cur.op);
      if (!(cur.op inside {OP_ACQUIRE, OP_LOAD, OP_STORE})) begin failures++; $display("op %0d to memory", cur.op); end
    end
    if (proc_start) begin
      issued.push_back(cur.op);
      if (cur.op inside {OP_ACQUIRE, OP_LOAD, OP_STORE, OP_END}) begin failures++; $display("op %0d to unit", cur.op); end
    end
    if (acq_start) n_acq++;
    if (done) n_done++;
  end
  // done responder
  always begin
    @(posedge clk);
    if (xfer_start || proc_start) begin
      logic x;
      x = xfer_start;
      if (copy_out != (proc_start && cur.copy_out)) bad_copy++;
      repeat ($urandom_range(1, 6)) @(posedge clk);
      if (x) xfer_done <= 1; else proc_done <= 1;
      @(posedge clk); xfer_done <= 0; proc_done <= 0;
    end
  end

  task automatic chain(int n_tasks, bit end_marker);
    op_e e[$];
    int acq0;
    acq0 = n_acq;
    issued.delete();
    for (int t = 0; t < MAX_TASKS; t++) begin
      tasks[t] = '0;
      tasks[t].op = op_e'($urandom_range(1, 9));
      tasks[t].copy_out = 1'($urandom);
      if (t == n_tasks && end_marker) tasks[t].op = OP_END;
      if (t < n_tasks) e.push_back(tasks[t].op);
    end
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    @(negedge clk);
    checks++;
    if (issued != e) begin failures++; $display("chain of %0d: %0d issued", n_tasks, issued.size()); end
    checks++;
    begin
      int na;
      na = 0;
      foreach (e[i]) if (e[i] == OP_ACQUIRE) na++;
      if (n_acq - acq0 != na) begin failures++; $display("acquisition starts %0d exp %0d", n_acq - acq0, na); end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int r = 0; r < 12; r++) chain($urandom_range(0, 7), 1'b1);
    chain(8, 1'b0);
    checks++;
    if (n_done != 13 || bad_copy != 0) begin failures++; $display("done %0d bad copy %0d", n_done, bad_copy); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
