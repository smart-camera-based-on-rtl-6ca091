// tb_command_controller: writes random configuration words and checks the
// decoded task descriptors, acquisition command and coefficients field by
// field against the register map; checks that REG_CTRL bit 0 starts the
// chain only while it is idle, and that unmapped words change nothing.
// What is checked is this design's own interface behaviour; the stimulus is
// random.
module tb_command_controller;
  import cop_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_we = 0, busy = 0, start;
  logic [7:0] cfg_addr = 0;
  word_t cfg_wdata = 0;
  task_t tasks [MAX_TASKS];
  acq_cmd_t acq;
  logic signed [15:0] coef [HPF_TAPS];
  command_controller dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(logic [7:0] a, word_t d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("mismatch: %s", what); end
  endtask

  int starts = 0;
  always @(posedge clk) if (rst_n && start) starts++;

  initial begin
    word_t tw [MAX_TASKS][5];
    word_t aw [5];
    word_t cw [HPF_TAPS];
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < MAX_TASKS; t++)
      for (int i = 0; i < 5; i++) begin tw[t][i] = $urandom; wr(REG_TASK_BASE + 8'(8*t + i), tw[t][i]); end
    for (int i = 0; i < 5; i++) begin aw[i] = $urandom; wr(REG_ACQ_BASE + 8'(i), aw[i]); end
    for (int k = 0; k < HPF_TAPS; k++) begin cw[k] = $urandom; wr(REG_COEF_BASE + 8'(k), cw[k]); end
    wr(REG_TASK_BASE + 8'd5, 32'hFFFF_FFFF);    // unmapped word of task 0
    wr(8'h30, 32'hFFFF_FFFF);                   // unmapped address
    @(negedge clk);
    for (int t = 0; t < MAX_TASKS; t++) begin
      chk(tasks[t].op == op_e'(tw[t][0][3:0]) && tasks[t].mode == tw[t][0][7:4] &&
          tasks[t].copy_out == tw[t][0][8], "task word 0");
      chk(tasks[t].src == tw[t][1][AW-1:0] && tasks[t].dst == tw[t][2][AW-1:0], "task addresses");
      chk(tasks[t].width == tw[t][3][11:0] && tasks[t].height == tw[t][3][27:16] &&
          tasks[t].param == tw[t][4], "task size/param");
    end
    chk(acq.x0 == aw[0][11:0] && acq.y0 == aw[0][27:16] && acq.w == aw[1][11:0] && acq.h == aw[1][27:16], "acq window");
    chk(acq.sub_x == aw[2][3:0] && acq.sub_y == aw[2][7:4] && acq.mode == acq_mode_e'(aw[2][9:8]), "acq mode");
    chk(acq.t_int == aw[3][15:0] && acq.t_delay == aw[3][31:16] && acq.n_exp == aw[4][7:0] &&
        acq.dx == aw[4][15:8] && acq.dy == aw[4][23:16], "acq timing");
    for (int k = 0; k < HPF_TAPS; k++) chk(coef[k] == cw[k][15:0], "coefficient");
    wr(REG_CTRL, 1);
    @(negedge clk);
    chk(starts == 1, "start while idle");
    busy = 1; wr(REG_CTRL, 1); @(negedge clk); busy = 0;
    wr(REG_CTRL, 0); @(negedge clk);
    chk(starts == 1, "no start while busy or with bit 0 clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
