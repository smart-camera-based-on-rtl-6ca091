// command_controller: receives the commands of the main processor (the
// global control) and keeps the configuration the coprocessor works from.
//
// Configuration words arrive as (address, data) writes from the bus bridge
// and are stored in the configuration memory (register map in cop_pkg):
// the acquisition command (words REG_ACQ_BASE+0..4), the 11 high pass
// coefficients (REG_COEF_BASE+k, bits 15:0 signed) and eight task
// descriptors of eight words each (REG_TASK_BASE + 8*t + i):
//   i=0: op[3:0], mode[7:4], copy_out[8];  i=1: src;  i=2: dst;
//   i=3: width[11:0], height[27:16];       i=4: param.
// Acquisition words: +0 x0[11:0], y0[27:16]; +1 w[11:0], h[27:16];
// +2 sub_x[3:0], sub_y[7:4], mode[9:8]; +3 t_int[15:0], t_delay[31:16];
// +4 n_exp[7:0], dx[15:8], dy[23:16].
// Writing bit 0 of REG_CTRL while the task chain is idle starts it (start
// pulses for one cycle); a start while busy is ignored. The configuration
// may be rewritten between runs, so the acquisition mode and the processing
// chain change on the fly from one acquisition to the next. Register
// layout and encodings are this design's choice.
module command_controller import cop_pkg::*; (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     cfg_we,
  input  logic [7:0] cfg_addr,
  input  word_t    cfg_wdata,
  input  logic     busy,
  output logic     start,
  output task_t    tasks [MAX_TASKS],
  output acq_cmd_t acq,
  output logic signed [15:0] coef [HPF_TAPS]
);
  word_t acq_w [5];
  word_t task_w [MAX_TASKS][5];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start <= 1'b0;
      for (int i = 0; i < 5; i++) acq_w[i] <= '0;
      for (int t = 0; t < MAX_TASKS; t++) for (int i = 0; i < 5; i++) task_w[t][i] <= '0;
      for (int k = 0; k < HPF_TAPS; k++) coef[k] <= '0;
    end else begin
      start <= cfg_we && cfg_addr == REG_CTRL && cfg_wdata[0] && !busy;
      if (cfg_we) begin
        if (cfg_addr >= REG_ACQ_BASE && cfg_addr < REG_ACQ_BASE + 8'd5)
          acq_w[cfg_addr - REG_ACQ_BASE] <= cfg_wdata;
        if (cfg_addr >= REG_COEF_BASE && cfg_addr < REG_COEF_BASE + 8'(HPF_TAPS))
          coef[cfg_addr - REG_COEF_BASE] <= cfg_wdata[15:0];
        if (cfg_addr >= REG_TASK_BASE && cfg_addr < REG_TASK_BASE + 8'(8 * MAX_TASKS) && cfg_addr[2:0] < 3'd5)
          task_w[cfg_addr[5:3]][cfg_addr[2:0]] <= cfg_wdata;
      end
    end
  end

  always_comb begin
    for (int t = 0; t < MAX_TASKS; t++) begin
      tasks[t].op       = op_e'(task_w[t][0][3:0]);
      tasks[t].mode     = task_w[t][0][7:4];
      tasks[t].copy_out = task_w[t][0][8];
      tasks[t].src      = task_w[t][1][AW-1:0];
      tasks[t].dst      = task_w[t][2][AW-1:0];
      tasks[t].width    = task_w[t][3][11:0];
      tasks[t].height   = task_w[t][3][27:16];
      tasks[t].param    = task_w[t][4];
    end
    acq.x0      = acq_w[0][11:0];  acq.y0 = acq_w[0][27:16];
    acq.w       = acq_w[1][11:0];  acq.h  = acq_w[1][27:16];
    acq.sub_x   = acq_w[2][3:0];   acq.sub_y = acq_w[2][7:4];
    acq.mode    = acq_mode_e'(acq_w[2][9:8]);
    acq.t_int   = acq_w[3][15:0];  acq.t_delay = acq_w[3][31:16];
    acq.n_exp   = acq_w[4][7:0];
    acq.dx      = acq_w[4][15:8];  acq.dy = acq_w[4][23:16];
  end
endmodule
