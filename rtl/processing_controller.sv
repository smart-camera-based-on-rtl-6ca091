// processing_controller: schedules the chain of tasks programmed by the host
// (the processing controller, CONTROL_PRO).
//
// On start it walks the task descriptors 0, 1, ... (at most MAX_TASKS = 8)
// until an OP_END descriptor. Each task is started with a one-cycle pulse:
// data movements (OP_ACQUIRE, OP_LOAD, OP_STORE) go to the memory controller,
// where OP_ACQUIRE also starts the acquisition part, and every other opcode
// goes to the processing unit; the copy_out bit of the task selects whether
// module results are broadcast to the host. The controller waits for the
// task's done before the next one; done pulses after the last task. Tasks run
// strictly one after another; there is no ordering constraint between them.
// task_idx shows the task in progress. Up to eight chained stages follow
// the document; the sequential start/done protocol is this design's choice.
module processing_controller import cop_pkg::*; (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  task_t tasks [MAX_TASKS],
  output logic  busy,
  output logic  done,
  output logic [2:0] task_idx,
  output task_t cur,
  // memory controller transfers
  output logic  xfer_start,
  input  logic  xfer_done,
  // processing unit
  output logic  proc_start,
  input  logic  proc_done,
  output logic  copy_out,
  // acquisition part
  output logic  acq_start
);
  typedef enum logic [1:0] {P_IDLE, P_ISSUE, P_WAIT} pstate_e;
  pstate_e ps;
  logic [3:0] idx;

  function automatic logic is_xfer(op_e op);
    return op == OP_ACQUIRE || op == OP_LOAD || op == OP_STORE;
  endfunction

  assign cur      = tasks[idx[2:0]];
  assign busy     = (ps != P_IDLE);
  assign task_idx = idx[2:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ps <= P_IDLE; idx <= '0; done <= 0; xfer_start <= 0; proc_start <= 0;
      acq_start <= 0; copy_out <= 0;
    end else begin
      done <= 0; xfer_start <= 0; proc_start <= 0; acq_start <= 0;
      case (ps)
        P_IDLE: if (start) begin idx <= '0; ps <= P_ISSUE; end
        P_ISSUE: begin
          if (idx == 4'(MAX_TASKS) || cur.op == OP_END) begin
            ps <= P_IDLE; done <= 1'b1; copy_out <= 1'b0;
          end else begin
            copy_out <= cur.copy_out && !is_xfer(cur.op);
            if (is_xfer(cur.op)) xfer_start <= 1'b1;
            else                 proc_start <= 1'b1;
            acq_start <= (cur.op == OP_ACQUIRE);
            ps <= P_WAIT;
          end
        end
        P_WAIT: if (xfer_done || proc_done) begin
          idx <= idx + 1'b1; ps <= P_ISSUE;
        end
        default: ps <= P_IDLE;
      endcase
    end
  end
endmodule
