// control_mem: owner of the coprocessor main memory (CONTROL_MEM with MEM)
// and of the data-flow multiplexers around it.
//
// The memory is used by one client at a time:
//  - the active processing module, through the mem_if port pm, whenever no
//    transfer runs. When pm_copy is set, every word the module writes is also
//    pushed to the output stream (the broadcast of results towards the host
//    while they are stored); a write is then only granted while the output
//    stream can take it, which stalls the module.
//  - the transfer engine, started with xfer_start for three operations:
//    OP_ACQUIRE  cfg.param words of the sensor stream -> memory at cfg.dst,
//                also copied to the output stream if cfg.copy_out (direct
//                path of the raw image to the host);
//    OP_LOAD     cfg.param words of the host data stream -> memory at cfg.dst;
//    OP_STORE    cfg.param words of memory at cfg.src -> output stream.
//    xfer_done pulses once the last word is through.
// Streams use valid/ready; a word moves when both are high. OP_STORE keeps at
// most one read in flight, so it moves one word every two cycles and never
// overruns the output stream. The memory is single ported: one access per
// cycle. The client set and the three transfers follow the data flow of the
// processing structure; the handshakes are this design's choice.
module control_mem import cop_pkg::*; #(
  parameter int MEM_AW = AW
) (
  input  logic  clk,
  input  logic  rst_n,
  // transfers
  input  logic  xfer_start,
  input  task_t cfg,
  output logic  xfer_done,
  output logic  xfer_busy,
  // processing module port
  mem_if.slave  pm,
  input  logic  pm_copy,
  // host data in (PCI -> processing FIFO)
  input  word_t host_data,
  input  logic  host_valid,
  output logic  host_ready,
  // sensor data in (acquisition -> processing FIFO)
  input  word_t acq_data,
  input  logic  acq_valid,
  output logic  acq_ready,
  // result data out (processing -> PCI FIFO)
  output word_t out_data,
  output logic  out_valid,
  input  logic  out_ready
);
  typedef enum logic [1:0] {X_IDLE, X_ACQ, X_LOAD, X_STORE} xstate_e;
  xstate_e xs;
  addr_t   xaddr;
  logic [31:0] xleft;
  logic    copy, rd_inflight;

  // memory port
  logic  m_en, m_we;
  addr_t m_addr;
  word_t m_wdata, m_rdata;
  sram_mem #(.AW(MEM_AW), .DW(DW)) u_mem (
    .clk, .en(m_en), .we(m_we), .addr(m_addr[MEM_AW-1:0]), .wdata(m_wdata), .rdata(m_rdata));

  logic pm_rd_q;   // the module's read was granted last cycle

  always_comb begin
    m_en = 1'b0; m_we = 1'b0; m_addr = '0; m_wdata = '0;
    host_ready = 1'b0; acq_ready = 1'b0;
    out_data = '0; out_valid = 1'b0;
    pm.gnt = 1'b0;
    case (xs)
      X_ACQ: begin
        acq_ready = (!copy || out_ready);
        m_en = acq_valid && acq_ready; m_we = 1'b1; m_addr = xaddr; m_wdata = acq_data;
        out_valid = copy && acq_valid && out_ready; out_data = acq_data;
      end
      X_LOAD: begin
        host_ready = 1'b1;
        m_en = host_valid; m_we = 1'b1; m_addr = xaddr; m_wdata = host_data;
      end
      X_STORE: begin
        m_en = out_ready && !rd_inflight && xleft != 0; m_addr = xaddr;
        out_valid = rd_inflight; out_data = m_rdata;
      end
      default: begin
        pm.gnt    = pm.req && (!pm.we || !pm_copy || out_ready);
        m_en      = pm.gnt; m_we = pm.we; m_addr = pm.addr; m_wdata = pm.wdata;
        out_valid = pm_copy && pm.req && pm.we && out_ready;
        out_data  = pm.wdata;
      end
    endcase
  end

  assign pm.rvalid = pm_rd_q;
  assign pm.rdata  = m_rdata;
  assign xfer_busy = (xs != X_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xs <= X_IDLE; xaddr <= '0; xleft <= '0; copy <= 1'b0; rd_inflight <= 1'b0;
      xfer_done <= 1'b0; pm_rd_q <= 1'b0;
    end else begin
      xfer_done <= 1'b0;
      pm_rd_q   <= (xs == X_IDLE) && pm.gnt && !pm.we;
      case (xs)
        X_IDLE: if (xfer_start) begin
          copy  <= cfg.copy_out;
          xleft <= cfg.param;
          case (cfg.op)
            OP_ACQUIRE: begin xs <= X_ACQ;   xaddr <= cfg.dst; end
            OP_LOAD:    begin xs <= X_LOAD;  xaddr <= cfg.dst; end
            OP_STORE:   begin xs <= X_STORE; xaddr <= cfg.src; end
            default:    xfer_done <= 1'b1;
          endcase
          if (cfg.param == 0) begin xs <= X_IDLE; xfer_done <= 1'b1; end
        end
        X_ACQ, X_LOAD: if (m_en) begin
          xaddr <= xaddr + 1'b1;
          xleft <= xleft - 1'b1;
          if (xleft == 1) begin xs <= X_IDLE; xfer_done <= 1'b1; end
        end
        X_STORE: begin
          rd_inflight <= m_en;
          if (m_en) begin xaddr <= xaddr + 1'b1; xleft <= xleft - 1'b1; end
          if (rd_inflight && xleft == 0) begin xs <= X_IDLE; xfer_done <= 1'b1; end
        end
        default: xs <= X_IDLE;
      endcase
    end
  end

  // a granted module request is never combined with a running transfer
  a_one_client: assert property (@(posedge clk) disable iff (!rst_n) !(xs != X_IDLE && pm.gnt));
endmodule
