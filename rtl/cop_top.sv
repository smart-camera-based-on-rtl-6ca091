// cop_top: the coprocessor (COP) of a smart camera, placed between a CMOS
// sensor and the main processor. Its acquisition part drives the sensor
// (windowed, subsampled, multi-exposure, tracking and line-scan reads) and
// its processing part runs a host-programmed chain of up to eight
// image-processing tasks on the acquired images before anything is sent to
// the processor, so that only the relevant, already processed data crosses
// the processor bus.
//
// Clock domains: pci_clk (processor bus), clk (processing part) and acq_clk
// (acquisition part and sensor). Structure:
//   bus_bridge            processor bus <-> processing part, three FIFOs
//   command_controller    configuration memory, start of the task chain
//   processing_controller task sequencer
//   processing_unit       median, Niblack binarization, shape search,
//                         transposition, high pass, dilation + subsampling
//   control_mem           main memory (8 MB) and its data-flow multiplexers
//   acq_data_control      sensor sequencer
//   acq_data_interface    pixel packing towards the processing part
//   cdc_fifo              acquisition -> processing link
// The acquisition command is held in the command controller and is read by
// the acquisition part only after the start toggle has crossed over, so it
// must not be rewritten while an acquisition runs. The sensor, the processor
// bus protocol (PCI), the serial link between the two FPGAs and the SDRAM of
// the acquisition part are outside this design; their places are the
// sensor, host and link ports here. status: done is set when a chain ends and
// cleared by the next start.
module cop_top import cop_pkg::*; #(
  parameter int MAX_W   = 2048,
  parameter int SHAPE_M = 32,
  parameter int MEM_AW  = AW
) (
  input  logic        clk,
  input  logic        rst_n,
  // processor bus
  input  logic        pci_clk,
  input  logic        pci_rst_n,
  input  logic        host_wr,
  input  logic        host_rd,
  input  logic [7:0]  host_addr,
  input  word_t       host_wdata,
  output word_t       host_rdata,
  output logic        host_rvalid,
  output logic        host_wait,
  // sensor
  input  logic        acq_clk,
  input  logic        acq_rst_n,
  output logic        sen_expose,
  output logic        sen_rd,
  output dim_t        sen_row,
  output dim_t        sen_col,
  input  pix_t        sen_pix,
  input  logic        sen_pix_valid,
  // results of the shape search and task progress
  output logic [15:0] best_score,
  output dim_t        best_i,
  output dim_t        best_j,
  output logic        chain_busy,
  output logic        chain_done,
  output logic [2:0]  task_idx
);
  // ---------------- processing part ----------------
  logic        cfg_we;
  logic [7:0]  cfg_addr;
  word_t       cfg_wdata;
  word_t       h_data, o_data, a_data;
  logic        h_valid, h_ready, o_valid, o_ready, a_valid, a_ready;
  logic        start, pbusy, pdone, done_flag;
  task_t       tasks [MAX_TASKS];
  task_t       cur;
  acq_cmd_t    acq;
  logic signed [15:0] coef [HPF_TAPS];
  logic        xfer_start, xfer_done, xfer_busy, proc_start, proc_done, copy_out, acq_go;

  bus_bridge u_bridge (
    .pci_clk, .pci_rst_n, .host_wr, .host_rd, .host_addr, .host_wdata, .host_rdata,
    .host_rvalid, .host_wait, .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata,
    .host_data(h_data), .host_valid(h_valid), .host_ready(h_ready),
    .out_data(o_data), .out_valid(o_valid), .out_ready(o_ready),
    .busy(pbusy), .done(done_flag));

  command_controller u_cmd (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .busy(pbusy), .start, .tasks, .acq, .coef);

  processing_controller u_ctl (
    .clk, .rst_n, .start, .tasks, .busy(pbusy), .done(pdone), .task_idx, .cur,
    .xfer_start, .xfer_done, .proc_start, .proc_done, .copy_out, .acq_start(acq_go));

  mem_if #(.AW(AW), .DW(DW)) pm ();

  processing_unit #(.MAX_W(MAX_W), .SHAPE_M(SHAPE_M)) u_pu (
    .clk, .rst_n, .start(proc_start), .cfg(cur), .coef, .done(proc_done),
    .best_score, .best_i, .best_j, .m(pm));

  control_mem #(.MEM_AW(MEM_AW)) u_cm (
    .clk, .rst_n, .xfer_start, .cfg(cur), .xfer_done, .xfer_busy, .pm, .pm_copy(copy_out),
    .host_data(h_data), .host_valid(h_valid), .host_ready(h_ready),
    .acq_data(a_data), .acq_valid(a_valid), .acq_ready(a_ready),
    .out_data(o_data), .out_valid(o_valid), .out_ready(o_ready));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) done_flag <= 1'b0;
    else if (start) done_flag <= 1'b0;
    else if (pdone) done_flag <= 1'b1;
  end
  assign chain_busy = pbusy;
  assign chain_done = done_flag;

  // ---------------- acquisition part ----------------
  logic go_tgl;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) go_tgl <= 1'b0;
    else if (acq_go) go_tgl <= ~go_tgl;
  end
  logic [2:0] go_s;
  always_ff @(posedge acq_clk or negedge acq_rst_n) begin
    if (!acq_rst_n) go_s <= '0;
    else go_s <= {go_s[1:0], go_tgl};
  end
  wire acq_start = go_s[2] ^ go_s[1];

  logic  a_busy, a_done, pix_v, l_full, l_afull, l_empty, l_wr;
  pix_t  pix;
  word_t l_data;
  logic [7:0]  n_exp_done;
  logic [31:0] a_words;
  logic [1:0]  done_d;
  logic [9:0]  l_lvl;

  acq_data_control u_dctl (
    .clk(acq_clk), .rst_n(acq_rst_n), .start(acq_start), .cmd(acq), .stall(l_afull),
    .busy(a_busy), .done(a_done), .sen_expose, .sen_rd, .sen_row, .sen_col, .sen_pix,
    .sen_pix_valid, .pix, .pix_valid(pix_v), .exposure(n_exp_done));

  always_ff @(posedge acq_clk or negedge acq_rst_n) begin
    if (!acq_rst_n) done_d <= '0;
    else done_d <= {done_d[0], a_done};
  end

  acq_data_interface u_dif (
    .clk(acq_clk), .rst_n(acq_rst_n), .clear(acq_start), .pix, .pix_valid(pix_v),
    .flush(done_d[1]), .wr_en(l_wr), .wr_data(l_data), .words(a_words));

  // acquisition -> processing link
  cdc_fifo #(.W(32), .AW_F(9)) u_link (
    .wr_clk(acq_clk), .wr_rst_n(acq_rst_n), .wr_en(l_wr), .wr_data(l_data),
    .full(l_full), .afull(l_afull),
    .rd_clk(clk), .rd_rst_n(rst_n), .rd_en(a_ready), .rd_data(a_data),
    .empty(l_empty), .rd_level(l_lvl));
  assign a_valid = !l_empty;

  a_link_no_overflow: assert property (@(posedge acq_clk) disable iff (!acq_rst_n) !(l_wr && l_full));
endmodule
