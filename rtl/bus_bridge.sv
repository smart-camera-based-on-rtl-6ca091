// bus_bridge: the bridge between the processor bus (a simple word-addressed
// register bus standing for the PCI target interface) and the processing
// part, which runs on its own clock.
//
// Host side (pci_clk): host_wr writes host_wdata at host_addr; host_rd reads
// host_addr and host_rdata is valid with host_rvalid on the next cycle.
// host_wait high means the write cannot be taken now and must be held.
//  - writes to REG_DATA go through the data FIFO (PCI => processing) and
//    come out as the host_data stream;
//  - all other writes go through a small command FIFO and come out as
//    cfg_we/cfg_addr/cfg_wdata towards the command controller;
//  - reads of REG_DATA pop the result FIFO (processing => PCI); an empty
//    FIFO reads as 0 and pops nothing;
//  - reads of REG_STATUS return {out_level[15:0] (bits 31:16), ..., bit 2
//    result FIFO empty, bit 1 done (chain finished since last start), bit 0
//    busy}; busy and done are brought over with two flip-flops.
// The result stream's ready is the FIFO's almost-full flag inverted, so a
// producer with one word in flight never overruns it. Three dual-clock
// FIFOs, one per crossing direction of data plus one for commands, are this
// design's rendering of the FIFO block RAMs between the clock domains.
module bus_bridge import cop_pkg::*; #(
  parameter int DATA_AW = 9,   // data FIFOs: 512 words (one 18 kb block RAM)
  parameter int CMD_AW  = 4
) (
  input  logic        pci_clk,
  input  logic        pci_rst_n,
  input  logic        host_wr,
  input  logic        host_rd,
  input  logic [7:0]  host_addr,
  input  word_t       host_wdata,
  output word_t       host_rdata,
  output logic        host_rvalid,
  output logic        host_wait,
  input  logic        clk,
  input  logic        rst_n,
  output logic        cfg_we,
  output logic [7:0]  cfg_addr,
  output word_t       cfg_wdata,
  output word_t       host_data,
  output logic        host_valid,
  input  logic        host_ready,
  input  word_t       out_data,
  input  logic        out_valid,
  output logic        out_ready,
  input  logic        busy,
  input  logic        done
);
  // PCI => processing: data
  logic din_full, din_afull, din_empty;
  logic [DATA_AW:0] din_lvl;
  cdc_fifo #(.W(32), .AW_F(DATA_AW)) u_din (
    .wr_clk(pci_clk), .wr_rst_n(pci_rst_n), .wr_en(host_wr && host_addr == REG_DATA),
    .wr_data(host_wdata), .full(din_full), .afull(din_afull),
    .rd_clk(clk), .rd_rst_n(rst_n), .rd_en(host_ready), .rd_data(host_data),
    .empty(din_empty), .rd_level(din_lvl));
  assign host_valid = !din_empty;

  // PCI => processing: commands
  logic cmd_full, cmd_afull, cmd_empty;
  logic [CMD_AW:0] cmd_lvl;
  logic [39:0] cmd_q;
  cdc_fifo #(.W(40), .AW_F(CMD_AW)) u_cmd (
    .wr_clk(pci_clk), .wr_rst_n(pci_rst_n), .wr_en(host_wr && host_addr != REG_DATA),
    .wr_data({host_addr, host_wdata}), .full(cmd_full), .afull(cmd_afull),
    .rd_clk(clk), .rd_rst_n(rst_n), .rd_en(1'b1), .rd_data(cmd_q),
    .empty(cmd_empty), .rd_level(cmd_lvl));
  assign cfg_we    = !cmd_empty;
  assign cfg_addr  = cmd_q[39:32];
  assign cfg_wdata = cmd_q[31:0];

  assign host_wait = (host_addr == REG_DATA) ? din_full : cmd_full;

  // processing => PCI: results
  logic dout_full, dout_afull, dout_empty;
  logic [DATA_AW:0] dout_lvl;
  word_t dout_q;
  wire pop = host_rd && host_addr == REG_DATA && !dout_empty;
  cdc_fifo #(.W(32), .AW_F(DATA_AW)) u_dout (
    .wr_clk(clk), .wr_rst_n(rst_n), .wr_en(out_valid), .wr_data(out_data),
    .full(dout_full), .afull(dout_afull),
    .rd_clk(pci_clk), .rd_rst_n(pci_rst_n), .rd_en(pop), .rd_data(dout_q),
    .empty(dout_empty), .rd_level(dout_lvl));
  assign out_ready = !dout_afull;

  // status into the PCI domain
  logic [1:0] st1, st2;
  always_ff @(posedge pci_clk or negedge pci_rst_n) begin
    if (!pci_rst_n) begin
      st1 <= '0; st2 <= '0; host_rvalid <= 1'b0; host_rdata <= '0;
    end else begin
      st1 <= {done, busy}; st2 <= st1;
      host_rvalid <= host_rd;
      if (host_rd)
        host_rdata <= (host_addr == REG_DATA)   ? (dout_empty ? '0 : dout_q) :
                      (host_addr == REG_STATUS) ? {16'(dout_lvl), 13'd0, dout_empty, st2} : '0;
    end
  end

  // a result word must never meet a full FIFO
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(out_valid && dout_full));
endmodule
