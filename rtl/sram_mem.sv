// sram_mem: the coprocessor main memory (MEM), a single-port synchronous
// SRAM standing for the ZBT memory attached to the processing FPGA.
//
// One access per cycle: a write stores wdata at addr on the clock edge; a read
// presents the word at addr on rdata after the edge (one cycle latency),
// which is the behaviour of a flow-through ZBT/BRAM port. The default depth
// is 2M x 32 bit = 8 MB, the largest ZBT size the board carries. The memory
// has no reset; only written words are meaningful.
// The 32-bit width and the 8 MB size follow the source design's ZBT memory;
// the one-cycle latency is this design's simplification of it.
module sram_mem #(
  parameter int AW = 21,
  parameter int DW = 32
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
