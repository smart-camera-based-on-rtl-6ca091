// mem_if: request/grant port of the coprocessor main memory.
//
// A master raises req with we, addr and wdata and holds them until gnt is
// seen high in the same cycle. A granted read returns its data one cycle
// later with rvalid; reads return in the order they were granted. This is
// the shared input/output bus that all processing modules see in turn.
// The 32-bit word bus follows the source design; the request/grant handshake
// is this design's choice.
interface mem_if #(parameter int AW = 21, parameter int DW = 32);
  logic          req;
  logic          we;
  logic [AW-1:0] addr;
  logic [DW-1:0] wdata;
  logic          gnt;
  logic          rvalid;
  logic [DW-1:0] rdata;

  modport master (output req, we, addr, wdata, input gnt, rvalid, rdata);
  modport slave  (input req, we, addr, wdata, output gnt, rvalid, rdata);
endinterface
