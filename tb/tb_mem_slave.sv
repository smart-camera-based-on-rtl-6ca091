// tb_mem_slave: memory for testbenches. Serves a mem_if port from an array
// (one cycle read latency, in order). With STALL=1 it refuses about one
// request in four, to exercise the masters' wait on gnt.
// What is checked is this design's own interface behaviour; the stimulus is
// random.
module tb_mem_slave #(
  parameter int AW    = 21,
  parameter int DEPTH = 65536,
  parameter bit STALL = 1'b1
) (
  input logic clk,
  mem_if.slave s
);
  logic [31:0] mem [DEPTH];
  logic        stall_q;
  bit          stall_en = STALL;   // may be changed by the testbench at run time
  int unsigned accesses = 0;

  always_ff @(posedge clk) stall_q <= stall_en && (($urandom % 4) == 0);
  assign s.gnt = s.req && !stall_q;

  always_ff @(posedge clk) begin
    s.rvalid <= 1'b0;
    if (s.req && s.gnt) begin
      accesses <= accesses + 1;
      if (s.we) mem[s.addr % DEPTH] <= s.wdata;
      else begin
        s.rdata  <= mem[s.addr % DEPTH];
        s.rvalid <= 1'b1;
      end
    end
  end
endmodule
