// cdc_fifo: dual-clock FIFO used where data crosses clock domains
// (host bus -> processing, processing -> host bus, acquisition -> processing).
//
// Classic Gray-coded pointer FIFO: each side keeps a binary and a Gray
// pointer one bit wider than the address; the other side's Gray pointer is
// brought over with two flip-flops. full/empty are therefore conservative
// (they clear a few cycles late), never wrong. Write when wr_en && !full; read
// data is shown on rd_data while !empty and popped with rd_en (show-ahead).
// rd_level is an approximate fill level seen from the read side; afull
// (four or fewer free entries, seen from the write side) lets a writer with a
// few words in flight stop in time.
// The depth (2**AW_F entries) is this design's choice; on the board each such
// FIFO is one 18 kb block RAM.
module cdc_fifo #(
  parameter int W    = 32,
  parameter int AW_F = 9
) (
  input  logic          wr_clk,
  input  logic          wr_rst_n,
  input  logic          wr_en,
  input  logic [W-1:0]  wr_data,
  output logic          full,
  output logic          afull,
  input  logic          rd_clk,
  input  logic          rd_rst_n,
  input  logic          rd_en,
  output logic [W-1:0]  rd_data,
  output logic          empty,
  output logic [AW_F:0] rd_level
);
  logic [W-1:0] ram [2**AW_F];
  logic [AW_F:0] wbin, wgray, rbin, rgray;
  logic [AW_F:0] wq1, wq2, rq1, rq2;   // wq*: read gray ptr in wr domain, rq*: write gray in rd domain

  function automatic logic [AW_F:0] b2g(logic [AW_F:0] b);
    return b ^ (b >> 1);
  endfunction
  function automatic logic [AW_F:0] g2b(logic [AW_F:0] g);
    logic [AW_F:0] b;
    b[AW_F] = g[AW_F];
    for (int i = AW_F - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // write side
  logic [AW_F:0] wbin_n;
  assign wbin_n = wbin + 1'b1;
  assign full   = (wgray == {~wq2[AW_F:AW_F-1], wq2[AW_F-2:0]});
  logic [AW_F:0] wlevel;
  assign wlevel = wbin - g2b(wq2);
  assign afull  = (wlevel >= (AW_F+1)'(2**AW_F - 4));

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wbin <= '0; wgray <= '0; wq1 <= '0; wq2 <= '0;
    end else begin
      wq1 <= rgray; wq2 <= wq1;
      if (wr_en && !full) begin
        wbin  <= wbin_n;
        wgray <= b2g(wbin_n);
      end
    end
  end
  always_ff @(posedge wr_clk) begin
    if (wr_en && !full) ram[wbin[AW_F-1:0]] <= wr_data;
  end

  // read side
  logic [AW_F:0] rbin_n;
  assign rbin_n   = rbin + 1'b1;
  assign empty    = (rgray == rq2);
  assign rd_data  = ram[rbin[AW_F-1:0]];
  assign rd_level = g2b(rq2) - rbin;

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rbin <= '0; rgray <= '0; rq1 <= '0; rq2 <= '0;
    end else begin
      rq1 <= wgray; rq2 <= rq1;
      if (rd_en && !empty) begin
        rbin  <= rbin_n;
        rgray <= b2g(rbin_n);
      end
    end
  end
endmodule
