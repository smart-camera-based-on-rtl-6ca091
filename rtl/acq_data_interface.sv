// acq_data_interface: the data interface of the acquisition part. It packs
// the acquired 8-bit pixels into 32-bit words, four per word with the first
// pixel in bits 7:0, and hands them to the link towards the processing part
// (wr_en/wr_data into the crossing FIFO). A partial word left when an
// acquisition ends (flush) is sent zero-padded. words counts the words sent
// since the last clear. The 4-pixel packing matches the 32-bit data bus of
// the processing part; the padding rule is this design's choice.
module acq_data_interface import cop_pkg::*; (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  pix_t  pix,
  input  logic  pix_valid,
  input  logic  flush,
  output logic  wr_en,
  output word_t wr_data,
  output logic [31:0] words
);
  word_t      acc;
  logic [1:0] n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; n <= '0; wr_en <= 1'b0; wr_data <= '0; words <= '0;
    end else begin
      wr_en <= 1'b0;
      if (clear) words <= '0;
      if (pix_valid) begin
        if (n == 2'd3) begin
          wr_en   <= 1'b1;
          wr_data <= {pix, acc[23:0]};
          words   <= words + 1'b1;
          acc <= '0;
        end else acc[8*n +: 8] <= pix;
        n <= n + 1'b1;
      end else if (flush && n != 0) begin
        wr_en <= 1'b1; wr_data <= acc; words <= words + 1'b1;
        acc <= '0; n <= '0;
      end
    end
  end
endmodule
