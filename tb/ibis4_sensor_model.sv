// ibis4_sensor_model: behavioural model of a random-access CMOS sensor of
// 1280 x 1024 pixels for simulation only (not synthesizable logic). Each
// rising edge of sen_expose starts a new frame (integration); a read
// request sen_rd with a (row, column) address returns one 8-bit pixel on the
// next clock edge. The scene is a fixed function of row, column and frame
// number, scene(), which testbenches use to compute the expected images.
// The random-access read of a CMOS sensor follows the source design's use of
// one; the port, the timing and the scene are this model's own.
module ibis4_sensor_model #(
  parameter int ROWS = 1024,
  parameter int COLS = 1280
) (
  input  logic        clk,
  input  logic        sen_expose,
  input  logic        sen_rd,
  input  logic [11:0] sen_row,
  input  logic [11:0] sen_col,
  output logic [7:0]  sen_pix,
  output logic        sen_pix_valid
);
  int   frame = -1;
  logic exp_q = 1'b0;
  int   reads = 0, bad_addr = 0;

  function automatic logic [7:0] scene(int r, int c, int f);
    return 8'(((r * 3 + c * 5) ^ (f * 17)) + ((c / 8) % 2) * 90);
  endfunction

  always @(posedge clk) begin
    exp_q <= sen_expose;
    if (sen_expose && !exp_q) frame <= frame + 1;
    sen_pix_valid <= sen_rd;
    if (sen_rd) begin
      reads++;
      if (sen_row >= ROWS || sen_col >= COLS) bad_addr++;
      sen_pix <= scene(int'(sen_row), int'(sen_col), frame);
    end
  end
endmodule
