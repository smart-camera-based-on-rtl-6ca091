// tb_acq_data_control: runs the four acquisition modes against the
// behavioural sensor and checks every pixel of the stream against the
// sensor's scene at the expected window position, subsampling, exposure and
// origin, the integration time (sen_expose cycles), the delay between
// exposures, and that reads pause while stall is high.
// What is checked is this design's own interface behaviour; the stimulus is
// random.
module tb_acq_data_control;
  import cop_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, stall = 0, busy, done, sen_expose, sen_rd, sen_pix_valid, pix_valid;
  dim_t sen_row, sen_col;
  pix_t sen_pix, pix;
  logic [7:0] exposure;
  acq_cmd_t cmd;
  acq_data_control dut (.*);
  ibis4_sensor_model sensor (.clk, .sen_expose, .sen_rd, .sen_row, .sen_col, .sen_pix, .sen_pix_valid);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  pix_t got[$];
  int exp_cycles = 0, rd_in_stall = 0, idle_gap = 0, max_gap = 0;
  always @(posedge clk) if (rst_n) begin
    if (pix_valid) got.push_back(pix);
    if (sen_expose) exp_cycles++;
    if (sen_rd && stall) rd_in_stall++;
    if (busy && !sen_expose && !sen_rd && !stall) idle_gap++;
    else begin if (idle_gap > max_gap) max_gap = idle_gap; idle_gap = 0; end
  end

  task automatic run(acq_mode_e md, int x0, int y0, int w, int h, int sx, int sy, int tint,
                     int n, int tdel, int dx, int dy, bit do_stall);
    int nexp, nrows, f0, k;
    cmd = '0; cmd.mode = md; cmd.x0 = dim_t'(x0); cmd.y0 = dim_t'(y0); cmd.w = dim_t'(w);
    cmd.h = dim_t'(h); cmd.sub_x = 4'(sx); cmd.sub_y = 4'(sy); cmd.t_int = 16'(tint);
    cmd.n_exp = 8'(n); cmd.t_delay = 16'(tdel); cmd.dx = 8'(dx); cmd.dy = 8'(dy);
    got.delete(); exp_cycles = 0; max_gap = 0;
    f0 = sensor.frame + 1;
    @(posedge clk); start <= 1; @(posedge clk); start <= 0;
    while (!done) begin
      @(posedge clk);
      if (do_stall) stall <= ($urandom % 3 == 0);
    end
    stall <= 0;
    repeat (2) @(posedge clk);
    nexp = (md == ACQ_WINDOW) ? 1 : n;
    nrows = (md == ACQ_LINESCAN) ? 1 : h;
    k = 0;
    for (int e = 0; e < nexp; e++)
      for (int r = 0; r < nrows; r++)
        for (int c = 0; c < w; c++) begin
          int row, col;
          row = y0 + r * (sy + 1) + (md == ACQ_TRACKING ? e * dy : 0);
          col = x0 + c * (sx + 1) + (md == ACQ_TRACKING ? e * dx : 0);
          checks++;
          if (k >= got.size() || got[k] != sensor.scene(row, col, f0 + e)) begin
            failures++;
            if (failures < 6) $display("mode %0d exp %0d r %0d c %0d", md, e, r, c);
          end
          k++;
        end
    checks++;
    if (got.size() != k || exp_cycles != nexp * tint) begin
      failures++; $display("mode %0d: %0d pixels, %0d integration cycles", md, got.size(), exp_cycles);
    end
    if (nexp > 1) begin
      checks++;
      if (max_gap != tdel) begin failures++; $display("delay %0d, expected %0d", max_gap, tdel); end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    run(ACQ_WINDOW,   10, 20, 12, 5, 1, 2, 7, 1, 0, 0, 0, 1'b1);
    run(ACQ_MULTI,    40, 30, 8, 3, 0, 0, 4, 3, 9, 0, 0, 1'b0);
    run(ACQ_TRACKING, 40, 30, 8, 3, 0, 1, 4, 4, 5, 3, -2, 1'b0);
    run(ACQ_LINESCAN, 0, 600, 16, 9, 0, 0, 3, 6, 2, 0, 0, 1'b0);
    checks++;
    if (rd_in_stall != 0) begin failures++; $display("read during stall"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
