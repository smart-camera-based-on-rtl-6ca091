// tb_cop_top: end-to-end test of the coprocessor. A behavioural sensor and a
// host on the processor bus drive cop_top with all parameters at their
// defaults; three clock domains run at 100 MHz (processing), 33 MHz (bus) and
// 40 MHz (sensor). Four task chains are run, each result word read by the
// host is compared with values computed here from the sensor's scene:
//  A  windowed, X-subsampled acquisition broadcast to the host while it is
//     stored, 3x3 median with its results broadcast, then read back from
//     memory; the host reads slowly so that the result FIFO fills and the
//     chain and the sensor reads stall;
//  B  the bar-code chain: line-scan acquisition, transposition, high pass
//     filter, dilation + subsampling (results broadcast), filtered image
//     read back;
//  C  multi-exposure and tracking acquisitions;
//  D  host data loaded into memory, binary shape search and Niblack
//     binarization of the median image of chain A.
// Every mechanism (each opcode, each acquisition mode, each broadcast path,
// result-FIFO back-pressure, sensor stall) is counted and
// must have happened at least once; host write waits are only reported.
// The chains follow the source design's applications (bar-code chain,
// acquisition modes, shape search, binarization); sizes and the host program
// are this testbench's own.
module tb_cop_top;
  import cop_pkg::*;
  logic clk = 0, pci_clk = 0, acq_clk = 0;
  logic rst_n = 0, pci_rst_n = 0, acq_rst_n = 0;
  always #5  clk = ~clk;
  always #15 pci_clk = ~pci_clk;
  always #12.5 acq_clk = ~acq_clk;

  int checks = 0, failures = 0;

  logic host_wr = 0, host_rd = 0, host_rvalid, host_wait;
  logic [7:0] host_addr = 0;
  word_t host_wdata = 0, host_rdata;
  logic sen_expose, sen_rd, sen_pix_valid;
  dim_t sen_row, sen_col;
  pix_t sen_pix;
  logic [15:0] best_score;
  dim_t best_i, best_j;
  logic chain_busy, chain_done;
  logic [2:0] task_idx;

  cop_top dut (.*);
  ibis4_sensor_model sensor (.clk(acq_clk), .sen_expose, .sen_rd, .sen_row, .sen_col,
                             .sen_pix, .sen_pix_valid);

  initial begin
    #20ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_op [16];
  int n_mode [4];
  int n_copy_acq = 0, n_copy_res = 0, n_out_bp = 0, n_acq_stall = 0, n_host_wait = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctl.proc_start || dut.u_ctl.xfer_start) n_op[dut.cur.op]++;
    if (dut.u_cm.xs == 1 && dut.u_cm.copy && dut.o_valid) n_copy_acq++;
    if (dut.u_cm.xs == 0 && dut.copy_out && dut.o_valid) n_copy_res++;
    if (!dut.o_ready && (dut.pm.req || dut.u_cm.xs != 0)) n_out_bp++;
  end
  always @(posedge acq_clk) if (acq_rst_n) begin
    if (dut.acq_start) n_mode[dut.acq.mode]++;
    if (dut.u_dctl.as == 2 && dut.l_afull) n_acq_stall++;
  end

  // ---------------- host bus ----------------
  task automatic hwrite(logic [7:0] a, word_t d);
    @(posedge pci_clk);
    host_addr <= a; host_wdata <= d; host_wr <= 1;
    @(posedge pci_clk);
    while (host_wait) begin n_host_wait++; @(posedge pci_clk); end
    host_wr <= 0;
  endtask
  task automatic hread(logic [7:0] a, output word_t d);
    @(posedge pci_clk);
    host_addr <= a; host_rd <= 1;
    @(posedge pci_clk);
    host_rd <= 0;
    @(posedge pci_clk);
    d = host_rdata;
  endtask
  task automatic set_task(int t, op_e op, int mode, bit copy, int src, int dst, int w, int h, int param);
    logic [7:0] b;
    b = REG_TASK_BASE + 8'(8 * t);
    hwrite(b + 0, {23'd0, copy, 4'(mode), op});
    hwrite(b + 1, src);
    hwrite(b + 2, dst);
    hwrite(b + 3, {4'd0, 12'(h), 4'd0, 12'(w)});
    hwrite(b + 4, param);
  endtask
  task automatic set_acq(acq_mode_e md, int x0, int y0, int w, int h, int sx, int sy,
                         int tint, int nexp, int tdel, int dx, int dy);
    hwrite(REG_ACQ_BASE + 0, {4'd0, 12'(y0), 4'd0, 12'(x0)});
    hwrite(REG_ACQ_BASE + 1, {4'd0, 12'(h), 4'd0, 12'(w)});
    hwrite(REG_ACQ_BASE + 2, {22'd0, md, 4'(sy), 4'(sx)});
    hwrite(REG_ACQ_BASE + 3, {16'(tdel), 16'(tint)});
    hwrite(REG_ACQ_BASE + 4, {8'd0, 8'(dy), 8'(dx), 8'(nexp)});
  endtask

  // runs the chain, reading result words (gap: idle bus cycles per read)
  word_t got[$];
  task automatic run_chain(int gap);
    word_t st, d;
    got.delete();
    hwrite(REG_CTRL, 1);
    repeat (8) @(posedge pci_clk);
    forever begin
      hread(REG_STATUS, st);
      if (st[2] == 1'b0) begin
        hread(REG_DATA, d); got.push_back(d);
        repeat (gap) @(posedge pci_clk);
      end else if (st[1] && !st[0]) begin
        // finished and drained: one more look for words still crossing
        repeat (10) @(posedge pci_clk);
        hread(REG_STATUS, st);
        if (st[2]) break;
      end
    end
  endtask

  // ---------------- reference images ----------------
  int img [int];          // pixel images by (id << 24 | y << 12 | x)
  function automatic int key(int id, int x, int y); return (id << 24) | (y << 12) | x; endfunction
  function automatic int px(int id, int x, int y, int w, int h);
    x = x < 0 ? 0 : x >= w ? w - 1 : x;
    y = y < 0 ? 0 : y >= h ? h - 1 : y;
    return img[key(id, x, y)];
  endfunction
  function automatic word_t pack4(int id, int x, int y);
    word_t r;
    for (int k = 0; k < 4; k++) r[8*k +: 8] = 8'(img[key(id, x + k, y)]);
    return r;
  endfunction

  int pos;
  task automatic expect_img(string what, int id, int w, int h);
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x += 4) begin
        word_t e;
        e = pack4(id, x, y);
        checks++;
        if (pos >= got.size() || got[pos] != e) begin
          failures++;
          if (failures < 10) $display("%s word %0d,%0d: got %h exp %h", what, x, y,
                                      pos < got.size() ? got[pos] : 0, e);
        end
        pos++;
      end
  endtask

  // ---------------- test ----------------
  initial begin
    word_t d;
    for (int k = 0; k < 16; k++) n_op[k] = 0;
    for (int k = 0; k < 4; k++) n_mode[k] = 0;
    #100; rst_n = 1; pci_rst_n = 1; acq_rst_n = 1;
    repeat (5) @(posedge pci_clk);

    // ===== A: window acquisition with X subsampling, median 3x3 =====
    begin
      int W = 64, H = 80;
      set_acq(ACQ_WINDOW, 100, 50, W, H, 1, 0, 10, 1, 0, 0, 0);
      set_task(0, OP_ACQUIRE, 0, 1, 0, 0, 0, 0, W*H/4);
      set_task(1, OP_MEDIAN, MED_3X3, 1, 0, 4096, W, H, 0);
      set_task(2, OP_STORE, 0, 0, 4096, 0, 0, 0, W*H/4);
      set_task(3, OP_END, 0, 0, 0, 0, 0, 0, 0);
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++)
        img[key(1, x, y)] = int'(sensor.scene(50 + y, 100 + 2*x, 0));
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
        int v[$];
        v.delete();
        for (int j = -1; j <= 1; j++) for (int i = -1; i <= 1; i++) v.push_back(px(1, x+i, y+j, W, H));
        v.sort();
        img[key(2, x, y)] = v[4];
      end
      run_chain(30);
      pos = 0;
      expect_img("A raw", 1, W, H);
      expect_img("A median bcast", 2, W, H);
      expect_img("A median store", 2, W, H);
      checks++;
      if (got.size() != 3 * W*H/4) begin failures++; $display("A: %0d words", got.size()); end
    end

    // ===== B: bar-code chain =====
    begin
      int W = 64, L = 32;        // line width, number of lines
      int TW, TH;
      TW = L; TH = W;            // transposed image
      set_acq(ACQ_LINESCAN, 0, 500, W, 1, 0, 0, 4, L, 3, 0, 0);
      for (int k = 0; k < HPF_TAPS; k++) hwrite(REG_COEF_BASE + 8'(k), k == 5 ? 32'd10 : 32'hFFFF_FFFF);
      set_task(0, OP_ACQUIRE, 0, 0, 0, 0, 0, 0, W*L/4);
      set_task(1, OP_TRANSPOSE, 0, 0, 0, 8192, W, L, 0);
      set_task(2, OP_HPF, 0, 0, 8192, 16384, TW, TH, 1);
      set_task(3, OP_DILSUB, 0, 1, 16384, 24576, TW, TH, 0);
      set_task(4, OP_STORE, 0, 0, 16384, 0, 0, 0, TW*TH/4);
      set_task(5, OP_END, 0, 0, 0, 0, 0, 0, 0);
      for (int l = 0; l < L; l++) for (int x = 0; x < W; x++)
        img[key(3, x, l)] = int'(sensor.scene(500, x, 1 + l));   // frames 1.. after chain A
      for (int y = 0; y < TH; y++) for (int x = 0; x < TW; x++)
        img[key(4, x, y)] = img[key(3, y, x)];
      for (int y = 0; y < TH; y++) for (int x = 0; x < TW; x++) begin
        int a;
        a = 0;
        for (int t = 0; t < HPF_TAPS; t++) a += (t == 5 ? 10 : -1) * px(4, x + t - 5, y, TW, TH);
        a = a >>> 1;
        img[key(5, x, y)] = a < 0 ? 0 : a > 255 ? 255 : a;
      end
      for (int y = 0; y < TH / 4; y++) for (int x = 0; x < TW / 4; x++) begin
        int m;
        m = 0;
        for (int i = 4*x - 16; i < 4*x + 16; i++)
          if (i >= 0 && i < TW && img[key(5, i, 4*y)] > m) m = img[key(5, i, 4*y)];
        img[key(6, x, y)] = m;
      end
      run_chain(0);
      pos = 0;
      expect_img("B dilated", 6, TW / 4, TH / 4);
      expect_img("B filtered", 5, TW, TH);
      checks++;
      if (got.size() != TW*TH/64 + TW*TH/4) begin failures++; $display("B: %0d words", got.size()); end
    end

    // ===== C: multi-exposure and tracking =====
    begin
      int W = 16, H = 4, N = 3;
      set_acq(ACQ_MULTI, 300, 200, W, H, 0, 1, 6, N, 20, 0, 0);
      set_task(0, OP_ACQUIRE, 0, 1, 0, 50000, 0, 0, N*W*H/4);
      set_task(1, OP_END, 0, 0, 0, 0, 0, 0, 0);
      for (int f = 0; f < N; f++) for (int y = 0; y < H; y++) for (int x = 0; x < W; x++)
        img[key(7, x, f*H + y)] = int'(sensor.scene(200 + 2*y, 300 + x, 33 + f));
      run_chain(0);
      pos = 0;
      expect_img("C multi", 7, W, N*H);
      set_acq(ACQ_TRACKING, 300, 200, W, H, 0, 0, 6, N, 0, 5, -2);
      for (int f = 0; f < N; f++) for (int y = 0; y < H; y++) for (int x = 0; x < W; x++)
        img[key(8, x, f*H + y)] = int'(sensor.scene(200 - 2*f + y, 300 + 5*f + x, 36 + f));
      run_chain(0);
      pos = 0;
      expect_img("C tracking", 8, W, N*H);
    end

    // ===== D: host load, shape search, Niblack =====
    begin
      int M = 32, SW = 64, SH = 48, PI = 21, PJ = 9;
      word_t shp [32];
      word_t win [96];
      for (int y = 0; y < M; y++) shp[y] = $urandom;
      for (int i = 0; i < 96; i++) win[i] = $urandom;
      for (int y = 0; y < M; y++) for (int x = 0; x < M; x++)
        win[(y + PJ) * 2 + (x + PI) / 32][(x + PI) % 32] = shp[y][x];
      set_task(0, OP_LOAD, 0, 0, 0, 30000, 0, 0, 128);
      set_task(1, OP_SHAPE, 0, 0, 30032, 40000, SW, SH, 30000);
      set_task(2, OP_NIBLACK, 0, 1, 4096, 45000, 64, 80, 30);
      set_task(3, OP_END, 0, 0, 0, 0, 0, 0, 0);
      hwrite(REG_CTRL, 1);   // the LOAD task waits for the words below
      for (int i = 0; i < M; i++) hwrite(REG_DATA, shp[i]);
      for (int i = 0; i < 96; i++) hwrite(REG_DATA, win[i]);
      got.delete();
      forever begin
        word_t st;
        hread(REG_STATUS, st);
        if (!st[2]) begin hread(REG_DATA, d); got.push_back(d); end
        else if (st[1] && !st[0]) begin
          repeat (10) @(posedge pci_clk);
          hread(REG_STATUS, st);
          if (st[2]) break;
        end
      end
      checks++;
      if (best_score != 16'(M*M) || best_i != PI || best_j != PJ) begin
        failures++; $display("shape: %0d at %0d,%0d", best_score, best_i, best_j);
      end
      // Niblack reference on the median image of chain A (64 x 80), 8x8
      for (int y = 0; y < 80; y++) begin
        for (int wd = 0; wd < 2; wd++) begin
          word_t e;
          for (int b = 0; b < 32; b++) begin
            longint s1, s2, dd, mean, vr, sd, r;
            int x;
            x = 32*wd + b;
            s1 = 0; s2 = 0;
            for (int j = -4; j < 4; j++) for (int i = -4; i < 4; i++) begin
              longint p;
              p = px(2, x + i, y + j, 64, 80); s1 += p; s2 += p*p;
            end
            dd = 64*s2 - s1*s1; mean = s1/64; vr = dd/4096;
            r = 0; while ((r+1)*(r+1) <= dd) r++;
            sd = r/64;
            e[b] = (vr >= 30) && (16*px(2, x, y, 64, 80) < 16*mean - 3*sd);
          end
          checks++;
          if (got.size() <= 2*y + wd || got[2*y + wd] != e) begin
            failures++;
            if (failures < 10) $display("niblack row %0d word %0d: got %h exp %h", y, wd,
                                        got.size() > 2*y+wd ? got[2*y+wd] : 0, e);
          end
        end
      end
    end

    // ===== mechanisms =====
    for (int k = 1; k <= 9; k++) begin
      checks++;
      if (n_op[k] == 0) begin failures++; $display("opcode %0d never ran", k); end
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (n_mode[k] == 0) begin failures++; $display("acquisition mode %0d never ran", k); end
    end
    checks++;
    if (n_copy_acq == 0 || n_copy_res == 0 || n_out_bp == 0 || n_acq_stall == 0) begin
      failures++;
      $display("mechanisms: sensor copy %0d, result copy %0d, back-pressure %0d, sensor stall %0d",
               n_copy_acq, n_copy_res, n_out_bp, n_acq_stall);
    end
    checks++;
    if (sensor.bad_addr != 0) begin failures++; $display("sensor address out of range"); end
    $display("ops: acq %0d load %0d store %0d med %0d nib %0d shape %0d trp %0d hpf %0d dil %0d",
             n_op[1], n_op[2], n_op[3], n_op[4], n_op[5], n_op[6], n_op[7], n_op[8], n_op[9]);
    $display("sensor copy %0d, result copy %0d, back-pressure cycles %0d, sensor stall cycles %0d, host waits %0d",
             n_copy_acq, n_copy_res, n_out_bp, n_acq_stall, n_host_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
