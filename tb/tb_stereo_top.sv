// tb_stereo_top: end-to-end test of the stereo matching processor at its
// default size (64x64 image, 8x8 maximum window, radius 2).
//
// A random-texture candidate (right) image is generated, and the reference
// (left) image is built from it with a known disparity field: a background at
// one disparity, a raised square at a larger one, and a narrow strip whose
// disparity lies far from its surroundings. A behavioural model of the
// hierarchical algorithm, written directly from the SAD definition, computes
// the expected map of every window size; every entry of every map read back
// from the processor is compared with it. The start-to-done time is checked
// against the schedule (16675 clocks, 0.194 ms at 86 MHz). The test also counts
// how often each mechanism of the design occurred and fails on any that never
// did: passes at each window size, prefetch of a band during computation,
// candidate windows rejected at the image edge, candidates rejected by the
// local search, and windows whose result the local search actually changed.
module tb_stereo_top;
  import stereo_pkg::*;

  localparam int IW     = IW_DEF;
  localparam int WMAX   = WMAX_DEF;
  localparam int RADIUS = RADIUS_DEF;
  localparam int LMAX   = $clog2(WMAX);
  localparam int NPASS  = (LMAX + 1) * (IW / WMAX);
  localparam int GT_PCT = 80;   // least share of pixels at the true disparity
  localparam int EXP_CYCLES = 3 + IW + NPASS * (IW * PIX_W + LMAX + 4);

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  img_we = 1'b0, img_sel = 1'b0, start = 1'b0;
  disp_t img_row = '0, img_col = '0;
  pix_t  img_data = '0;
  logic  busy, done;
  lvl_t  rd_level = '0;
  disp_t rd_row = '0, rd_col = '0, rd_disp;

  stereo_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #(40_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int limg [IW][IW];   // [y][x] reference (left)
  int rimg [IW][IW];   // [y][x] candidate (right)
  int gt   [IW][IW];
  int emap [LMAX+1][IW][IW];
  int n_edge_rej = 0, n_local_rej = 0, n_local_changed = 0;
  int n_used [LMAX+1];   // SAD words that reached a minimum detector

  function automatic int absd(int a, int b);
    return (a > b) ? a - b : b - a;
  endfunction

  // behavioural model of the matching algorithm
  task automatic model();
    for (int L = LMAX; L >= 0; L--) begin
      int W = 1 << L, N = IW >> L;
      for (int wy = 0; wy < N; wy++)
        for (int wx = 0; wx < N; wx++) begin
          int x0 = wx * W, y0 = wy * W;
          int best = -1, bd = 0, bestu = -1, bdu = 0;
          int dr [4];
          if (L < LMAX) begin
            int np = IW >> (L + 1), pr = wy / 2, pc = wx / 2, nr, nc;
            nr = (wy % 2 == 1) ? ((pr + 1 < np) ? pr + 1 : pr) : ((pr > 0) ? pr - 1 : 0);
            nc = (wx % 2 == 1) ? ((pc + 1 < np) ? pc + 1 : pc) : ((pc > 0) ? pc - 1 : 0);
            dr[0] = emap[L+1][pr][pc]; dr[1] = emap[L+1][pr][nc];
            dr[2] = emap[L+1][nr][pc]; dr[3] = emap[L+1][nr][nc];
          end
          for (int d = 0; d < IW; d++) begin
            int sad = 0;
            bit near = 0;
            if (d > x0) begin
              n_edge_rej++;
              continue;
            end
            for (int j = 0; j < W; j++)
              for (int i = 0; i < W; i++)
                sad += absd(limg[y0+j][x0+i], rimg[y0+j][x0+i-d]);
            if (bestu < 0 || sad < bestu) begin bestu = sad; bdu = d; end
            if (L < LMAX) begin
              for (int q = 0; q < 4; q++) if (absd(d, dr[q]) <= RADIUS) near = 1;
              if (!near) begin
                n_local_rej++;
                continue;
              end
            end
            n_used[L]++;
            if (best < 0 || sad < best) begin best = sad; bd = d; end
          end
          if (bd != bdu) n_local_changed++;
          emap[L][wy][wx] = bd;
        end
    end
  endtask

  int n_pass [LMAX+1];
  int n_prefetch = 0;
  always @(negedge clk) begin
    if (dut.u_ctrl.state == S_XFER) n_pass[int'(dut.u_ctrl.level)]++;
    if (dut.u_ctrl.state == S_COMPUTE && dut.lb_shift) n_prefetch++;
  end

  initial begin
    int t0, t1, ncorrect;
    for (int l = 0; l <= LMAX; l++) begin n_pass[l] = 0; n_used[l] = 0; end
    // scene: disparity 3 background, 9 on a square, 20 on a thin strip
    for (int y = 0; y < IW; y++)
      for (int x = 0; x < IW; x++) begin
        rimg[y][x] = $urandom_range(0, 255);
        gt[y][x] = 3;
        if (y >= IW/4 && y < IW*5/8 && x >= IW*3/8 && x < IW*3/4) gt[y][x] = 9;
        if (y >= IW*11/16 && y < IW*15/16 && x >= IW*5/8 && x < IW*5/8 + 4) gt[y][x] = 20;
      end
    for (int y = 0; y < IW; y++)
      for (int x = 0; x < IW; x++)
        limg[y][x] = (x - gt[y][x] >= 0) ? rimg[y][x - gt[y][x]] : $urandom_range(0, 255);
    model();

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int s = 0; s < 2; s++)
      for (int y = 0; y < IW; y++)
        for (int x = 0; x < IW; x++) begin
          img_we <= 1'b1; img_sel <= s[0];
          img_row <= disp_t'(y); img_col <= disp_t'(x);
          img_data <= pix_t'(s == 0 ? limg[y][x] : rimg[y][x]);
          @(posedge clk);
        end
    img_we <= 1'b0;
    start <= 1'b1;
    @(posedge clk);
    t0 = cyc - 1;
    start <= 1'b0;
    while (!done) @(posedge clk);
    t1 = cyc - 1;
    checks++;
    if (t1 - t0 != EXP_CYCLES) begin
      failures++;
      $display("FAIL cycles %0d expected %0d", t1 - t0, EXP_CYCLES);
    end
    $display("start-to-done %0d clocks = %0.4f ms at 86 MHz", t1 - t0, (t1 - t0) / 86.0e3);
    checks++;
    if ((t1 - t0) / 86.0e3 >= 0.195) begin
      failures++;
      $display("FAIL processing time above 0.19 ms");
    end

    // read back every map
    ncorrect = 0;
    for (int L = 0; L <= LMAX; L++)
      for (int y = 0; y < (IW >> L); y++)
        for (int x = 0; x < (IW >> L); x++) begin
          rd_level <= lvl_t'(L); rd_row <= disp_t'(y); rd_col <= disp_t'(x);
          @(posedge clk);
          @(negedge clk);
          checks++;
          if (int'(rd_disp) != emap[L][y][x]) begin
            failures++;
            if (failures < 20)
              $display("FAIL level %0d (%0d,%0d): got %0d expected %0d", L, y, x, rd_disp, emap[L][y][x]);
          end
          if (L == 0 && int'(rd_disp) == gt[y][x]) ncorrect++;
        end
    $display("level-0 pixels equal to ground truth: %0d of %0d", ncorrect, IW * IW);
    checks++;
    if (ncorrect * 100 < IW * IW * GT_PCT) begin
      failures++;
      $display("FAIL too few correct disparities");
    end

    // mechanisms
    for (int l = 0; l <= LMAX; l++) begin
      $display("passes at window %0d: %0d, SAD words used %0.1f%%", 1 << l, n_pass[l],
               100.0 * n_used[l] / ((IW >> l) * (IW >> l) * IW));
      checks++;
      if (n_pass[l] != IW / WMAX) failures++;
    end
    $display("prefetch reads during compute: %0d", n_prefetch);
    $display("candidates outside the image: %0d", n_edge_rej);
    $display("candidates rejected by local search: %0d", n_local_rej);
    $display("windows changed by local search: %0d", n_local_changed);
    checks++; if (n_prefetch == 0) failures++;
    checks++; if (n_edge_rej == 0) failures++;
    checks++; if (n_local_rej == 0) failures++;
    checks++; if (n_local_changed == 0) failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
