// tb_sad_unit: runs one pass of the WPPP array per window size on a random
// band (16-pixel-wide image, 4x4 maximum window, so 64 PE1s, 16 PE2s and 4
// PE3s) with random parent disparities, and checks every window's chosen
// disparity against SADs computed directly from the pixels. The largest
// window size is a full search, the others are local searches around D1..D4.
// Bands alternate between a shifted copy with noise and unrelated random
// pixels, where the minimum depends on every absolute difference.
module tb_sad_unit;
  import stereo_pkg::*;

  localparam int IW = 16, WMAX = 4, LMAX = 2, SR = WMAX/2 + 2, SC = IW/2;
  localparam int RADIUS = 1;
  logic clk = 0, rst_n = 0, load = 0, clear = 0;
  pix_t ref_rows [WMAX][IW];
  pix_t cand_rows [WMAX][IW];
  bit_tok_t tok = '0;
  lvl_t level = '0;
  disp_t radius = disp_t'(RADIUS);
  disp_t dstrip [SR][SC];
  disp_t node_disp [LMAX+1][WMAX][IW];
  int checks = 0, failures = 0, n_local_rej = 0;

  sad_unit #(.IW(IW), .WMAX(WMAX)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int absd(int a, int b);
    return (a > b) ? a - b : b - a;
  endfunction

  function automatic int expect_d(int L, int r, int c);
    int w = 1 << L, x0 = c << L, best = -1, bd = 0, np = IW >> (L + 1);
    int dr [4];
    int pr = r / 2, pc = c / 2, sr2, nc;
    sr2 = (r % 2 == 1) ? pr + 2 : pr;
    nc = (c % 2 == 1) ? ((pc + 1 < np) ? pc + 1 : pc) : ((pc > 0) ? pc - 1 : 0);
    dr = '{int'(dstrip[pr+1][pc]), int'(dstrip[pr+1][nc]), int'(dstrip[sr2][pc]), int'(dstrip[sr2][nc])};
    for (int d = 0; d <= x0; d++) begin
      int sad = 0;
      bit ok = (L == LMAX);
      for (int q = 0; q < 4; q++) if (absd(d, dr[q]) <= RADIUS) ok = 1;
      if (!ok) begin n_local_rej++; continue; end
      for (int j = 0; j < w; j++)
        for (int i = 0; i < w; i++)
          sad += absd(int'(ref_rows[r*w+j][x0+i]), int'(cand_rows[r*w+j][x0+i-d]));
      if (best < 0 || sad < best) begin best = sad; bd = d; end
    end
    return bd;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 8; n++)
      for (int L = LMAX; L >= 0; L--) begin
        // odd n: band with a true shift of 2 + n plus noise; even n: unrelated
        // random bands, whose minima depend on every AD of a window
        for (int r = 0; r < WMAX; r++)
          for (int c = 0; c < IW; c++) cand_rows[r][c] = pix_t'($urandom_range(0, 255));
        for (int r = 0; r < WMAX; r++)
          for (int c = 0; c < IW; c++)
            ref_rows[r][c] = (n % 2 == 1 && c >= 2 + n) ? pix_t'(int'(cand_rows[r][c-2-n]) ^ $urandom_range(0, 7))
                                          : pix_t'($urandom_range(0, 255));
        for (int k = 0; k < SR; k++)
          for (int c = 0; c < SC; c++) dstrip[k][c] = disp_t'($urandom_range(0, 15));
        @(negedge clk);
        level = lvl_t'(L); load = 1; clear = 1;
        @(negedge clk);
        load = 0; clear = 0;
        for (int d = 0; d < IW; d++)
          for (int k = 0; k < PIX_W; k++) begin
            tok = '{valid: 1'b1, k: BIT_W'(k), d: disp_t'(d)};
            @(negedge clk);
          end
        tok = '0;
        repeat (LMAX + 3) @(negedge clk);
        for (int r = 0; r < (WMAX >> L); r++)
          for (int c = 0; c < (IW >> L); c++) begin
            automatic int e = expect_d(L, r, c);
            checks++;
            if (int'(node_disp[L][r][c]) != e) begin
              failures++;
              if (failures < 10) $display("FAIL n=%0d L=%0d (%0d,%0d): %0d vs %0d", n, L, r, c, node_disp[L][r][c], e);
            end
          end
      end
    checks++;
    if (n_local_rej == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
