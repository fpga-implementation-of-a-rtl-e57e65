// tb_disparity_mem: writes random band results at every level, then checks the
// parent-disparity strip presented for every (level, band) pair, including the
// clamped rows at the top and bottom of the image, and reads every map entry
// back through the host port.
module tb_disparity_mem;
  import stereo_pkg::*;

  localparam int IW = 64, WMAX = 8, LMAX = $clog2(WMAX), SR = WMAX/2 + 2, SC = IW/2;
  logic clk = 0, we = 0;
  lvl_t level = '0, rd_level = '0;
  disp_t band = '0, rd_row = '0, rd_col = '0, rd_disp;
  disp_t node_disp [LMAX+1][WMAX][IW];
  disp_t dstrip [SR][SC];
  int checks = 0, failures = 0;
  int mdl [LMAX+1][IW][IW];

  disparity_mem dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    node_disp = '{default: '0};
    for (int L = LMAX; L >= 0; L--) begin
      automatic int nr = WMAX >> L, n = IW >> L;
      for (int b = 0; b < IW / WMAX; b++) begin
        @(negedge clk);
        for (int r = 0; r < WMAX; r++)
          for (int c = 0; c < IW; c++) begin
            node_disp[L][r][c] = disp_t'($urandom_range(0, 63));
            if (r < nr && c < n) mdl[L][b*nr + r][c] = int'(node_disp[L][r][c]);
          end
        we = 1; level = lvl_t'(L); band = disp_t'(b);
        @(negedge clk);
        we = 0;
      end
    end
    // strips
    for (int L = 0; L < LMAX; L++) begin
      automatic int np = IW >> (L + 1), rp = WMAX >> (L + 1);
      for (int b = 0; b < IW / WMAX; b++) begin
        level = lvl_t'(L); band = disp_t'(b);
        #1;
        for (int k = 0; k < rp + 2; k++)
          for (int c = 0; c < np; c++) begin
            automatic int row = b * rp - 1 + k;
            if (row < 0) row = 0;
            if (row >= np) row = np - 1;
            checks++;
            if (int'(dstrip[k][c]) != mdl[L+1][row][c]) begin
              failures++;
              if (failures < 10) $display("FAIL strip L=%0d b=%0d k=%0d c=%0d", L, b, k, c);
            end
          end
      end
    end
    // read port
    for (int L = 0; L <= LMAX; L++)
      for (int y = 0; y < (IW >> L); y++)
        for (int x = 0; x < (IW >> L); x++) begin
          @(negedge clk);
          rd_level = lvl_t'(L); rd_row = disp_t'(y); rd_col = disp_t'(x);
          @(negedge clk);
          checks++;
          if (int'(rd_disp) != mdl[L][y][x]) begin
            failures++;
            if (failures < 10) $display("FAIL read L=%0d (%0d,%0d): %0d vs %0d", L, y, x, rd_disp, mdl[L][y][x]);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
