// disparity_mem: the disparity maps of all window sizes.
//
// Level L (window size 2^L) has an (IW>>L) x (IW>>L) map, one entry per
// non-overlapping window. After each pass the controller writes the
// disparities of all windows of one band at the pass's level in one clock.
// While level L is being matched, dstrip presents the map of level L+1 for the
// rows the band needs: row k of dstrip is parent row band*(WMAX>>(L+1)) - 1 + k,
// clamped to the map, so the windows of the first and last bands see their own
// parent in place of a missing neighbour. Columns beyond the parent map's
// width are zero. The level-0 map is the result; a host read port reads any
// level. Storing every level and clamping at the image border are choices of
// this design.
//
// Timing: write on the clock edge with we; dstrip is combinational; rd_disp is
// registered (one clock after rd_*).
module disparity_mem
  import stereo_pkg::*;
#(
  parameter int IW   = IW_DEF,
  parameter int WMAX = WMAX_DEF,
  localparam int LMAX = $clog2(WMAX),
  localparam int SR   = WMAX/2 + 2,
  localparam int SC   = IW/2
) (
  input  logic  clk,
  input  logic  we,
  input  lvl_t  level,                  // level being matched / written
  input  disp_t band,                   // band being matched / written
  input  disp_t node_disp [LMAX+1][WMAX][IW],
  output disp_t dstrip [SR][SC],
  input  lvl_t  rd_level,
  input  disp_t rd_row,
  input  disp_t rd_col,
  output disp_t rd_disp
);

  disp_t strips [LMAX+2][SR][SC];
  disp_t rd_vals [LMAX+1];

  for (genvar L = 0; L <= LMAX; L++) begin : g_map
    localparam int N  = IW >> L;        // map size
    localparam int NR = WMAX >> L;      // map rows per band
    localparam int AB = (N > 1) ? $clog2(N) : 1;
    disp_t map [N][N];

    always_ff @(posedge clk) begin
      if (we && level == lvl_t'(L)) begin
        for (int r = 0; r < NR; r++)
          for (int c = 0; c < N; c++)
            map[int'(band) * NR + r][c] <= node_disp[L][r][c];
      end
    end

    assign rd_vals[L] = (int'(rd_row) < N && int'(rd_col) < N) ? map[rd_row[AB-1:0]][rd_col[AB-1:0]] : '0;

    // strip used while level L-1 is matched
    always_comb begin
      strips[L] = '{default: '0};
      if (L >= 1) begin
        for (int k = 0; k < NR + 2 && k < SR; k++) begin
          int row;
          row = int'(band) * NR - 1 + k;
          if (row < 0)  row = 0;
          if (row >= N) row = N - 1;
          for (int c = 0; c < N && c < SC; c++) strips[L][k][c] = map[row][c];
        end
      end
    end
  end

  assign strips[LMAX+1] = '{default: '0};
  assign dstrip = strips[int'(level) + 1];

  always_ff @(posedge clk) begin
    rd_disp <= '0;
    for (int l = 0; l <= LMAX; l++)
      if (int'(rd_level) == l) rd_disp <= rd_vals[l];
  end

endmodule
