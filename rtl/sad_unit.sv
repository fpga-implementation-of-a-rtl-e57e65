// sad_unit: the window-parallel-and-pixel-parallel (WPPP) SAD array.
//
// A band of WMAX image rows by IW columns is held in WMAX x IW PE1s, one per
// reference pixel (WMAX*IW = 512 PE1s for the 64x64 / 8x8 configuration).
// Above them sits a quad-tree of adders: a PE2 per 2x2 block, a PE3 per 4x4
// block, another PE3 per 8x8 block, and so on up to WMAX x WMAX. Every node of
// the tree has its own window node (SAD accumulator, search area controller,
// minimum detector), so at window size W = 2^L all (WMAX/W) x (IW/W) windows of
// the band are matched at once from the same 512 absolute differences: one 8x8
// SAD, four 4x4 SADs, sixteen 2x2 SADs ... per 8x8 block. The number of ADs in
// use is the same at every window size.
//
// Candidate disparities are produced by shifting the candidate pixels one
// column to the right through the PE1 chain after every PIX_W clocks (one
// bit-serial word); the candidate pixel shifted in at column 0 is zero and is
// never used, because the search area controllers reject candidate windows
// that leave the image.
//
// Interface: load copies the reference and candidate rows into the PE1s.
// tok is the bit-plane token of the controller; it is delayed here by one
// clock per tree level so each level's window nodes see it together with their
// data. level selects the window size being matched; dstrip holds the
// disparities found at the next larger size for the rows around the band
// (row k of dstrip = parent-map row band*(WMAX>>(level+1)) - 1 + k, clamped).
// node_disp[L][r][c] is the disparity of window (r,c) of the band at level L;
// for the active level it is final LMAX+3 clocks after the last token.
module sad_unit
  import stereo_pkg::*;
#(
  parameter int IW   = IW_DEF,          // image width
  parameter int WMAX = WMAX_DEF,        // maximum window size (power of 2, >= 2)
  localparam int LMAX = $clog2(WMAX),
  localparam int CWM  = 2*LMAX + 1,     // widest bit-plane count
  localparam int SR   = WMAX/2 + 2,     // rows of the parent-disparity strip
  localparam int SC   = IW/2            // columns of the parent-disparity strip
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     load,
  input  pix_t     ref_rows  [WMAX][IW],
  input  pix_t     cand_rows [WMAX][IW],
  input  bit_tok_t tok,
  input  logic     clear,
  input  lvl_t     level,
  input  disp_t    radius,
  input  disp_t    dstrip    [SR][SC],
  output disp_t    node_disp [LMAX+1][WMAX][IW]
);

  bit_tok_t           tok_d [LMAX+1];           // tok delayed by L+1 clocks
  logic [CWM-1:0]     cnt   [LMAX+1][WMAX][IW]; // bit-plane counts per level
  pix_t               cand_chain [WMAX][IW];
  logic               shift;

  assign shift = tok_last(tok);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l <= LMAX; l++) tok_d[l] <= '0;
    end else begin
      tok_d[0] <= tok;
      for (int l = 1; l <= LMAX; l++) tok_d[l] <= tok_d[l-1];
    end
  end

  for (genvar L = 0; L <= LMAX; L++) begin : g_lvl
    localparam int NR  = WMAX >> L;            // windows per band, vertically
    localparam int NC  = IW >> L;              // windows per band, horizontally
    localparam int NPC = IW >> (L + 1);        // parent windows horizontally
    localparam int CW  = 2*L + 1;
    for (genvar r = 0; r < WMAX; r++) begin : g_r
      for (genvar c = 0; c < IW; c++) begin : g_c
        if (r < NR && c < NC) begin : g_pe
          disp_t dref [4];
          disp_t bd;
          logic  act;
          logic [CW-1:0] s;
          if (L < LMAX) begin : g_local
            // the four larger windows nearest to this one (Fig. 4)
            localparam int PR = r / 2;
            localparam int PC = c / 2;
            localparam int S1 = PR + 1;
            localparam int S2 = (r % 2 == 1) ? PR + 2 : PR;
            localparam int C1 = PC;
            localparam int C2 = (c % 2 == 1) ? ((PC + 1 < NPC) ? PC + 1 : PC)
                                             : ((PC > 0) ? PC - 1 : 0);
            assign dref[0] = dstrip[S1][C1];
            assign dref[1] = dstrip[S1][C2];
            assign dref[2] = dstrip[S2][C1];
            assign dref[3] = dstrip[S2][C2];
          end else begin : g_full
            assign dref = '{default: '0};
          end
          assign act = (level == lvl_t'(L));
          if (L == 0) begin : g_pe1
            pe1 #(.X0(c)) u_pe (
              .clk      (clk),
              .rst_n    (rst_n),
              .load     (load),
              .ref_in   (ref_rows[r][c]),
              .cand_ld  (cand_rows[r][c]),
              .shift    (shift),
              .cand_in  ((c == 0) ? '0 : cand_chain[r][(c == 0) ? 0 : c-1]),
              .cand_out (cand_chain[r][c]),
              .tok      (tok),
              .adbit    (s),
              .node_tok (tok_d[0]),
              .clear    (clear),
              .active   (act),
              .full     (LMAX == 0),
              .dref     (dref),
              .radius   (radius),
              .best_d   (bd)
            );
          end else if (L == 1) begin : g_pe2
            pe2 #(.X0(c*2)) u_pe (
              .clk      (clk),
              .rst_n    (rst_n),
              .bits_in  ({cnt[0][2*r+1][2*c+1][0], cnt[0][2*r+1][2*c][0],
                          cnt[0][2*r][2*c+1][0],   cnt[0][2*r][2*c][0]}),
              .sum      (s),
              .node_tok (tok_d[1]),
              .clear    (clear),
              .active   (act),
              .full     (LMAX == 1),
              .dref     (dref),
              .radius   (radius),
              .best_d   (bd)
            );
          end else begin : g_pe3
            logic [CW-3:0] sin [4];
            assign sin[0] = cnt[L-1][2*r][2*c][CW-3:0];
            assign sin[1] = cnt[L-1][2*r][2*c+1][CW-3:0];
            assign sin[2] = cnt[L-1][2*r+1][2*c][CW-3:0];
            assign sin[3] = cnt[L-1][2*r+1][2*c+1][CW-3:0];
            pe3 #(.IN_W(CW-2), .X0(c << L)) u_pe (
              .clk      (clk),
              .rst_n    (rst_n),
              .sums_in  (sin),
              .sum      (s),
              .node_tok (tok_d[L]),
              .clear    (clear),
              .active   (act),
              .full     (L == LMAX),
              .dref     (dref),
              .radius   (radius),
              .best_d   (bd)
            );
          end
          assign cnt[L][r][c]       = CWM'(s);
          assign node_disp[L][r][c] = bd;
        end else begin : g_none
          assign cnt[L][r][c]       = '0;
          assign node_disp[L][r][c] = '0;
        end
      end
    end
  end

endmodule
