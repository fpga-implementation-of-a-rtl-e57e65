// stereo_top: stereo matching processor with adaptive window size.
//
// For every pixel of the reference (left) image it finds the disparity of the
// best-matching pixel on the same row of the candidate (right) image, by
// minimising the sum of absolute differences (SAD) over a window whose size
// shrinks from WMAX x WMAX to 1x1. At the largest size the reference image is
// tiled into non-overlapping windows, each searched over every candidate
// window inside the image. At each halved size each window is searched only
// within +-RADIUS of the four disparities found around it at the previous size.
// The level-0 (1x1) map is the per-pixel result.
//
// Structure: WMAX R-MEMs and WMAX C-MEMs (row-interleaved image memories),
// 2*WMAX line buffers, the WPPP SAD unit (WMAX x IW bit-serial PE1s and a tree
// of PE2/PE3 adders, each with its own search area controller and minimum
// detector), the disparity memory and the controller.
//
// Host interface: while busy is low, write pixels with img_we (img_sel 0 =
// reference/left, 1 = candidate/right image, at img_row/img_col). Pulse start;
// done pulses when the maps are complete (16675 clocks after start for the
// default 64x64 image, 8x8 maximum window). Read disparities with
// rd_level/rd_row/rd_col; rd_disp follows one clock later. Writes during busy
// are ignored.
module stereo_top
  import stereo_pkg::*;
#(
  parameter int IW     = IW_DEF,        // image width and height
  parameter int WMAX   = WMAX_DEF,      // maximum window size
  parameter int RADIUS = RADIUS_DEF,    // local search radius
  localparam int LMAX = $clog2(WMAX),
  localparam int AW   = $clog2((IW / WMAX) * IW)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  img_we,
  input  logic  img_sel,
  input  disp_t img_row,
  input  disp_t img_col,
  input  pix_t  img_data,
  input  logic  start,
  output logic  busy,
  output logic  done,
  input  lvl_t  rd_level,
  input  disp_t rd_row,
  input  disp_t rd_col,
  output disp_t rd_disp
);

  logic [AW-1:0] mem_raddr, waddr;
  logic          lb_shift, pe_load, clear, dm_we;
  bit_tok_t      tok;
  lvl_t          level;
  disp_t         band;
  ctrl_state_t   state;

  pix_t  r_rd [WMAX];
  pix_t  c_rd [WMAX];
  pix_t  r_lb [WMAX][IW];
  pix_t  c_lb [WMAX][IW];
  disp_t dstrip    [WMAX/2+2][IW/2];
  disp_t node_disp [LMAX+1][WMAX][IW];

  assign waddr = AW'((int'(img_row) / WMAX) * IW + int'(img_col));

  for (genvar m = 0; m < WMAX; m++) begin : g_mem
    logic row_hit;
    assign row_hit = img_we && !busy && (int'(img_row) % WMAX == m);

    image_mem #(.IW(IW), .WMAX(WMAX)) u_rmem (
      .clk(clk), .we(row_hit && !img_sel), .waddr(waddr), .wdata(img_data),
      .raddr(mem_raddr), .rdata(r_rd[m]));
    image_mem #(.IW(IW), .WMAX(WMAX)) u_cmem (
      .clk(clk), .we(row_hit && img_sel), .waddr(waddr), .wdata(img_data),
      .raddr(mem_raddr), .rdata(c_rd[m]));

    line_buffer #(.IW(IW)) u_rlb (
      .clk(clk), .rst_n(rst_n), .shift_en(lb_shift), .din(r_rd[m]), .q(r_lb[m]));
    line_buffer #(.IW(IW)) u_clb (
      .clk(clk), .rst_n(rst_n), .shift_en(lb_shift), .din(c_rd[m]), .q(c_lb[m]));
  end

  stereo_ctrl #(.IW(IW), .WMAX(WMAX)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .done(done),
    .mem_raddr(mem_raddr), .lb_shift(lb_shift), .pe_load(pe_load),
    .clear(clear), .tok(tok), .level(level), .band(band), .dm_we(dm_we),
    .state_o(state));

  sad_unit #(.IW(IW), .WMAX(WMAX)) u_sad (
    .clk(clk), .rst_n(rst_n), .load(pe_load), .ref_rows(r_lb),
    .cand_rows(c_lb), .tok(tok), .clear(clear), .level(level),
    .radius(disp_t'(RADIUS)), .dstrip(dstrip), .node_disp(node_disp));

  disparity_mem #(.IW(IW), .WMAX(WMAX)) u_dmem (
    .clk(clk), .we(dm_we), .level(level), .band(band),
    .node_disp(node_disp), .dstrip(dstrip), .rd_level(rd_level),
    .rd_row(rd_row), .rd_col(rd_col), .rd_disp(rd_disp));

endmodule
