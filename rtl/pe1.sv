// pe1: processing element that computes one absolute difference bit-serially.
//
// It holds one reference pixel and one candidate pixel. The candidate register
// is part of a horizontal shift chain: on shift it takes its left neighbour's
// pixel, so after d shifts it holds the candidate pixel d columns to the left,
// i.e. candidate disparity d. A parallel comparator picks the larger pixel; a
// one-bit serial subtractor with a borrow flip-flop then produces
// |ref - cand| one bit per clock, LSB first, while tok.k steps through the
// bit-planes. The AD bit is registered (the PE's pipeline register) before it
// goes to the PE2 above and to this PE's own 1x1 window node.
//
// Timing: bit k of the AD for the token presented in clock n appears on adbit
// in clock n+1; tok_q is the token delayed to match. The 1x1 window node is
// used when the window size is 1.
module pe1
  import stereo_pkg::*;
#(
  parameter int X0 = 0                  // column of this PE
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     load,                // take ref_in / cand_ld (pass start)
  input  pix_t     ref_in,
  input  pix_t     cand_ld,
  input  logic     shift,               // move candidate chain one column right
  input  pix_t     cand_in,             // candidate pixel of the left neighbour
  output pix_t     cand_out,            // to the right neighbour
  input  bit_tok_t tok,                 // bit-plane token for this clock
  output logic     adbit,               // registered AD bit
  // 1x1 window node
  input  bit_tok_t node_tok,            // tok delayed by one clock
  input  logic     clear,
  input  logic     active,
  input  logic     full,
  input  disp_t    dref [4],
  input  disp_t    radius,
  output disp_t    best_d
);

  pix_t ref_q, cand_q;
  logic borrow_q;
  logic ge, a_k, b_k, diff_k, borrow_n, borrow_in;
  logic [PIX_W:0] best_sad_unused;

  assign cand_out = cand_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ref_q  <= '0;
      cand_q <= '0;
    end else if (load) begin
      ref_q  <= ref_in;
      cand_q <= cand_ld;
    end else if (shift) begin
      cand_q <= cand_in;
    end
  end

  // serial |ref - cand| = max - min, LSB first
  always_comb begin
    ge        = (ref_q >= cand_q);
    a_k       = ge ? ref_q[tok.k] : cand_q[tok.k];
    b_k       = ge ? cand_q[tok.k] : ref_q[tok.k];
    borrow_in = tok_first(tok) ? 1'b0 : borrow_q;
    diff_k    = a_k ^ b_k ^ borrow_in;
    borrow_n  = (~a_k & b_k) | (~(a_k ^ b_k) & borrow_in);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      borrow_q <= 1'b0;
      adbit    <= 1'b0;
    end else begin
      borrow_q <= tok.valid ? borrow_n : 1'b0;
      adbit    <= tok.valid ? diff_k : 1'b0;
    end
  end

  window_node #(.CW(1), .X0(X0)) u_node (
    .clk      (clk),
    .rst_n    (rst_n),
    .cnt      (adbit),
    .tok      (node_tok),
    .clear    (clear),
    .active   (active),
    .full     (full),
    .dref     (dref),
    .radius   (radius),
    .best_d   (best_d),
    .best_sad (best_sad_unused)
  );

endmodule
