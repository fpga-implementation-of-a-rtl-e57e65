// pe3: processing element that adds four partial sums of the level below.
//
// A PE3 at level L (window size 2^L, L >= 2) adds the four registered
// bit-plane sums of the four 2^(L-1) windows that tile its window; the result
// (two bits wider) is registered, the PE's pipeline register. Its window node
// forms the SAD of the 2^L x 2^L window and keeps its minimum; it is used when
// the window size is 2^L. The same PE3 serves every level from 4x4 up.
//
// Timing: sum is valid one clock after its inputs; node_tok must be the token
// delayed to match sum.
module pe3
  import stereo_pkg::*;
#(
  parameter int IN_W = 3,               // width of each input sum
  parameter int X0   = 0                // left column of this window
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [IN_W-1:0] sums_in [4],
  output logic [IN_W+1:0] sum,
  input  bit_tok_t        node_tok,
  input  logic            clear,
  input  logic            active,
  input  logic            full,
  input  disp_t           dref [4],
  input  disp_t           radius,
  output disp_t           best_d
);

  logic [PIX_W+IN_W+1:0] best_sad_unused;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sum <= '0;
    else        sum <= (IN_W+2)'(sums_in[0]) + (IN_W+2)'(sums_in[1])
                     + (IN_W+2)'(sums_in[2]) + (IN_W+2)'(sums_in[3]);
  end

  window_node #(.CW(IN_W+2), .X0(X0)) u_node (
    .clk      (clk),
    .rst_n    (rst_n),
    .cnt      (sum),
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
