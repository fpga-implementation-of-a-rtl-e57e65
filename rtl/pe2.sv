// pe2: processing element that adds the AD bits of a 2x2 window.
//
// Its four inputs are the registered AD bits of four PE1s of the same
// bit-plane; their sum (0..4) is registered, the PE's pipeline register, and
// passed to the PE3 above and to this PE's 2x2 window node. The window node
// turns the stream of bit-plane sums into the SAD of the 2x2 window and keeps
// its minimum; it is used when the window size is 2.
//
// Timing: sum is valid one clock after the input bits; node_tok must be the
// token delayed to match sum.
module pe2
  import stereo_pkg::*;
#(
  parameter int X0 = 0                  // left column of this 2x2 window
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  bits_in,          // AD bits of the four PE1s
  output logic [2:0]  sum,              // registered ones count
  input  bit_tok_t    node_tok,
  input  logic        clear,
  input  logic        active,
  input  logic        full,
  input  disp_t       dref [4],
  input  disp_t       radius,
  output disp_t       best_d
);

  logic [PIX_W+2:0] best_sad_unused;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sum <= '0;
    else        sum <= 3'(bits_in[0]) + 3'(bits_in[1]) + 3'(bits_in[2]) + 3'(bits_in[3]);
  end

  window_node #(.CW(3), .X0(X0)) u_node (
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
