// window_node: the per-window back end shared by PE1, PE2 and PE3.
//
// It turns the bit-plane counts of one window into a SAD word and feeds that
// word, gated by the window's search area controller, to its minimum detector.
//
// The bit-serial accumulation works LSB first: for bit-plane k the input cnt is
// the number of absolute differences in the window whose bit k is 1. Each clock
// t = P + cnt; bit 0 of t is the next SAD bit (shifted into res) and t >> 1
// carries into the next plane. After the last plane the SAD is {t >> 1, t[0],
// res}. So a window of N pixels needs only a (log2 N + 1)-bit adder however
// wide the pixels are.
//
// Timing: tok must arrive with the cnt it describes. The SAD of disparity d is
// offered to the minimum detector one clock after its last bit-plane, and the
// result (best_d) is valid the clock after that.
module window_node
  import stereo_pkg::*;
#(
  parameter int CW = 1,                 // width of the bit-plane count
  parameter int X0 = 0                  // left edge column of this window
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [CW-1:0] cnt,            // ones count of the current bit-plane
  input  bit_tok_t      tok,            // timing token aligned with cnt
  input  logic          clear,          // start of a pass: reset the minimum
  input  logic          active,         // this window size is being matched
  input  logic          full,           // full search (largest window size)
  input  disp_t         dref [4],       // D1..D4 from the larger window size
  input  disp_t         radius,
  output disp_t         best_d,
  output logic [PIX_W+CW-1:0] best_sad
);

  localparam int SW = PIX_W + CW;

  logic [CW-1:0]    p_q;                // carry of the serial accumulation
  logic [PIX_W-1:0] res_q;              // SAD bits produced so far
  logic [CW:0]      t;
  logic [SW-1:0]    sad_q;
  disp_t            sad_d_q;
  logic             sad_v_q;
  logic             en;
  logic             found;

  assign t = (tok_first(tok) ? '0 : {1'b0, p_q}) + {1'b0, cnt};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_q     <= '0;
      res_q   <= '0;
      sad_q   <= '0;
      sad_d_q <= '0;
      sad_v_q <= 1'b0;
    end else begin
      sad_v_q <= 1'b0;
      if (tok.valid) begin
        p_q   <= t[CW:1];
        res_q <= {t[0], res_q[PIX_W-1:1]};
        if (tok_last(tok)) begin
          sad_q   <= {t[CW:1], t[0], res_q[PIX_W-1:1]};
          sad_d_q <= tok.d;
          sad_v_q <= 1'b1;
        end
      end
    end
  end

  search_area_ctrl u_sac (
    .d      (sad_d_q),
    .x0     (disp_t'(X0)),
    .full   (full),
    .dref   (dref),
    .radius (radius),
    .en     (en)
  );

  min_detector #(.SW(SW)) u_min (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (clear),
    .valid    (sad_v_q && active && en),
    .sad      (sad_q),
    .d        (sad_d_q),
    .best_sad (best_sad),
    .best_d   (best_d),
    .found    (found)
  );

endmodule
