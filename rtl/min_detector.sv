// min_detector: keeps the smallest SAD offered during one search and the
// disparity at which it occurred.
//
// clear starts a new search. Each clock with valid set compares sad with the
// stored minimum; the first offer after clear is always taken. On a tie the
// earlier offer (the smaller disparity, since disparities are offered in rising
// order) is kept. The tie rule is a choice of this design.
//
// Timing: best_sad/best_d/found update on the clock edge after the offer.
module min_detector
  import stereo_pkg::*;
#(
  parameter int SW = 16                 // SAD width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,          // start a new search
  input  logic          valid,          // offer (sad, d) this clock
  input  logic [SW-1:0] sad,
  input  disp_t         d,
  output logic [SW-1:0] best_sad,
  output disp_t         best_d,
  output logic          found           // at least one offer since clear
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_sad <= '1;
      best_d   <= '0;
      found    <= 1'b0;
    end else if (clear) begin
      best_sad <= '1;
      best_d   <= '0;
      found    <= 1'b0;
    end else if (valid && (!found || sad < best_sad)) begin
      best_sad <= sad;
      best_d   <= d;
      found    <= 1'b1;
    end
  end

endmodule
