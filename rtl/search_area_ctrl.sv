// search_area_ctrl: decides whether the SAD of one candidate window takes part
// in the minimum search of its reference window.
//
// At the largest window size every candidate window that lies inside the image
// on the same rows is searched (full search): disparity d is allowed when the
// candidate's left edge x0 - d is not negative. At every smaller window size the
// search is local: d must also lie within +-radius of at least one of the four
// disparities D1..D4 found at the next larger window size around this window.
// The rule is the algorithm's; the combinational form and the value of the
// radius are choices of this design.
//
// Purely combinational: en follows the inputs in the same clock.
module search_area_ctrl
  import stereo_pkg::*;
(
  input  disp_t d,          // disparity of the SAD being offered
  input  disp_t x0,         // left edge (column) of the reference window
  input  logic  full,       // 1: full search (largest window size)
  input  disp_t dref [4],   // D1..D4 from the larger window size
  input  disp_t radius,     // local search half-width
  output logic  en          // 1: this SAD is a valid candidate
);

  logic near;

  always_comb begin
    near = 1'b0;
    for (int i = 0; i < 4; i++) begin
      // |d - Di| <= radius, computed without signed arithmetic
      if (d >= dref[i]) begin
        if ((d - dref[i]) <= radius) near = 1'b1;
      end else begin
        if ((dref[i] - d) <= radius) near = 1'b1;
      end
    end
    en = (d <= x0) && (full || near);
  end

endmodule
