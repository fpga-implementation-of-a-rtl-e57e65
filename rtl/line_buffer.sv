// line_buffer: an IW-register line buffer between an image memory module and
// one row of the PE array.
//
// Pixels arrive one per clock, leftmost column first, and are shifted in from
// the right end; after IW shifts q[x] holds column x. The whole row is then
// copied in parallel into the PE1 row, and the buffer can be refilled with the
// next band while the PEs compute, which hides the load time. Using the line
// buffer as a prefetch stage is a choice of this design.
//
// Timing: q changes on the clock edge at which shift_en is high.
module line_buffer
  import stereo_pkg::*;
#(
  parameter int IW = IW_DEF
) (
  input  logic clk,
  input  logic rst_n,
  input  logic shift_en,
  input  pix_t din,
  output pix_t q [IW]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '{default: '0};
    end else if (shift_en) begin
      for (int x = 0; x < IW - 1; x++) q[x] <= q[x+1];
      q[IW-1] <= din;
    end
  end

endmodule
