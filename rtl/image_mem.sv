// image_mem: one image memory module (an R-MEM for the reference image or a
// C-MEM for the candidate image).
//
// The image is spread row-interleaved over WMAX such modules: module m holds
// every row y with y mod WMAX = m, at address (y / WMAX) * IW + x. All WMAX
// modules are read with the same address, so one read delivers one pixel of
// each row of a WMAX-row band and the band's line buffers fill in IW clocks.
// The interleaving follows the architecture; the port arrangement (one write
// port for the host, one read port for the line buffers) is this design's.
//
// Timing: synchronous write; synchronous read with one clock of latency, as a
// block RAM.
module image_mem
  import stereo_pkg::*;
#(
  parameter int IW    = IW_DEF,
  parameter int WMAX  = WMAX_DEF,
  localparam int DEPTH = (IW / WMAX) * IW,
  localparam int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  pix_t          wdata,
  input  logic [AW-1:0] raddr,
  output pix_t          rdata
);

  pix_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
