// stereo_pkg: constants and types shared by the stereo matching processor.
//
// Pixels are 8-bit grayscale, as in the reference implementation (64x64 image,
// maximum window 8x8). The SAD datapath is bit-serial: one pixel bit-plane is
// processed per clock, LSB first, so one candidate shift takes PIX_W clocks.
// Disparities are carried as DISP_W-bit numbers; 8 bits covers image widths up
// to 256, the practical size the architecture is meant to scale to (this width
// is a choice of this design).
package stereo_pkg;

  localparam int PIX_W  = 8;               // pixel width, bits
  localparam int BIT_W  = $clog2(PIX_W);   // bit-plane index width
  localparam int DISP_W = 8;               // disparity width, bits

  // Default geometry of the reference implementation.
  localparam int IW_DEF     = 64;          // image width = height, pixels
  localparam int WMAX_DEF   = 8;           // maximum window size
  localparam int RADIUS_DEF = 2;           // local search radius (+-d) at smaller windows

  typedef logic [PIX_W-1:0]  pix_t;
  typedef logic [DISP_W-1:0] disp_t;
  typedef logic [2:0]        lvl_t;   // window-size level L, window = 2^L

  // Broadcast timing token of the bit-serial schedule. It enters the PE1 row
  // together with bit-plane k of candidate shift d and is delayed by one clock
  // per adder level, alongside the data it describes.
  typedef struct packed {
    logic             valid;  // a bit-plane is being processed
    logic [BIT_W-1:0] k;      // bit-plane index, 0 = LSB
    disp_t            d;      // disparity (candidate shift) of this word
  } bit_tok_t;

  // Controller states.
  typedef enum logic [2:0] {
    S_IDLE, S_PRELOAD, S_XFER, S_COMPUTE, S_DRAIN, S_WB, S_DONE
  } ctrl_state_t;

  function automatic logic tok_first(bit_tok_t t);
    return t.valid && (t.k == '0);
  endfunction

  function automatic logic tok_last(bit_tok_t t);
    return t.valid && (t.k == BIT_W'(PIX_W - 1));
  endfunction

endpackage
