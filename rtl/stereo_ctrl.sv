// stereo_ctrl: sequencer of the hierarchical variable-window matching.
//
// The image is processed in bands of WMAX rows. A pass matches all windows of
// one band at one window size; the passes run from the largest window size
// (full search) down to 1x1 (local search), and within a size band by band,
// so a band at size W always finds the complete map of size 2W, including
// the band below, in the disparity memory.
//
// One pass:
//   XFER     1 clock   line buffers -> PE1 registers, minimum detectors
//                      cleared, prefetch of the next band's rows started
//   COMPUTE  IW*PIX_W  bit-plane tokens: for every disparity d = 0..IW-1,
//                      bit-planes k = 0..PIX_W-1; the PE array shifts the
//                      candidate row after the last bit-plane of each d
//   DRAIN    LMAX+2    pipeline of the adder tree and window nodes empties
//   WB       1 clock   all window disparities of the band written
// Before the first pass the first band's rows are loaded (PRELOAD); later
// loads overlap COMPUTE. Total for the 64x64 / 8x8 configuration:
// 66 + 32 * (512 + 7) = 16674 clocks + 1 for done.
//
// The ordering of passes and the overlap of loading with computing are
// choices of this design; the three steps (load reference, load candidate,
// shift-and-compute) follow the architecture.
module stereo_ctrl
  import stereo_pkg::*;
#(
  parameter int IW   = IW_DEF,
  parameter int WMAX = WMAX_DEF,
  localparam int LMAX   = $clog2(WMAX),
  localparam int NBANDS = IW / WMAX,
  localparam int AW     = $clog2((IW / WMAX) * IW),
  localparam int DRAIN  = LMAX + 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,           // one-clock pulse at the end
  // image memories and line buffers
  output logic [AW-1:0] mem_raddr,
  output logic          lb_shift,
  // SAD unit
  output logic          pe_load,
  output logic          clear,
  output bit_tok_t      tok,
  output lvl_t          level,
  output disp_t         band,
  // disparity memory
  output logic          dm_we,
  output ctrl_state_t   state_o
);

  ctrl_state_t state;
  logic [BIT_W-1:0] k_q;
  disp_t            d_q;
  logic [3:0]       drain_q;

  // prefetch loader
  logic  ld_act, ld_rd_q, ld_start;
  disp_t ld_band, ld_col, ld_band_start;

  logic last_pass;
  assign last_pass = (level == '0) && (int'(band) == NBANDS - 1);
  assign state_o   = state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ld_act  <= 1'b0;
      ld_rd_q <= 1'b0;
      ld_band <= '0;
      ld_col  <= '0;
    end else begin
      ld_rd_q <= ld_act;
      if (ld_start) begin
        ld_act  <= 1'b1;
        ld_band <= ld_band_start;
        ld_col  <= '0;
      end else if (ld_act) begin
        if (int'(ld_col) == IW - 1) ld_act <= 1'b0;
        ld_col <= ld_col + 1'b1;
      end
    end
  end

  assign mem_raddr = AW'(int'(ld_band) * IW + int'(ld_col));
  assign lb_shift  = ld_rd_q;

  always_comb begin
    ld_start      = 1'b0;
    ld_band_start = '0;
    if (state == S_IDLE && start) begin
      ld_start = 1'b1;
    end else if (state == S_XFER && !last_pass) begin
      ld_start      = 1'b1;
      ld_band_start = (int'(band) == NBANDS - 1) ? '0 : band + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      k_q     <= '0;
      d_q     <= '0;
      drain_q <= '0;
      level   <= '0;
      band    <= '0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          state <= S_PRELOAD;
          level <= lvl_t'(LMAX);
          band  <= '0;
        end
        S_PRELOAD: if (!ld_act && !ld_rd_q && !ld_start) state <= S_XFER;
        S_XFER: begin
          state <= S_COMPUTE;
          k_q   <= '0;
          d_q   <= '0;
        end
        S_COMPUTE: begin
          if (k_q == BIT_W'(PIX_W - 1)) begin
            k_q <= '0;
            d_q <= d_q + 1'b1;
            if (int'(d_q) == IW - 1) begin
              state   <= S_DRAIN;
              drain_q <= '0;
            end
          end else begin
            k_q <= k_q + 1'b1;
          end
        end
        S_DRAIN: begin
          drain_q <= drain_q + 1'b1;
          if (int'(drain_q) == DRAIN - 1) state <= S_WB;
        end
        S_WB: begin
          if (last_pass) begin
            state <= S_DONE;
          end else begin
            state <= (ld_act || ld_rd_q) ? S_PRELOAD : S_XFER;
            if (int'(band) == NBANDS - 1) begin
              band  <= '0;
              level <= level - 1'b1;
            end else begin
              band <= band + 1'b1;
            end
          end
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy    = (state != S_IDLE);
  assign done    = (state == S_DONE);
  assign pe_load = (state == S_XFER);
  assign clear   = (state == S_XFER);
  assign dm_we   = (state == S_WB);
  assign tok     = '{valid: (state == S_COMPUTE), k: k_q, d: d_q};

  // a new pass may only start once its rows are in the line buffers
  a_xfer_after_load: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_XFER) |-> !ld_act && !ld_rd_q);

endmodule
