// tb_stereo_ctrl: runs the controller alone for a 64x64 image with 8x8
// maximum window and checks its schedule: the order of passes (largest window
// first, bands top to bottom), the bit-plane token sequence of every pass,
// candidate-shift words, line-buffer prefetch lengths and addresses, one
// write-back per pass, and the total start-to-done time.
module tb_stereo_ctrl;
  import stereo_pkg::*;

  localparam int IW = 64, WMAX = 8, LMAX = 3, NB = IW / WMAX;
  localparam int AW = $clog2((IW / WMAX) * IW);
  localparam int NPASS = (LMAX + 1) * NB;
  localparam int EXP = 3 + IW + NPASS * (IW * PIX_W + LMAX + 4);
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [AW-1:0] mem_raddr;
  logic lb_shift, pe_load, clear, dm_we;
  bit_tok_t tok;
  lvl_t level;
  disp_t band;
  ctrl_state_t state_o;
  int checks = 0, failures = 0;

  stereo_ctrl dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s", what);
    end
  endtask

  int pass_no = -1, tok_no = 0, shifts = 0, wbs = 0, cyc = 0;
  int ld_addr_exp = 0;
  always @(negedge clk) if (rst_n) begin
    cyc++;
    if (pe_load) begin
      pass_no++;
      check(clear, "clear with load");
      check(int'(level) == LMAX - pass_no / NB && int'(band) == pass_no % NB, "pass order");
      check(pass_no == 0 || shifts == IW, "shifts in previous pass");
      tok_no = 0; shifts = 0;
    end
    if (tok.valid) begin
      check(int'(tok.k) == tok_no % PIX_W && int'(tok.d) == tok_no / PIX_W, "token order");
      if (tok_last(tok)) shifts++;
      tok_no++;
    end
    if (dm_we) begin
      wbs++;
      check(tok_no == IW * PIX_W, "write-back after all tokens");
      check(int'(level) == LMAX - pass_no / NB && int'(band) == pass_no % NB, "write-back level/band");
    end
    if (dut.ld_act) begin
      automatic int b = (pass_no < 0) ? 0 : (pass_no + 1) % NB;
      check(int'(mem_raddr) == b * IW + ld_addr_exp, "prefetch address");
      ld_addr_exp = (ld_addr_exp + 1) % IW;
    end
  end

  initial begin
    int t0, nshift;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1;
    t0 = cyc;
    @(negedge clk); start = 0;
    nshift = 0;
    while (!done) begin
      @(negedge clk);
      if (lb_shift) nshift++;
    end
    check(cyc - t0 == EXP, $sformatf("duration %0d vs %0d", cyc - t0, EXP));
    check(pass_no + 1 == NPASS, "number of passes");
    check(wbs == NPASS, "number of write-backs");
    check(nshift == NPASS * IW, $sformatf("line buffer shifts %0d", nshift));
    @(negedge clk);
    check(!busy, "idle after done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
