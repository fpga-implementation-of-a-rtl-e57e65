// tb_pe1: checks the bit-serial absolute difference of PE1 bit by bit, the
// candidate shift chain (a new candidate pixel each PIX_W clocks) and the
// 1x1 window node: full search with the image-edge limit, and local search
// around given D1..D4.
module tb_pe1;
  import stereo_pkg::*;

  localparam int X0 = 40, N = 48;
  logic clk = 0, rst_n = 0, load = 0, shift = 0, clear = 0, active = 1, full = 1;
  pix_t ref_in = '0, cand_ld = '0, cand_in = '0, cand_out;
  bit_tok_t tok = '0, node_tok = '0;
  logic adbit;
  disp_t dref [4];
  disp_t radius = disp_t'(2), best_d;
  int checks = 0, failures = 0;
  int c [N + 1];

  pe1 #(.X0(X0)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) node_tok <= tok;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit allowed(int d, bit f);
    bit near = f;
    for (int i = 0; i < 4; i++)
      if ((d >= int'(dref[i]) ? d - int'(dref[i]) : int'(dref[i]) - d) <= int'(radius)) near = 1;
    return (d <= X0) && near;
  endfunction

  task automatic run(int r, bit f);
    int best, bd, ad;
    @(negedge clk);
    full = f;
    load = 1; clear = 1; ref_in = pix_t'(r); cand_ld = pix_t'(c[0]);
    @(negedge clk);
    load = 0; clear = 0;
    best = -1; bd = 0;
    for (int d = 0; d < N; d++) begin
      ad = (r > c[d]) ? r - c[d] : c[d] - r;
      if (allowed(d, f) && (best < 0 || ad < best)) begin best = ad; bd = d; end
      for (int k = 0; k < PIX_W; k++) begin
        tok = '{valid: 1'b1, k: BIT_W'(k), d: disp_t'(d)};
        shift = (k == PIX_W - 1);
        cand_in = pix_t'(c[d + 1]);
        @(negedge clk);
        checks++;
        if (adbit !== ad[k]) begin
          failures++;
          if (failures < 10) $display("FAIL AD d=%0d k=%0d: ref %0d cand %0d", d, k, r, c[d]);
        end
      end
    end
    tok = '0; shift = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (int'(best_d) != bd) begin
      failures++;
      $display("FAIL best_d %0d expected %0d (full=%0d)", best_d, bd, f);
    end
  endtask

  initial begin
    dref = '{disp_t'(5), disp_t'(5), disp_t'(20), disp_t'(45)};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 20; n++) begin
      for (int i = 0; i <= N; i++) c[i] = $urandom_range(0, 255);
      if (n == 0) c[3] = 0;  // extremes
      run((n == 0) ? 255 : $urandom_range(0, 255), n[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
