// tb_pe3: builds four random 2x2-window SAD sets, feeds their bit-plane sums
// (0..4 each) to a PE3 and checks the registered sum each clock and the 4x4
// window node's disparity choice, which depends on the full SAD of 16
// absolute differences, in full and local search.
module tb_pe3;
  import stereo_pkg::*;

  localparam int IN_W = 3, X0 = 28, N = 36;
  logic clk = 0, rst_n = 0, clear = 0, active = 1, full = 1;
  logic [IN_W-1:0] sums_in [4];
  logic [IN_W+1:0] sum;
  bit_tok_t node_tok = '0, tok = '0;
  disp_t dref [4];
  disp_t radius = disp_t'(2), best_d;
  int checks = 0, failures = 0;
  int ad [N][16];

  pe3 #(.IN_W(IN_W), .X0(X0)) dut (.*);
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

  initial begin
    dref = '{disp_t'(4), disp_t'(12), disp_t'(12), disp_t'(33)};
    sums_in = '{default: '0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 20; n++) begin
      automatic int best = -1, bd = 0;
      full = n[0];
      for (int d = 0; d < N; d++)
        for (int i = 0; i < 16; i++) ad[d][i] = $urandom_range(0, 255);
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0;
      for (int d = 0; d < N; d++) begin
        automatic int s = 0;
        for (int i = 0; i < 16; i++) s += ad[d][i];
        if (allowed(d, full) && (best < 0 || s < best)) begin best = s; bd = d; end
        for (int k = 0; k < PIX_W; k++) begin
          automatic int e = 0;
          for (int q = 0; q < 4; q++) begin
            automatic int p = 0;
            for (int i = 0; i < 4; i++) p += ad[d][4*q+i][k];
            sums_in[q] = IN_W'(p);
            e += p;
          end
          tok = '{valid: 1'b1, k: BIT_W'(k), d: disp_t'(d)};
          @(negedge clk);
          checks++;
          if (int'(sum) != e) begin
            failures++;
            if (failures < 10) $display("FAIL sum d=%0d k=%0d: %0d vs %0d", d, k, sum, e);
          end
        end
      end
      tok = '0; sums_in = '{default: '0};
      repeat (4) @(negedge clk);
      checks++;
      if (int'(best_d) != bd) begin
        failures++;
        $display("FAIL best_d %0d expected %0d (full=%0d)", best_d, bd, full);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
