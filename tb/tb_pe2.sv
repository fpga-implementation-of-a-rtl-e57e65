// tb_pe2: feeds four random absolute differences bit-serially (LSB first) to
// a PE2 and checks the registered bit-plane sum each clock and the 2x2 window
// node's choice of disparity over a sequence of candidates, in full and local
// search.
module tb_pe2;
  import stereo_pkg::*;

  localparam int X0 = 30, N = 40;
  logic clk = 0, rst_n = 0, clear = 0, active = 1, full = 1;
  logic [3:0] bits_in = '0;
  logic [2:0] sum;
  bit_tok_t node_tok = '0, tok = '0;
  disp_t dref [4];
  disp_t radius = disp_t'(1), best_d;
  int checks = 0, failures = 0;
  int ad [N][4];

  pe2 #(.X0(X0)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) node_tok <= tok;   // node sees the token with the registered sum

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
    dref = '{disp_t'(10), disp_t'(11), disp_t'(25), disp_t'(36)};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 20; n++) begin
      automatic int best = -1, bd = 0, expsum;
      full = n[0];
      for (int d = 0; d < N; d++)
        for (int i = 0; i < 4; i++) ad[d][i] = $urandom_range(0, 255);
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0;
      for (int d = 0; d < N; d++) begin
        automatic int s = ad[d][0] + ad[d][1] + ad[d][2] + ad[d][3];
        if (allowed(d, full) && (best < 0 || s < best)) begin best = s; bd = d; end
        for (int k = 0; k < PIX_W; k++) begin
          for (int i = 0; i < 4; i++) bits_in[i] = ad[d][i][k];
          tok = '{valid: 1'b1, k: BIT_W'(k), d: disp_t'(d)};
          expsum = ad[d][0][k] + ad[d][1][k] + ad[d][2][k] + ad[d][3][k];
          @(negedge clk);
          checks++;
          if (int'(sum) != expsum) begin
            failures++;
            if (failures < 10) $display("FAIL sum d=%0d k=%0d: %0d vs %0d", d, k, sum, expsum);
          end
        end
      end
      tok = '0; bits_in = '0;
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
