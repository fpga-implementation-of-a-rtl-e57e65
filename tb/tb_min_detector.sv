// tb_min_detector: offers random SAD streams with gaps and ties and checks the
// kept minimum, its disparity (first occurrence wins) and the found flag after
// every clock; clear between searches.
module tb_min_detector;
  import stereo_pkg::*;

  localparam int SW = 10;
  logic clk = 0, rst_n = 0, clear = 0, valid = 0, found;
  logic [SW-1:0] sad = '0, best_sad;
  disp_t d = '0, best_d;
  int checks = 0, failures = 0;

  min_detector #(.SW(SW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int msad, md;
    bit mf;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 50; s++) begin
      @(negedge clk); clear = 1; valid = 0;
      @(negedge clk); clear = 0;
      mf = 0; msad = 0; md = 0;
      for (int i = 0; i < 64; i++) begin
        valid = ($urandom_range(0, 3) != 0);
        sad = SW'($urandom_range(0, 40));
        d = disp_t'(i);
        @(posedge clk);
        if (valid && (!mf || int'(sad) < msad)) begin msad = sad; md = i; mf = 1; end
        @(negedge clk);
        checks++;
        if (found !== mf || (mf && (int'(best_sad) != msad || int'(best_d) != md))) begin
          failures++;
          if (failures < 10) $display("FAIL s=%0d i=%0d best=%0d/%0d exp %0d/%0d", s, i, best_sad, best_d, msad, md);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
