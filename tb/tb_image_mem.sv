// tb_image_mem: fills one row-interleaved image memory module with random
// pixels and reads every address back, checking the one-clock read latency.
module tb_image_mem;
  import stereo_pkg::*;

  localparam int IW = 64, WMAX = 8, DEPTH = (IW / WMAX) * IW, AW = $clog2(DEPTH);
  logic clk = 0, we = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  pix_t wdata = '0, rdata;
  int checks = 0, failures = 0;
  int ref_mem [DEPTH];

  image_mem dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      ref_mem[a] = $urandom_range(0, 255);
      @(negedge clk); we = 1; waddr = AW'(a); wdata = pix_t'(ref_mem[a]);
    end
    @(negedge clk); we = 0;
    for (int a = DEPTH - 1; a >= 0; a--) begin
      raddr = AW'(a);
      @(posedge clk);
      @(negedge clk);
      checks++;
      if (int'(rdata) != ref_mem[a]) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d: %0d vs %0d", a, rdata, ref_mem[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
