// tb_line_buffer: shifts rows of random pixels into a line buffer, with idle
// clocks in between, and checks that every register holds its column after a
// full row and that the buffer holds its contents when not shifting.
module tb_line_buffer;
  import stereo_pkg::*;

  localparam int IW = 64;
  logic clk = 0, rst_n = 0, shift_en = 0;
  pix_t din = '0;
  pix_t q [IW];
  int checks = 0, failures = 0;
  int row [IW];

  line_buffer dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 10; n++) begin
      for (int x = 0; x < IW; x++) row[x] = $urandom_range(0, 255);
      for (int x = 0; x < IW; x++) begin
        if (x % 7 == 3) begin
          @(negedge clk); shift_en = 0; din = pix_t'($urandom);
        end
        @(negedge clk); shift_en = 1; din = pix_t'(row[x]);
      end
      @(negedge clk); shift_en = 0;
      repeat (3) @(negedge clk);
      for (int x = 0; x < IW; x++) begin
        checks++;
        if (int'(q[x]) != row[x]) begin
          failures++;
          if (failures < 10) $display("FAIL row %0d col %0d: %0d vs %0d", n, x, q[x], row[x]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
