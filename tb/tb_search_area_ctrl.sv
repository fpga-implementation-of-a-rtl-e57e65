// tb_search_area_ctrl: random and corner-case check of the candidate-enable
// rule (inside the image, and full search or within +-radius of one of D1..D4)
// against an independent integer model.
module tb_search_area_ctrl;
  import stereo_pkg::*;

  disp_t d, x0, radius;
  logic  full, en;
  disp_t dref [4];
  int checks = 0, failures = 0;

  search_area_ctrl dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit model();
    bit near = 0;
    for (int i = 0; i < 4; i++) begin
      int diff = int'(d) - int'(dref[i]);
      if (diff < 0) diff = -diff;
      if (diff <= int'(radius)) near = 1;
    end
    return (int'(d) <= int'(x0)) && (full || near);
  endfunction

  initial begin
    for (int n = 0; n < 4000; n++) begin
      d = disp_t'($urandom_range(0, 63));
      x0 = disp_t'($urandom_range(0, 63));
      full = n[0];
      radius = disp_t'($urandom_range(0, 4));
      for (int i = 0; i < 4; i++) dref[i] = disp_t'($urandom_range(0, 63));
      if (n % 4 == 2) dref[n % 3] = disp_t'(int'(d) + int'(radius));  // boundary
      if (n % 4 == 3) x0 = d;                                          // edge
      #1;
      checks++;
      if (en !== model()) begin
        failures++;
        if (failures < 10) $display("FAIL d=%0d x0=%0d full=%0d r=%0d en=%0d", d, x0, full, radius, en);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
