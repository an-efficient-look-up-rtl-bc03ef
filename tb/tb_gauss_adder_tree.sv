// tb_gauss_adder_tree: applies directed windows (all zero, all 255, single
// hot pixels) and random windows to the Gaussian adder tree and checks the
// output against the truth-table model of the same tree. It also checks
// that the result is never above the exact kernel sum and counts windows
// where the approximation changes the result.
module tb_gauss_adder_tree;
  import gauss_pkg::*;
  import tb_mdemas_ref_pkg::*;

  win_t win;
  pix_t pix;
  int checks = 0, failures = 0, inexact = 0;
  int unsigned p[3][3];

  gauss_adder_tree dut (.win(win), .pix(pix));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply();
    int unsigned expv, exact;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) win[i][j] = pix_t'(p[i][j]);
    #1;
    expv  = ref_filter(p, 1);
    exact = ref_filter(p, 0);
    checks++;
    if (int'(pix) != int'(expv)) begin
      failures++;
      $display("FAIL got %0d expected %0d (exact %0d)", pix, expv, exact);
    end
    checks++;
    if (int'(pix) > int'(exact)) failures++;
    if (int'(pix) != int'(exact)) inexact++;
  endtask

  initial begin
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) p[i][j] = 0;
    apply();
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) p[i][j] = 255;
    apply();
    checks++;
    if (pix != 8'd247 && pix > 8'd247) failures++;
    for (int k = 0; k < 9; k++) begin
      for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) p[i][j] = 0;
      p[k / 3][k % 3] = 255;
      apply();
      // a single pixel of 255 must come out as 255 >> shift exactly
      checks++;
      if (int'(pix) != (255 >> ref_shift(k / 3, k % 3))) failures++;
    end
    for (int n = 0; n < 50000; n++) begin
      for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) p[i][j] = $urandom % 256;
      apply();
    end
    checks++;
    if (inexact == 0) failures++;
    $display("inexact results: %0d", inexact);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
