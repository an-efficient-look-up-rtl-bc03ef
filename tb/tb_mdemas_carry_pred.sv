// tb_mdemas_carry_pred: exhaustive check of the 2-bit block carry predictor
// against the predicted-carry column of the MDeMAS truth table, and against
// "carry of A + B with carry-in 0".
module tb_mdemas_carry_pred;
  import tb_mdemas_ref_pkg::*;

  logic [1:0] a, b;
  logic       cout;
  int checks = 0, failures = 0;

  mdemas_carry_pred dut (.a(a), .b(b), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      {a, b} = 4'(i);
      #1;
      checks++;
      if (cout !== LUT_COUT[i]) begin
        failures++;
        $display("FAIL a=%0d b=%0d cout=%0b expected %0b", a, b, cout, LUT_COUT[i]);
      end
      checks++;
      if (cout !== (int'(a) + int'(b) >= 4)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
