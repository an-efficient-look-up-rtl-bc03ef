// tb_mdemas_cell: exhaustive check of the MDeMAS 2-bit sum cell against the
// S1/S0 columns of the MDeMAS truth table, with the predicted carry taken
// from the table's carry column. Also checks the table's error statistics:
// four erroneous input states, each off by exactly 1.
module tb_mdemas_cell;
  import tb_mdemas_ref_pkg::*;

  logic [1:0] a, b, s;
  logic       cin, pred;
  int checks = 0, failures = 0;
  int err_states = 0, err_sum = 0;

  mdemas_cell dut (.a(a), .b(b), .cin(cin), .pred(pred), .s(s));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int approx, exact;
    for (int i = 0; i < 32; i++) begin
      {a, b, cin} = 5'(i);
      pred = LUT_COUT[i >> 1];
      #1;
      checks++;
      if (s !== {LUT_S1[i], LUT_S0[i]}) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%0b s=%0d expected %0d", a, b, cin, s,
                 {LUT_S1[i], LUT_S0[i]});
      end
      approx = 4 * int'(pred) + int'(s);
      exact  = int'(a) + int'(b) + int'(cin);
      if (approx != exact) begin
        err_states++;
        err_sum += (exact > approx) ? exact - approx : approx - exact;
      end
    end
    checks++;
    if (err_states != 4 || err_sum != 4) begin
      failures++;
      $display("FAIL error states %0d, error sum %0d (expected 4, 4)", err_states, err_sum);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
