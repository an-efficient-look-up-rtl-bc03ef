// tb_mdemas_adder: checks the N-bit MDeMAS adder. The 8-bit adder (the size
// the filter uses) is checked exhaustively, all 2^17 input combinations,
// against a block-by-block model built from the truth table; a 16-bit
// instance is checked on random inputs. Every result must also be at most
// the exact sum, and equal to it when no 2-bit block both sums to 3 and
// receives a carry.
module tb_mdemas_adder;
  import tb_mdemas_ref_pkg::*;

  logic [7:0]  a8, b8, s8;
  logic        cin8, co8;
  logic [15:0] a16, b16, s16;
  logic        co16;
  int checks = 0, failures = 0, inexact = 0;

  mdemas_adder #(.N(8))  dut8  (.a(a8), .b(b8), .cin(cin8), .sum(s8), .cout(co8));
  mdemas_adder #(.N(16)) dut16 (.a(a16), .b(b16), .cin(1'b0), .sum(s16), .cout(co16));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned expv, exact;
    for (int i = 0; i < (1 << 17); i++) begin
      {a8, b8, cin8} = 17'(i);
      #1;
      expv  = ref_add(a8, b8, cin8, 8);
      exact = longint'(a8) + longint'(b8) + longint'(cin8);
      checks++;
      if ({co8, s8} !== 9'(expv)) begin
        failures++;
        if (failures < 10)
          $display("FAIL a=%0d b=%0d cin=%0b got %0d expected %0d", a8, b8, cin8,
                   {co8, s8}, expv);
      end
      checks++;
      if (longint'({co8, s8}) > exact) failures++;
      if (longint'({co8, s8}) != exact) inexact++;
    end
    for (int i = 0; i < 20000; i++) begin
      a16 = 16'($urandom);
      b16 = 16'($urandom);
      #1;
      checks++;
      if ({co16, s16} !== 17'(ref_add(a16, b16, 0, 16))) failures++;
    end
    // the approximation must actually show on some inputs
    checks++;
    if (inexact == 0) failures++;
    $display("8-bit adder: %0d of %0d input combinations inexact", inexact, 1 << 17);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
