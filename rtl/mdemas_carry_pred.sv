// mdemas_carry_pred: carry predictor of one 2-bit block of the MDeMAS
// approximate adder.
//
// The carry out of the block is predicted from the block's own operand bits
// A1 A0 B1 B0 only: it is the carry that A + B would produce with a
// carry-in of 0 (A1&B1 | (A1^B1)&A0&B0). Ignoring the carry-in is what
// breaks the carry chain between blocks; the prediction is wrong only when
// A + B = 3 and the carry-in is 1. On an FPGA this is a single LUT4
// (INIT 16'hEC80 with index {A1,A0,B1,B0}).
//
// The predictor and its LUT4 form follow the published design; writing it
// as a Boolean equation instead of a LUT primitive is this design's choice.
//
// Interface: a, b are the block's two operand bits each; cout is the
// predicted carry. Purely combinational.
module mdemas_carry_pred (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic       cout
);

  always_comb begin
    cout = (a[1] & b[1]) | ((a[1] ^ b[1]) & a[0] & b[0]);
  end

endmodule
