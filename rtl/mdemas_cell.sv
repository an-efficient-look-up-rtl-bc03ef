// mdemas_cell: the 2-bit sum generator of the MDeMAS approximate adder
// (one LUT6_2 on an FPGA: five shared inputs A1 A0 B1 B0 Cin, outputs S1 S0).
//
// The block's carry out is not computed here but by the carry predictor
// (mdemas_carry_pred), which ignores the carry-in. The sum is chosen to
// agree with that predicted carry: whenever the predicted carry equals the
// exact carry of A + B + Cin, {S1,S0} is the exact sum; in the four input
// states where they differ (A + B = 3, Cin = 1, exact result 4, predicted
// carry 0) the sum is set to 2'b11, the closest value to 4 that the block
// can express without a carry. The error is then at most 1 in those four
// states and 0 elsewhere. The cell takes the predicted carry as an input
// (pred) so that the predictor LUT is shared with the next block's carry-in.
//
// The sum rule and its truth table follow the published design; passing the
// predicted carry in as a port is this design's choice.
//
// Interface: a, b operand bits, cin block carry-in, pred predicted carry of
// this block; s the 2-bit approximate sum. Purely combinational.
module mdemas_cell (
  input  logic [1:0] a,
  input  logic [1:0] b,
  input  logic       cin,
  input  logic       pred,
  output logic [1:0] s
);

  logic [2:0] exact;

  always_comb begin
    exact = {1'b0, a} + {1'b0, b} + {2'b00, cin};
    if (exact[2] != pred) s = 2'b11;
    else                  s = exact[1:0];
  end

endmodule
