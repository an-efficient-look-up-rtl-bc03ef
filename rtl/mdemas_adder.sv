// mdemas_adder: N-bit LUT-based approximate adder (MDeMAS).
//
// The operands are split into N/2 blocks of 2 bits. Every block has a carry
// predictor (mdemas_carry_pred) that looks only at the block's own operand
// bits, and a 2-bit sum cell (mdemas_cell). The carry-in of block i is the
// predicted carry of block i-1, and the carry-in of block 0 is the adder's
// cin. Because no predicted carry depends on a carry-in there is no carry
// chain: the delay is that of two LUT levels whatever N is. All N bits are
// approximate; there is no exact upper part.
//
// The result never exceeds the exact sum a + b + cin, so an addition whose
// exact result fits in N bits never sets cout wrongly.
//
// The block structure, the carry path and the all-approximate width follow
// the published design; the cin port of the lowest block is this design's
// choice.
//
// Parameters: N operand width (even; the filter uses 8). Block size is fixed
// at 2, the only size the structure is defined for.
// Interface: a, b, cin in; sum (N bits) and cout (predicted carry of the top
// block) out. Purely combinational.
module mdemas_adder #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  localparam int unsigned NB = N / 2;

  if (N % 2 != 0 || N == 0) begin : g_bad_width
    $error("mdemas_adder: N must be a positive even number");
  end

  logic [NB-1:0] pred;    // predicted carry out of each block
  logic [NB-1:0] blk_cin; // carry-in of each block

  for (genvar i = 0; i < NB; i++) begin : g_blk
    mdemas_carry_pred u_pred (
      .a    (a[2*i +: 2]),
      .b    (b[2*i +: 2]),
      .cout (pred[i])
    );

    if (i == 0) begin : g_first
      assign blk_cin[i] = cin;
    end else begin : g_rest
      assign blk_cin[i] = pred[i-1];
    end

    mdemas_cell u_cell (
      .a    (a[2*i +: 2]),
      .b    (b[2*i +: 2]),
      .cin  (blk_cin[i]),
      .pred (pred[i]),
      .s    (sum[2*i +: 2])
    );
  end

  assign cout = pred[NB-1];

endmodule
