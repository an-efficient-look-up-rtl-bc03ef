// gauss_adder_tree: weighted sum of a 3x3 window with the sigma = 1
// Gaussian kernel, built from 8-bit MDeMAS approximate adders.
//
// Each of the nine pixels is first scaled by its kernel weight with a right
// shift (corner >> 4, edge >> 3, centre >> 2, i.e. the kernel
// [1 2 1; 2 4 2; 1 2 1] / 16 applied to each pixel separately). The nine
// terms are then added by eight ADD_W-bit MDeMAS adders: a balanced tree of
// seven adders over the eight non-centre terms, and an eighth adder that
// adds the centre term. Every exact partial sum is at most 247, and an
// MDeMAS sum never exceeds the exact one, so no adder's carry out is ever
// set and the 8-bit result needs no saturation (an assertion checks this).
// The 8-bit adders and the sigma = 1 kernel follow the published
// design; the pre-shifting and the tree shape are this design's
// choices.
//
// Interface: win in, pix (the smoothed pixel) out. Purely combinational.
module gauss_adder_tree
  import gauss_pkg::*;
(
  input  win_t win,
  output pix_t pix
);

  localparam int unsigned ADD_W = PIX_W;

  pix_t term [9];
  pix_t lvl1 [4];
  pix_t lvl2 [2];
  pix_t lvl3;
  logic [7:0] carry;

  // Terms 0..7: the eight positions around the centre; term 8: the centre.
  for (genvar k = 0; k < 9; k++) begin : g_term
    localparam int unsigned POS = (k < 4) ? k : ((k < 8) ? k + 1 : 4);
    localparam int unsigned R   = POS / 3;
    localparam int unsigned C   = POS % 3;
    assign term[k] = win[R][C] >> kernel_shift(R, C);
  end

  for (genvar k = 0; k < 4; k++) begin : g_l1
    mdemas_adder #(.N(ADD_W)) u_add (
      .a(term[2*k]), .b(term[2*k+1]), .cin(1'b0), .sum(lvl1[k]), .cout(carry[k])
    );
  end

  for (genvar k = 0; k < 2; k++) begin : g_l2
    mdemas_adder #(.N(ADD_W)) u_add (
      .a(lvl1[2*k]), .b(lvl1[2*k+1]), .cin(1'b0), .sum(lvl2[k]), .cout(carry[4+k])
    );
  end

  mdemas_adder #(.N(ADD_W)) u_l3 (
    .a(lvl2[0]), .b(lvl2[1]), .cin(1'b0), .sum(lvl3), .cout(carry[6])
  );

  mdemas_adder #(.N(ADD_W)) u_l4 (
    .a(lvl3), .b(term[8]), .cin(1'b0), .sum(pix), .cout(carry[7])
  );

  always_comb begin
    assert (carry == '0) else $error("gauss_adder_tree: adder overflow");
  end

endmodule
