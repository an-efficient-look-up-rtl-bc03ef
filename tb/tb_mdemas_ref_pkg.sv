// tb_mdemas_ref_pkg: reference models for the testbenches, written from the
// MDeMAS truth table rather than from the RTL.
//
// The 2-bit block is described by three LUT contents taken row by row from
// the truth table of the MDeMAS adder (index {A1,A0,B1,B0,Cin} for the sum
// bits, {A1,A0,B1,B0} for the predicted carry). ref_add chains N/2 such
// blocks, each fed by the previous block's predicted carry; ref_filter
// applies the [1 2 1; 2 4 2; 1 2 1]/16 kernel (pixel >> 4, >> 3, >> 2) with
// the same adder tree order as the design, or with exact additions.
package tb_mdemas_ref_pkg;

  localparam logic [31:0] LUT_S1   = 32'hE38F3EF8;
  localparam logic [31:0] LUT_S0   = 32'h9B6EB9E6;
  localparam logic [15:0] LUT_COUT = 16'hEC80;

  function automatic logic [2:0] ref_block(logic [1:0] a, logic [1:0] b, logic cin);
    int unsigned idx4, idx5;
    idx4 = 32'({a[1], a[0], b[1], b[0]});
    idx5 = 32'({a[1], a[0], b[1], b[0], cin});
    return {LUT_COUT[idx4], LUT_S1[idx5], LUT_S0[idx5]};
  endfunction

  // Approximate sum of two n-bit values (n even, up to 32); bit n = carry.
  function automatic longint unsigned ref_add(longint unsigned a, longint unsigned b,
                                             bit cin, int n);
    longint unsigned res;
    logic c;
    logic [2:0] blk;
    res = 0;
    c   = cin;
    for (int i = 0; i < n / 2; i++) begin
      blk = ref_block(2'((a >> (2 * i)) & 3), 2'((b >> (2 * i)) & 3), c);
      res |= longint'(blk[1:0]) << (2 * i);
      c = blk[2];
    end
    res |= longint'(c) << n;
    return res;
  endfunction

  function automatic int unsigned ref_shift(int r, int c);
    if (r == 1 && c == 1) return 2;
    if (r == 1 || c == 1) return 3;
    return 4;
  endfunction

  // p[r][c]: window, row 0 oldest, col 0 leftmost. approx=0 gives exact sums.
  function automatic int unsigned ref_filter(int unsigned p[3][3], bit approx);
    int unsigned t[9];
    int unsigned l1[4], l2[2], l3, res;
    int k;
    k = 0;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        if (!(r == 1 && c == 1)) begin
          t[k] = p[r][c] >> ref_shift(r, c);
          k++;
        end
    t[8] = p[1][1] >> 2;
    if (!approx) begin
      res = 0;
      for (int i = 0; i < 9; i++) res += t[i];
      return res;
    end
    for (int i = 0; i < 4; i++) l1[i] = int'(ref_add(64'(t[2*i]), 64'(t[2*i+1]), 0, 8));
    for (int i = 0; i < 2; i++) l2[i] = int'(ref_add(64'(l1[2*i]), 64'(l1[2*i+1]), 0, 8));
    l3  = int'(ref_add(64'(l2[0]), 64'(l2[1]), 0, 8));
    res = int'(ref_add(64'(l3), 64'(t[8]), 0, 8));
    return res;
  endfunction

endpackage
