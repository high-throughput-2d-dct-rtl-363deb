// csa_5to3: row-wise 5:3 compressor (counter) for carry-save multiplier trees.
//
// Five W-bit rows of equal weight are reduced to three rows with the same
// total (modulo 2^W).  Every bit column counts its five input bits into a
// three-bit number; bit 0 of the count stays in the column (row s), bit 1
// moves one position up (row c1) and bit 2 two positions up (row c2).  No
// signal crosses more than two columns, so the delay does not depend on W.
// Bits pushed beyond the top column are dropped, which is correct for
// sign-extended two's-complement rows.  c1[0], c2[1] and c2[0] are always
// zero by construction; they keep all three rows at the same weight and width.
// Purely combinational.  The 5:3
// compressor is the second building block the multipliers are described with;
// the counter formulation is this design's.
module csa_5to3 #(
  parameter int W = 34
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic [W-1:0] d,
  input  logic [W-1:0] e,
  output logic [W-1:0] s,
  output logic [W-1:0] c1,
  output logic [W-1:0] c2
);
  always_comb begin
    logic [2:0] cnt;
    s  = '0;
    c1 = '0;
    c2 = '0;
    for (int i = 0; i < W; i++) begin
      cnt = 3'(a[i]) + 3'(b[i]) + 3'(c[i]) + 3'(d[i]) + 3'(e[i]);
      s[i] = cnt[0];
      if (i + 1 < W) c1[i+1] = cnt[1];
      if (i + 2 < W) c2[i+2] = cnt[2];
    end
  end
endmodule
