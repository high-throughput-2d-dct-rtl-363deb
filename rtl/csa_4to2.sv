// csa_4to2: row-wise 4:2 compressor for carry-save multiplier trees.
//
// Four W-bit rows of equal weight are reduced to a sum row and a carry row
// with the same total (modulo 2^W).  Each bit column is two full adders in
// series: the first adds a, b and c, and its carry goes into the next column,
// where the second full adder adds it to the first sum and d.  The carry out
// of a column therefore never ripples further than one position, so the delay
// is that of two full adders whatever the width.  Bits carried out of the top
// column are dropped, which is correct for two's-complement rows that are
// already sign-extended to W bits.  Bit 0 of cy is always zero by
// construction; it is kept so that both rows have the same weight and width.
// Purely combinational.  The compressor is
// the building block the multipliers are described with; the row-wise
// formulation is this design's.
module csa_4to2 #(
  parameter int W = 34
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic [W-1:0] d,
  output logic [W-1:0] s,
  output logic [W-1:0] cy
);
  logic [W-1:0] s1, c1, c2;

  always_comb begin
    s1 = a ^ b ^ c;
    c1 = ((a & b) | (a & c) | (b & c)) << 1;   // column carry into the next bit
    s  = s1 ^ d ^ c1;
    c2 = (s1 & d) | (s1 & c1) | (d & c1);
    cy = c2 << 1;
  end
endmodule
