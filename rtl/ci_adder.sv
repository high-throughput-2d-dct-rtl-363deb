// ci_adder: carry-increment adder, s = a + b + cin.
//
// The operands are cut into blocks of BLK bits.  Each block adds its bits with
// a ripple carry assuming a carry-in of 0, giving a provisional sum and carry.
// An incrementer then adds the real incoming block carry: a bit of the
// provisional sum flips when the carry-in is 1 and all lower bits of the block
// are 1.  The block carry-out is the provisional carry, or the carry-in when
// the whole provisional block sum is all ones.  This gives O(n) area with a
// delay between ripple-carry and carry-look-ahead, which is why the processor
// uses this adder style for all its adders and subtracters.  Purely
// combinational.  The block size is this design's choice (equal blocks).
module ci_adder #(
  parameter int W   = 20,
  parameter int BLK = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  localparam int NB = (W + BLK - 1) / BLK;

  always_comb begin
    logic c_blk;       // carry into the current block
    logic rc;          // ripple carry inside the block (carry-in 0)
    logic all1;        // provisional sum bits below this one all ones
    logic [W-1:0] ps;  // provisional sums
    c_blk = cin;
    ps    = '0;
    s     = '0;
    for (int blk = 0; blk < NB; blk++) begin
      rc   = 1'b0;
      all1 = 1'b1;
      for (int k = 0; k < BLK; k++) begin
        if (blk * BLK + k < W) begin
          ps[blk*BLK+k] = a[blk*BLK+k] ^ b[blk*BLK+k] ^ rc;
          rc = (a[blk*BLK+k] & b[blk*BLK+k]) | (rc & (a[blk*BLK+k] ^ b[blk*BLK+k]));
        end
      end
      for (int k = 0; k < BLK; k++) begin
        if (blk * BLK + k < W) begin
          s[blk*BLK+k] = ps[blk*BLK+k] ^ (c_blk & all1);
          all1 = all1 & ps[blk*BLK+k];
        end
      end
      c_blk = rc | (c_blk & all1);
    end
    cout = c_blk;
  end
endmodule
