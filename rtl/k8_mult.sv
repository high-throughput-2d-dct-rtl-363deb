// k8_mult: normalisation multiplier of the 2-D transform, running at f_s.
//
// Sample n (0..63, counted from reset over valid samples) of a block is
// multiplied by K8[n/8][n%8] = P_{n/8} * P_{n%8}, where P = 1/2 * diag(C0, C4,
// C2, C2, C1, C5, C5, C1) is indexed in the reordered coefficient order.  K8
// is symmetric, so the row-wise (inverse, at the input) and the column-wise
// (forward, at the output) sample order use the same index rule.  The ten
// distinct 13-bit coefficients come from dct_pkg::k8_coef.  The product is
// registered, then rounded (to nearest, ties away from zero) and shifted right by KFRAC + FRAC_DCT
// (forward: data-path word to integer coefficient) or KFRAC - FRAC_IDCT
// (inverse: integer coefficient to data-path word).  Latency 2 f_s cycles.
// Placing one multiplier at the output for DCT and at the input for IDCT is
// as described; the binary points are this design's.
module k8_mult
  import dct_pkg::*;
#(
  parameter int FRAC_DCT  = 4,
  parameter int FRAC_IDCT = 7
) (
  input  logic  clk,
  input  logic  rst_n,
  input  mode_e mode,
  input  logic  in_valid,
  input  word_t in_data,
  output logic  out_valid,
  output word_t out_data
);
  localparam int PW = DW + KW + 1;
  localparam int SH_DCT  = KFRAC + FRAC_DCT;
  localparam int SH_IDCT = KFRAC - FRAC_IDCT;

  // round to nearest with ties away from zero, then drop sh fractional bits
  function automatic logic signed [PW-1:0] rnd_shift(input logic signed [PW-1:0] v, input int sh);
    logic signed [PW-1:0] half, mag;
    half = PW'(1) <<< (sh - 1);
    mag  = v[PW-1] ? -v : v;
    mag  = (mag + half) >>> sh;
    return v[PW-1] ? -mag : mag;
  endfunction

  logic [5:0] n;
  logic signed [PW-1:0] prod_q;
  logic v1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      n         <= '0;
      v1        <= 1'b0;
      prod_q    <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      v1 <= in_valid;
      if (in_valid) begin
        n      <= n + 6'd1;
        prod_q <= PW'(in_data) * $signed({1'b0, k8_coef(n[5:3], n[2:0])});
      end
      out_valid <= v1;
      out_data  <= word_t'(rnd_shift(prod_q, (mode == MODE_DCT) ? SH_DCT : SH_IDCT));
    end
  end
endmodule
