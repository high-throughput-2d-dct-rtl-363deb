// dct_pkg: shared types and constants of the 8x8 2-D DCT/IDCT processor.
//
// The transform is computed as X_R = K8 .* (J_R8 * x * J_R8^t) (forward) and
// x = J_R8^t * (K8 .* X_R) * J_R8 (inverse), where J_R8 is a product of sparse
// factors that only need add/subtract and four fixed coefficients, and K8 is
// the normalisation matrix K8[i][j] = P_i * P_j.  The data-path word is 20 bits,
// the fixed coefficients 12 bits and the normalisation coefficients 13 bits, as
// the design's accuracy analysis requires.  The binary points chosen here
// (11 fractional bits for the 12-bit coefficients, 15 for K8) are this design's.
package dct_pkg;

  // data-path word width
  parameter int DW = 20;
  typedef logic signed [DW-1:0] word_t;

  // fixed coefficient width and binary point: value = COEF / 2^CFRAC
  parameter int CW    = 12;
  parameter int CFRAC = 11;
  // T1 = C7/C1 = tan(pi/16), T2 = C6/C2 = tan(pi/8), T5 = C3/C5 = cot(3pi/16),
  // C4 = cos(pi/4); each round(2^11 * value)
  parameter int unsigned COEF_T1 = 407;
  parameter int unsigned COEF_T2 = 848;
  parameter int unsigned COEF_T5 = 3065;
  parameter int unsigned COEF_C4 = 1448;
  // multiplication by exactly 1 (the "1 or T2" multiplier)
  parameter int unsigned COEF_ONE = 2048;

  // normalisation coefficients: 13 bits, 15 fractional bits
  parameter int KW    = 13;
  parameter int KFRAC = 15;

  // transform direction
  typedef enum logic {
    MODE_DCT  = 1'b0,
    MODE_IDCT = 1'b1
  } mode_e;

  // latency of the basic processors, in Clk2 ticks from the first input
  // sample of a frame to the first output sample of that frame
  parameter int LAT_ADD  = 5;  // add/subtract-only processors (Q_R8, Q_R4, J_O4C)
  parameter int LAT_MULT = 6;  // processors with a pipelined hardwired multiplier
  // the odd chain (J_O4D, J_O4C, J_O4B) is one processor deeper than the even
  // chain (Q_R4, J_SE4); the even result waits this many ticks
  parameter int EVEN_DELAY = (LAT_MULT + LAT_ADD + LAT_MULT) - (LAT_ADD + LAT_MULT);

  // P_i = 1/2 * (C0, C4, C2, C2, C1, C5, C5, C1)_i indexed by reordered
  // position; returns an index 0..3 into the four distinct values
  // (C0/2 = C4/2, C2/2, C1/2, C5/2)
  function automatic logic [1:0] p_class(input logic [2:0] pos);
    case (pos)
      3'd0, 3'd1: return 2'd0;  // C0/2, C4/2 = 0.353553
      3'd2, 3'd3: return 2'd1;  // C2/2       = 0.461940
      3'd4, 3'd7: return 2'd2;  // C1/2       = 0.490393
      default:    return 2'd3;  // C5/2       = 0.277785
    endcase
  endfunction

  // K8[i][j] = round(2^15 * P_i * P_j)
  function automatic logic [KW-1:0] k8_coef(input logic [2:0] i, input logic [2:0] j);
    logic [3:0] c;
    c = {p_class(i), p_class(j)};
    case (c)
      4'h0: return 13'd4096;
      4'h1, 4'h4: return 13'd5352;
      4'h2, 4'h8: return 13'd5681;
      4'h3, 4'hC: return 13'd3218;
      4'h5: return 13'd6992;
      4'h6, 4'h9: return 13'd7423;
      4'h7, 4'hD: return 13'd4205;
      4'hA: return 13'd7880;
      4'hB, 4'hE: return 13'd4464;
      default: return 13'd2529;  // 4'hF
    endcase
  endfunction

endpackage
