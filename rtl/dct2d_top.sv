// dct2d_top: 8x8 2-D DCT / IDCT processor for video coding.
//
// Row-column decomposition with the normalisation pulled out of the 1-D
// transforms:  forward  X_R = K8 .* (J_R8 x J_R8^t),
//              inverse  x   = J_R8^t (K8 .* X_R) J_R8.
// Data path (one f_s clock, Clk2 = every second cycle as the enable ce2):
//   forward: din -> D-S -> 1-D J_R8 (rows) -> transpose buffer -> 1-D J_R8
//            (columns) -> U-S -> K8 multiplier -> dout
//   inverse: din -> K8 multiplier -> D-S -> 1-D J_R8^t -> transpose buffer ->
//            1-D J_R8^t -> U-S -> dout
// The 1-D processors and the transpose buffer run at f_s/2 on two samples per
// tick; only the K8 multiplier, the D-S input and the U-S output run at f_s.
//
// Interface: one sample per clock in (din_valid), row by row; 64 samples form
// a block; results leave one per clock (dout_valid), column by column.
// Forward: din = 9-bit pixel (the low 9 bits, two's complement), dout = 12-bit
// coefficient saturated to [-2048, 2047].  Inverse: din = 12-bit coefficient,
// dout = pixel saturated to [-256, 255].  Coefficients are in the reordered
// index order (0,4,2,6,1,5,3,7) in both directions: forward output sample
// n = 8c + p is X[R(p)][R(c)], inverse input sample n = 8r + j is X[R(r)][R(j)]
// (first index vertical frequency), and the inverse output sample n = 8c + p
// is pixel row p, column c.  With a continuous input a block leaves every 64
// cycles; latency (first input sample to first output sample of a block) is
// 176 cycles in either direction when the block is sent without idle cycles.
// mode may only change while the pipeline is empty.
// Internally the 20-bit word carries FRAC_DCT (forward) or FRAC_IDCT (inverse)
// fractional bits; these binary points and the order of the coefficient ports
// are this design's choices.
module dct2d_top
  import dct_pkg::*;
#(
  parameter int FRAC_DCT  = 4,
  parameter int FRAC_IDCT = 7
) (
  input  logic        clk,
  input  logic        rst_n,
  input  mode_e       mode,
  input  logic        din_valid,
  input  logic [11:0] din,
  output logic        dout_valid,
  output logic [11:0] dout
);
  logic inv;
  assign inv = (mode == MODE_IDCT);

  // Clk2: f_s / 2 as a clock enable
  logic ce2;
  always_ff @(posedge clk) begin
    if (!rst_n) ce2 <= 1'b0;
    else        ce2 <= !ce2;
  end

  // input alignment
  word_t pix_in, coef_in;
  assign pix_in  = word_t'($signed(din[8:0])) <<< FRAC_DCT;
  assign coef_in = word_t'($signed(din));

  // K8 multiplier: at the input for the inverse, at the output for the forward
  logic  k_iv, k_ov;
  word_t k_id, k_od;
  logic  us_v;
  word_t us_d;
  assign k_iv = inv ? din_valid : us_v;
  assign k_id = inv ? coef_in   : us_d;
  k8_mult #(.FRAC_DCT(FRAC_DCT), .FRAC_IDCT(FRAC_IDCT)) u_k8 (
    .clk, .rst_n, .mode, .in_valid(k_iv), .in_data(k_id), .out_valid(k_ov), .out_data(k_od));

  // D-S
  logic  ds_v;
  word_t ds_e, ds_o;
  down_sample u_ds (.clk, .rst_n, .ce2, .in_valid(inv ? k_ov : din_valid),
                    .in_data(inv ? k_od : pix_in), .out_valid(ds_v), .out_e(ds_e), .out_o(ds_o));

  // first 1-D processor (rows)
  logic  p1_v;
  word_t p1_e, p1_o;
  jr8_proc u_row (.clk, .rst_n, .ce2, .mode, .in_valid(ds_v), .in_e(ds_e), .in_o(ds_o),
                  .out_valid(p1_v), .out_e(p1_e), .out_o(p1_o));

  // transpose buffer
  logic  tb_v;
  word_t tb_e, tb_o;
  transpose_buffer u_tb (.clk, .rst_n, .ce2, .in_valid(p1_v), .in_e(p1_e), .in_o(p1_o),
                         .out_valid(tb_v), .out_e(tb_e), .out_o(tb_o));

  // second 1-D processor (columns)
  logic  p2_v;
  word_t p2_e, p2_o;
  jr8_proc u_col (.clk, .rst_n, .ce2, .mode, .in_valid(tb_v), .in_e(tb_e), .in_o(tb_o),
                  .out_valid(p2_v), .out_e(p2_e), .out_o(p2_o));

  // U-S
  up_sample u_us (.clk, .rst_n, .ce2, .in_valid(p2_v), .in_e(p2_e), .in_o(p2_o),
                  .out_valid(us_v), .out_data(us_d));

  // output scaling and saturation
  localparam word_t HALF_LSB = word_t'(1) <<< (FRAC_IDCT - 1);
  word_t pix_out;
  // round to nearest, ties away from zero (no bias on signed data)
  assign pix_out = (us_d[DW-1] == 1'b0) ? ((us_d + HALF_LSB) >>> FRAC_IDCT)
                                        : -((-us_d + HALF_LSB) >>> FRAC_IDCT);

  function automatic logic [11:0] sat(input word_t v, input word_t lo, input word_t hi);
    if (v < lo)      return 12'(lo);
    else if (v > hi) return 12'(hi);
    else             return 12'(v);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dout_valid <= 1'b0;
      dout       <= '0;
    end else if (inv) begin
      dout_valid <= us_v;
      dout       <= sat(pix_out, -word_t'(256), word_t'(255));
    end else begin
      dout_valid <= k_ov;
      dout       <= sat(k_od, -word_t'(2048), word_t'(2047));
    end
  end
endmodule
