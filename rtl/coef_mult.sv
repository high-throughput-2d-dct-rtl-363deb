// coef_mult: configurable hardwired multiplier, p = d_i * {A or B} + (+/-)d_j.
//
// The two fixed coefficients (CW bits, CFRAC fractional bits) are recoded at
// elaboration into canonical signed digits.  For each digit position a small
// multiplexer picks the shifted d_i, its bit inverse (for a -1 digit) or zero
// according to the selected coefficient, so one carry-save tree serves both
// coefficients.  The +1 that completes each inverted row, the rounding
// constant 2^(CFRAC-1) and the +1 of a subtracted d_j are folded into a single
// correction row.  The first half of the tree (digit rows 0..6 and the
// correction row) is reduced by three 4:2 compressors to two rows, the second
// half (digit rows 7..13) by a 4:2 and a 5:3 compressor to three rows; these
// five rows are registered, which is the pipeline stage inside the
// multiplier.  After the register the d_j row, aligned to the binary point,
// joins them, two more 4:2 compressors leave a sum and a carry row, and a
// carry-increment adder resolves them.  p is that sum with the CFRAC
// fractional bits dropped, i.e. round-half-up(d_i * coef) + d_j, registered.
// Timing: operands applied on a tick with ce = 1 give p two ce-ticks later.
// Multiplying by 2^CFRAC (coefficient 1) returns d_i exactly, which the
// "1 or T2" and "C4 or 1" configurations use.  Signed-digit coefficients, the
// 4:2/5:3 compressor tree, the stage inside the multiplier and the final
// carry-increment adder with rounding follow the described multiplier; the
// grouping of rows, the place of the register and round-half-up are this
// design's own choices.
module coef_mult
  import dct_pkg::*;
#(
  parameter int unsigned COEF_A = 1448,
  parameter int unsigned COEF_B = 1448
) (
  input  logic  clk,
  input  logic  ce,
  input  logic  sel_b,   // 1: multiply by COEF_B, 0: by COEF_A
  input  word_t di,
  input  word_t dj,
  input  logic  add_en,  // add d_j at all
  input  logic  neg_j,   // subtract d_j instead of adding it
  output word_t p
);
  localparam int ND = CW + 2;          // signed digits needed
  localparam int PW = DW + CW + 2;     // full product width
  typedef logic [PW-1:0] row_t;

  // the tree below is laid out for 14 digit rows (12-bit coefficients)
  if (ND != 14) begin : g_bad_nd
    $error("coef_mult: compressor tree is laid out for 14 signed digits");
  end

  typedef struct packed {
    logic [ND-1:0] pos;
    logic [ND-1:0] neg;
  } csd_t;

  // canonical signed-digit (non-adjacent form) recoding of a constant
  function automatic csd_t to_csd(input int unsigned c);
    csd_t r;
    longint x;
    r = '0;
    x = longint'(c);
    for (int i = 0; i < ND; i++) begin
      if (x[0]) begin
        if (x[1]) begin
          r.neg[i] = 1'b1;
          x = x + 1;
        end else begin
          r.pos[i] = 1'b1;
          x = x - 1;
        end
      end
      x = x >>> 1;
    end
    return r;
  endfunction

  localparam csd_t DIG_A = to_csd(COEF_A);
  localparam csd_t DIG_B = to_csd(COEF_B);
  localparam int NNEG_A = $countones(DIG_A.neg);
  localparam int NNEG_B = $countones(DIG_B.neg);
  localparam row_t NEG_A_ROW = row_t'(NNEG_A);
  localparam row_t NEG_B_ROW = row_t'(NNEG_B);

  // stage 1: partial-product rows and correction row
  row_t pp [ND];
  row_t corr;

  always_comb begin
    row_t sh;
    logic dpos, dneg;
    sh = row_t'(PW'(di));               // sign-extended d_i
    for (int i = 0; i < ND; i++) begin
      dpos = sel_b ? DIG_B.pos[i] : DIG_A.pos[i];
      dneg = sel_b ? DIG_B.neg[i] : DIG_A.neg[i];
      pp[i] = dneg ? ~(sh << i) : (dpos ? (sh << i) : '0);
    end
    corr = (sel_b ? NEG_B_ROW : NEG_A_ROW)
         + (row_t'(1) << (CFRAC - 1))
         + {{(PW-1){1'b0}}, add_en & neg_j};
  end

  row_t a_s, a_c, b_s, b_c, lo_s, lo_c, h_s, h_c, hi0, hi1, hi2;

  csa_4to2 #(.W(PW)) u_la (.a(pp[0]), .b(pp[1]), .c(pp[2]), .d(pp[3]), .s(a_s), .cy(a_c));
  csa_4to2 #(.W(PW)) u_lb (.a(pp[4]), .b(pp[5]), .c(pp[6]), .d(corr),  .s(b_s), .cy(b_c));
  csa_4to2 #(.W(PW)) u_lc (.a(a_s),   .b(a_c),   .c(b_s),   .d(b_c),   .s(lo_s), .cy(lo_c));
  csa_4to2 #(.W(PW)) u_ha (.a(pp[7]), .b(pp[8]), .c(pp[9]), .d(pp[10]), .s(h_s), .cy(h_c));
  csa_5to3 #(.W(PW)) u_hb (.a(h_s), .b(h_c), .c(pp[11]), .d(pp[12]), .e(pp[13]),
                           .s(hi0), .c1(hi1), .c2(hi2));

  row_t lo_s_q, lo_c_q, hi0_q, hi1_q, hi2_q, jrow_q;

  always_ff @(posedge clk) begin
    if (ce) begin
      lo_s_q <= lo_s;
      lo_c_q <= lo_c;
      hi0_q  <= hi0;
      hi1_q  <= hi1;
      hi2_q  <= hi2;
      jrow_q <= !add_en ? '0
              : (neg_j ? ~(row_t'(PW'(dj)) << CFRAC) : (row_t'(PW'(dj)) << CFRAC));
    end
  end

  // stage 2: merge the halves with d_j, final carry-increment adder
  row_t x_s, x_c, f_s, f_c, fsum;
  logic co;

  csa_4to2 #(.W(PW)) u_ma (.a(lo_s_q), .b(lo_c_q), .c(hi0_q), .d(hi1_q), .s(x_s), .cy(x_c));
  csa_4to2 #(.W(PW)) u_mb (.a(x_s), .b(x_c), .c(hi2_q), .d(jrow_q), .s(f_s), .cy(f_c));
  ci_adder #(.W(PW), .BLK(4)) u_fin (.a(f_s), .b(f_c), .cin(1'b0), .s(fsum), .cout(co));

  always_ff @(posedge clk) begin
    if (ce) p <= word_t'(fsum[CFRAC +: DW]);
  end

  logic unused;
  assign unused = co ^ (^fsum[CFRAC-1:0]) ^ (^fsum[PW-1:CFRAC+DW]);
endmodule
