// jr8_proc: 1-D 8-point J_R8 (forward) / J_R8^t (inverse) processor.
//
// J_R8 = diag(J_SE4*Q_R4, J_O4B*J_O4C*J_O4D) * Q_R8 and, the symmetric
// factors being their own transposes,
// J_R8^t = Q_R8 * diag(Q_R4*J_SE4^t, J_O4D*J_O4C*J_O4B^t).
// The processor holds one of each basic processor and multiplexers that
// chain them in the order of the selected direction:
//   forward:  (I_E,I_O) -> Q_R8 -> even: Q_R4 -> J_SE4   -> O_E
//                                  odd:  J_O4D -> J_O4C -> J_O4B -> O_O
//   inverse:  I_E -> J_SE4^t -> Q_R4 ----------\
//             I_O -> J_O4B^t -> J_O4C -> J_O4D -> Q_R8 -> (O_E, O_O)
// Both halves are processed in parallel, so two samples enter and two leave
// per Clk2 tick (ce2), at half the input sample rate.  The even chain is one
// processor shorter; a shift register of EVEN_DELAY ticks at its end keeps the
// halves aligned.
//
// Vector layout: I_E/O_E carry elements 0..3, I_O/O_O elements 4..7, one per
// tick.  Forward: input natural order x0..x7, output the S_R8 row order
// (0,4,2,6 | 1,5,3,7) without the P_R8 scaling.  Inverse: input in that
// reordered order, output natural order.  Latency 22 ticks from the first
// input pair to the first output pair in either direction.  mode must only
// change while the processor is empty.
module jr8_proc
  import dct_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  ce2,
  input  mode_e mode,
  input  logic  in_valid,
  input  word_t in_e,
  input  word_t in_o,
  output logic  out_valid,
  output word_t out_e,
  output word_t out_o
);
  logic inv;
  assign inv = (mode == MODE_IDCT);

  // processor outputs
  logic  r8_v, r4_v, se_v, od_v, oc_v, ob_v, dl_v;
  word_t r8_e, r8_o, r4_d, se_d, od_d, oc_d, ob_d, dl_d;

  // input multiplexers
  logic  r8_iv;
  word_t r8_iu, r8_iw;
  assign r8_iv = inv ? od_v : in_valid;
  assign r8_iu = inv ? dl_d : in_e;
  assign r8_iw = inv ? od_d : in_o;

  q_r8 u_qr8 (.clk, .rst_n, .ce2, .in_valid(r8_iv), .in_u(r8_iu), .in_v(r8_iw),
              .out_valid(r8_v), .out_e(r8_e), .out_o(r8_o));

  q_r4 u_qr4 (.clk, .rst_n, .ce2, .in_valid(inv ? se_v : r8_v), .in_data(inv ? se_d : r8_e),
              .out_valid(r4_v), .out_data(r4_d));

  j_se4 u_se4 (.clk, .rst_n, .ce2, .transp(inv), .in_valid(inv ? in_valid : r4_v),
               .in_data(inv ? in_e : r4_d), .out_valid(se_v), .out_data(se_d));

  sync_delay #(.N(EVEN_DELAY)) u_even_sync (.clk, .rst_n, .ce(ce2),
               .in_valid(inv ? r4_v : se_v), .in_data(inv ? r4_d : se_d),
               .out_valid(dl_v), .out_data(dl_d));

  j_o4d u_o4d (.clk, .rst_n, .ce2, .in_valid(inv ? oc_v : r8_v), .in_data(inv ? oc_d : r8_o),
               .out_valid(od_v), .out_data(od_d));

  j_o4c u_o4c (.clk, .rst_n, .ce2, .in_valid(inv ? ob_v : od_v), .in_data(inv ? ob_d : od_d),
               .out_valid(oc_v), .out_data(oc_d));

  j_o4b u_o4b (.clk, .rst_n, .ce2, .transp(inv), .in_valid(inv ? in_valid : oc_v),
               .in_data(inv ? in_o : oc_d), .out_valid(ob_v), .out_data(ob_d));

  assign out_valid = inv ? r8_v : ob_v;
  assign out_e     = inv ? r8_e : dl_d;
  assign out_o     = inv ? r8_o : ob_d;

  // the two halves must arrive together wherever they are recombined
  property p_aligned(logic a, logic b);
    @(posedge clk) disable iff (!rst_n) ce2 |-> (a == b);
  endproperty
  a_fwd_aligned: assert property (p_aligned(inv ? 1'b0 : dl_v, inv ? 1'b0 : ob_v));
  a_inv_aligned: assert property (p_aligned(inv ? dl_v : 1'b0, inv ? od_v : 1'b0));
endmodule
