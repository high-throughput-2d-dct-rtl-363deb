// q_r8: double-input Q_R8 processor, Q_R8 = [I4 I_D4; I_D4 -I4].
//
// Two serial streams u (elements 0..3 of an 8-vector) and v (elements 4..7)
// arrive together, one sample of each per Clk2 tick.  After a frame is
// complete two add/subtract units produce, one pair per tick for k = 0..3,
//   out_e[k] = u[k] + v[3-k]    and    out_o[k] = u[3-k] - v[k].
// Because Q_R8 is symmetric the same processor is the first stage of the
// forward transform (giving the even and odd halves) and the last stage of
// the inverse (giving pixels 0..3 and 4..7).  Latency: first input to first
// output LAT_ADD = 5 ticks; full throughput.  The frame/hold schedule is this
// design's; the arithmetic follows Eq. (8).
module q_r8
  import dct_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  ce2,
  input  logic  in_valid,
  input  word_t in_u,
  input  word_t in_v,
  output logic  out_valid,
  output word_t out_e,
  output word_t out_o
);
  word_t hu [4], hv [4];
  logic  act, act_v;
  logic [1:0] ph, ph_v;

  sr_frame4 u_sru (.clk, .rst_n, .ce(ce2), .in_valid, .in_data(in_u), .hold(hu), .act, .phase(ph));
  sr_frame4 u_srv (.clk, .rst_n, .ce(ce2), .in_valid, .in_data(in_v), .hold(hv), .act(act_v), .phase(ph_v));

  word_t se, so;
  addsub u_e (.a(hu[ph]),        .b(hv[2'd3 - ph]), .sub(1'b0), .y(se));
  addsub u_o (.a(hu[2'd3 - ph]), .b(hv[ph]),        .sub(1'b1), .y(so));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_e     <= '0;
      out_o     <= '0;
    end else if (ce2) begin
      out_valid <= act;
      out_e     <= se;
      out_o     <= so;
    end
  end

  logic unused;
  assign unused = act_v ^ ph_v[0] ^ ph_v[1];
endmodule
