// j_o4b: J_O4B / J_O4B^t processor of the odd chain.
//   J_O4B = [T1 0 0 1; 0 T5 1 0; 0 -1 T5 0; -1 0 0 T1],  T1 = C7/C1, T5 = C3/C5.
// Collects a 4-sample frame h[0..3], then per Clk2 tick one configurable
// multiplier computes P = h[k] * {T1 or T5} +/- h[3-k]:
//   forward (transp = 0):  T1*h0+h3, T5*h1+h2, T5*h2-h1, T1*h3-h0
//   transposed (transp=1): T1*h0-h3, T5*h1-h2, T5*h2+h1, T1*h3+h0
// Latency LAT_MULT = 6 ticks, full throughput.
module j_o4b
  import dct_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  ce2,
  input  logic  transp,
  input  logic  in_valid,
  input  word_t in_data,
  output logic  out_valid,
  output word_t out_data
);
  word_t h [4];
  logic  act;
  logic [1:0] ph;
  sr_frame4 u_sr (.clk, .rst_n, .ce(ce2), .in_valid, .in_data, .hold(h), .act, .phase(ph));

  logic outer;
  assign outer = (ph == 2'd0) || (ph == 2'd3);

  coef_mult #(.COEF_A(COEF_T5), .COEF_B(COEF_T1)) u_mul (
    .clk, .ce(ce2), .sel_b(outer), .di(h[ph]), .dj(h[2'd3 - ph]), .add_en(1'b1),
    .neg_j(ph[1] ^ transp), .p(out_data));

  logic v1;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      out_valid <= 1'b0;
    end else if (ce2) begin
      v1        <= act;
      out_valid <= v1;
    end
  end
endmodule
