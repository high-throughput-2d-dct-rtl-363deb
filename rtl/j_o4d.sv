// j_o4d: J_O4D processor, J_O4D = [1 0 0 0; 0 -C4 C4 0; 0 C4 C4 0; 0 0 0 1].
//
// Collects a 4-sample frame b[0..3], then per Clk2 tick a pre-adder forms
// b2-b1 or b2+b1 and the hardwired multiplier scales it by C4, giving
//   b0, C4*(b2-b1), C4*(b1+b2), b3.
// The outer samples pass through the same multiplier configured for a
// coefficient of exactly 1, which keeps all four outputs on the same
// pipeline (this reuse is this design's choice).  J_O4D is symmetric, so
// forward and inverse use it unchanged.  Latency LAT_MULT = 6 ticks.
module j_o4d
  import dct_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  ce2,
  input  logic  in_valid,
  input  word_t in_data,
  output logic  out_valid,
  output word_t out_data
);
  word_t h [4];
  logic  act;
  logic [1:0] ph;
  sr_frame4 u_sr (.clk, .rst_n, .ce(ce2), .in_valid, .in_data, .hold(h), .act, .phase(ph));

  logic  inner;
  word_t pre, di;
  assign inner = ph[0] ^ ph[1];
  addsub u_pre (.a(h[2]), .b(h[1]), .sub(ph == 2'd1), .y(pre));
  assign di = inner ? pre : h[ph];

  coef_mult #(.COEF_A(COEF_C4), .COEF_B(COEF_ONE)) u_mul (
    .clk, .ce(ce2), .sel_b(!inner), .di, .dj('0), .add_en(1'b0), .neg_j(1'b0), .p(out_data));

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
