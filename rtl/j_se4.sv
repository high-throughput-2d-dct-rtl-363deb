// j_se4: J_SE4 / J_SE4^t processor of the even chain.
//   J_SE4 = [1 1 0 0; 1 -1 0 0; 0 0 T2 1; 0 0 -1 T2],  T2 = C6/C2.
// Collects a 4-sample frame h[0..3], then per Clk2 tick one configurable
// multiplier computes P = d_i * {1 or T2} +/- d_j:
//   forward (transp = 0):  h0+h1, h0-h1, T2*h2+h3, T2*h3-h2
//   transposed (transp=1): h0+h1, h0-h1, T2*h2-h3, T2*h3+h2
// so the arithmetic unit is busy on every tick.  Only the sign of d_j differs
// between the two directions.  Latency LAT_MULT = 6 ticks, full throughput.
module j_se4
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

  word_t di, dj;
  logic  neg;
  always_comb begin
    case (ph)
      2'd0:    begin di = h[0]; dj = h[1]; neg = 1'b0;   end
      2'd1:    begin di = h[0]; dj = h[1]; neg = 1'b1;   end
      2'd2:    begin di = h[2]; dj = h[3]; neg = transp; end
      default: begin di = h[3]; dj = h[2]; neg = !transp; end
    endcase
  end

  coef_mult #(.COEF_A(COEF_ONE), .COEF_B(COEF_T2)) u_mul (
    .clk, .ce(ce2), .sel_b(ph[1]), .di, .dj, .add_en(1'b1), .neg_j(neg), .p(out_data));

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
