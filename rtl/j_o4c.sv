// j_o4c: J_O4C processor, J_O4C = [1 1 0 0; 1 -1 0 0; 0 0 -1 1; 0 0 1 1].
//
// Collects a 4-sample frame d[0..3], then emits one result per Clk2 tick from
// a single adder/subtracter:  d0+d1, d0-d1, d3-d2, d3+d2.  The matrix is
// symmetric, so the processor is the same in the forward and inverse odd
// chain.  Latency LAT_ADD = 5 ticks, full throughput.
module j_o4c
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

  word_t y;
  addsub u_as (.a(ph[1] ? h[3] : h[0]), .b(ph[1] ? h[2] : h[1]), .sub(ph[0] ^ ph[1]), .y(y));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (ce2) begin
      out_valid <= act;
      out_data  <= y;
    end
  end
endmodule
