// q_r4: Q_R4 processor, Q_R4 = [I2 I_D2; I_D2 -I2], on one serial stream.
//
// Collects a 4-sample frame a[0..3], then emits one result per Clk2 tick from
// a single adder/subtracter:  a0+a3, a1+a2, a1-a2, a0-a3.  Q_R4 is symmetric,
// so the same processor serves the forward (after Q_R8) and the inverse
// (after J_SE4^t) even chain.  Latency LAT_ADD = 5 ticks, full throughput.
module q_r4
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

  logic  outer;  // phases 0 and 3 use a0/a3, phases 1 and 2 use a1/a2
  word_t y;
  assign outer = (ph == 2'd0) || (ph == 2'd3);
  addsub u_as (.a(outer ? h[0] : h[1]), .b(outer ? h[3] : h[2]), .sub(ph[1]), .y(y));

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
