// sync_delay: shift register that delays a (valid, data) stream by N Clk2
// ticks.  The 1-D processor uses it to line the shorter even chain up with
// the odd chain.  Reset clears the valid bits.
module sync_delay
  import dct_pkg::*;
#(
  parameter int N = 6
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  ce,
  input  logic  in_valid,
  input  word_t in_data,
  output logic  out_valid,
  output word_t out_data
);
  logic  v [N];
  word_t d [N];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) begin
        v[i] <= 1'b0;
        d[i] <= '0;
      end
    end else if (ce) begin
      v[0] <= in_valid;
      d[0] <= in_data;
      for (int i = 1; i < N; i++) begin
        v[i] <= v[i-1];
        d[i] <= d[i-1];
      end
    end
  end

  assign out_valid = v[N-1];
  assign out_data  = d[N-1];
endmodule
