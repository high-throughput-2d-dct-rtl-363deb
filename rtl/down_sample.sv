// down_sample: D-S unit between the f_s input and the half-rate 1-D
// processor.  Samples arrive one per f_s clock (in_valid may have gaps).  An
// 8-sample row is collected; when its last sample arrives the row is copied
// to a holding register and sent on the next four Clk2 ticks as pairs
// (x[k], x[k+4]), k = 0..3 (I_E = first half, I_O = second half), while the
// next row is collected.  With a continuous input every Clk2 tick carries a
// pair.  Latency: row sample 7 to first pair 1 or 2 f_s cycles.
module down_sample
  import dct_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  ce2,
  input  logic  in_valid,
  input  word_t in_data,
  output logic  out_valid,
  output word_t out_e,
  output word_t out_o
);
  word_t row [7];
  word_t hold [8];
  logic [2:0] cnt;
  logic       pend;    // a held row still has pairs to send
  logic [1:0] em;      // next pair to send

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt       <= '0;
      pend      <= 1'b0;
      em        <= '0;
      out_valid <= 1'b0;
      out_e     <= '0;
      out_o     <= '0;
      for (int i = 0; i < 7; i++) row[i] <= '0;
      for (int i = 0; i < 8; i++) hold[i] <= '0;
    end else begin
      // half-rate side: send one pair per Clk2 tick
      if (ce2) begin
        out_valid <= pend;
        out_e     <= hold[{1'b0, em}];
        out_o     <= hold[{1'b1, em}];
        if (pend) begin
          em <= em + 2'd1;
          if (em == 2'd3) pend <= 1'b0;
        end
      end
      // full-rate side: collect a row (takes priority over the lines above)
      if (in_valid) begin
        cnt <= cnt + 3'd1;
        if (cnt == 3'd7) begin
          for (int i = 0; i < 7; i++) hold[i] <= row[i];
          hold[7] <= in_data;
          pend    <= 1'b1;
          em      <= '0;
        end else begin
          row[cnt] <= in_data;
        end
      end
    end
  end
endmodule
