// up_sample: U-S unit between the half-rate 1-D processor and the f_s
// output.  Pairs (O_E[k], O_O[k]), k = 0..3, arrive on consecutive Clk2
// ticks.  When the fourth pair arrives the frame is copied to an output
// buffer and sent one sample per f_s clock in the order O_E[0..3], O_O[0..3]
// (elements 0..7 of the vector) on the next 8 cycles, while the next frame
// is collected.  Latency: last pair to first sample 1 f_s cycle.
module up_sample
  import dct_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  ce2,
  input  logic  in_valid,
  input  word_t in_e,
  input  word_t in_o,
  output logic  out_valid,
  output word_t out_data
);
  word_t ce_buf [3], co_buf [3];
  word_t obuf [8];
  logic [1:0] cnt;
  logic       oact;
  logic [2:0] oidx;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt       <= '0;
      oact      <= 1'b0;
      oidx      <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      for (int i = 0; i < 3; i++) begin
        ce_buf[i] <= '0;
        co_buf[i] <= '0;
      end
      for (int i = 0; i < 8; i++) obuf[i] <= '0;
    end else begin
      // full-rate side
      out_valid <= oact;
      out_data  <= obuf[oidx];
      if (oact) begin
        oidx <= oidx + 3'd1;
        if (oidx == 3'd7) oact <= 1'b0;
      end
      // half-rate side (takes priority over the lines above)
      if (ce2 && in_valid) begin
        cnt <= cnt + 2'd1;
        if (cnt == 2'd3) begin
          for (int i = 0; i < 3; i++) begin
            obuf[i]   <= ce_buf[i];
            obuf[i+4] <= co_buf[i];
          end
          obuf[3] <= in_e;
          obuf[7] <= in_o;
          oact    <= 1'b1;
          oidx    <= '0;
        end else begin
          ce_buf[cnt] <= in_e;
          co_buf[cnt] <= in_o;
        end
      end
    end
  end
endmodule
