// sr_frame4: input shift register and holding register shared by the basic
// processors.  Four samples of a frame arrive serially on consecutive Clk2
// ticks (ce = 1, in_valid = 1).  When the fourth arrives the frame is copied
// into the holding register and the processor's output phase starts: act is
// high for the next four ticks with phase = 0..3, while the shift register
// already collects the next frame.  So a processor reads its whole frame from
// hold[] during the four ticks after the frame's last sample.
module sr_frame4
  import dct_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  ce,
  input  logic  in_valid,
  input  word_t in_data,
  output word_t hold [4],
  output logic  act,
  output logic [1:0] phase
);
  word_t sr [3];
  logic [1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt   <= '0;
      act   <= 1'b0;
      phase <= '0;
      for (int i = 0; i < 3; i++) sr[i] <= '0;
      for (int i = 0; i < 4; i++) hold[i] <= '0;
    end else if (ce) begin
      if (act) begin
        phase <= phase + 2'd1;
        if (phase == 2'd3) act <= 1'b0;
      end
      if (in_valid) begin
        cnt <= cnt + 2'd1;
        if (cnt == 2'd3) begin
          hold[0] <= sr[0];
          hold[1] <= sr[1];
          hold[2] <= sr[2];
          hold[3] <= in_data;
          act     <= 1'b1;
          phase   <= '0;
        end else begin
          sr[cnt] <= in_data;
        end
      end
    end
  end
endmodule
