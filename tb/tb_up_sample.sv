// tb_up_sample: sends random frames of four (O_E, O_O) pairs on consecutive
// Clk2 ticks, back to back and with idle ticks between frames, and checks
// that each frame leaves as O_E[0..3], O_O[0..3] on eight consecutive
// full-rate cycles starting the cycle after its last pair was taken.
`timescale 1ns/1ps
module tb_up_sample;
  import dct_pkg::*;

  localparam int NFR = 200;
  logic clk = 1'b0, rst_n = 1'b0, ce2 = 1'b0;
  logic in_valid = 1'b0, out_valid;
  word_t in_e = '0, in_o = '0, out_data;

  up_sample dut (.clk, .rst_n, .ce2, .in_valid, .in_e, .in_o, .out_valid, .out_data);

  always #5 clk = ~clk;
  always @(posedge clk) ce2 <= rst_n ? !ce2 : 1'b0;

  int checks = 0, failures = 0;
  word_t exp_q [$];
  longint cyc = 0;
  longint end_q [$];
  int nout = 0;
  logic last_v = 1'b0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #(1_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      word_t e;
      e = exp_q.pop_front();
      checks++;
      if (out_data !== e) begin
        failures++;
        if (failures < 10) $display("sample %0d: got %0d exp %0d", nout, out_data, e);
      end
      if (nout % 8 == 0) begin
        checks++;
        if (cyc != end_q.pop_front() + 2) begin
          failures++;
          $display("frame %0d starts late", nout / 8);
        end
      end else begin
        checks++;
        if (!last_v) begin
          failures++;
          $display("sample %0d not contiguous", nout);
        end
      end
      nout++;
    end
    last_v = out_valid;
  end

  initial begin
    word_t e [4], o [4];
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < NFR; n++) begin
      for (int k = 0; k < 4; k++) begin
        e[k] = word_t'($urandom);
        o[k] = word_t'($urandom);
      end
      for (int k = 0; k < 4; k++) exp_q.push_back(e[k]);
      for (int k = 0; k < 4; k++) exp_q.push_back(o[k]);
      if (n >= NFR / 2 && $urandom % 3 == 0) begin
        @(posedge clk iff !ce2);
        in_valid <= 1'b0;
        repeat (1 + $urandom % 3) @(posedge clk iff ce2);
      end
      for (int k = 0; k < 4; k++) begin
        @(posedge clk iff !ce2);
        in_valid <= 1'b1;
        in_e <= e[k];
        in_o <= o[k];
        @(posedge clk iff ce2);
        if (k == 3) end_q.push_back(cyc);
      end
    end
    @(posedge clk iff !ce2);
    in_valid <= 1'b0;
    repeat (20) @(posedge clk);
    checks++;
    if (nout != 8 * NFR) begin
      failures++;
      $display("%0d samples out, expected %0d", nout, 8 * NFR);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
