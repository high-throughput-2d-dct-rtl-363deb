// tb_q_r8: tests the double-input Q_R8 processor.  Random frames u[0..3],
// v[0..3] are sent one pair per Clk2 tick, back to back and with idle ticks;
// the outputs must be exactly out_e[k] = u[k] + v[3-k] and
// out_o[k] = u[3-k] - v[k], starting 5 ticks after the first input pair.
`timescale 1ns/1ps
module tb_q_r8;
  import dct_pkg::*;

  localparam int NFR = 300;
  localparam int LAT = 5;
  logic clk = 1'b0, rst_n = 1'b0, ce2 = 1'b0;
  logic in_valid = 1'b0, out_valid;
  word_t in_u = '0, in_v = '0, out_e, out_o;

  q_r8 dut (.clk, .rst_n, .ce2, .in_valid, .in_u, .in_v, .out_valid, .out_e, .out_o);

  always #5 clk = ~clk;
  always @(posedge clk) ce2 <= rst_n ? !ce2 : 1'b0;

  int checks = 0, failures = 0, nout = 0;
  word_t exp_q [$];
  longint tick = 0, first_in = -1, first_out = -1;
  always @(posedge clk) if (ce2) tick <= tick + 1;

  initial begin
    #(1_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && ce2 && out_valid) begin
      word_t a, b;
      if (first_out < 0) first_out = tick;
      a = exp_q.pop_front();
      b = exp_q.pop_front();
      checks++;
      if (out_e !== a || out_o !== b) begin
        failures++;
        if (failures < 10) $display("pair %0d: got %0d %0d exp %0d %0d", nout, out_e, out_o, a, b);
      end
      nout++;
    end
  end

  initial begin
    word_t u [4], v [4];
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    for (int f = 0; f < NFR; f++) begin
      for (int k = 0; k < 4; k++) begin
        u[k] = word_t'(int'($urandom % 200001) - 100000);
        v[k] = word_t'(int'($urandom % 200001) - 100000);
      end
      for (int k = 0; k < 4; k++) begin
        exp_q.push_back(u[k] + v[3-k]);
        exp_q.push_back(u[3-k] - v[k]);
      end
      if (f >= NFR / 2 && $urandom % 3 == 0) begin
        @(posedge clk iff !ce2);
        in_valid <= 1'b0;
        repeat (1 + $urandom % 4) @(posedge clk iff ce2);
      end
      for (int k = 0; k < 4; k++) begin
        @(posedge clk iff !ce2);
        in_valid <= 1'b1;
        in_u <= u[k];
        in_v <= v[k];
        @(posedge clk iff ce2);
        if (first_in < 0) first_in = tick;
      end
    end
    @(posedge clk iff !ce2);
    in_valid <= 1'b0;
    repeat (30) @(posedge clk);
    checks++;
    if (first_out - first_in != LAT) begin
      failures++;
      $display("latency %0d, expected %0d", first_out - first_in, LAT);
    end
    checks++;
    if (nout != 4 * NFR) begin
      failures++;
      $display("%0d pairs, expected %0d", nout, 4 * NFR);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
