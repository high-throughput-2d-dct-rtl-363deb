// tb_j_o4d: tests the j_o4d basic processor.  Random 4-sample frames are sent
// on consecutive Clk2 ticks, back to back and with idle ticks between frames.
// Each output is compared with the exact real-valued result
//   (h0, C4(h2-h1), C4(h1+h2), h3)
// (tolerance 1.5 LSB: rounding and 12-bit coefficients), and the first output must follow the first input
// by 6 ticks.
`timescale 1ns/1ps
module tb_j_o4d;
  import dct_pkg::*;

  localparam int NFR = 300;
  localparam int LAT = 6;
  localparam real T1 = 0.19891236737965800691;   // tan(pi/16)
  localparam real T2 = 0.41421356237309504880;   // tan(pi/8)
  localparam real T5 = 1.49660576266548901761;   // cot(3pi/16)
  localparam real C4 = 0.70710678118654752440;   // cos(pi/4)

  logic clk = 1'b0, rst_n = 1'b0, ce2 = 1'b0;
  logic in_valid = 1'b0, out_valid;
  word_t in_data = '0, out_data;

  j_o4d dut (.clk, .rst_n, .ce2, .in_valid, .in_data, .out_valid, .out_data);

  always #5 clk = ~clk;
  always @(posedge clk) ce2 <= rst_n ? !ce2 : 1'b0;

  int checks = 0, failures = 0;
  real exp_q [$];
  longint tick = 0, first_in = -1, first_out = -1;
  int nout = 0;
  always @(posedge clk) if (ce2) tick <= tick + 1;

  initial begin
    #(2_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && ce2 && out_valid) begin
      real e, d;
      if (first_out < 0) first_out = tick;
      e = exp_q.pop_front();
      d = real'(out_data) - e;
      checks++;
      if (d > 1.5 || d < -1.5) begin
        failures++;
        if (failures < 10) $display("out %0d: got %0d exp %f", nout, out_data, e);
      end
      nout++;
    end
  end

  task automatic run(input logic tr);
    real h [4];
    real y [4];
    int  x [4];
    first_in = -1;
    first_out = -1;
    for (int f = 0; f < NFR; f++) begin
      for (int k = 0; k < 4; k++) begin
        x[k] = int'($urandom % 8001) - 4000;
        h[k] = real'(x[k]);
      end
      y = '{h[0], C4*(h[2]-h[1]), C4*(h[1]+h[2]), h[3]};
      for (int k = 0; k < 4; k++) exp_q.push_back(y[k]);
      if (f >= NFR / 2 && $urandom % 3 == 0) begin
        @(posedge clk iff !ce2);
        in_valid <= 1'b0;
        repeat (1 + $urandom % 4) @(posedge clk iff ce2);
      end
      for (int k = 0; k < 4; k++) begin
        @(posedge clk iff !ce2);
        in_valid <= 1'b1;
        in_data  <= word_t'(x[k]);
        @(posedge clk iff ce2);
        if (first_in < 0) first_in = tick;
      end
    end
    @(posedge clk iff !ce2);
    in_valid <= 1'b0;
    wait (exp_q.size() == 0);
    repeat (10) @(posedge clk);
    checks++;
    if (first_out - first_in != LAT) begin
      failures++;
      $display("latency %0d ticks, expected %0d", first_out - first_in, LAT);
    end
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    run(1'b0);

    checks++;
    if (nout != NFR * 4) begin
      failures++;
      $display("%0d outputs, expected %0d", nout, NFR * 4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
