// tb_down_sample: feeds random samples at the full rate, with and without
// idle cycles, and checks that every 8-sample row leaves as the pairs
// (x[k], x[k+4]), k = 0..3, on four consecutive Clk2 ticks.
`timescale 1ns/1ps
module tb_down_sample;
  import dct_pkg::*;

  localparam int NROW = 200;
  logic clk = 1'b0, rst_n = 1'b0, ce2 = 1'b0;
  logic in_valid = 1'b0, out_valid;
  word_t in_data = '0, out_e, out_o;

  down_sample dut (.clk, .rst_n, .ce2, .in_valid, .in_data, .out_valid, .out_e, .out_o);

  always #5 clk = ~clk;
  always @(posedge clk) ce2 <= rst_n ? !ce2 : 1'b0;

  int checks = 0, failures = 0;
  word_t exp_q [$];
  int nout = 0, run = 0;
  logic last_v = 1'b0;

  initial begin
    #(1_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (ce2) begin
      if (out_valid) begin
        word_t a, b;
        a = exp_q.pop_front();
        b = exp_q.pop_front();
        checks++;
        if (out_e !== a || out_o !== b) begin
          failures++;
          if (failures < 10) $display("pair %0d: got %0d %0d exp %0d %0d", nout, out_e, out_o, a, b);
        end
        // the four pairs of a row are contiguous
        if (nout % 4 != 0) begin
          checks++;
          if (!last_v) begin
            failures++;
            $display("pair %0d not contiguous", nout);
          end
        end
        nout++;
      end
      last_v = out_valid;
    end
  end

  initial begin
    word_t r [8];
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < NROW; n++) begin
      for (int i = 0; i < 8; i++) r[i] = word_t'($urandom);
      for (int k = 0; k < 4; k++) begin
        exp_q.push_back(r[k]);
        exp_q.push_back(r[k+4]);
      end
      for (int i = 0; i < 8; i++) begin
        if (n >= NROW / 2 && $urandom % 4 == 0) begin
          in_valid <= 1'b0;
          repeat (1 + $urandom % 4) @(posedge clk);
        end
        in_valid <= 1'b1;
        in_data  <= r[i];
        @(posedge clk);
      end
    end
    in_valid <= 1'b0;
    repeat (20) @(posedge clk);
    checks++;
    if (nout != 4 * NROW) begin
      failures++;
      $display("%0d pairs out, expected %0d", nout, 4 * NROW);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
