// tb_jr8_proc: tests the 1-D J_R8 / J_R8^t processor against the real-valued
// matrix J_R8 = P_R8^-1 * S_R8 (forward: y = J x, inverse: x = J^t y).
// Random vectors are sent as 4 pairs on consecutive Clk2 ticks, back to back
// and with random idle ticks between vectors; each result must lie within
// 3 LSB of the exact value, and the first result must appear 22 ticks after
// the first input pair.
`timescale 1ns/1ps
module tb_jr8_proc;
  import dct_pkg::*;
  import tb_dct_ref_pkg::*;

  localparam int LAT = 22;   // Clk2 ticks, first pair in to first pair out
  localparam int NVEC = 200;

  logic clk = 1'b0, rst_n = 1'b0, ce2 = 1'b0;
  mode_e mode = MODE_DCT;
  logic in_valid = 1'b0, out_valid;
  word_t in_e = '0, in_o = '0, out_e, out_o;

  jr8_proc dut (.clk, .rst_n, .ce2, .mode, .in_valid, .in_e, .in_o, .out_valid, .out_e, .out_o);

  always #5 clk = ~clk;
  always @(posedge clk) ce2 <= rst_n ? !ce2 : 1'b0;

  int checks = 0, failures = 0;
  real exp_q [$];
  longint tick = 0, first_in = -1, first_out = -1;
  always @(posedge clk) if (ce2) tick <= tick + 1;

  initial begin
    #(2_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real jm(input int p, input int n);
    real pp [8];
    pp = '{cosk(0, 0), cosk(0, 4), cosk(0, 2), cosk(0, 2), cosk(0, 1), cosk(0, 5), cosk(0, 5), cosk(0, 1)};
    // cosk(0,k) = c(k)/2 cos(k pi/16) = P value for k
    return cosk(n, reorder(p)) / pp[p];
  endfunction

  int nout = 0;
  always @(posedge clk) begin
    if (rst_n && ce2 && out_valid) begin
      real e0, e1;
      if (first_out < 0) first_out = tick;
      e0 = exp_q.pop_front();
      e1 = exp_q.pop_front();
      checks += 2;
      if ((real'(out_e) - e0) > 4.0 || (real'(out_e) - e0) < -4.0 ||
          (real'(out_o) - e1) > 4.0 || (real'(out_o) - e1) < -4.0) begin
        failures++;
        if (failures < 10) $display("out %0d: got %0d %0d exp %f %f", nout, out_e, out_o, e0, e1);
      end
      nout++;
    end
  end

  task automatic run(input mode_e m);
    int x [8];
    real y [8];
    mode <= m;
    repeat (4) @(posedge clk);
    for (int v = 0; v < NVEC; v++) begin
      for (int i = 0; i < 8; i++) x[i] = int'($urandom % 8192) - 4096;
      for (int i = 0; i < 8; i++) begin
        y[i] = 0.0;
        for (int j = 0; j < 8; j++) y[i] += (m == MODE_DCT) ? jm(i, j) * x[j] : jm(j, i) * x[j];
      end
      for (int k = 0; k < 4; k++) begin
        exp_q.push_back(y[k]);
        exp_q.push_back(y[k+4]);
      end
      if ($urandom % 3 == 0) begin
        in_valid <= 1'b0;
        repeat (1 + $urandom % 5) @(posedge clk iff ce2);
      end
      for (int k = 0; k < 4; k++) begin
        @(posedge clk iff !ce2);   // drive between ticks
        in_valid <= 1'b1;
        in_e <= word_t'(x[k]);
        in_o <= word_t'(x[k+4]);
        if (first_in < 0) first_in = tick;
        @(posedge clk iff ce2);
      end
      @(posedge clk iff !ce2);
      in_valid <= 1'b0;
    end
    wait (exp_q.size() == 0);
    repeat (10) @(posedge clk);
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    run(MODE_DCT);
    checks++;
    if (first_out - first_in != LAT) begin
      failures++;
      $display("latency %0d ticks, expected %0d", first_out - first_in, LAT);
    end
    first_in = -1;
    first_out = -1;
    run(MODE_IDCT);
    checks++;
    if (first_out - first_in != LAT) begin
      failures++;
      $display("latency %0d ticks, expected %0d", first_out - first_in, LAT);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
