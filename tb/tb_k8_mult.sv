// tb_k8_mult: checks the normalisation multiplier.  For each sample n of a
// block the expected coefficient is round(2^15 * P_{n/8} * P_{n%8}) with
// P = 1/2 (C0, C4, C2, C2, C1, C5, C5, C1) computed here from cosines; the
// result must equal round(x * K / 2^s), s = 15 + 4 (forward) or 15 - 7
// (inverse), two cycles after the sample.  Samples come with random gaps.
`timescale 1ns/1ps
module tb_k8_mult;
  import dct_pkg::*;
  import tb_dct_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  mode_e mode = MODE_DCT;
  logic in_valid = 1'b0, out_valid;
  word_t in_data = '0, out_data;

  k8_mult dut (.clk, .rst_n, .mode, .in_valid, .in_data, .out_valid, .out_data);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, nout = 0;
  longint exp_q [$];
  longint cyc = 0;
  longint t_q [$];
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real pval(input int p);
    int k [8] = '{0, 4, 2, 2, 1, 5, 5, 1};
    return cosk(0, k[p]);   // c(k)/2 * cos(k pi / 16)
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      longint e, t0;
      e = exp_q.pop_front();
      checks += 2;
      if (longint'(out_data) != e) begin
        failures++;
        if (failures < 10) $display("out %0d: got %0d exp %0d", nout, out_data, e);
      end
      t0 = t_q.pop_front();
      if (cyc != t0 + 3) begin
        failures++;
        if (failures < 10) $display("out %0d: latency %0d", nout, cyc - t0);
      end
      nout++;
    end
  end

  task automatic run(input mode_e m, input int nblk);
    longint x, k, sh;
    mode <= m;
    sh = (m == MODE_DCT) ? 19 : 8;
    for (int n = 0; n < 64 * nblk; n++) begin
      x = (m == MODE_DCT) ? longint'(int'($urandom % 600001) - 300000) : longint'(int'($urandom % 4096) - 2048);
      k = longint'(rnd(32768.0 * pval((n % 64) / 8) * pval(n % 8)));
      exp_q.push_back((x < 0) ? -((-x * k + (longint'(1) << (sh - 1))) >>> sh) : ((x * k + (longint'(1) << (sh - 1))) >>> sh));
      if ($urandom % 5 == 0) begin
        in_valid <= 1'b0;
        @(posedge clk);
      end
      in_valid <= 1'b1;
      in_data <= word_t'(x);
      t_q.push_back(cyc);
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (5) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    run(MODE_DCT, 5);
    run(MODE_IDCT, 5);
    checks++;
    if (nout != 640) begin
      failures++;
      $display("%0d outputs, expected 640", nout);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
