// tb_ieee1180: IEEE Std 1180-1990 style accuracy test of the inverse
// transform of dct2d_top at its default parameters.
// For each input range [-L, H] in {[-256,255], [-5,5], [-300,300]} and each
// sign (the second pass negates the random samples), NBLK random 8x8 blocks
// are made with the 32-bit generator of the standard, transformed with a
// double-precision forward DCT, rounded and clipped to [-2048, 2047].  These
// coefficient blocks are fed to the processor in IDCT mode back to back; its
// output is compared with the double-precision inverse DCT, rounded and
// clipped to [-256, 255].  Limits of the standard, per set: peak error <= 1,
// per-pixel mean square error <= 0.06, overall mean square error <= 0.02,
// per-pixel mean error <= 0.015 (magnitude), overall mean error <= 0.0015
// (magnitude); and an all-zero block must give all zeros.
`timescale 1ns/1ps
module tb_ieee1180;
  import dct_pkg::*;
  import tb_dct_ref_pkg::*;

  localparam int NBLK = 10000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic din_valid = 1'b0;
  logic [11:0] din = '0;
  logic dout_valid;
  logic [11:0] dout;

  dct2d_top dut (.clk, .rst_n, .mode(MODE_IDCT), .din_valid, .din, .dout_valid, .dout);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  real cm [8][8];   // cm[n][k] = c(k)/2 cos((2n+1) k pi / 16)

  initial begin
    #(60_000_000_000.0);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected pixel values, output order (column-major)
  int exp_q [$];
  // statistics of the current set
  longint esum [64], esq [64];
  int     epeak = 0;
  int     n_out = 0;

  always @(posedge clk) begin
    if (rst_n && dout_valid) begin
      int got, e, d, p, c;
      got = int'($signed(dout));
      e = exp_q.pop_front();
      d = got - e;
      c = (n_out % 64) / 8;
      p = n_out % 8;
      esum[p*8+c] += d;
      esq[p*8+c]  += d * d;
      if ((d < 0 ? -d : d) > epeak) epeak = (d < 0 ? -d : d);
      n_out++;
    end
  end

  task automatic send(input int coef [64]);
    rblk_t x;
    real t [64];
    // reference inverse transform
    for (int u = 0; u < 8; u++)
      for (int j = 0; j < 8; j++) begin
        t[u*8+j] = 0.0;
        for (int v = 0; v < 8; v++) t[u*8+j] += cm[j][v] * coef[u*8+v];
      end
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        x[i*8+j] = 0.0;
        for (int u = 0; u < 8; u++) x[i*8+j] += cm[i][u] * t[u*8+j];
      end
    for (int c = 0; c < 8; c++)
      for (int p = 0; p < 8; p++) exp_q.push_back(clip(rnd(x[p*8+c]), -256, 255));
    for (int n = 0; n < 64; n++) begin
      din_valid <= 1'b1;
      din <= 12'(coef[reorder(n / 8) * 8 + reorder(n % 8)]);
      @(posedge clk);
    end
  endtask

  task automatic one_set(input int l, input int h, input int sgn);
    ieee_rng rng;
    int blk [64], coef [64];
    real t [64], X [64];
    real omse, ome, pmse, pme, m;
    rng = new();
    for (int i = 0; i < 64; i++) begin
      esum[i] = 0;
      esq[i] = 0;
    end
    epeak = 0;
    for (int b = 0; b < NBLK; b++) begin
      for (int i = 0; i < 64; i++) blk[i] = sgn * rng.next(l, h);
      for (int i = 0; i < 8; i++)
        for (int v = 0; v < 8; v++) begin
          t[i*8+v] = 0.0;
          for (int j = 0; j < 8; j++) t[i*8+v] += cm[j][v] * blk[i*8+j];
        end
      for (int u = 0; u < 8; u++)
        for (int v = 0; v < 8; v++) begin
          X[u*8+v] = 0.0;
          for (int i = 0; i < 8; i++) X[u*8+v] += cm[i][u] * t[i*8+v];
          coef[u*8+v] = clip(rnd(X[u*8+v]), -2048, 2047);
        end
      send(coef);
    end
    din_valid <= 1'b0;
    wait (exp_q.size() == 0);
    repeat (4) @(posedge clk);
    omse = 0.0; ome = 0.0; pmse = 0.0; pme = 0.0;
    for (int i = 0; i < 64; i++) begin
      omse += real'(esq[i]);
      ome  += real'(esum[i]);
      m = real'(esq[i]) / NBLK;
      if (m > pmse) pmse = m;
      m = real'(esum[i]) / NBLK;
      if (m < 0.0) m = -m;
      if (m > pme) pme = m;
    end
    omse = omse / (64.0 * NBLK);
    ome  = ome / (64.0 * NBLK);
    if (ome < 0.0) ome = -ome;
    $display("range [%0d,%0d] sign %0d: peak=%0d PMSE=%f OMSE=%f PME=%f OME=%f",
             -l, h, sgn, epeak, pmse, omse, pme, ome);
    checks += 5;
    if (epeak > 1)      begin failures++; $display("  peak error above 1"); end
    if (pmse > 0.06)    begin failures++; $display("  PMSE above 0.06"); end
    if (omse > 0.02)    begin failures++; $display("  OMSE above 0.02"); end
    if (pme > 0.015)    begin failures++; $display("  PME above 0.015"); end
    if (ome > 0.0015)   begin failures++; $display("  OME above 0.0015"); end
  endtask

  initial begin
    int z [64];
    for (int n = 0; n < 8; n++)
      for (int k = 0; k < 8; k++) cm[n][k] = cosk(n, k);
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    one_set(256, 255, 1);
    one_set(256, 255, -1);
    one_set(5, 5, 1);
    one_set(5, 5, -1);
    one_set(300, 300, 1);
    one_set(300, 300, -1);
    // zero in, zero out
    for (int i = 0; i < 64; i++) z[i] = 0;
    n_out = 0;
    epeak = 0;
    send(z);
    din_valid <= 1'b0;
    wait (exp_q.size() == 0);
    checks++;
    if (epeak != 0) begin failures++; $display("zero block does not give zero"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
