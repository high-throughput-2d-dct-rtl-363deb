// tb_dct2d_top: end-to-end test of the 2-D DCT/IDCT processor at its default
// parameters.  Blocks are streamed row-wise (back to back, and with random
// idle cycles), results are compared with a double-precision reference
// (within +/-1 of the rounded exact value), the latency of every block sent
// without idle cycles is checked against LATENCY, and the mode is switched DCT -> IDCT -> DCT with
// the pipeline drained in between.  It counts how often each mechanism
// occurred: back-to-back blocks (transpose buffer written while read), input
// gaps, both buffer orientations, mode switches, output saturation.
`timescale 1ns/1ps
module tb_dct2d_top;
  import tb_dct_ref_pkg::*;
  import dct_pkg::*;

  localparam int LATENCY = 176;   // first input sample to first output sample

  logic clk = 1'b0, rst_n = 1'b0;
  mode_e mode = MODE_DCT;
  logic din_valid = 1'b0;
  logic [11:0] din = '0;
  logic dout_valid;
  logic [11:0] dout;

  dct2d_top dut (.clk, .rst_n, .mode, .din_valid, .din, .dout_valid, .dout);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // expected outputs (in output order) and start cycle of each block
  int     exp_q [$];
  longint start_q [$];
  bit     gap_q [$];      // block was sent with idle cycles
  int     n_out = 0, blocks_out = 0;
  int     n_b2b = 0, n_gap = 0, n_switch = 0, n_sat = 0, n_orient0 = 0, n_orient1 = 0;
  int     maxerr = 0;

  // watchdog
  initial begin
    #(4_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker
  always @(posedge clk) begin
    if (rst_n && dout_valid) begin
      int got, e, d;
      got = int'($signed(dout));
      if (exp_q.size() == 0) begin
        failures++;
        $display("unexpected output %0d", got);
      end else begin
        e = exp_q.pop_front();
        d = got - e;
        if (d < 0) d = -d;
        if (d > maxerr) maxerr = d;
        checks++;
        if (d > 1) begin
          failures++;
          if (failures < 10) $display("mismatch out %0d: got %0d exp %0d", n_out, got, e);
        end
      end
      if (n_out % 64 == 0) begin
        longint lat;
        lat = cyc - start_q.pop_front();
        checks++;
        if (!gap_q.pop_front() && lat != longint'(LATENCY)) begin
          failures++;
          $display("block %0d latency %0d, expected %0d", blocks_out, lat, LATENCY);
        end
      end
      n_out++;
      if (n_out % 64 == 0) blocks_out++;
    end
  end

  // count buffer orientation and back-to-back use of the transpose buffer
  always @(posedge clk) begin
    if (dut.ce2 && dut.u_tb.in_valid && dut.u_tb.wn == 5'd31) begin
      if (dut.u_tb.w_orient) n_orient1++; else n_orient0++;
    end
    if (dut.ce2 && dut.u_tb.in_valid && dut.u_tb.ract) n_b2b++;
  end

  task automatic send_block(input int s [64], input bit gaps);
    for (int n = 0; n < 64; n++) begin
      if (gaps && ($urandom % 4 == 0)) begin
        din_valid <= 1'b0;
        n_gap++;
        repeat (1 + $urandom % 3) @(posedge clk);
      end
      din_valid <= 1'b1;
      din <= 12'(s[n]);
      if (n == 0) begin
        start_q.push_back(cyc);
        gap_q.push_back(gaps);
      end
      @(posedge clk);
    end
  endtask

  // forward: send pixel block x (row-major), queue expected coefficients in
  // column-major reordered order
  task automatic dct_block(input iblk_t x, input bit gaps);
    rblk_t X;
    X = fdct(x);
    for (int c = 0; c < 8; c++)
      for (int p = 0; p < 8; p++)
        exp_q.push_back(clip(rnd(X[reorder(p)*8 + reorder(c)]), -2048, 2047));
    send_block(x, gaps);
  endtask

  // inverse: send coefficient block C (natural [u][v]) in reordered row-major
  // order, queue expected pixels column-major
  task automatic idct_block(input iblk_t C, input bit gaps);
    rblk_t x;
    int s [64];
    int v;
    x = idct(C);
    for (int c = 0; c < 8; c++)
      for (int p = 0; p < 8; p++) begin
        v = rnd(x[p*8 + c]);
        if (v < -256 || v > 255) n_sat++;
        exp_q.push_back(clip(v, -256, 255));
      end
    for (int n = 0; n < 64; n++) s[n] = C[reorder(n / 8) * 8 + reorder(n % 8)];
    send_block(s, gaps);
  endtask

  task automatic drain();
    din_valid <= 1'b0;
    wait (exp_q.size() == 0);
    repeat (20) @(posedge clk);
  endtask

  function automatic iblk_t rand_pix(input int lo, input int hi);
    iblk_t x;
    for (int i = 0; i < 64; i++) x[i] = lo + int'($urandom % (hi - lo + 1));
    return x;
  endfunction

  function automatic iblk_t coefs_of(input iblk_t x);
    rblk_t X;
    iblk_t C;
    X = fdct(x);
    for (int i = 0; i < 64; i++) C[i] = clip(rnd(X[i]), -2048, 2047);
    return C;
  endfunction

  initial begin
    iblk_t x, C;
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // forward DCT: extreme patterns, then random blocks back to back
    for (int i = 0; i < 64; i++) x[i] = 255;
    dct_block(x, 0);
    for (int i = 0; i < 64; i++) x[i] = ((i / 8 + i % 8) % 2) ? 255 : -256;
    dct_block(x, 0);
    for (int i = 0; i < 64; i++) x[i] = ((i / 8) % 2) ? -256 : 255;
    dct_block(x, 0);
    for (int b = 0; b < 12; b++) dct_block(rand_pix(-256, 255), 0);
    for (int b = 0; b < 4; b++) dct_block(rand_pix(-256, 255), 1);
    drain();

    // switch to inverse
    mode <= MODE_IDCT;
    n_switch++;
    @(posedge clk);
    for (int b = 0; b < 12; b++) idct_block(coefs_of(rand_pix(-256, 255)), 0);
    for (int b = 0; b < 4; b++) idct_block(coefs_of(rand_pix(-300, 300)), 1);
    for (int i = 0; i < 64; i++) C[i] = 0;
    C[0] = 2047;
    idct_block(C, 0);  // DC of 2047 -> 255.9: saturates
    C[0] = -2048;
    idct_block(C, 0);
    drain();

    // and back
    mode <= MODE_DCT;
    n_switch++;
    @(posedge clk);
    for (int b = 0; b < 4; b++) dct_block(rand_pix(-256, 255), 0);
    drain();

    $display("blocks=%0d back_to_back_writes=%0d gaps=%0d orient0=%0d orient1=%0d switches=%0d saturations=%0d max_abs_err=%0d",
             blocks_out, n_b2b, n_gap, n_orient0, n_orient1, n_switch, n_sat, maxerr);
    checks++; if (n_b2b == 0) begin failures++; $display("no back-to-back blocks"); end
    checks++; if (n_gap == 0) begin failures++; $display("no input gaps"); end
    checks++; if (n_orient0 == 0 || n_orient1 == 0) begin failures++; $display("one buffer orientation never used"); end
    checks++; if (n_switch < 2) begin failures++; $display("no mode switch"); end
    checks++; if (n_sat == 0) begin failures++; $display("no saturation"); end
    checks++; if (blocks_out != 41) begin failures++; $display("got %0d blocks", blocks_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
