// tb_transpose_buffer: writes random 8x8 blocks row by row (two words per
// Clk2 tick: row i, elements k and k+4) and checks that each block is read
// back column by column (column c, rows k and k+4), starting on the tick after its last
// write, for blocks sent back to back and with random idle ticks.
`timescale 1ns/1ps
module tb_transpose_buffer;
  import dct_pkg::*;

  localparam int NBLK = 40;
  logic clk = 1'b0, rst_n = 1'b0, ce2 = 1'b0;
  logic in_valid = 1'b0, out_valid;
  word_t in_e = '0, in_o = '0, out_e, out_o;

  transpose_buffer dut (.clk, .rst_n, .ce2, .in_valid, .in_e, .in_o, .out_valid, .out_e, .out_o);

  always #5 clk = ~clk;
  always @(posedge clk) ce2 <= rst_n ? !ce2 : 1'b0;

  int checks = 0, failures = 0;
  word_t blk_q [$][64];
  longint tick = 0, last_wr = 0;
  longint end_q [$];
  always @(posedge clk) if (ce2) tick <= tick + 1;

  initial begin
    #(1_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int rn = 0, nblk = 0;
  always @(posedge clk) begin
    if (rst_n && ce2 && out_valid) begin
      int c, k;
      c = rn / 4;
      k = rn % 4;
      if (rn == 0) begin
        checks++;
        if (tick != end_q.pop_front() + 2) begin
          failures++;
          $display("block %0d read-out does not start one tick after its last write", nblk);
        end
      end
      checks += 2;
      if (out_e !== blk_q[0][k*8 + c] || out_o !== blk_q[0][(k+4)*8 + c]) begin
        failures++;
        if (failures < 10) $display("blk %0d read %0d: got %0d %0d exp %0d %0d", nblk, rn, out_e, out_o,
                                    blk_q[0][k*8 + c], blk_q[0][(k+4)*8 + c]);
      end
      rn++;
      if (rn == 32) begin
        rn = 0;
        nblk++;
        void'(blk_q.pop_front());
      end
    end
  end

  initial begin
    word_t b [64];
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < NBLK; n++) begin
      for (int i = 0; i < 64; i++) b[i] = word_t'($urandom);
      blk_q.push_back(b);
      for (int t = 0; t < 32; t++) begin
        if (n >= NBLK / 2 && $urandom % 4 == 0) begin
          @(posedge clk iff !ce2);
          in_valid <= 1'b0;
          repeat (1 + $urandom % 3) @(posedge clk iff ce2);
        end
        @(posedge clk iff !ce2);
        in_valid <= 1'b1;
        in_e <= b[(t/4)*8 + t%4];
        in_o <= b[(t/4)*8 + t%4 + 4];
        @(posedge clk iff ce2);
        if (t == 31) end_q.push_back(tick);
      end
    end
    @(posedge clk iff !ce2);
    in_valid <= 1'b0;
    repeat (100) @(posedge clk);
    checks++;
    if (nblk != NBLK) begin
      failures++;
      $display("read %0d blocks of %0d", nblk, NBLK);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
