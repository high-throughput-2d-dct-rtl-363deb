// tb_coef_mult: checks the configurable hardwired multiplier for the three
// configurations the transform uses ({1 or T2}, {T5 or T1}, {C4 or 1}):
// p = round(d_i * COEF / 2^11) +/- d_j, computed here with integer arithmetic
// from the coefficient values, must appear exactly two enabled ticks after
// the operands.  ce is toggled to check that the pipeline holds when disabled.
`timescale 1ns/1ps
module tb_coef_mult;
  import dct_pkg::*;

  logic clk = 1'b0, ce = 1'b0;
  logic sel_b [3];
  word_t di [3], dj [3], p [3];
  logic add_en [3], neg_j [3];

  coef_mult #(.COEF_A(COEF_ONE), .COEF_B(COEF_T2)) u0 (.clk, .ce, .sel_b(sel_b[0]), .di(di[0]), .dj(dj[0]), .add_en(add_en[0]), .neg_j(neg_j[0]), .p(p[0]));
  coef_mult #(.COEF_A(COEF_T5), .COEF_B(COEF_T1))  u1 (.clk, .ce, .sel_b(sel_b[1]), .di(di[1]), .dj(dj[1]), .add_en(add_en[1]), .neg_j(neg_j[1]), .p(p[1]));
  coef_mult #(.COEF_A(COEF_C4), .COEF_B(COEF_ONE)) u2 (.clk, .ce, .sel_b(sel_b[2]), .di(di[2]), .dj(dj[2]), .add_en(add_en[2]), .neg_j(neg_j[2]), .p(p[2]));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint exp_q [3][$];

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint model(input int u, input logic sb, input longint a, input longint b,
                                   input logic ae, input logic nj);
    longint ca [3] = '{2048, 3065, 1448};
    longint cb [3] = '{848, 407, 2048};
    longint c, pr;
    c  = sb ? cb[u] : ca[u];
    pr = (a * c + 1024) >>> 11;   // floor((a*c + 1024) / 2048)
    if (ae) pr = nj ? pr - b : pr + b;
    return pr;
  endfunction

  int n_ops = 0;
  initial begin
    // fill the pipeline with known values
    for (int u = 0; u < 3; u++) begin
      di[u] = '0; dj[u] = '0; sel_b[u] = 1'b0; add_en[u] = 1'b0; neg_j[u] = 1'b0;
    end
    ce = 1'b1;
    repeat (3) @(posedge clk);
    for (int n = 0; n < 3000; n++) begin
      // drive new operands and, on enabled ticks, remember the expected result
      @(negedge clk);
      ce = ($urandom % 4 != 0);
      for (int u = 0; u < 3; u++) begin
        di[u]     = word_t'(int'($urandom % 200001) - 100000);
        dj[u]     = word_t'(int'($urandom % 200001) - 100000);
        sel_b[u]  = 1'($urandom);
        add_en[u] = (u == 2) ? 1'b0 : 1'b1;
        neg_j[u]  = 1'($urandom);
        if (ce) exp_q[u].push_back(model(u, sel_b[u], longint'(di[u]), longint'(dj[u]), add_en[u], neg_j[u]));
      end
      if (ce) n_ops++;
      // after this edge p holds the result of the previous enabled operands
      @(posedge clk);
      #1;
      if (ce && n_ops >= 2) begin
        for (int u = 0; u < 3; u++) begin
          longint e;
          e = exp_q[u].pop_front();
          checks++;
          if (longint'(p[u]) != e) begin
            failures++;
            if (failures < 10) $display("unit %0d op %0d: got %0d exp %0d", u, n_ops, p[u], e);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
