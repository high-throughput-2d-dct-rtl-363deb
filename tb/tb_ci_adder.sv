// tb_ci_adder: checks the carry-increment adder against integer addition for
// directed carry-chain cases (all ones plus one, block boundaries) and random
// operands, at the data-path width and at an odd width whose last block is
// partial.
`timescale 1ns/1ps
module tb_ci_adder;
  logic [19:0] a20, b20, s20;
  logic        c20, ci20;
  logic [13:0] a14, b14, s14;
  logic        c14, ci14;

  ci_adder #(.W(20), .BLK(4)) dut20 (.a(a20), .b(b20), .cin(ci20), .s(s20), .cout(c20));
  ci_adder #(.W(14), .BLK(4)) dut14 (.a(a14), .b(b14), .cin(ci14), .s(s14), .cout(c14));

  int checks = 0, failures = 0;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try20(input logic [19:0] a, input logic [19:0] b, input logic ci);
    logic [20:0] r;
    a20 = a; b20 = b; ci20 = ci;
    #1;
    r = {1'b0, a} + {1'b0, b} + 21'(ci);
    checks++;
    if ({c20, s20} !== r) begin
      failures++;
      if (failures < 10) $display("20b: %h + %h + %0d = %h, got %h", a, b, ci, r, {c20, s20});
    end
  endtask

  task automatic try14(input logic [13:0] a, input logic [13:0] b, input logic ci);
    logic [14:0] r;
    a14 = a; b14 = b; ci14 = ci;
    #1;
    r = {1'b0, a} + {1'b0, b} + 15'(ci);
    checks++;
    if ({c14, s14} !== r) begin
      failures++;
      if (failures < 10) $display("14b: %h + %h + %0d = %h, got %h", a, b, ci, r, {c14, s14});
    end
  endtask

  initial begin
    try20('1, 20'd0, 1'b1);
    try20('1, 20'd1, 1'b0);
    try20('1, '1, 1'b1);
    try20(20'h0000F, 20'h00001, 1'b0);
    try20(20'h000FF, 20'h00000, 1'b1);
    try20(20'h7FFFF, 20'h00001, 1'b0);
    for (int i = 0; i < 20; i++) try20(20'((1 << i) - 1), 20'd0, 1'b1);
    for (int i = 0; i < 5000; i++) try20(20'($urandom), 20'($urandom), 1'($urandom));
    try14('1, 14'd0, 1'b1);
    for (int i = 0; i < 14; i++) try14(14'((1 << i) - 1), 14'd1, 1'b0);
    for (int i = 0; i < 5000; i++) try14(14'($urandom), 14'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
