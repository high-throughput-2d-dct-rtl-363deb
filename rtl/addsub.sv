// addsub: data-path adder/subtracter, y = a + b or a - b (sub = 1), built on
// the carry-increment adder (subtraction as a + ~b + 1).  Wraps modulo 2^DW.
// Purely combinational.
module addsub
  import dct_pkg::*;
(
  input  word_t a,
  input  word_t b,
  input  logic  sub,
  output word_t y
);
  logic [DW-1:0] bb;
  logic          co;
  assign bb = sub ? ~b : b;
  ci_adder #(.W(DW), .BLK(4)) u_add (.a(a), .b(bb), .cin(sub), .s(y), .cout(co));
  logic unused;
  assign unused = co;
endmodule
