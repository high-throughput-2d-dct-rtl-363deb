// transpose_buffer: 8x8 flip-flop transpose memory between the two 1-D
// processors, with simultaneous write and read.
//
// The first processor delivers a block row by row, two words per Clk2 tick:
// on write tick n (0..31) row i = n/4, elements k and k+4 (k = n%4).  The
// second processor needs it column by column in the same pair layout: on read
// tick n column c = n/4, rows k and k+4.  Each block is stored in the
// orientation opposite to the one before (row-major, then column-major, ...).
// With that alternation the two words written on tick n of a block go to
// exactly the two locations read on tick n of the previous block's read-out,
// so a single 64-word array suffices.  Read-out of a block starts on the tick
// after its last write and runs for 32 consecutive ticks; the next block may
// be written at the same time (a location is read before it is overwritten on
// the same tick).  Latency: last write to first read 1 tick.
module transpose_buffer
  import dct_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  ce2,
  input  logic  in_valid,
  input  word_t in_e,
  input  word_t in_o,
  output logic  out_valid,
  output word_t out_e,
  output word_t out_o
);
  word_t mem [64];
  logic [4:0] wn, rn;
  logic       w_orient, r_orient;   // orientation of the block being written / read
  logic       ract;

  // physical address of logical element (i, j) in orientation o
  function automatic logic [5:0] phys(input logic o, input logic [2:0] i, input logic [2:0] j);
    return o ? {j, i} : {i, j};
  endfunction

  logic [5:0] wa_e, wa_o, ra_e, ra_o;
  assign wa_e = phys(w_orient, wn[4:2], {1'b0, wn[1:0]});
  assign wa_o = phys(w_orient, wn[4:2], {1'b1, wn[1:0]});
  assign ra_e = phys(r_orient, {1'b0, rn[1:0]}, rn[4:2]);
  assign ra_o = phys(r_orient, {1'b1, rn[1:0]}, rn[4:2]);

  always_ff @(posedge clk) begin
    if (ce2 && in_valid) begin
      mem[wa_e] <= in_e;
      mem[wa_o] <= in_o;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wn        <= '0;
      rn        <= '0;
      w_orient       <= 1'b0;
      r_orient       <= 1'b0;
      ract      <= 1'b0;
      out_valid <= 1'b0;
      out_e     <= '0;
      out_o     <= '0;
    end else if (ce2) begin
      out_valid <= ract;
      out_e     <= mem[ra_e];
      out_o     <= mem[ra_o];
      if (ract) begin
        rn <= rn + 5'd1;
        if (rn == 5'd31) ract <= 1'b0;
      end
      if (in_valid) begin
        wn <= wn + 5'd1;
        if (wn == 5'd31) begin
          ract <= 1'b1;
          rn   <= '0;
          r_orient  <= w_orient;
          w_orient  <= !w_orient;
        end
      end
    end
  end

  // a block must not finish being written while the previous one is still
  // being read out in its first half (the read-out would be cut short)
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    (ce2 && in_valid && wn == 5'd31 && ract) |-> (rn == 5'd31));
endmodule
