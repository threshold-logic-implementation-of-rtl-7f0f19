// L1 byte select.
//
// Drives the four select lines of the 2nd rotate, which rotates the word left
// by whole bytes. For a rotate or a shift left the byte decoder lines pass
// straight through. For a shift right the byte count is replaced by that of
// the two's complement of the whole five-bit count, (4 - B - (bits != 0)) mod
// 4; this needs the bit decoder's line 0 as an extra input, which is this
// design's addition so that right shifts by whole bytes come out right. For
// the complement operation (count 0, m = 0, LS = 0) all four lines are 0.
// Combinational.
module l1_byte_select
  import tl_pkg::*;
(
  input  logic [3:0] byte_line,   // B0..B3 from the byte decoder
  input  logic       bit_zero,    // bit decoder line 0: bit count is 0
  input  logic       m,
  input  logic       ls,
  output logic [3:0] sel
);
  logic [1:0] b, neg;

  always_comb begin
    b = '0;
    for (int i = 0; i < 4; i++)
      if (byte_line[i]) b = 2'(i);
    neg = 2'(2'd0 - b - {1'b0, ~bit_zero});
    sel = '0;
    if (l1_decode_op(m, ls) != OP_SHIFT_RIGHT)
      sel = byte_line;
    else if (!(byte_line[0] && bit_zero))
      sel[neg] = 1'b1;
  end
endmodule
