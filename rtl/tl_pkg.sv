// Shared constants and helpers for the threshold-logic Modular Computer blocks.
//
// The L1 general-logic character is 8 bits wide and up to four of them form a
// 32-bit word; the C inputs give a character its byte position. The shift
// count is the five lines d0..d4, d0 being the most significant: d0,d1 count
// whole bytes and d2..d4 count bits. The microinstruction lines m and LS pick
// the operation: m=1 rotates left, m=0 with LS=1 shifts left, m=0 with LS=0
// shifts right, and m=0, LS=0 with a zero count gates the complement of the
// input bus to the output bus. The encoding of m and LS is read from the bit
// mask and byte mask circuit inputs; the numbering of d is this design's choice.
package tl_pkg;

  // Operation decoded from the m and LS microinstruction lines.
  typedef enum logic [1:0] {
    OP_ROTATE      = 2'd0,
    OP_SHIFT_LEFT  = 2'd1,
    OP_SHIFT_RIGHT = 2'd2
  } l1_op_e;

  function automatic l1_op_e l1_decode_op(input logic m, input logic ls);
    if (m)       return OP_ROTATE;
    else if (ls) return OP_SHIFT_LEFT;
    else         return OP_SHIFT_RIGHT;
  endfunction

endpackage
