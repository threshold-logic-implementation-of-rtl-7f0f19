// L1 byte mask generator.
//
// Blanks the whole output byte of a character when a shift moves every one of
// its bits out. With B the byte count (one-hot from the byte decoder) and
// the character's position C (one-hot from the C decoder), a shift left
// blanks positions below B (C0 with B not 0, C1 with B2 or B3, C2 with B3)
// and a shift right blanks positions with C+B of four or more (C1 with B3,
// C2 with B2 or B3, C3 with B not 0). These are the input pairings printed on
// the circuit. Rotates never mask. Combinational.
module l1_byte_mask (
  input  logic [3:0] byte_line,   // B0..B3
  input  logic [3:0] c_line,      // C0..C3
  input  logic       m,
  input  logic       ls,
  output logic       mask
);
  logic left_mask, right_mask;

  assign left_mask  = (c_line[0] & ~byte_line[0])
                    | (c_line[1] & (byte_line[2] | byte_line[3]))
                    | (c_line[2] & byte_line[3]);
  assign right_mask = (c_line[1] & byte_line[3])
                    | (c_line[2] & (byte_line[2] | byte_line[3]))
                    | (c_line[3] & ~byte_line[0]);

  assign mask = ~m & (ls ? left_mask : right_mask);
endmodule
