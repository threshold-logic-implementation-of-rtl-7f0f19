// L1 bit mask.
//
// Picks the character whose 1st-rotate output holds the partially shifted-out
// byte and the direction from which its bits are blanked. The circuit's
// printed inputs are m, LS and the C decoder's output 0: in a shift left the
// character at byte position 0 blanks from its LSB upward, in a shift right
// from its MSB downward; rotates and the complement blank nothing. How many
// bits are blanked comes from the bit decoder's mask lines. Combinational.
module l1_bit_mask (
  input  logic m,
  input  logic ls,
  input  logic c0,        // C decoder output 0: this character holds bits 1-8
  output logic lsb_to_msb,
  output logic msb_to_lsb
);
  assign lsb_to_msb = ~m &  ls & c0;
  assign msb_to_lsb = ~m & ~ls & c0;
endmodule
