// L1 general-logic character: one 8-bit slice of the rotate/shift unit.
//
// The decode half turns the shift count (d0..d4), the character position
// (c0,c1) and the m/LS microinstruction lines into select and mask lines;
// the logic half rotates the input bus by 0-7 bits (1st rotate, using IR+ from
// the next lower character), then by 0-3 bytes (2nd rotate, using the 1st
// rotate outputs of the other three characters on RI2..RI4), blanks shifted-
// out bits and gates the result, or its complement, onto the output bus. The
// output bus also feeds the L register and incrementer. The rotate path is
// combinational, one pass for any count from 1 to 31; only the L register is
// clocked. Block structure follows the character's block diagram.
module l1_character (
  input  logic            clk,
  // microinstruction
  input  logic [1:0]      d_byte,      // {d0, d1}
  input  logic [2:0]      d_bit,       // {d2, d3, d4}
  input  logic            m,
  input  logic            ls,
  input  logic [1:0]      c,           // {c0, c1}: byte position of this character
  // data
  input  logic [7:0]      ib,          // input bus
  input  logic [6:0]      ir_in,       // IR+ from the next lower character
  output logic [6:0]      ir_out,      // IR- to the next higher character
  output logic [7:0]      rot1_out,    // 1st rotate output (RI1 of this character)
  input  logic [2:0][7:0] ri_ext,      // RI2..RI4 from the other characters
  output logic [7:0]      out_bus,
  // L register and incrementer
  input  logic            l_dest,
  input  logic            reset_l_n,
  input  logic            l_select,
  input  logic            incr_select,
  input  logic            carry_in,
  output logic [7:0]      l_q,
  output logic [7:0]      l_out,
  output logic            carry_out
);
  logic [7:0] bit_line, rot1_sel;
  logic [6:0] bit_mask_lines;
  logic [3:0] byte_line, c_line, byte_sel;
  logic       lsb_to_msb, msb_to_lsb, byte_mask;

  l1_bit_decoder  u_bit_dec  (.d_bit, .line(bit_line), .bit_mask(bit_mask_lines));
  l1_decoder_2to4 u_byte_dec (.a(d_byte), .y(byte_line));
  l1_decoder_2to4 u_c_dec    (.a(c), .y(c_line));
  l1_rot1_select  u_rot1_sel (.line(bit_line), .m, .ls, .sel(rot1_sel));
  l1_bit_mask     u_bit_mask (.m, .ls, .c0(c_line[0]), .lsb_to_msb, .msb_to_lsb);
  l1_byte_mask    u_byte_mask(.byte_line, .c_line, .m, .ls, .mask(byte_mask));
  l1_byte_select  u_byte_sel (.byte_line, .bit_zero(bit_line[0]), .m, .ls, .sel(byte_sel));

  l1_rotate1 u_rot1 (
    .ib, .ir_in, .sel(rot1_sel), .bit_mask(bit_mask_lines),
    .lsb_to_msb, .msb_to_lsb, .rot_out(rot1_out), .ir_out
  );

  l1_rotate2 u_rot2 (
    .ri({ri_ext, rot1_out}), .sel(byte_sel), .mask(byte_mask), .out_bus
  );

  l1_lreg_incr u_lreg (
    .clk, .l_in(out_bus), .l_dest, .reset_l_n, .l_select, .incr_select,
    .carry_in, .l_q, .out(l_out), .carry_out
  );
endmodule
