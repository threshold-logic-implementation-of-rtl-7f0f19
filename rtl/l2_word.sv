// Four L2 arithmetic characters chained into a 32-bit adder.
//
// Character j holds bits 8j..8j+7 of the A and B registers and adds them
// with its 8-stage look-ahead adder; its carry out C8 is the carry in of
// character j+1, so the carry ripples byte by byte from the initial carry
// to bit 32 (the 32-bit path whose delay the original design quotes). The
// K1/K2 controls and the transfer lines are common to all four characters.
// The byte-serial chaining is this design's reading of a 32-bit word made
// of four 8-bit characters. Registers load on the rising clk edge; the sum
// is combinational.
module l2_word (
  input  logic        clk,
  input  logic [31:0] data_in,
  input  logic        xfer_a,
  input  logic        xfer_b,
  input  logic        k1,
  input  logic        k2,
  input  logic        cin,
  output logic [31:0] a_q,
  output logic [31:0] b_q,
  output logic [31:0] sum,
  output logic        cout
);
  logic [4:0] carry;

  assign carry[0] = cin;
  assign cout     = carry[4];

  for (genvar j = 0; j < 4; j++) begin : g_char
    l2_character u_char (
      .clk, .data_in(data_in[8*j +: 8]), .xfer_a, .xfer_b, .k1, .k2,
      .cin(carry[j]), .a_q(a_q[8*j +: 8]), .b_q(b_q[8*j +: 8]),
      .sum(sum[8*j +: 8]), .cout(carry[j+1])
    );
  end
endmodule
