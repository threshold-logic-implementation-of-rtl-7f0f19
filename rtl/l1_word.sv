// Four L1 characters joined into a 32-bit rotate, shift and complement unit.
//
// Character p sits at byte position p (its C inputs tied to p) and handles
// bits 8p..8p+7. Its IR+ lines carry IB[7:1] of character p-1 (mod 4), and
// its RI2, RI3, RI4 buses carry the 1st rotate outputs of characters p-1, p-2
// and p-3 (mod 4). With that wiring the word rotates left by the five-bit
// count {d0..d4}; shifts blank the bits moved out, a right shift being a left
// rotate by the two's complement of the count. The L registers of the four
// characters form a 32-bit register whose incrementer carry ripples from
// character 0 upward. The inter-character wiring is this design's choice;
// the original fixes only that up to four characters connect and which C
// code means which byte. Combinational except for the L register.
module l1_word (
  input  logic        clk,
  input  logic [4:0]  d,            // shift count {d0,d1,d2,d3,d4}
  input  logic        m,
  input  logic        ls,
  input  logic [31:0] ib,           // input bus
  output logic [31:0] out_bus,      // output bus
  input  logic        l_dest,
  input  logic        reset_l_n,
  input  logic        l_select,
  input  logic        incr_select,
  input  logic        carry_in,
  output logic [31:0] l_q,
  output logic [31:0] l_out,
  output logic        carry_out
);
  logic [3:0][7:0] rot1;
  logic [3:0][6:0] ir;
  logic [4:0]      carry;

  assign carry[0]  = carry_in;
  assign carry_out = carry[4];

  for (genvar p = 0; p < 4; p++) begin : g_char
    logic [2:0][7:0] ri_ext;
    for (genvar k = 1; k < 4; k++) begin : g_ri
      assign ri_ext[k-1] = rot1[(p + 4 - k) % 4];
    end

    l1_character u_char (
      .clk,
      .d_byte(d[4:3]), .d_bit(d[2:0]), .m, .ls, .c(2'(p)),
      .ib(ib[8*p +: 8]), .ir_in(ir[(p + 3) % 4]), .ir_out(ir[p]),
      .rot1_out(rot1[p]), .ri_ext, .out_bus(out_bus[8*p +: 8]),
      .l_dest, .reset_l_n, .l_select, .incr_select,
      .carry_in(carry[p]), .l_q(l_q[8*p +: 8]), .l_out(l_out[8*p +: 8]),
      .carry_out(carry[p+1])
    );
  end
endmodule
