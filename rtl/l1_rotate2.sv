// L1 2nd rotate: byte rotation and gating onto the output bus.
//
// Each output bit chooses one of four 8-bit buses: RI1 is this character's own
// 1st-rotate output, RI2..RI4 are the 1st-rotate outputs of the characters
// one, two and three byte positions below (wired outside the character), so
// select line k rotates the word left by k bytes. The mask line blanks the
// whole byte and overrides the selects. When no select line is high and the
// mask is low, the complement of RI1 goes to the output bus: this is the
// complement operation. Combinational.
module l1_rotate2 (
  input  logic [3:0][7:0] ri,   // ri[0] = RI1 ... ri[3] = RI4
  input  logic [3:0]      sel,
  input  logic            mask,
  output logic [7:0]      out_bus
);
  logic [7:0] picked;

  tl_switch #(.N(4), .W(8)) u_sw (.x(ri), .k(sel), .y(picked));

  always_comb begin
    if (mask)        out_bus = '0;
    else if (|sel)   out_bus = picked;
    else             out_bus = ~ri[0];
  end
endmodule
