// L1 1st rotate: bit rotation within the word, 0 to 7 places.
//
// Eight switches, one per output bit, each choosing one of fifteen data lines:
// the character's own input bus IB (8 bits) and IR+, the upper seven bits of
// the input bus of the next lower character. With select line k high, output
// bit i takes window bit 7+i-k, where the window is {IB, IR+}; so the four
// characters together rotate the 32-bit word left by k. The character sends
// its own IB[7:1] on IR- for the character above. A mask command overrides
// the select lines and forces up to seven outputs to 0: from the LSB upward
// (shift left) or from the MSB downward (shift right), as many bits as the
// bit decoder's mask lines say. Combinational.
module l1_rotate1 (
  input  logic [7:0] ib,          // input bus of this character
  input  logic [6:0] ir_in,       // IR+: IB[7:1] of the next lower character
  input  logic [7:0] sel,         // one-hot rotate amount
  input  logic [6:0] bit_mask,    // thermometer: number of bits to blank
  input  logic       lsb_to_msb,  // blank from bit 0 upward
  input  logic       msb_to_lsb,  // blank from bit 7 downward
  output logic [7:0] rot_out,
  output logic [6:0] ir_out       // IR-: to the next higher character
);
  logic [14:0] window;
  logic [7:0]  blank;

  assign window = {ib, ir_in};
  assign ir_out = ib[7:1];

  always_comb begin
    blank = '0;
    for (int j = 0; j < 7; j++) begin
      if (lsb_to_msb && bit_mask[j]) blank[j]     = 1'b1;
      if (msb_to_lsb && bit_mask[j]) blank[7 - j] = 1'b1;
    end
  end

  for (genvar i = 0; i < 8; i++) begin : g_bit
    logic [7:0] taps;
    logic       picked;
    for (genvar k = 0; k < 8; k++) begin : g_tap
      assign taps[k] = window[7 + i - k];
    end
    tl_switch #(.N(8), .W(1)) u_sw (.x(taps), .k(sel), .y(picked));
    assign rot_out[i] = picked & ~blank[i];
  end
endmodule
