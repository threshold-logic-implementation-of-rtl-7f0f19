// L1 byte decoder and C decoder (one circuit, used twice).
//
// A two-line binary input becomes a one-of-four output. As the byte decoder
// it decodes d0,d1, the whole-byte part of the shift count; as the C decoder
// it decodes c0,c1, the byte position of this character in the word
// (00 = bits 1-8 ... 11 = bits 25-32). Combinational.
module l1_decoder_2to4 (
  input  logic [1:0] a,   // {a0, a1}, a0 most significant
  output logic [3:0] y    // y[i] high when a == i
);
  always_comb begin
    y = '0;
    y[a] = 1'b1;
  end
endmodule
