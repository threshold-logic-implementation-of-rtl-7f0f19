// L1 bit decoder.
//
// Decodes the bit part of the shift count, the lines d2..d4 (d2 most
// significant), into two sets of outputs. The one-of-eight lines pick the
// rotation of the 1st rotate; the seven bit-mask lines are a thermometer code,
// line j high when the bit count exceeds j, and tell the 1st rotate how many
// bits to blank in a shift. The thermometer coding is this design's reading of
// "the number of bits that are forced to 0 is determined by the bit decoder".
// Combinational.
module l1_bit_decoder (
  input  logic [2:0] d_bit,     // {d2, d3, d4}
  output logic [7:0] line,      // one-of-eight decode
  output logic [6:0] bit_mask   // bit_mask[j] = (count > j)
);
  always_comb begin
    line = '0;
    line[d_bit] = 1'b1;
    for (int j = 0; j < 7; j++)
      bit_mask[j] = (d_bit > 3'(j));
  end
endmodule
