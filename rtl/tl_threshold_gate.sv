// Weighted threshold gate of the current-switch family.
//
// Each input steers a current of WEIGHT units into a common summing resistor;
// the output is 1 when the summed weight of the high inputs reaches the
// threshold T, and the complementary output is always available, as in the
// general gate of the current-switch family. OR'ing inputs of one switch are
// modelled by the caller OR'ing signals before they enter the gate.
// Combinational, no clock. WEIGHTS packs one 4-bit weight per input, input 0
// in the low nibble. The default is the (1,1,1; T=2) majority gate.
module tl_threshold_gate #(
  parameter int unsigned N = 3,
  parameter int unsigned T = 2,
  parameter logic [4*N-1:0] WEIGHTS = {N{4'd1}}
) (
  input  logic [N-1:0] x,
  output logic         y,
  output logic         y_n
);
  logic [7:0] sum;

  always_comb begin
    sum = '0;
    for (int i = 0; i < N; i++)
      if (x[i]) sum = sum + 8'(WEIGHTS[4*i +: 4]);
  end

  assign y   = (sum >= 8'(T));
  assign y_n = ~y;
endmodule
