// Double-level switching circuit (one-of-N selector).
//
// Data inputs X sit on the upper switches, control inputs K on the lower
// ones; the output is the X of whichever control is high, and 0 when none
// is. With several controls high the selected inputs are OR'ed, which is what
// the shared summing resistor does. Combinational; each of the N data inputs
// is W bits wide and shares its control across the bits.
module tl_switch #(
  parameter int unsigned N = 4,
  parameter int unsigned W = 1
) (
  input  logic [N-1:0][W-1:0] x,
  input  logic [N-1:0]        k,
  output logic [W-1:0]        y
);
  always_comb begin
    y = '0;
    for (int i = 0; i < N; i++)
      if (k[i]) y = y | x[i];
  end
endmodule
