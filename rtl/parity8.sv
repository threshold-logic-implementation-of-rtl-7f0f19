// 8-bit parity circuit built from five threshold gates.
//
// Four gates see all eight inputs with unit weights and thresholds 2, 4, 6
// and 8; each feeds its inverted output, with weight 2, into a fifth gate
// that also sees the eight inputs and has threshold 9. With s inputs high the
// fifth gate sums s + 2 * (number of even thresholds above s), which reaches 9
// exactly when s is odd, so the output is 1 for an odd number of ones (the
// exclusive-or of the inputs). Gate weights and thresholds are those of the
// minimum-component parity circuit. Combinational; four stage delays in the
// original circuit.
module parity8 (
  input  logic [7:0] x,
  output logic       parity
);
  logic [3:0] level_n;
  logic [3:0] unused_level;
  logic       unused_parity_n;

  for (genvar g = 0; g < 4; g++) begin : g_level
    tl_threshold_gate #(.N(8), .T(2 * (g + 1)), .WEIGHTS({8{4'd1}})) u_gate (
      .x(x), .y(unused_level[g]), .y_n(level_n[g])
    );
  end

  tl_threshold_gate #(
    .N(12), .T(9), .WEIGHTS({{4{4'd2}}, {8{4'd1}}})
  ) u_out (
    .x({level_n, x}), .y(parity), .y_n(unused_parity_n)
  );
endmodule
