// Configuration assignment unit (CAU) switch.
//
// Connects one of N_IN module outputs (CUiQ) to an output bus. Each input has
// one control line, the OR of the two configuration selection register (CSR)
// bits that assign it (CSR1+CSR2 for the first input, CSR3+CSR4 for the
// second, and so on); the output is the input whose control is high. It is
// the double-level switching circuit: module outputs on the upper switches,
// controls on the lower ones. The original circuit is drawn with two inputs, and
// three are used, so N_IN defaults to 3; the bus width W is this design's
// parameter (1 = a single switch, as in the original comparison). Combinational.
module cau_switch #(
  parameter int unsigned N_IN = 3,
  parameter int unsigned W    = 1
) (
  input  logic [N_IN-1:0][W-1:0] cu_q,     // module outputs CU1Q..CUnQ
  input  logic [N_IN-1:0]        csr_sel,  // OR'ed CSR pair for each input
  output logic [W-1:0]           out
);
  tl_switch #(.N(N_IN), .W(W)) u_sw (.x(cu_q), .k(csr_sel), .y(out));
endmodule
