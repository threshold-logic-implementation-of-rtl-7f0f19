// L2 full adder cell: two threshold gates and two control inputs.
//
// The control K1 is OR'ed with the B input and K2 with the carry input C.
// A (1,1,1; T=2) majority gate gives the carry out Co; a second gate sees A,
// B and C again plus the inverted carry with weight 2 and threshold 3, which
// is the sum (odd parity of A, B, C), as in the parity circuit. Controls:
// K1=K2=0 adds (subtract by supplying the complement of B and carry in 1);
// K1=0, K2=1 forces the carry inputs high, giving the exclusive-or of A and
// B inverted (the exclusive-or itself when the complement of A is supplied);
// K1=K2=1 passes A to the sum output (transfer A). Combinational.
module l2_full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic k1,
  input  logic k2,
  output logic co,
  output logic so
);
  logic b_eff, c_eff, co_n, unused_so_n;

  assign b_eff = b | k1;
  assign c_eff = c | k2;

  tl_threshold_gate #(.N(3), .T(2), .WEIGHTS({4'd1, 4'd1, 4'd1})) u_carry (
    .x({c_eff, b_eff, a}), .y(co), .y_n(co_n)
  );

  tl_threshold_gate #(.N(4), .T(3), .WEIGHTS({4'd2, 4'd1, 4'd1, 4'd1})) u_sum (
    .x({co_n, c_eff, b_eff, a}), .y(so), .y_n(unused_so_n)
  );
endmodule
