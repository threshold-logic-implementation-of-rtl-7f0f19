// L2 arithmetic character (8 bits).
//
// Two 8-bit storage registers, A and B (the sixteen register stages of the
// character), load from the data bus on their transfer lines. The 8-stage
// adder combines them under the K1/K2 controls: add (K1=K2=0), subtract
// (load the complement of B and set carry in), exclusive-or (K2=1, with the
// complement of A loaded) and transfer of A (K1=K2=1). The sum and the carry
// out of the byte are combinational outputs of the registers. The bus
// arrangement, one shared data bus, is this design's choice.
module l2_character (
  input  logic       clk,
  input  logic [7:0] data_in,
  input  logic       xfer_a,
  input  logic       xfer_b,
  input  logic       k1,
  input  logic       k2,
  input  logic       cin,
  output logic [7:0] a_q,
  output logic [7:0] b_q,
  output logic [7:0] sum,
  output logic       cout
);
  l2_storage_register #(.W(8)) u_a (.clk, .transfer(xfer_a), .data(data_in), .q(a_q));
  l2_storage_register #(.W(8)) u_b (.clk, .transfer(xfer_b), .data(data_in), .q(b_q));

  l2_adder8 u_add (.a(a_q), .b(b_q), .cin, .k1, .k2, .s(sum), .c8(cout));
endmodule
