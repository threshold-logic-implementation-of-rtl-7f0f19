// L2 storage register.
//
// Each stage is the gateable threshold flip-flop with one data input, one
// output and a transfer line common to the whole register; there is no
// direct set or reset. A high transfer line at a rising clk edge loads the
// data (the transparent phase of the original latch is replaced by a clock
// edge here). W defaults to one 8-bit register; the L2 character uses two.
module l2_storage_register #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         transfer,
  input  logic [W-1:0] data,
  output logic [W-1:0] q
);
  tl_gateable_ff #(.W(W)) u_ff (
    .clk, .gate(transfer), .d(data), .set(1'b0), .reset(1'b0), .q
  );
endmodule
