// CAU search mode logic (SML), one bit path.
//
// Gates one of four inputs X1..X4, chosen by K1..K4, into a storage register,
// and from there into the configuration selection register (CSR), a
// master-slave flip-flop with set and reset. The storage register loads on
// its own CLOCK line (sr_clock) and has a RESET; the CSR loads from the
// storage register on its clock line (csr_clock) and has SET and RESET. Both
// are modelled as synchronous registers on clk whose clock lines act as load
// enables; reset wins over set. W bit paths side by side share the controls
// (W = 1 is the single bit path of the original design). The selection
// switch expects at most one of K1..K4 high at a time, which an assertion
// checks at every clock.
module cau_sml #(
  parameter int unsigned W = 1
) (
  input  logic               clk,
  input  logic [3:0][W-1:0]  x,
  input  logic [3:0]         k,
  input  logic               sr_clock,
  input  logic               sr_reset,
  input  logic               csr_clock,
  input  logic               csr_set,
  input  logic               csr_reset,
  output logic [W-1:0]       stored,     // storage register
  output logic [W-1:0]       csr         // configuration selection register
);
  logic [W-1:0] selected;

  tl_switch #(.N(4), .W(W)) u_sel (.x, .k, .y(selected));

  a_one_input: assert property (@(posedge clk) $onehot0(k))
    else $error("search mode logic: more than one of K1..K4 high");

  tl_gateable_ff #(.W(W)) u_store (
    .clk, .gate(sr_clock), .d(selected), .set(1'b0), .reset(sr_reset), .q(stored)
  );

  tl_gateable_ff #(.W(W)) u_csr (
    .clk, .gate(csr_clock), .d(stored), .set(csr_set), .reset(csr_reset), .q(csr)
  );
endmodule
