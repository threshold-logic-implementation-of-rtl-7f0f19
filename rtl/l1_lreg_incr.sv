// L1 L register and incrementer (8 bits).
//
// The L register takes the output bus when L DEST is high at a clock edge and
// is cleared by RESET L (active low). The incrementer adds CARRY IN to the
// register: each stage has a (1,1; T=2) threshold gate for the carry and a
// gate of weights (1,1,2; T=3), fed by the L bit, the carry and the inverted
// carry gate, for the exclusive-or; the carry ripples from stage to stage and
// leaves as CARRY OUT. The output lines follow the control table of the
// circuit: L SELECT 0 with INCR SELECT 1 gives the incremented value, L
// SELECT 1 with INCR SELECT 0 gives the register, L SELECT 1 with INCR
// SELECT 1 gives 0; the untabulated combination 0,0 also gives 0 here.
// Register updates on the rising clk edge; the outputs are combinational.
module l1_lreg_incr (
  input  logic       clk,
  input  logic [7:0] l_in,        // from the output bus
  input  logic       l_dest,      // load the L register
  input  logic       reset_l_n,   // clear the L register (active low)
  input  logic       l_select,
  input  logic       incr_select,
  input  logic       carry_in,
  output logic [7:0] l_q,         // L register contents
  output logic [7:0] out,         // to the input bus
  output logic       carry_out
);
  logic [8:0] carry;
  logic [7:0] sum, carry_n;

  tl_gateable_ff #(.W(8)) u_lreg (
    .clk, .gate(l_dest), .d(l_in), .set(1'b0), .reset(~reset_l_n), .q(l_q)
  );

  assign carry[0] = carry_in;
  for (genvar i = 0; i < 8; i++) begin : g_stage
    logic unused_y_n;
    tl_threshold_gate #(.N(2), .T(2), .WEIGHTS({4'd1, 4'd1})) u_carry (
      .x({carry[i], l_q[i]}), .y(carry[i+1]), .y_n(carry_n[i])
    );
    tl_threshold_gate #(.N(3), .T(3), .WEIGHTS({4'd2, 4'd1, 4'd1})) u_sum (
      .x({carry_n[i], carry[i], l_q[i]}), .y(sum[i]), .y_n(unused_y_n)
    );
  end
  assign carry_out = carry[8];

  always_comb begin
    unique case ({l_select, incr_select})
      2'b01:   out = sum;
      2'b10:   out = l_q;
      default: out = '0;
    endcase
  end
endmodule
