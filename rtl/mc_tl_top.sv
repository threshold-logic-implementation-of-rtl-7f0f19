// Threshold-logic portions of a modular computer, side by side.
//
// Four independent pieces of the machine, each with its own ports:
//  - the L1 general-logic word: four L1 characters forming a 32-bit
//    single-pass rotate/shift/complement unit with the L register and
//    incrementer;
//  - the 8-bit parity circuit;
//  - the configuration assignment unit (CAU) logic: one module switch, one
//    search mode logic bit path and the 8-stage idle-time up/down counter;
//  - the L2 arithmetic unit: four L2 characters, each with A and B registers
//    and an 8-bit look-ahead adder, chained into a 32-bit adder.
// The pieces do not connect to each other; in the machine they sit in
// different units. All registers share clk.
module mc_tl_top (
  input  logic            clk,
  // L1 word
  input  logic [4:0]      l1_d,
  input  logic            l1_m,
  input  logic            l1_ls,
  input  logic [31:0]     l1_ib,
  output logic [31:0]     l1_out_bus,
  input  logic            l1_l_dest,
  input  logic            l1_reset_l_n,
  input  logic            l1_l_select,
  input  logic            l1_incr_select,
  input  logic            l1_carry_in,
  output logic [31:0]     l1_l_q,
  output logic [31:0]     l1_l_out,
  output logic            l1_carry_out,
  // parity circuit
  input  logic [7:0]      par_x,
  output logic            par_out,
  // CAU switch
  input  logic [2:0]      sw_cu_q,
  input  logic [2:0]      sw_csr_sel,
  output logic            sw_out,
  // CAU search mode logic
  input  logic [3:0]      sml_x,
  input  logic [3:0]      sml_k,
  input  logic            sml_sr_clock,
  input  logic            sml_sr_reset,
  input  logic            sml_csr_clock,
  input  logic            sml_csr_set,
  input  logic            sml_csr_reset,
  output logic            sml_stored,
  output logic            sml_csr,
  // CAU idle-time counter
  input  logic            cnt_up,
  input  logic            cnt_down,
  input  logic            cnt_cascade_in,
  input  logic            cnt_set,
  input  logic            cnt_reset,
  output logic [7:0]      cnt_q,
  output logic            cnt_carry_out,
  // L2 arithmetic word
  input  logic [31:0]     l2_data_in,
  input  logic            l2_xfer_a,
  input  logic            l2_xfer_b,
  input  logic            l2_k1,
  input  logic            l2_k2,
  input  logic            l2_cin,
  output logic [31:0]     l2_a_q,
  output logic [31:0]     l2_b_q,
  output logic [31:0]     l2_sum,
  output logic            l2_cout
);
  l1_word u_l1 (
    .clk, .d(l1_d), .m(l1_m), .ls(l1_ls), .ib(l1_ib), .out_bus(l1_out_bus),
    .l_dest(l1_l_dest), .reset_l_n(l1_reset_l_n), .l_select(l1_l_select),
    .incr_select(l1_incr_select), .carry_in(l1_carry_in),
    .l_q(l1_l_q), .l_out(l1_l_out), .carry_out(l1_carry_out)
  );

  parity8 u_parity (.x(par_x), .parity(par_out));

  cau_switch #(.N_IN(3), .W(1)) u_switch (
    .cu_q(sw_cu_q), .csr_sel(sw_csr_sel), .out(sw_out)
  );

  cau_sml #(.W(1)) u_sml (
    .clk, .x(sml_x), .k(sml_k), .sr_clock(sml_sr_clock), .sr_reset(sml_sr_reset),
    .csr_clock(sml_csr_clock), .csr_set(sml_csr_set), .csr_reset(sml_csr_reset),
    .stored(sml_stored), .csr(sml_csr)
  );

  cau_updown_counter #(.WIDTH(8)) u_counter (
    .clk, .count_up(cnt_up), .count_down(cnt_down), .cascade_in(cnt_cascade_in),
    .set(cnt_set), .reset(cnt_reset), .q(cnt_q), .carry_out(cnt_carry_out)
  );

  l2_word u_l2 (
    .clk, .data_in(l2_data_in), .xfer_a(l2_xfer_a), .xfer_b(l2_xfer_b),
    .k1(l2_k1), .k2(l2_k2), .cin(l2_cin), .a_q(l2_a_q), .b_q(l2_b_q),
    .sum(l2_sum), .cout(l2_cout)
  );
endmodule
