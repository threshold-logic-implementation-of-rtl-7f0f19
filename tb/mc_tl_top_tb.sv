// End-to-end testbench for mc_tl_top at its default parameters.
//
// Drives all four pieces at once with random stimulus, one operation per
// clock, and checks every output against models kept here. It counts how
// often each mechanism occurs and fails if one never does: L1 rotate, shift
// left, shift right and complement, partial-byte (bit) masking, whole-byte
// masking, L register load / increment / increment carry out / reset,
// odd and even parity, each CAU switch input, search-mode transfers into
// the CSR with set and reset, counter up, down, wrap in both directions,
// set and reset, and the 32-bit L2 add, subtract, exclusive-or and transfer
// operations with a carry out.
module mc_tl_top_tb;
  import l1_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  typedef enum int {
    EV_ROTATE, EV_SHL, EV_SHR, EV_COMPLEMENT, EV_BIT_MASK, EV_BYTE_MASK,
    EV_L_LOAD, EV_L_INCR, EV_L_CARRY, EV_L_RESET,
    EV_PAR_ODD, EV_PAR_EVEN, EV_SW0, EV_SW1, EV_SW2,
    EV_SML_XFER, EV_SML_SET, EV_SML_RESET,
    EV_CNT_UP, EV_CNT_DOWN, EV_CNT_WRAP_UP, EV_CNT_WRAP_DOWN, EV_CNT_SET, EV_CNT_RESET,
    EV_L2_ADD, EV_L2_SUB, EV_L2_XOR, EV_L2_XFER, EV_L2_CARRY,
    EV_COUNT
  } event_e;
  int seen [EV_COUNT];

  // DUT ports
  logic [4:0]  l1_d;
  logic        l1_m, l1_ls, l1_l_dest, l1_reset_l_n, l1_l_select, l1_incr_select, l1_carry_in;
  logic [31:0] l1_ib, l1_out_bus, l1_l_q, l1_l_out;
  logic        l1_carry_out;
  logic [7:0]  par_x;
  logic        par_out;
  logic [2:0]  sw_cu_q, sw_csr_sel;
  logic        sw_out;
  logic [3:0]  sml_x, sml_k;
  logic        sml_sr_clock, sml_sr_reset, sml_csr_clock, sml_csr_set, sml_csr_reset;
  logic        sml_stored, sml_csr;
  logic        cnt_up, cnt_down, cnt_cascade_in, cnt_set, cnt_reset, cnt_carry_out;
  logic [7:0]  cnt_q;
  logic [31:0] l2_data_in, l2_a_q, l2_b_q, l2_sum;
  logic        l2_xfer_a, l2_xfer_b, l2_k1, l2_k2, l2_cin, l2_cout;

  mc_tl_top dut (.*);

  // models
  logic [31:0] m_l;
  logic        m_stored, m_csr;
  logic [7:0]  m_cnt;
  logic [31:0] m_a, m_b;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    // reset everything that holds state
    {l1_d, l1_m, l1_ls, l1_l_dest, l1_l_select, l1_incr_select, l1_carry_in} = '0;
    l1_reset_l_n = 0; l1_ib = 0; par_x = 0; sw_cu_q = 0; sw_csr_sel = 0;
    sml_x = 0; sml_k = 0; sml_sr_clock = 0; sml_csr_clock = 0; sml_csr_set = 0;
    sml_sr_reset = 1; sml_csr_reset = 1;
    cnt_up = 0; cnt_down = 0; cnt_cascade_in = 1; cnt_set = 0; cnt_reset = 1;
    l2_data_in = 0; l2_xfer_a = 1; l2_xfer_b = 1; l2_k1 = 0; l2_k2 = 0; l2_cin = 0;
    @(posedge clk); #1;
    m_l = 0; m_stored = 0; m_csr = 0; m_cnt = 0; m_a = 0; m_b = 0;
    l1_reset_l_n = 1; sml_sr_reset = 0; sml_csr_reset = 0; cnt_reset = 0;
    l2_xfer_a = 0; l2_xfer_b = 0;

    for (int t = 0; t < 6000; t++) begin
      int op, n, l2op, r;
      logic [31:0] e32;
      logic [32:0] inc;
      logic        sel_bit;

      // ---------- L1 word: one operation on the output bus
      op = $urandom % 3;
      n  = (t % 97 == 0) ? 0 : $urandom % 32;
      l1_m = (op == 0); l1_ls = (op == 1); l1_d = 5'(n);
      l1_ib = $urandom;
      l1_l_dest = ($urandom % 4) == 0;
      l1_reset_l_n = ($urandom % 50) != 0;
      r = $urandom % 3;
      l1_l_select = (r != 0); l1_incr_select = (r != 2);
      l1_carry_in = (r == 0) ? 1'($urandom) : 1'b0;
      // ---------- parity
      par_x = 8'($urandom);
      // ---------- CAU switch
      sw_cu_q = 3'($urandom);
      sw_csr_sel = 3'(1 << ($urandom % 3));
      // ---------- search mode logic
      sml_x = 4'($urandom); sml_k = 4'(1 << ($urandom % 4));
      sml_sr_clock = 1'($urandom); sml_csr_clock = 1'($urandom);
      sml_sr_reset = ($urandom % 20) == 0;
      sml_csr_set = ($urandom % 20) == 0;
      sml_csr_reset = ($urandom % 20) == 0;
      // ---------- counter: long runs up then down so that it wraps
      r = $urandom % 100;
      cnt_up   = ((t / 600) % 2 == 0) ? (r < 90) : (r < 5);
      cnt_down = ((t / 600) % 2 == 1) ? (r < 90) : (r >= 95);
      cnt_cascade_in = ($urandom % 8) != 0;
      cnt_set = ($urandom % 1000) == 0;
      cnt_reset = ($urandom % 1000) == 0;
      // ---------- L2: operand loads alternate with operations
      l2op = $urandom % 4;
      l2_xfer_a = 0; l2_xfer_b = 0;
      l2_data_in = (t % 50 == 7) ? 32'hffff_ffff : $urandom;
      if (t % 3 == 0) l2_xfer_a = 1;
      else if (t % 3 == 1) l2_xfer_b = 1;
      l2_k1 = (l2op == 3); l2_k2 = (l2op >= 2); l2_cin = (l2op == 1) ? 1'b1 : 1'($urandom);

      #1;
      // ---- combinational checks before the clock
      e32 = l1_ref(l1_ib, n, l1_m, l1_ls);
      check(l1_out_bus === e32, "L1 output bus");
      if (l1_m) seen[EV_ROTATE]++;
      else if (l1_ls) seen[EV_SHL]++;
      else if (n == 0) seen[EV_COMPLEMENT]++;
      else seen[EV_SHR]++;
      if (!l1_m && n % 8 != 0) seen[EV_BIT_MASK]++;
      if (!l1_m && n >= 8) seen[EV_BYTE_MASK]++;
      inc = 33'(m_l) + 33'(l1_carry_in);
      if (!l1_l_select && l1_incr_select) begin
        check(l1_l_out === inc[31:0], "L increment");
        check(l1_carry_out === inc[32], "L carry out");
        if (l1_carry_in) seen[EV_L_INCR]++;
        if (l1_carry_out) seen[EV_L_CARRY]++;
      end else if (l1_l_select && !l1_incr_select)
        check(l1_l_out === m_l, "L register out");
      else
        check(l1_l_out === 32'd0, "L zero out");

      check(par_out === ^par_x, "parity");
      if (^par_x) seen[EV_PAR_ODD]++; else seen[EV_PAR_EVEN]++;

      for (int i = 0; i < 3; i++) if (sw_csr_sel[i]) begin
        check(sw_out === sw_cu_q[i], "CAU switch");
        seen[EV_SW0 + i]++;
      end

      check(cnt_carry_out === (cnt_cascade_in && ((cnt_up && !cnt_down && m_cnt == 8'hff) ||
                                                  (cnt_down && !cnt_up && m_cnt == 8'h00))),
            "counter look-ahead");

      case (l2op)
        0: begin check({l2_cout, l2_sum} === 33'(33'(m_a) + 33'(m_b) + 33'(l2_cin)), "L2 add");
                 seen[EV_L2_ADD]++; if (l2_cout) seen[EV_L2_CARRY]++; end
        1: begin check(l2_sum === 32'(m_a + m_b + 32'd1), "L2 subtract (A + ~B' + 1)");
                 seen[EV_L2_SUB]++; end
        2: begin check(l2_sum === ~(m_a ^ m_b), "L2 exclusive-or cell"); seen[EV_L2_XOR]++; end
        default: begin check(l2_sum === m_a, "L2 transfer A"); seen[EV_L2_XFER]++; end
      endcase

      // ---- clock and state updates
      sel_bit = 0;
      for (int i = 0; i < 4; i++) if (sml_k[i]) sel_bit = sml_x[i];
      @(posedge clk); #1;
      if (!l1_reset_l_n) begin m_l = 0; seen[EV_L_RESET]++; end
      else if (l1_l_dest) begin m_l = e32; seen[EV_L_LOAD]++; end
      check(l1_l_q === m_l, "L register");

      if (sml_csr_reset) begin m_csr = 0; seen[EV_SML_RESET]++; end
      else if (sml_csr_set) begin m_csr = 1; seen[EV_SML_SET]++; end
      else if (sml_csr_clock) begin m_csr = m_stored; seen[EV_SML_XFER]++; end
      if (sml_sr_reset) m_stored = 0;
      else if (sml_sr_clock) m_stored = sel_bit;
      check(sml_stored === m_stored, "SML storage register");
      check(sml_csr === m_csr, "SML CSR");

      if (cnt_reset) begin m_cnt = 0; seen[EV_CNT_RESET]++; end
      else if (cnt_set) begin m_cnt = 8'hff; seen[EV_CNT_SET]++; end
      else if (cnt_cascade_in && cnt_up && !cnt_down) begin
        if (m_cnt == 8'hff) seen[EV_CNT_WRAP_UP]++;
        m_cnt++; seen[EV_CNT_UP]++;
      end else if (cnt_cascade_in && cnt_down && !cnt_up) begin
        if (m_cnt == 8'h00) seen[EV_CNT_WRAP_DOWN]++;
        m_cnt--; seen[EV_CNT_DOWN]++;
      end
      check(cnt_q === m_cnt, "counter");

      if (l2_xfer_a) m_a = l2_data_in;
      if (l2_xfer_b) m_b = l2_data_in;
      check(l2_a_q === m_a && l2_b_q === m_b, "L2 registers");

      // load all ones into L now and then so the 32-bit carry out occurs
      if (t % 40 == 20) begin
        l1_m = 0; l1_ls = 0; l1_d = 0; l1_ib = 32'h0; l1_l_dest = 1; l1_reset_l_n = 1;
        // the other pieces hold during this extra clock
        cnt_up = 0; cnt_down = 0; cnt_set = 0; cnt_reset = 0;
        sml_sr_clock = 0; sml_sr_reset = 0; sml_csr_clock = 0; sml_csr_set = 0; sml_csr_reset = 0;
        l2_xfer_a = 0; l2_xfer_b = 0;
        @(posedge clk); #1;
        m_l = 32'hffff_ffff;
        l1_l_dest = 0;
        check(l1_l_q === m_l, "L register all ones (complement of 0)");
        seen[EV_L_LOAD]++; seen[EV_COMPLEMENT]++;
        l1_l_select = 0; l1_incr_select = 1; l1_carry_in = 1; #1;
        check(l1_l_out === 32'd0 && l1_carry_out === 1'b1, "L increment wrap");
        seen[EV_L_INCR]++; seen[EV_L_CARRY]++;
      end
    end

    for (int e = 0; e < int'(EV_COUNT); e++) begin
      event_e ev;
      ev = event_e'(e);
      $display("mechanism %-18s seen %0d", ev.name(), seen[e]);
      checks++;
      if (seen[e] == 0) begin failures++; $display("FAIL mechanism %s never happened", ev.name()); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
