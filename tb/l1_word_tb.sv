// Testbench for l1_word: every count and operation on random and edge
// data against the reference, then the 32-bit L register: load from the
// output bus, increment with the carry rippling across all four
// characters (including the all-ones wrap with carry out), register and
// zero outputs, and reset.
module l1_word_tb;
  import l1_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [4:0]  d;
  logic        m, ls, l_dest, reset_l_n, l_select, incr_select, carry_in, carry_out;
  logic [31:0] ib, out_bus, l_q, l_out;

  l1_word dut (.clk, .d, .m, .ls, .ib, .out_bus, .l_dest, .reset_l_n, .l_select,
               .incr_select, .carry_in, .l_q, .l_out, .carry_out);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    l_dest = 0; reset_l_n = 0; l_select = 1; incr_select = 0; carry_in = 0;
    d = 0; m = 1; ls = 0; ib = 0;
    @(posedge clk); #1;
    reset_l_n = 1;
    checks++;
    if (l_q !== 32'd0) failures++;
    for (int t = 0; t < 60; t++) begin
      ib = (t == 0) ? 32'hffff_ffff : (t == 1) ? 32'h8000_0001 : $urandom;
      for (int op = 0; op < 3; op++)
        for (int n = 0; n < 32; n++) begin
          logic [31:0] e;
          m = (op == 0); ls = (op == 1); d = 5'(n);
          e = l1_ref(ib, n, m, ls);
          #1;
          checks++;
          if (out_bus !== e) begin
            failures++;
            if (failures < 10) $display("FAIL op=%0d n=%0d got=%h exp=%h", op, n, out_bus, e);
          end
        end
    end
    // L register and incrementer, 32 bits wide
    for (int t = 0; t < 200; t++) begin
      logic [32:0] inc;
      m = 1; d = 0;
      ib = (t % 20 == 0) ? 32'hffff_ffff : (t % 20 == 1) ? 32'h0000_00ff : $urandom;
      l_dest = 1;
      @(posedge clk); #1;
      l_dest = 0;
      checks++;
      if (l_q !== ib) begin failures++; $display("FAIL L load"); end
      carry_in = 1; l_select = 0; incr_select = 1;
      inc = 33'(ib) + 33'd1;
      #1;
      checks += 2;
      if (l_out !== inc[31:0]) begin failures++; $display("FAIL incr %h", l_out); end
      if (carry_out !== inc[32]) begin failures++; $display("FAIL carry out"); end
      l_select = 1; incr_select = 0; carry_in = 0; #1;
      checks++;
      if (l_out !== ib) begin failures++; $display("FAIL L out"); end
      l_select = 1; incr_select = 1; #1;
      checks++;
      if (l_out !== 32'd0) begin failures++; $display("FAIL zero out"); end
    end
    reset_l_n = 0;
    @(posedge clk); #1;
    checks++;
    if (l_q !== 32'd0) begin failures++; $display("FAIL reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
