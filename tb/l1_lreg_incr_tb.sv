// Testbench for l1_lreg_incr: loads, resets and holds of the L register
// (one clock each) and the output table (increment, register, zero) with
// the carry out, against an integer model.
module l1_lreg_incr_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0] l_in, l_q, out, model;
  logic       l_dest, reset_l_n, l_select, incr_select, carry_in, carry_out;

  l1_lreg_incr dut (.clk, .l_in, .l_dest, .reset_l_n, .l_select, .incr_select,
                    .carry_in, .l_q, .out, .carry_out);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    l_in = 0; l_dest = 0; reset_l_n = 0; l_select = 0; incr_select = 0; carry_in = 0;
    @(posedge clk); #1;
    model = 0;
    for (int t = 0; t < 1000; t++) begin
      logic [8:0] inc;
      l_in = (t % 50 == 0) ? 8'hff : 8'($urandom);
      l_dest = 1'($urandom);
      reset_l_n = ($urandom % 10) != 0;
      @(posedge clk); #1;
      if (!reset_l_n) model = 0;
      else if (l_dest) model = l_in;
      checks++;
      if (l_q !== model) begin failures++; $display("FAIL l_q=%h exp=%h", l_q, model); end
      for (int s = 0; s < 4; s++)
        for (int c = 0; c < 2; c++) begin
          logic [7:0] e;
          {l_select, incr_select} = 2'(s);
          carry_in = 1'(c);
          inc = 9'(model) + 9'(c);
          e = (s == 1) ? inc[7:0] : (s == 2) ? model : 8'd0;
          #1;
          checks += 2;
          if (out !== e) begin failures++; $display("FAIL out s=%0d c=%0d got=%h exp=%h", s, c, out, e); end
          if (carry_out !== inc[8]) begin failures++; $display("FAIL carry"); end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
