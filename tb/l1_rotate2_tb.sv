// Testbench for l1_rotate2: each select passes its bus, the mask blanks the
// byte over any select, and no select gives the complement of RI1.
module l1_rotate2_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0][7:0] ri;
  logic [3:0]      sel;
  logic            mask;
  logic [7:0]      out_bus;

  l1_rotate2 dut (.ri, .sel, .mask, .out_bus);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 100; t++) begin
      for (int i = 0; i < 4; i++) ri[i] = 8'($urandom);
      for (int s = 0; s < 5; s++)
        for (int mk = 0; mk < 2; mk++) begin
          logic [7:0] e;
          sel = (s < 4) ? 4'(1 << s) : 4'd0;
          mask = 1'(mk);
          e = mask ? 8'd0 : (s < 4) ? ri[s] : ~ri[0];
          #1;
          checks++;
          if (out_bus !== e) begin failures++; $display("FAIL s=%0d mask=%b", s, mask); end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
