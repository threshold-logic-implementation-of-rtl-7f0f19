// Testbench for l2_adder8: exhaustive add over A, B and carry in, plus
// random checks of subtract, exclusive-or and transfer A.
module l2_adder8_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0] a, b, s;
  logic       cin, k1, k2, c8;

  l2_adder8 dut (.a, .b, .cin, .k1, .k2, .s, .c8);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    k1 = 0; k2 = 0;
    for (int v = 0; v < 131072; v++) begin
      logic [8:0] r;
      {cin, b, a} = 17'(v);
      r = 9'(a) + 9'(b) + 9'(cin);
      #1;
      checks++;
      if ({c8, s} !== r) begin
        failures++;
        if (failures < 10) $display("FAIL add a=%h b=%h cin=%b got=%h", a, b, cin, {c8, s});
      end
    end
    for (int t = 0; t < 500; t++) begin
      logic [7:0] x, y;
      x = 8'($urandom); y = 8'($urandom);
      // subtract: complement of B gated in, carry in 1
      a = x; b = ~y; cin = 1; k1 = 0; k2 = 0; #1;
      checks++;
      if (s !== 8'(x - y) || c8 !== (x >= y)) begin failures++; $display("FAIL sub"); end
      // exclusive-or: complement of A gated in, K2 = 1
      a = ~x; b = y; cin = 1'($urandom); k1 = 0; k2 = 1; #1;
      checks++;
      if (s !== (x ^ y)) begin failures++; $display("FAIL xor"); end
      // transfer A
      a = x; b = y; k1 = 1; k2 = 1; #1;
      checks++;
      if (s !== x) begin failures++; $display("FAIL transfer"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
