// Testbench for l2_full_adder: all 32 input and control combinations
// against the control table (add, exclusive-or forcing, transfer A).
module l2_full_adder_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic a, b, c, k1, k2, co, so;

  l2_full_adder dut (.a, .b, .c, .k1, .k2, .co, .so);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      logic be, ce;
      {k2, k1, c, b, a} = 5'(v);
      be = b | k1;
      ce = c | k2;
      #1;
      checks += 2;
      if (co !== ((a & be) | (a & ce) | (be & ce))) begin failures++; $display("FAIL co v=%0d", v); end
      if (so !== (a ^ be ^ ce)) begin failures++; $display("FAIL so v=%0d", v); end
      if (k1 && k2) begin
        checks++;
        if (so !== a) failures++;               // transfer A
      end
      if (!k1 && k2) begin
        checks++;
        if (so !== ~(a ^ b)) failures++;        // exclusive-or, inverted
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
