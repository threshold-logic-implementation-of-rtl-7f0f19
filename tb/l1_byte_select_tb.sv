// Testbench for l1_byte_select: for every five-bit count and operation the
// selected byte rotation equals the whole-byte part of the left rotation
// the operation needs (the count, or 32 minus it for a shift right); the
// complement operation selects nothing.
module l1_byte_select_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0] byte_line, sel;
  logic       bit_zero, m, ls;

  l1_byte_select dut (.byte_line, .bit_zero, .m, .ls, .sel);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int op = 0; op < 4; op++)
      for (int n = 0; n < 32; n++) begin
        int left;
        logic [3:0] e;
        {m, ls} = 2'(op);
        byte_line = 4'(1 << (n / 8));
        bit_zero  = (n % 8) == 0;
        left = (!m && !ls) ? ((32 - n) % 32) : n;
        e = (!m && !ls && n == 0) ? 4'd0 : 4'(1 << (left / 8));
        #1;
        checks++;
        if (sel !== e) begin failures++; $display("FAIL op=%0d n=%0d sel=%b", op, n, sel); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
