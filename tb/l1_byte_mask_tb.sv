// Testbench for l1_byte_mask: for every position, byte count and operation,
// the byte is masked exactly when all its bits are shifted out: positions
// below the byte count on a shift left, positions p with p + count >= 4 on
// a shift right, none on a rotate.
module l1_byte_mask_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0] byte_line, c_line;
  logic       m, ls, mask;

  l1_byte_mask dut (.byte_line, .c_line, .m, .ls, .mask);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int op = 0; op < 4; op++)
      for (int bc = 0; bc < 4; bc++)
        for (int p = 0; p < 4; p++) begin
          logic e;
          {m, ls} = 2'(op);
          byte_line = 4'(1 << bc);
          c_line = 4'(1 << p);
          e = m ? 1'b0 : ls ? (p < bc) : (p + bc >= 4);
          #1;
          checks++;
          if (mask !== e) begin failures++; $display("FAIL op=%0d B=%0d p=%0d", op, bc, p); end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
