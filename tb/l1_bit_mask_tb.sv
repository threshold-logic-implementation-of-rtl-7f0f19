// Testbench for l1_bit_mask: only the character at position 0 masks, from
// the LSB in a shift left and from the MSB in a shift right.
module l1_bit_mask_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic m, ls, c0, lsb_to_msb, msb_to_lsb;

  l1_bit_mask dut (.m, .ls, .c0, .lsb_to_msb, .msb_to_lsb);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic shl, shr;
      {m, ls, c0} = 3'(v);
      shl = !m && ls;
      shr = !m && !ls;
      #1;
      checks += 2;
      if (lsb_to_msb !== (shl && c0)) begin failures++; $display("FAIL l v=%0d", v); end
      if (msb_to_lsb !== (shr && c0)) begin failures++; $display("FAIL r v=%0d", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
