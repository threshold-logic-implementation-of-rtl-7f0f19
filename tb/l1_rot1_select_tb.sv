// Testbench for l1_rot1_select: rotate and shift left pass the count,
// shift right gives (8 - count) mod 8.
module l1_rot1_select_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0] line, sel;
  logic       m, ls;

  l1_rot1_select dut (.line, .m, .ls, .sel);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int op = 0; op < 4; op++) begin
      for (int v = 0; v < 8; v++) begin
        int e;
        {m, ls} = 2'(op);
        line = 8'(1 << v);
        e = (!m && !ls) ? ((8 - v) % 8) : v;
        #1;
        checks++;
        if (sel !== 8'(1 << e)) begin failures++; $display("FAIL m=%b ls=%b v=%0d sel=%b", m, ls, v, sel); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
