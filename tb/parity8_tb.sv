// Testbench for parity8: all 256 inputs against the exclusive-or reduction.
module parity8_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0] x;
  logic       parity;

  parity8 dut (.x, .parity);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      x = 8'(v);
      #1;
      checks++;
      if (parity !== (($countones(x) % 2) == 1)) begin
        failures++; $display("FAIL x=%b parity=%b", x, parity);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
