// Testbench for l1_bit_decoder: all eight counts; one-hot line and the
// number of mask lines set must equal the count.
module l1_bit_decoder_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [2:0] d_bit;
  logic [7:0] line;
  logic [6:0] bit_mask;

  l1_bit_decoder dut (.d_bit, .line, .bit_mask);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      d_bit = 3'(v);
      #1;
      checks += 3;
      if (line !== 8'(1 << v)) begin failures++; $display("FAIL line v=%0d", v); end
      if ($countones(bit_mask) != v) begin failures++; $display("FAIL count v=%0d", v); end
      if (bit_mask !== 7'((1 << v) - 1)) begin failures++; $display("FAIL mask v=%0d", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
