// Testbench for l1_decoder_2to4: the four codes of the byte / C table.
module l1_decoder_2to4_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [1:0] a;
  logic [3:0] y;
  logic [3:0] expected [4] = '{4'b0001, 4'b0010, 4'b0100, 4'b1000};

  l1_decoder_2to4 dut (.a, .y);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      a = 2'(v);
      #1;
      checks++;
      if (y !== expected[v]) begin failures++; $display("FAIL a=%b y=%b", a, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
