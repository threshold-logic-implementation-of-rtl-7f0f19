// Testbench for l2_word: load 32-bit A and B, then check add with the carry
// rippling through all four characters (including all-ones operands),
// subtract, exclusive-or and transfer A against integer arithmetic.
module l2_word_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [31:0] data_in, a_q, b_q, sum;
  logic        xfer_a, xfer_b, k1, k2, cin, cout;

  l2_word dut (.clk, .data_in, .xfer_a, .xfer_b, .k1, .k2, .cin, .a_q, .b_q, .sum, .cout);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(input logic [31:0] av, input logic [31:0] bv);
    data_in = av; xfer_a = 1; xfer_b = 0;
    @(posedge clk); #1;
    data_in = bv; xfer_a = 0; xfer_b = 1;
    @(posedge clk); #1;
    xfer_b = 0;
    checks++;
    if (a_q !== av || b_q !== bv) begin failures++; $display("FAIL load"); end
  endtask

  initial begin
    xfer_a = 0; xfer_b = 0; k1 = 0; k2 = 0; cin = 0; data_in = 0;
    for (int t = 0; t < 400; t++) begin
      logic [31:0] x, y;
      x = (t == 0) ? 32'hffff_ffff : $urandom;
      y = (t == 0) ? 32'h0000_0000 : (t == 1) ? 32'hffff_ffff : $urandom;
      load(x, y);
      k1 = 0; k2 = 0; cin = (t == 0) ? 1'b1 : 1'($urandom); #1;
      checks++;
      if ({cout, sum} !== 33'(33'(x) + 33'(y) + 33'(cin))) begin
        failures++; $display("FAIL add %h + %h + %b = %b %h", x, y, cin, cout, sum);
      end
      load(x, ~y);
      cin = 1; #1;
      checks++;
      if (sum !== 32'(x - y) || cout !== (x >= y)) begin failures++; $display("FAIL sub"); end
      load(~x, y);
      k2 = 1; #1;
      checks++;
      if (sum !== (x ^ y)) begin failures++; $display("FAIL xor"); end
      load(x, y);
      k1 = 1; k2 = 1; #1;
      checks++;
      if (sum !== x) begin failures++; $display("FAIL transfer"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
