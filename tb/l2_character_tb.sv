// Testbench for l2_character: load A and B from the bus, then check add,
// subtract (complement of B loaded, carry in 1), exclusive-or (complement
// of A loaded, K2 = 1) and transfer A. Each register load takes one clock.
module l2_character_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0] data_in, a_q, b_q, sum;
  logic       xfer_a, xfer_b, k1, k2, cin, cout;

  l2_character dut (.clk, .data_in, .xfer_a, .xfer_b, .k1, .k2, .cin,
                    .a_q, .b_q, .sum, .cout);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(input logic [7:0] av, input logic [7:0] bv);
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
    for (int t = 0; t < 300; t++) begin
      logic [7:0] x, y;
      x = 8'($urandom); y = 8'($urandom);
      load(x, y);
      k1 = 0; k2 = 0; cin = 1'($urandom); #1;
      checks++;
      if ({cout, sum} !== 9'(9'(x) + 9'(y) + 9'(cin))) begin failures++; $display("FAIL add"); end
      load(x, ~y);
      cin = 1; #1;
      checks++;
      if (sum !== 8'(x - y)) begin failures++; $display("FAIL sub"); end
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
