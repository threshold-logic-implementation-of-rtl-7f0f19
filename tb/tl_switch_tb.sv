// Testbench for tl_switch: one-hot controls pick the matching input, no
// control gives 0, random data.
module tl_switch_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0][7:0] x;
  logic [3:0]      k;
  logic [7:0]      y;

  tl_switch #(.N(4), .W(8)) dut (.x, .k, .y);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 50; t++) begin
      for (int i = 0; i < 4; i++) x[i] = 8'($urandom);
      for (int s = 0; s < 5; s++) begin
        k = (s < 4) ? 4'(1 << s) : 4'd0;
        #1;
        checks++;
        if (y !== ((s < 4) ? x[s] : 8'd0)) begin
          failures++; $display("FAIL k=%b y=%h", k, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
