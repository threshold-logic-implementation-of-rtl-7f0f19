// Testbench for cau_switch with three 4-bit module inputs: each control
// line connects its module's output, no control gives 0.
module cau_switch_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [2:0][3:0] cu_q;
  logic [2:0]      csr_sel;
  logic [3:0]      out;

  cau_switch #(.N_IN(3), .W(4)) dut (.cu_q, .csr_sel, .out);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 40; t++) begin
      for (int i = 0; i < 3; i++) cu_q[i] = 4'($urandom);
      for (int s = 0; s < 4; s++) begin
        csr_sel = (s < 3) ? 3'(1 << s) : 3'd0;
        #1;
        checks++;
        if (out !== ((s < 3) ? cu_q[s] : 4'd0)) begin
          failures++; $display("FAIL sel=%b out=%h", csr_sel, out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
