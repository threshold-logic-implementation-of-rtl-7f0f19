// Testbench for tl_threshold_gate: exhaustive check of the default
// majority gate and of a (2,1,1,1; T=3) gate against sums computed here.
module tl_threshold_gate_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [2:0] x3;  logic y3, y3_n;
  logic [3:0] x4;  logic y4, y4_n;

  tl_threshold_gate dut_maj (.x(x3), .y(y3), .y_n(y3_n));
  tl_threshold_gate #(.N(4), .T(3), .WEIGHTS({4'd1, 4'd1, 4'd1, 4'd2})) dut_w (
    .x(x4), .y(y4), .y_n(y4_n));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      x3 = 3'(v);
      #1;
      checks++;
      if (y3 !== ($countones(x3) >= 2) || y3_n !== ~y3) begin
        failures++; $display("FAIL maj x=%b y=%b", x3, y3);
      end
    end
    for (int v = 0; v < 16; v++) begin
      int s;
      x4 = 4'(v);
      s = 2 * x4[0] + x4[1] + x4[2] + x4[3];
      #1;
      checks++;
      if (y4 !== (s >= 3)) begin failures++; $display("FAIL w x=%b y=%b", x4, y4); end
      // the function X1(X2+X3+X4)+X2X3X4 of the weighted gate
      checks++;
      if (y4 !== ((x4[0] & (x4[1] | x4[2] | x4[3])) | (x4[1] & x4[2] & x4[3]))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
