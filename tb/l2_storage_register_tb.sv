// Testbench for l2_storage_register: loads on transfer, holds otherwise.
module l2_storage_register_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       transfer;
  logic [7:0] data, q, model;

  l2_storage_register #(.W(8)) dut (.clk, .transfer, .data, .q);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    transfer = 1; data = 8'h5a;
    @(posedge clk); #1;
    model = 8'h5a;
    checks++;
    if (q !== model) failures++;
    for (int t = 0; t < 300; t++) begin
      transfer = 1'($urandom);
      data = 8'($urandom);
      @(posedge clk); #1;
      if (transfer) model = data;
      checks++;
      if (q !== model) begin failures++; $display("FAIL q=%h exp=%h", q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
