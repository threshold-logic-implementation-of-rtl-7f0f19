// Testbench for tl_gateable_ff: load when gated, hold otherwise, reset
// over set over load; compared with a model kept in the testbench.
module tl_gateable_ff_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       gate, set, reset;
  logic [3:0] d, q, model;

  tl_gateable_ff #(.W(4)) dut (.clk, .gate, .d, .set, .reset, .q);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gate = 0; set = 0; reset = 1; d = '0;
    @(posedge clk); #1;
    model = '0;
    reset = 0;
    for (int t = 0; t < 300; t++) begin
      gate  = 1'($urandom);
      set   = ($urandom % 8) == 0;
      reset = ($urandom % 8) == 0;
      d     = 4'($urandom);
      @(posedge clk); #1;
      if (reset) model = '0;
      else if (set) model = '1;
      else if (gate) model = d;
      checks++;
      if (q !== model) begin failures++; $display("FAIL q=%h exp=%h", q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
