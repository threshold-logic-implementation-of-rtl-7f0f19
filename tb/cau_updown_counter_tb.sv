// Testbench for cau_updown_counter: random up/down/hold/set/reset and
// cascade, checked against an integer model, including wrap-around and the
// look-ahead carry. Every count must take effect on the next clock.
module cau_updown_counter_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int wraps_up = 0, wraps_down = 0;

  logic       count_up, count_down, cascade_in, set, reset, carry_out;
  logic [7:0] q, model;
  logic       exp_carry;

  cau_updown_counter #(.WIDTH(8)) dut (.clk, .count_up, .count_down, .cascade_in,
                                       .set, .reset, .q, .carry_out);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    count_up = 0; count_down = 0; cascade_in = 1; set = 0; reset = 1;
    @(posedge clk); #1;
    model = 0; reset = 0;
    for (int t = 0; t < 3000; t++) begin
      int r;
      r = $urandom % 100;
      count_up   = (t < 1000) ? (r < 90) : (t < 2000) ? 1'b0 : (r < 45);
      count_down = (t < 1000) ? 1'b0 : (t < 2000) ? (r < 90) : (r >= 40 && r < 90);
      cascade_in = ($urandom % 16) != 0;
      set   = ($urandom % 500) == 0;
      reset = ($urandom % 500) == 0;
      #1;
      exp_carry = cascade_in && ((count_up && !count_down && model == 8'hff) ||
                                 (count_down && !count_up && model == 8'h00));
      checks++;
      if (carry_out !== exp_carry) begin failures++; $display("FAIL carry t=%0d", t); end
      @(posedge clk); #1;
      if (reset) model = 0;
      else if (set) model = 8'hff;
      else if (cascade_in && count_up && !count_down) begin
        if (model == 8'hff) wraps_up++;
        model = model + 1;
      end else if (cascade_in && count_down && !count_up) begin
        if (model == 8'h00) wraps_down++;
        model = model - 1;
      end
      checks++;
      if (q !== model) begin failures++; $display("FAIL q=%h exp=%h t=%0d", q, model, t); end
    end
    checks++;
    if (wraps_up == 0 || wraps_down == 0) begin
      failures++; $display("FAIL no wrap seen up=%0d down=%0d", wraps_up, wraps_down);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
