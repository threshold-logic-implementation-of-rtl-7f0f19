// Testbench for l1_character: four characters wired here into a 32-bit
// word (C = byte position, IR+ from the character below, RI2..RI4 from the
// characters one to three positions below). Every count and operation is
// checked against the word-level reference on random data, and each
// character's L register must load its output byte in one clock.
module l1_character_tb;
  import l1_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [4:0]      d;
  logic            m, ls, l_dest;
  logic [31:0]     ib, out_bus, l_q, l_out;
  logic [3:0][7:0] rot1;
  logic [3:0][6:0] ir;
  logic [4:0]      carry;

  assign carry[0] = 1'b0;

  for (genvar p = 0; p < 4; p++) begin : g_char
    logic [2:0][7:0] ri_ext;
    assign ri_ext[0] = rot1[(p + 3) % 4];
    assign ri_ext[1] = rot1[(p + 2) % 4];
    assign ri_ext[2] = rot1[(p + 1) % 4];
    l1_character dut (
      .clk, .d_byte(d[4:3]), .d_bit(d[2:0]), .m, .ls, .c(2'(p)),
      .ib(ib[8*p +: 8]), .ir_in(ir[(p + 3) % 4]), .ir_out(ir[p]),
      .rot1_out(rot1[p]), .ri_ext, .out_bus(out_bus[8*p +: 8]),
      .l_dest, .reset_l_n(1'b1), .l_select(1'b1), .incr_select(1'b0),
      .carry_in(carry[p]), .l_q(l_q[8*p +: 8]), .l_out(l_out[8*p +: 8]),
      .carry_out(carry[p+1])
    );
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    l_dest = 0; d = 0; m = 1; ls = 0; ib = 0;
    for (int t = 0; t < 40; t++) begin
      ib = $urandom;
      for (int op = 0; op < 3; op++)
        for (int n = 0; n < 32; n++) begin
          logic [31:0] e;
          m  = (op == 0);
          ls = (op == 1);
          d  = 5'(n);
          e  = l1_ref(ib, n, m, ls);
          #1;
          checks++;
          if (out_bus !== e) begin
            failures++;
            if (failures < 10) $display("FAIL op=%0d n=%0d ib=%h got=%h exp=%h", op, n, ib, out_bus, e);
          end
        end
      l_dest = 1;
      @(posedge clk); #1;
      l_dest = 0;
      checks += 2;
      if (l_q !== out_bus) begin failures++; $display("FAIL L load"); end
      if (l_out !== out_bus) begin failures++; $display("FAIL L out"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
