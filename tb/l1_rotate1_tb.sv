// Testbench for l1_rotate1: random input bus and IR+ lines, every rotation
// and mask setting; each output bit is compared with the bit the 15-bit
// window holds k places below it, or 0 where the mask applies.
module l1_rotate1_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0] ib, sel, rot_out;
  logic [6:0] ir_in, bit_mask, ir_out;
  logic       lsb_to_msb, msb_to_lsb;

  l1_rotate1 dut (.ib, .ir_in, .sel, .bit_mask, .lsb_to_msb, .msb_to_lsb, .rot_out, .ir_out);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      ib = 8'($urandom); ir_in = 7'($urandom);
      for (int k = 0; k < 8; k++)
        for (int nb = 0; nb < 8; nb++)
          for (int dir = 0; dir < 3; dir++) begin
            logic [7:0] e;
            sel = 8'(1 << k);
            bit_mask = 7'((1 << nb) - 1);
            lsb_to_msb = (dir == 1);
            msb_to_lsb = (dir == 2);
            for (int i = 0; i < 8; i++) begin
              int src;
              src = i - k;
              e[i] = (src >= 0) ? ib[src] : ir_in[7 + src];
              if (dir == 1 && i < nb) e[i] = 0;
              if (dir == 2 && i >= 8 - nb) e[i] = 0;
            end
            #1;
            checks++;
            if (rot_out !== e) begin
              failures++;
              if (failures < 10) $display("FAIL k=%0d nb=%0d dir=%0d got=%b exp=%b", k, nb, dir, rot_out, e);
            end
          end
      checks++;
      if (ir_out !== ib[7:1]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
