// Testbench for cau_sml: random selections, storage and CSR clocks, set
// and reset, checked against a two-register model; the CSR must lag the
// storage register by one transfer.
module cau_sml_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0][0:0] x;
  logic [3:0]      k;
  logic            sr_clock, sr_reset, csr_clock, csr_set, csr_reset;
  logic            stored, csr, m_stored, m_csr, sel;

  cau_sml #(.W(1)) dut (.clk, .x, .k, .sr_clock, .sr_reset, .csr_clock,
                        .csr_set, .csr_reset, .stored, .csr);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0; k = '0; sr_clock = 0; csr_clock = 0; csr_set = 0;
    sr_reset = 1; csr_reset = 1;
    @(posedge clk); #1;
    m_stored = 0; m_csr = 0;
    sr_reset = 0; csr_reset = 0;
    for (int t = 0; t < 400; t++) begin
      x = 4'($urandom);
      k = 4'(1 << ($urandom % 4));
      sr_clock  = 1'($urandom);
      csr_clock = 1'($urandom);
      sr_reset  = ($urandom % 10) == 0;
      csr_set   = ($urandom % 10) == 0;
      csr_reset = ($urandom % 10) == 0;
      sel = 0;
      for (int i = 0; i < 4; i++) if (k[i]) sel = x[i];
      @(posedge clk); #1;
      if (csr_reset) m_csr = 0;
      else if (csr_set) m_csr = 1;
      else if (csr_clock) m_csr = m_stored;
      if (sr_reset) m_stored = 0;
      else if (sr_clock) m_stored = sel;
      checks += 2;
      if (stored !== m_stored) begin failures++; $display("FAIL stored t=%0d", t); end
      if (csr !== m_csr) begin failures++; $display("FAIL csr t=%0d", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
