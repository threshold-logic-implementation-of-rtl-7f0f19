// L1 1st-rotate select lines.
//
// Passes the one-of-eight bit decoder lines to the 1st rotate for a rotate or
// a shift left. For a shift right it feeds the two's complement of the count
// instead (line k drives select (8-k) mod 8), so that the left-rotating
// datapath moves the data right. Combinational; operation decoded from m and
// LS as in tl_pkg.
module l1_rot1_select
  import tl_pkg::*;
(
  input  logic [7:0] line,
  input  logic       m,
  input  logic       ls,
  output logic [7:0] sel
);
  always_comb begin
    if (l1_decode_op(m, ls) == OP_SHIFT_RIGHT) begin
      for (int k = 0; k < 8; k++)
        sel[(8 - k) % 8] = line[k];
    end else begin
      sel = line;
    end
  end
endmodule
