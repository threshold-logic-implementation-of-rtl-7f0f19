// L2 8-stage adder with threshold-gate carry look-ahead.
//
// Eight l2_full_adder cells, with four extra threshold gates that each give
// the carry out of a pair of bits in one gate delay:
// carry(2j+2) = [2*A(2j+1) + 2*B(2j+1) + A(2j) + B(2j) + carry(2j) >= 4],
// with K1 OR'ed into B and K2 into the carry as in the cells. The even
// cells take their carry from a look-ahead gate, the odd cells from the even
// cell below, and the last look-ahead gate gives C8. The original design gives only
// the number of look-ahead gates; grouping them by bit pairs is this
// design's choice. Combinational.
module l2_adder8 (
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic       cin,
  input  logic       k1,
  input  logic       k2,
  output logic [7:0] s,
  output logic       c8
);
  logic [4:0] pair_c;   // carry into bits 0, 2, 4, 6 and out of bit 7
  logic [7:0] cell_c;   // carry into each cell
  logic [7:0] cell_co;
  logic [3:0] unused_odd_co;  // odd cells' carries: the look-ahead gates replace them

  assign pair_c[0] = cin;

  for (genvar j = 0; j < 4; j++) begin : g_pair
    logic unused_n;
    tl_threshold_gate #(
      .N(5), .T(4), .WEIGHTS({4'd2, 4'd2, 4'd1, 4'd1, 4'd1})
    ) u_lookahead (
      .x({a[2*j+1], b[2*j+1] | k1, a[2*j], b[2*j] | k1, pair_c[j] | k2}),
      .y(pair_c[j+1]), .y_n(unused_n)
    );
    assign cell_c[2*j]   = pair_c[j];
    assign cell_c[2*j+1] = cell_co[2*j];
  end

  for (genvar i = 0; i < 8; i++) begin : g_cell
    l2_full_adder u_fa (
      .a(a[i]), .b(b[i]), .c(cell_c[i]), .k1, .k2, .co(cell_co[i]), .so(s[i])
    );
  end

  assign c8 = pair_c[4];
  assign unused_odd_co = {cell_co[7], cell_co[5], cell_co[3], cell_co[1]};
endmodule
