// Reference model of the 32-bit L1 word for the testbenches: what a rotate
// left, shift left, shift right or complement of the input bus must give,
// written directly from the operation, not from the datapath.
package l1_ref_pkg;
  function automatic logic [31:0] l1_ref(input logic [31:0] din, input int n,
                                         input logic m, input logic ls);
    if (m)        return (din << n) | (n == 0 ? 32'd0 : (din >> (32 - n)));
    else if (ls)  return din << n;
    else if (n == 0) return ~din;
    else          return din >> n;
  endfunction
endpackage
