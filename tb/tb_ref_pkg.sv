// tb_ref_pkg: reference models shared by the testbenches.
//
// ref_add is the precision-adaptive adder written arithmetically: the low
// 4*k bits are the OR of the operands, the high bits the exact sum of the
// high parts alone (no carry out of the OR part).
package tb_ref_pkg;

  function automatic logic [15:0] ref_add(logic [15:0] a, logic [15:0] b, int k);
    int unsigned lb, mask, lo, hi;
    lb   = 4 * k;
    mask = (32'd1 << lb) - 1;
    lo   = (32'(a) | 32'(b)) & mask;
    hi   = ((32'(a) >> lb) + (32'(b) >> lb)) << lb;
    return 16'(hi | lo);
  endfunction

endpackage
