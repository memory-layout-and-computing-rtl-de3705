// tb_dwp_util: testbench helpers for the signed-digit weight encoding.
//
// A condensed digit column of R rows holds n_neg digits -1, then n_pos digits
// +1, then zeros (ternary ordering rule). These helpers give the digit of a
// row and the stored (flag, memory bit) pair, computed directly from the
// encoding rules and independently of the RTL decoder.
// Stimulus, reference values and checks are this testbench's own; the
// behaviour it checks is the one the design implements (see rtl/).
package tb_dwp_util;

  function automatic int digit_of(int r, int n_neg, int n_pos);
    if (r < n_neg)         return -1;
    if (r < n_neg + n_pos) return 1;
    return 0;
  endfunction

  function automatic bit flag_of(int n_pos);
    return (n_pos != 0);
  endfunction

  function automatic bit mbit_of(int r, int n_neg, int n_pos);
    if (n_pos == 0) return (r < n_neg);                   // rule 1
    return (r >= n_neg) && (r < n_neg + n_pos);           // rule 2
  endfunction

  function automatic int shift_of(int lane, int gw);
    int o;
    o = lane % gw;
    return (o == 0) ? 0 : o - 1;
  endfunction

endpackage
