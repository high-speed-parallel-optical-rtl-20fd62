// tb_qsd_ref_pkg -- reference arithmetic for the QSD adder testbenches.
//
// Everything here is computed from the number system, not from the RTL's
// plane equations: the first step splits t = x + y into t = 4c + s with the
// carry c = 1 for t >= 3, -1 for t <= -3 and 0 otherwise; the second step
// adds z = s + c. Planes are decoded by looking for the single bright plane
// of a pixel.
package tb_qsd_ref_pkg;

  localparam int BAD = 99;  // returned when a pixel is not one-hot

  function automatic int ref_carry(int x, int y);
    int t = x + y;
    if (t >= 3)  return 1;
    if (t <= -3) return -1;
    return 0;
  endfunction

  function automatic int ref_sum(int x, int y);
    return x + y - 4 * ref_carry(x, y);
  endfunction

  // Value of a pixel whose K plane bits are given in col (bit k = value
  // k - off); BAD if not exactly one plane is bright.
  function automatic int onehot_val(logic [6:0] col, int k_planes, int off);
    int n = 0, v = BAD;
    for (int k = 0; k < k_planes; k++)
      if (col[k]) begin n++; v = k - off; end
    return (n == 1) ? v : BAD;
  endfunction

  // QSD digits of a decimal value: sign times the base-4 digits of |v|.
  function automatic int qsd_digit_of(int v, int d);
    int m = (v < 0) ? -v : v;
    int q = (m >> (2 * d)) & 3;
    return (v < 0) ? -q : q;
  endfunction

endpackage
