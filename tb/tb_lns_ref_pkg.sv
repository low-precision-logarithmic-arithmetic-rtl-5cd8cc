// tb_lns_ref_pkg: reference arithmetic for the LNS neuron testbenches.
//
// Written independently of the RTL tables: products are evaluated as
// exp(-L * ln b) and rounded, the output log code is found by searching all
// codes for the one closest to -log_b(act(S)). Values are handled as integer
// counts of the format's LSB.
package tb_lns_ref_pkg;

  // Linear product in units of 2^sum_lsb, correctly rounded, signed.
  function automatic int ref_product(int lx, int lw, bit sw, int lsb, int sum_lsb, real base);
    real v;
    int  m;
    v = $exp(-(real'(lx + lw) * (2.0 ** lsb)) * $ln(base)) / (2.0 ** sum_lsb);
    m = $rtoi(v + 0.5);
    return sw ? -m : m;
  endfunction

  // Two's complement value of v taken modulo 2^w.
  function automatic int wrap(int v, int w);
    int r;
    r = v % (1 << w);
    if (r < 0) r += (1 << w);
    if (r >= (1 << (w - 1))) r -= (1 << w);
    return r;
  endfunction

  // Output code for a sum of s units of 2^sum_lsb: nearest code to
  // -log_b(act(S)) among 0..max, ties to the larger code; max for act <= 0.
  function automatic int ref_act_log(int s, int msb, int lsb, int sum_lsb, real base, bit sigmoid);
    real x, y, t, d, best_d;
    int  max_code, best;
    max_code = (1 << (msb - lsb + 1)) - 1;
    x = real'(s) * (2.0 ** sum_lsb);
    y = sigmoid ? 1.0 / (1.0 + $exp(-x)) : x;
    if (y <= 0.0) return max_code;
    t = -$ln(y) / $ln(base);
    best = 0;
    best_d = 1.0e30;
    for (int k = 0; k <= max_code; k++) begin
      d = real'(k) * (2.0 ** lsb) - t;
      if (d < 0.0) d = -d;
      if (d <= best_d) begin
        best_d = d;
        best = k;
      end
    end
    return best;
  endfunction

endpackage
