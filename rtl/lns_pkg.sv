// lns_pkg: shared types and table-generation functions for the low-precision
// LNS (logarithmic number system) neuron.
//
// Number formats (fixed point, named by the weight of their most and least
// significant bits):
//   ufix(MSB,LSB)     unsigned, bits of weight 2^MSB down to 2^LSB
//   sfix(MSB,LSB)     two's complement, sign bit has weight -2^MSB
// A weight or activation A with |A| < 1 is stored as the negated logarithm
// L_A = -log_b|A| rounded to the nearest multiple of 2^LSB, as ufix(MSB,LSB).
// The largest code is never produced for a meaningful value and acts as the
// encoding of zero: its linear value rounds to 0 in the exp table.
//
// The two tables of the neuron (log-to-linear and activation+log) are filled
// at elaboration time by the constant functions below, so any base b, any
// format and any activation can be tabulated without external files.
// Rounding is to nearest, ties away from zero (ties cannot occur except for
// exact values such as b^0 = 1).
package lns_pkg;

  // Activation function fused into the output log table. ReLU and ReLU1 give
  // the same table, because outputs >= 1 already saturate to code 0.
  typedef enum logic [0:0] {
    ACT_RELU    = 1'b0,
    ACT_SIGMOID = 1'b1
  } act_e;

  // Magnitude of b^-(lp_code * 2^lsb), rounded to the nearest multiple of
  // 2^sum_lsb, returned as an integer count of 2^sum_lsb units.
  function automatic int exp_mag(int lp_code, int lsb, int sum_lsb, real base);
    real v;
    v = base ** (-(real'(lp_code) * (2.0 ** lsb)));
    return int'($floor(v * (2.0 ** (-sum_lsb)) + 0.5));
  endfunction

  // Output code of the fused activation + log table for a sum whose integer
  // value (in units of 2^sum_lsb) is s_code. Returns -log_b(act(S)) rounded to
  // the nearest multiple of 2^lsb, clamped to [0, max_code]; a non-positive
  // activation gives max_code, the zero encoding.
  function automatic int act_log_code(int s_code, int msb, int lsb, int sum_lsb,
                                      real base, act_e act);
    real x, y, l;
    int  k, max_code;
    max_code = (1 << (msb - lsb + 1)) - 1;
    x = real'(s_code) * (2.0 ** sum_lsb);
    if (act == ACT_SIGMOID) y = 1.0 / (1.0 + $exp(-x));
    else                    y = (x > 0.0) ? x : 0.0;
    if (y <= 0.0) return max_code;
    l = -$ln(y) / $ln(base);
    k = int'($floor(l * (2.0 ** (-lsb)) + 0.5));
    if (k < 0) k = 0;
    if (k > max_code) k = max_code;
    return k;
  endfunction

endpackage
