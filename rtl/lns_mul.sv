// lns_mul: multiplier of the LNS neuron, one per input pair.
//
// Activations and weight magnitudes are stored as negated base-b logarithms
// in ufix(MSB,LSB), so the product X*W is the exact fixed-point sum
// L_P = L_X + L_W. The carry out is kept, giving L_P one more integer bit,
// ufix(MSB+1,LSB): a carry means a very small product, which the exp table
// then rounds to zero. The sign of the product is the weight sign alone
// (activations are non-negative) and is not handled here.
// Weights may be stored with fewer fractional bits than activations
// (W_LSB > LSB), which saves weight memory but no adder bits: L_W is then
// padded with zeros on the right before the addition.
// Purely combinational. Formats, the kept carry and the zero padding of the
// narrower operand follow the published design; the module boundary (sign outside)
// is this design's choice.
module lns_mul #(
  parameter int MSB   = 2,    // m: weight of the MSB of the log
  parameter int LSB   = -1,   // l: weight of the LSB of the log
  parameter int W_LSB = LSB   // LSB of the weight logs, W_LSB >= LSB
) (
  input  logic [MSB-LSB:0]   lx,  // L_X, ufix(MSB,LSB)
  input  logic [MSB-W_LSB:0] lw,  // L_W, ufix(MSB,W_LSB)
  output logic [MSB-LSB+1:0] lp   // L_P, ufix(MSB+1,LSB)
);
  localparam int LPW = MSB - LSB + 2;

  if (W_LSB < LSB) begin : g_bad_wlsb
    $error("lns_mul: W_LSB (%0d) must not be below LSB (%0d)", W_LSB, LSB);
  end

  always_comb lp = LPW'(lx) + (LPW'(lw) << (W_LSB - LSB));
endmodule
