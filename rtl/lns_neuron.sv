// lns_neuron: N-input low-precision LNS neuron (top level).
//
// Computes L_X' = -log_b(act(B + S_in + sum_i X_i * W_i)) with activations
// and weights in a logarithmic number system without zero bit:
//   - lane i: lns_mul adds the negated logs, L_P = L_X + L_W (exact, carry
//     kept), and lns_exp turns {s_W, L_P} into the signed linear product,
//     correctly rounded to 2^SUM_LSB;
//   - lns_sum adds the N products, the bias and S_in exactly, giving
//     S_out in sfix(2,SUM_LSB);
//   - lns_act_log applies the activation and converts back to the log format.
// S_in and S_out let a dot product longer than N be split over several
// passes: feed S_out of one pass to S_in of the next with a zero bias, and
// use lx_out of the last pass only.
// Weights may use a coarser log format, ufix(MSB,W_LSB) with W_LSB > LSB, to
// save weight memory; the default keeps both formats equal.
// Ports are packed arrays, lane i in element i. The whole neuron is
// combinational (no clock); registers around it are left to the system.
// Structure, formats and the default parameters (N = 784, m = 2, l = -1,
// l' = -6, b = 2) follow the published design; port encoding is this design's choice.
module lns_neuron
  import lns_pkg::*;
#(
  parameter int   N       = 784,      // input pairs per pass
  parameter int   MSB     = 2,        // m: MSB of the logs
  parameter int   LSB     = -1,       // l: LSB of the logs
  parameter int   SUM_LSB = -6,       // l': LSB of the linear sum
  parameter real  BASE    = 2.0,      // b: base of the logarithms
  parameter act_e ACT     = ACT_RELU, // activation fused into the output table
  parameter int   W_LSB   = LSB       // LSB of the weight logs (>= LSB)
) (
  input  logic [N-1:0][MSB-LSB:0] lx,      // L_X per lane, ufix(MSB,LSB)
  input  logic [N-1:0][MSB-W_LSB:0] lw,    // L_W per lane, ufix(MSB,W_LSB)
  input  logic [N-1:0]            sw,      // weight signs, 1 = negative
  input  logic [2-SUM_LSB:0]      bias,    // B, sfix(2,SUM_LSB)
  input  logic [2-SUM_LSB:0]      s_in,    // partial sum in, sfix(2,SUM_LSB)
  output logic [2-SUM_LSB:0]      s_out,   // linear sum out, sfix(2,SUM_LSB)
  output logic [MSB-LSB:0]        lx_out   // L_X' of the output, ufix(MSB,LSB)
);
  logic [N-1:0][MSB-LSB+1:0] lp;  // per-lane L_P, ufix(MSB+1,LSB)
  logic [N-1:0][1-SUM_LSB:0] p;   // per-lane P, sfix(1,SUM_LSB)

  for (genvar i = 0; i < N; i++) begin : g_lane
    lns_mul #(.MSB(MSB), .LSB(LSB), .W_LSB(W_LSB)) u_mul (
      .lx(lx[i]), .lw(lw[i]), .lp(lp[i])
    );
    lns_exp #(.MSB(MSB), .LSB(LSB), .SUM_LSB(SUM_LSB), .BASE(BASE)) u_exp (
      .lp(lp[i]), .sp(sw[i]), .p(p[i])
    );
  end

  lns_sum #(.N(N), .SUM_LSB(SUM_LSB)) u_sum (
    .p(p), .bias(bias), .s_in(s_in), .s_out(s_out)
  );

  lns_act_log #(
    .MSB(MSB), .LSB(LSB), .SUM_LSB(SUM_LSB), .BASE(BASE), .ACT(ACT)
  ) u_act (
    .s(s_out), .lx(lx_out)
  );
endmodule
