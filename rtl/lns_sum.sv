// lns_sum: exact linear-domain summation (the Sigma box) of the LNS neuron.
//
// Adds the N products P_i, each sfix(1,SUM_LSB), the bias B and the partial
// sum S_in from a previous pass, both sfix(2,SUM_LSB), and returns
// S_out = B + S_in + sum(P_i) in sfix(2,SUM_LSB). Every term shares the LSB,
// so the sum is exact. It is computed modulo 2^(3-SUM_LSB) (two's complement
// wrap-around): the result is exact whenever the true sum lies in [-4, 4),
// which the weight prescaling guarantees, even if partial sums leave that
// range. The published design leaves the adder structure to a compressor-tree
// generator; here it is written as a plain sum and left to synthesis.
// The bias and S_in formats are this design's choice.
// Purely combinational.
module lns_sum #(
  parameter int N       = 784,  // number of products
  parameter int SUM_LSB = -6    // l'
) (
  input  logic [N-1:0][1-SUM_LSB:0] p,     // P_i, sfix(1,SUM_LSB)
  input  logic [2-SUM_LSB:0]        bias,  // B, sfix(2,SUM_LSB)
  input  logic [2-SUM_LSB:0]        s_in,  // S_in, sfix(2,SUM_LSB)
  output logic [2-SUM_LSB:0]        s_out  // S_out, sfix(2,SUM_LSB)
);
  localparam int PW = 2 - SUM_LSB;
  localparam int SW = 3 - SUM_LSB;

  always_comb begin
    logic [SW-1:0] acc;
    acc = bias + s_in;
    for (int i = 0; i < N; i++) acc = acc + {p[i][PW-1], p[i]};
    s_out = acc;
  end
endmodule
