// lns_act_log: fused activation and linear-to-log table of the LNS neuron.
//
// Maps the neuron sum S, sfix(2,SUM_LSB), to the next layer's activation in
// LNS, L_X' = -log_b(act(S)) rounded to the nearest multiple of 2^LSB and
// clamped to ufix(MSB,LSB). Outputs of 1 or more saturate to code 0 (so ReLU
// and ReLU1 give the same table); a non-positive activation, or one too small
// to represent, gives the largest code, which the next layer reads as zero.
// The table has 2^(3-SUM_LSB) entries of MSB-LSB+1 bits and is computed at
// elaboration by lns_pkg::act_log_code. Purely combinational.
// Fusing the activation with the log, and correct rounding, follow the published
// design; the sigmoid option and the tie-breaking are this design's choice.
module lns_act_log
  import lns_pkg::*;
#(
  parameter int   MSB     = 2,        // m
  parameter int   LSB     = -1,       // l
  parameter int   SUM_LSB = -6,       // l'
  parameter real  BASE    = 2.0,      // b
  parameter act_e ACT     = ACT_RELU  // activation function
) (
  input  logic [2-SUM_LSB:0] s,   // S, sfix(2,SUM_LSB)
  output logic [MSB-LSB:0]   lx   // L_X', ufix(MSB,LSB)
);
  localparam int SW    = 3 - SUM_LSB;
  localparam int LW    = MSB - LSB + 1;
  localparam int DEPTH = 1 << SW;

  typedef logic [DEPTH-1:0][LW-1:0] table_t;

  function automatic table_t build_table();
    table_t t;
    for (int i = 0; i < DEPTH; i++) begin
      int s_code;
      s_code = (i >= DEPTH / 2) ? i - DEPTH : i;  // two's complement value
      t[i]   = LW'(act_log_code(s_code, MSB, LSB, SUM_LSB, BASE, ACT));
    end
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  always_comb lx = TABLE[s];
endmodule
