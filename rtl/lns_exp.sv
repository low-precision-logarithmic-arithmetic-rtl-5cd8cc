// lns_exp: log-to-linear conversion table (the b^-x box), one per input pair.
//
// Given the negated log L_P of a product, ufix(MSB+1,LSB), and its sign s_P,
// it returns the linear product P = (-1)^s_P * b^-L_P rounded to the nearest
// multiple of 2^SUM_LSB, in sfix(1,SUM_LSB): |P| <= 1 so one integer bit and
// a sign bit suffice. The table is indexed by {s_P, L_P} and has
// 2^(MSB-LSB+3) entries of 2-SUM_LSB bits; it is computed at elaboration from
// b^-x by lns_pkg::exp_mag. Zero needs no special code: once L_P is large
// enough, b^-L_P is below half an LSB and the entry is 0, so the largest
// L_X or L_W code stands for zero when SUM_LSB is chosen high enough
// (for MSB = 2, LSB = -1: SUM_LSB >= -6, since 2^-7.5 < 2^-7). The
// published design puts that threshold at SUM_LSB >= -7, which holds only
// for a truncating table; this one rounds to nearest as it also specifies.
// Purely combinational. Formats and correct rounding follow the published design;
// tie-breaking (away from zero) is this design's choice.
module lns_exp
  import lns_pkg::*;
#(
  parameter int  MSB     = 2,    // m
  parameter int  LSB     = -1,   // l
  parameter int  SUM_LSB = -6,   // l': LSB of the linear domain
  parameter real BASE    = 2.0   // b
) (
  input  logic [MSB-LSB+1:0] lp,  // L_P, ufix(MSB+1,LSB)
  input  logic               sp,  // product sign, 1 = negative
  output logic [1-SUM_LSB:0] p    // P, sfix(1,SUM_LSB)
);
  localparam int LPW   = MSB - LSB + 2;
  localparam int PW    = 2 - SUM_LSB;
  localparam int DEPTH = 1 << (LPW + 1);

  typedef logic [DEPTH-1:0][PW-1:0] table_t;

  function automatic table_t build_table();
    table_t t;
    for (int i = 0; i < DEPTH; i++) begin
      int mag;
      mag  = exp_mag(i % (1 << LPW), LSB, SUM_LSB, BASE);
      t[i] = (i >= (1 << LPW)) ? PW'(-mag) : PW'(mag);
    end
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  always_comb p = TABLE[{sp, lp}];
endmodule
