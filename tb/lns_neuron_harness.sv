// lns_neuron_harness: stimulus generator and checker for one lns_neuron.
//
// Runs OPS operations. Each operation is PASSES passes of N input pairs:
// pass 0 gets a random bias (and a random S_in when PASSES = 1), later
// passes get a zero bias and the previous pass's S_out as S_in, as a
// dot product longer than N is meant to be split. After every pass S_out is
// compared with the reference running sum modulo 2^(3-SUM_LSB); after the
// last pass lx_out is compared with the reference activation + log code.
// Activation codes are the zero code with probability ZERO_PCT percent;
// weight codes, in ufix(MSB,W_LSB), are drawn from [LW_MIN, max-1] (LW_MIN models the power-of-two
// weight prescaling that keeps sums below 1) or are the zero code.
// mech[] counts how often each mechanism of the neuron was exercised:
//   0 zero-code activation   1 zero-code weight      2 carry out of L_X+L_W
//   3 negative weight        4 non-zero codes whose product rounds to 0
//   5 sum <= 0 (ReLU gives the zero code)            6 output saturates at 1
//   7 ordinary output code   8 non-zero bias         9 non-zero S_in
//  10 running sum leaves the sum format while the final sum fits
// When LAST_N < N, the lanes from LAST_N up in the last pass are padded with
// the zero code on both operands (a dot product that is not a multiple of N).
// Every 50th operation is directed: products of +1.0 on the first half of
// the lanes and -1.0 on the second, so the running sum leaves [-4, 4).
// One pass takes 1 time unit of settling; done rises at the end.
module lns_neuron_harness
  import tb_lns_ref_pkg::*;
#(
  parameter int  N        = 16,
  parameter int  MSB      = 2,
  parameter int  LSB      = -1,
  parameter int  SUM_LSB  = -6,
  parameter real BASE     = 2.0,
  parameter bit  SIGMOID  = 1'b0,
  parameter int  OPS      = 100,
  parameter int  PASSES   = 1,
  parameter int  ZERO_PCT = 30,
  parameter int  LW_MIN   = 0,
  parameter int  SEED     = 1,
  parameter int  LAST_N   = N,    // real lanes in the last pass, rest padded
  parameter int  W_LSB    = LSB   // LSB of the weight log format
) (
  output logic [N-1:0][MSB-LSB:0] lx,
  output logic [N-1:0][MSB-W_LSB:0] lw,
  output logic [N-1:0]            sw,
  output logic [2-SUM_LSB:0]      bias,
  output logic [2-SUM_LSB:0]      s_in,
  input  logic [2-SUM_LSB:0]      s_out,
  input  logic [MSB-LSB:0]        lx_out,
  output int                      checks,
  output int                      failures,
  output int                      mech [11],
  output bit                      done
);
  localparam int LW   = MSB - LSB + 1;
  localparam int SW   = 3 - SUM_LSB;
  localparam int MAXC = (1 << LW) - 1;
  localparam int WW   = MSB - W_LSB + 1;     // weight code width
  localparam int WMAX = (1 << WW) - 1;       // weight zero code
  localparam int WSH  = W_LSB - LSB;         // weight code to L_X units
  localparam int ONE  = 1 << (-SUM_LSB);  // 1.0 in sum units

  initial begin
    int seed_dummy;
    int running, exp_code, lo, hi;
    bit left_range;
    checks = 0;
    failures = 0;
    done = 1'b0;
    foreach (mech[k]) mech[k] = 0;
    lx = '0; lw = '0; sw = '0; bias = '0; s_in = '0;
    seed_dummy = $urandom(SEED);
    for (int op = 0; op < OPS; op++) begin
      left_range = 1'b0;
      running = 0;
      for (int pass = 0; pass < PASSES; pass++) begin
        int b, si, prod;
        if (pass == 0) begin
          b  = ($urandom_range(3) == 0) ? 0 : int'($urandom_range(ONE)) - ONE / 2;
          si = (PASSES == 1 && $urandom_range(1) == 1) ? int'($urandom_range(ONE)) - ONE / 2 : 0;
        end else begin
          b  = 0;
          si = int'($signed(s_out));
        end
        if (pass == 0) running = b + si;
        if (b != 0) mech[8]++;
        if (si != 0) mech[9]++;
        for (int i = 0; i < N; i++) begin
          int cx, cw;
          if (pass == PASSES - 1 && i >= LAST_N) begin
            // padding: both codes at the zero encoding
            cx = MAXC;
            cw = WMAX;
            sw[i] = 1'b0;
          end else if (op % 50 == 49) begin
            // directed: +1.0 on the first half of the lanes, -1.0 on the rest
            cx = 0;
            cw = 0;
            sw[i] = (i >= N / 2);
          end else begin
            cx = ($urandom_range(99) < ZERO_PCT) ? MAXC : int'($urandom_range(MAXC - 1));
            cw = ($urandom_range(99) < 5) ? WMAX : LW_MIN + int'($urandom_range(WMAX - 1 - LW_MIN));
            sw[i] = 1'($urandom_range(1));
          end
          lx[i] = LW'(cx);
          lw[i] = WW'(cw);
          prod  = ref_product(cx, cw * (1 << WSH), sw[i], LSB, SUM_LSB, BASE);
          running += prod;
          if (running >= ONE * 4 || running < -ONE * 4) left_range = 1'b1;
          if (cx == MAXC) mech[0]++;
          if (cw == WMAX) mech[1]++;
          if (cx + cw * (1 << WSH) > MAXC) mech[2]++;
          if (sw[i]) mech[3]++;
          if (cx != MAXC && cw != WMAX && prod == 0) mech[4]++;
        end
        bias = SW'(b);
        s_in = SW'(si);
        #1;
        checks++;
        if (int'($signed(s_out)) != wrap(running, SW)) begin
          failures++;
          $display("FAIL N=%0d l'=%0d op %0d pass %0d: S_out %0d expected %0d",
                   N, SUM_LSB, op, pass, $signed(s_out), wrap(running, SW));
        end
      end
      exp_code = ref_act_log(wrap(running, SW), MSB, LSB, SUM_LSB, BASE, SIGMOID);
      checks++;
      if (int'(lx_out) != exp_code) begin
        failures++;
        $display("FAIL N=%0d l'=%0d op %0d: lx_out %0d expected %0d",
                 N, SUM_LSB, op, lx_out, exp_code);
      end
      lo = -ONE * 4;
      hi = ONE * 4;
      if (left_range && running >= lo && running < hi) mech[10]++;
      if (!SIGMOID && wrap(running, SW) <= 0) mech[5]++;
      else if (wrap(running, SW) >= ONE) mech[6]++;
      else if (exp_code != 0 && exp_code != MAXC) mech[7]++;
    end
    done = 1'b1;
  end
endmodule
