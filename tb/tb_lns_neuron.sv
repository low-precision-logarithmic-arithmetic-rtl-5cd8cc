// tb_lns_neuron: end-to-end test of the LNS neuron at reduced width
// (N = 16 and N = 12 input pairs) in every format configuration evaluated
// for it: MNIST (2,-1),(1,-6) and (2,-1),(1,-7); CIFAR-10 (3,-1),(1,-11) and
// (2,-2),(1,-10). One more instance chains 3 passes through S_in/S_out and
// one uses the sigmoid table, one stores weights with a coarser log LSB
// (ufix(2,0), padded with a zero bit) than the activations (ufix(2,-1)). Each instance is driven and checked by
// lns_neuron_harness; every mechanism counted there must occur at least once.
module tb_lns_neuron;
  import lns_pkg::*;
  localparam int NI = 7;
  int checks = 0, failures = 0;
  int chk [NI], fl [NI];
  int mech [NI][11];
  bit done [NI];

  // Declares one neuron and its harness; formats given as (m, l, l').
  `define LNS_INST(IDX, NN, M, L, LP, ACTV, SIG, PASS, LWMIN, SD, WL) \
    logic [(NN)-1:0][(M)-(L):0] lx_``IDX; \
    logic [(NN)-1:0][(M)-(WL):0] lw_``IDX; \
    logic [(NN)-1:0] sw_``IDX; \
    logic [2-(LP):0] bias_``IDX, sin_``IDX, sout_``IDX; \
    logic [(M)-(L):0] lxo_``IDX; \
    lns_neuron #(.N(NN), .MSB(M), .LSB(L), .SUM_LSB(LP), .ACT(ACTV), .W_LSB(WL)) dut_``IDX ( \
      .lx(lx_``IDX), .lw(lw_``IDX), .sw(sw_``IDX), .bias(bias_``IDX), .s_in(sin_``IDX), \
      .s_out(sout_``IDX), .lx_out(lxo_``IDX)); \
    lns_neuron_harness #(.N(NN), .MSB(M), .LSB(L), .SUM_LSB(LP), .SIGMOID(SIG), \
      .OPS(400), .PASSES(PASS), .LW_MIN(LWMIN), .SEED(SD), .W_LSB(WL)) h_``IDX ( \
      .lx(lx_``IDX), .lw(lw_``IDX), .sw(sw_``IDX), .bias(bias_``IDX), .s_in(sin_``IDX), \
      .s_out(sout_``IDX), .lx_out(lxo_``IDX), .checks(chk[IDX]), .failures(fl[IDX]), \
      .mech(mech[IDX]), .done(done[IDX]));

  `LNS_INST(0, 16, 2, -1, -6,  ACT_RELU,    1'b0, 1, 0, 11, -1)
  `LNS_INST(1, 16, 2, -1, -7,  ACT_RELU,    1'b0, 1, 2, 12, -1)
  `LNS_INST(2, 12, 3, -1, -11, ACT_RELU,    1'b0, 1, 4, 13, -1)
  `LNS_INST(3, 12, 2, -2, -10, ACT_RELU,    1'b0, 1, 4, 14, -2)
  `LNS_INST(4, 16, 2, -1, -6,  ACT_RELU,    1'b0, 3, 2, 15, -1)
  `LNS_INST(5, 12, 2, -1, -6,  ACT_SIGMOID, 1'b1, 1, 0, 16, -1)
  `LNS_INST(6, 16, 2, -1, -6,  ACT_RELU,    1'b0, 1, 0, 17, 0)

  `undef LNS_INST

  initial begin
    int total [11];
    static string names [11] = '{"zero activation", "zero weight", "log-sum carry",
                          "negative weight", "product rounds to 0", "ReLU zero output",
                          "saturated output", "ordinary output", "bias",
                          "partial-sum input", "running-sum wrap"};
    wait (done[0] && done[1] && done[2] && done[3] && done[4] && done[5] && done[6]);
    #1;
    foreach (total[k]) total[k] = 0;
    for (int i = 0; i < NI; i++) begin
      checks += chk[i];
      failures += fl[i];
      for (int k = 0; k < 11; k++) total[k] += mech[i][k];
    end
    for (int k = 0; k < 11; k++) begin
      $display("mechanism %-22s occurred %0d times", names[k], total[k]);
      checks++;
      if (total[k] == 0) begin
        failures++;
        $display("FAIL mechanism %s never occurred", names[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
