// tb_lns_cifar_layer: the last convolution of the VGG-like CIFAR-10 network
// (512 input channels, 3x3 kernels: 4608 input pairs per output) computed on
// 784-input neurons in 6 passes chained through S_in/S_out, the last pass
// holding 688 real pairs and 96 padded ones. Both CIFAR-10 formats are run:
// (m,l) = (3,-1) with l' = -11, and (m,l) = (2,-2) with l' = -10.
module tb_lns_cifar_layer;
  import lns_pkg::*;
  localparam int N = 784;
  int checks = 0, failures = 0;
  int chk_a, fl_a, chk_b, fl_b;
  int mech_a [11], mech_b [11];
  bit done_a, done_b;

  logic [N-1:0][4:0] lx_a, lw_a;  logic [N-1:0] sw_a;
  logic [13:0] bias_a, sin_a, sout_a;  logic [4:0] lxo_a;
  logic [N-1:0][4:0] lx_b, lw_b;  logic [N-1:0] sw_b;
  logic [12:0] bias_b, sin_b, sout_b;  logic [4:0] lxo_b;

  lns_neuron #(.N(N), .MSB(3), .LSB(-1), .SUM_LSB(-11)) dut_a (
    .lx(lx_a), .lw(lw_a), .sw(sw_a), .bias(bias_a), .s_in(sin_a),
    .s_out(sout_a), .lx_out(lxo_a));
  lns_neuron_harness #(.N(N), .MSB(3), .LSB(-1), .SUM_LSB(-11), .OPS(20),
                       .PASSES(6), .LAST_N(688), .ZERO_PCT(50), .LW_MIN(10), .SEED(3)) h_a (
    .lx(lx_a), .lw(lw_a), .sw(sw_a), .bias(bias_a), .s_in(sin_a),
    .s_out(sout_a), .lx_out(lxo_a), .checks(chk_a), .failures(fl_a),
    .mech(mech_a), .done(done_a));

  lns_neuron #(.N(N), .MSB(2), .LSB(-2), .SUM_LSB(-10)) dut_b (
    .lx(lx_b), .lw(lw_b), .sw(sw_b), .bias(bias_b), .s_in(sin_b),
    .s_out(sout_b), .lx_out(lxo_b));
  lns_neuron_harness #(.N(N), .MSB(2), .LSB(-2), .SUM_LSB(-10), .OPS(20),
                       .PASSES(6), .LAST_N(688), .ZERO_PCT(50), .LW_MIN(16), .SEED(4)) h_b (
    .lx(lx_b), .lw(lw_b), .sw(sw_b), .bias(bias_b), .s_in(sin_b),
    .s_out(sout_b), .lx_out(lxo_b), .checks(chk_b), .failures(fl_b),
    .mech(mech_b), .done(done_b));

  initial begin
    wait (done_a && done_b);
    #1;
    checks = chk_a + chk_b + 1;
    failures = fl_a + fl_b;
    if (mech_a[9] == 0 || mech_b[9] == 0) failures++;  // chaining was used
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
