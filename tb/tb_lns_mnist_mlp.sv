// tb_lns_mnist_mlp: the hidden and output layers of the 784-300-100-10 MNIST
// perceptron on the default 784-input neuron. A layer-2 neuron has 300
// inputs and a layer-3 neuron 100; the remaining lanes are padded with the
// zero code on both operands. 300 random outputs are checked for each,
// with random bias values (the network itself has none, which is bias 0).
module tb_lns_mnist_mlp;
  localparam int N = 784;
  int chk2, fl2, chk3, fl3;
  int mech2 [11], mech3 [11];
  bit done2, done3;

  logic [N-1:0][3:0] lx2, lw2, lx3, lw3;
  logic [N-1:0]      sw2, sw3;
  logic [8:0]        bias2, sin2, sout2, bias3, sin3, sout3;
  logic [3:0]        lxo2, lxo3;

  lns_neuron dut2 (.lx(lx2), .lw(lw2), .sw(sw2), .bias(bias2), .s_in(sin2),
                   .s_out(sout2), .lx_out(lxo2));
  lns_neuron_harness #(.N(N), .OPS(300), .LAST_N(300), .LW_MIN(2), .SEED(21)) h2 (
    .lx(lx2), .lw(lw2), .sw(sw2), .bias(bias2), .s_in(sin2),
    .s_out(sout2), .lx_out(lxo2), .checks(chk2), .failures(fl2),
    .mech(mech2), .done(done2));

  lns_neuron dut3 (.lx(lx3), .lw(lw3), .sw(sw3), .bias(bias3), .s_in(sin3),
                   .s_out(sout3), .lx_out(lxo3));
  lns_neuron_harness #(.N(N), .OPS(300), .LAST_N(100), .LW_MIN(0), .SEED(22)) h3 (
    .lx(lx3), .lw(lw3), .sw(sw3), .bias(bias3), .s_in(sin3),
    .s_out(sout3), .lx_out(lxo3), .checks(chk3), .failures(fl3),
    .mech(mech3), .done(done3));

  initial begin
    int f;
    wait (done2 && done3);
    #1;
    f = fl2 + fl3;
    // both layers must produce ordinary codes and ReLU zeros
    if (mech2[5] == 0 || mech2[7] == 0 || mech3[5] == 0 || mech3[7] == 0) f++;
    $display("TB_RESULT checks=%0d failures=%0d", chk2 + chk3 + 1, f);
    $finish;
  end

  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", chk2 + chk3, fl2 + fl3 + 1);
    $finish;
  end
endmodule
