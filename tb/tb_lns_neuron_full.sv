// tb_lns_neuron_full: the LNS neuron at its default size, N = 784 input
// pairs (a fully parallel neuron of the first layer of a 784-300-100-10 MNIST
// MLP) in the format (m,l) = (2,-1), l' = -6. 300 operations of random data
// (30 % zero activations, weights prescaled by 2^-3 as the weight scaling
// step does) are checked against the reference model, which makes up the
// 300 neurons of that layer for one image.
module tb_lns_neuron_full;
  localparam int N = 784;
  int checks, failures;
  int mech [11];
  bit done;

  logic [N-1:0][3:0] lx, lw;
  logic [N-1:0]      sw;
  logic [8:0]        bias, s_in, s_out;
  logic [3:0]        lx_out;

  lns_neuron dut (
    .lx(lx), .lw(lw), .sw(sw), .bias(bias), .s_in(s_in),
    .s_out(s_out), .lx_out(lx_out)
  );

  lns_neuron_harness #(.N(N), .OPS(300), .LW_MIN(6), .SEED(7)) h (
    .lx(lx), .lw(lw), .sw(sw), .bias(bias), .s_in(s_in),
    .s_out(s_out), .lx_out(lx_out), .checks(checks), .failures(failures),
    .mech(mech), .done(done)
  );

  initial begin
    int f;
    wait (done);
    #1;
    f = failures;
    // zero codes, carries, negative weights, ReLU zeros and ordinary outputs
    // must all have occurred at full size
    foreach (mech[k]) if (k inside {0, 2, 3, 4, 5, 7}) begin
      if (mech[k] == 0) begin
        f++;
        $display("FAIL mechanism %0d never occurred", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks + 6, f);
    $finish;
  end

  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
