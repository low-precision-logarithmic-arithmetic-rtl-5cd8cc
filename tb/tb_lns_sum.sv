// tb_lns_sum: random test of the exact summation with N = 24 products in
// sfix(1,-6) plus bias and S_in in sfix(2,-6). The reference is the integer
// sum taken modulo 2^9. Includes directed vectors whose running sum leaves
// the output range while the final sum fits.
module tb_lns_sum;
  import tb_lns_ref_pkg::*;
  localparam int N = 24;
  int checks = 0, failures = 0, n_wrap = 0;

  logic [N-1:0][7:0] p;
  logic [8:0] bias, s_in, s_out;

  lns_sum #(.N(N), .SUM_LSB(-6)) dut (.p(p), .bias(bias), .s_in(s_in), .s_out(s_out));

  task automatic apply(int terms[N], int b, int si);
    int ref_sum;
    ref_sum = b + si;
    for (int i = 0; i < N; i++) begin
      p[i] = 8'(terms[i]);
      ref_sum += terms[i];
    end
    bias = 9'(b);
    s_in = 9'(si);
    #1;
    checks++;
    if (int'($signed(s_out)) != wrap(ref_sum, 9)) begin
      failures++;
      $display("FAIL sum: got %0d expected %0d", $signed(s_out), wrap(ref_sum, 9));
    end
  endtask

  initial begin
    int t[N];
    for (int v = 0; v < 2000; v++) begin
      for (int i = 0; i < N; i++) t[i] = int'($urandom_range(128)) - 64;
      apply(t, int'($urandom_range(511)) - 256, int'($urandom_range(511)) - 256);
    end
    // +1.0 on the first half, -1.0 on the second: running sum reaches 12,
    // final sum 0.
    for (int i = 0; i < N; i++) t[i] = (i < N / 2) ? 64 : -64;
    apply(t, 0, 0);
    n_wrap++;
    for (int i = 0; i < N; i++) t[i] = (i < N / 2) ? -64 : 63;
    apply(t, 17, -3);
    n_wrap++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
