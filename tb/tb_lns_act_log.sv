// tb_lns_act_log: exhaustive test of the activation + log table.
// Every sum code of sfix(2,-6) is applied to a ReLU table in the MNIST format
// (m,l) = (2,-1), and every code of sfix(2,-10) to a ReLU table in format
// (2,-2); a sigmoid table in the MNIST format is also checked. Outputs are
// compared with a nearest-code search, and the zero and saturation cases
// are counted.
module tb_lns_act_log;
  import lns_pkg::*;
  import tb_lns_ref_pkg::*;
  int checks = 0, failures = 0;
  int n_zero = 0, n_sat = 0, n_mid = 0;

  logic [8:0]  s_a;  logic [3:0] lx_a, lx_c;
  logic [12:0] s_b;  logic [4:0] lx_b;

  lns_act_log #(.MSB(2), .LSB(-1), .SUM_LSB(-6))  dut_a (.s(s_a), .lx(lx_a));
  lns_act_log #(.MSB(2), .LSB(-2), .SUM_LSB(-10)) dut_b (.s(s_b), .lx(lx_b));
  lns_act_log #(.MSB(2), .LSB(-1), .SUM_LSB(-6), .ACT(ACT_SIGMOID)) dut_c (.s(s_a), .lx(lx_c));

  initial begin
    for (int i = 0; i < 512; i++) begin
      int sv, e;
      s_a = 9'(i);
      sv  = wrap(i, 9);
      #1;
      e = ref_act_log(sv, 2, -1, -6, 2.0, 1'b0);
      checks++;
      if (int'(lx_a) != e) begin
        failures++;
        $display("FAIL relu s=%0d got %0d expected %0d", sv, lx_a, e);
      end
      if (sv <= 0) begin
        checks++;
        if (lx_a != 4'hf) failures++;
        n_zero++;
      end else if (sv >= 64) begin
        checks++;
        if (lx_a != 4'h0) failures++;
        n_sat++;
      end else if (lx_a != 4'h0 && lx_a != 4'hf) n_mid++;
      e = ref_act_log(sv, 2, -1, -6, 2.0, 1'b1);
      checks++;
      if (int'(lx_c) != e) begin
        failures++;
        $display("FAIL sigmoid s=%0d got %0d expected %0d", sv, lx_c, e);
      end
    end
    for (int i = 0; i < 8192; i++) begin
      int sv, e;
      s_b = 13'(i);
      sv  = wrap(i, 13);
      #1;
      e = ref_act_log(sv, 2, -2, -10, 2.0, 1'b0);
      checks++;
      if (int'(lx_b) != e) begin
        failures++;
        $display("FAIL (2,-2) s=%0d got %0d expected %0d", sv, lx_b, e);
      end
    end
    checks++;
    if (n_zero == 0 || n_sat == 0 || n_mid == 0) failures++;
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
