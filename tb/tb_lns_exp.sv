// tb_lns_exp: exhaustive test of the log-to-linear table for the MNIST format
// ((2,-1), l' = -6) and a CIFAR format ((3,-1), l' = -11). For every {s, L_P}
// the output must be within half an LSB of (-1)^s * 2^-L_P, must equal the
// independently rounded reference, and the product of a zero-code operand
// (L_P >= the largest input code) must be 0 in the MNIST format.
module tb_lns_exp;
  import tb_lns_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [4:0] lp_a; logic sp_a; logic [7:0]  p_a;
  logic [5:0] lp_b; logic sp_b; logic [12:0] p_b;

  lns_exp #(.MSB(2), .LSB(-1), .SUM_LSB(-6))  dut_a (.lp(lp_a), .sp(sp_a), .p(p_a));
  lns_exp #(.MSB(3), .LSB(-1), .SUM_LSB(-11)) dut_b (.lp(lp_b), .sp(sp_b), .p(p_b));

  task automatic check(int got, int lp, bit s, int lsb, int sum_lsb);
    real exact, err;
    int  expv;
    exact = (s ? -1.0 : 1.0) * (2.0 ** (-real'(lp) * (2.0 ** lsb)));
    err   = real'(got) * (2.0 ** sum_lsb) - exact;
    if (err < 0.0) err = -err;
    expv  = ref_product(lp, 0, s, lsb, sum_lsb, 2.0);
    checks++;
    if (got != expv || err > (2.0 ** (sum_lsb - 1)) * 1.000001) begin
      failures++;
      $display("FAIL lsb'=%0d s=%0d lp=%0d got %0d expected %0d", sum_lsb, s, lp, got, expv);
    end
  endtask

  initial begin
    for (int s = 0; s < 2; s++)
      for (int lp = 0; lp < 32; lp++) begin
        lp_a = 5'(lp); sp_a = 1'(s);
        #1;
        check(int'($signed(p_a)), lp, 1'(s), -1, -6);
        if (lp >= 15) begin  // an operand carried the zero code (7.5)
          checks++;
          if (p_a != '0) begin
            failures++;
            $display("FAIL zero encoding: lp=%0d gave %0d", lp, $signed(p_a));
          end
        end
      end
    for (int s = 0; s < 2; s++)
      for (int lp = 0; lp < 64; lp++) begin
        lp_b = 6'(lp); sp_b = 1'(s);
        #1;
        check(int'($signed(p_b)), lp, 1'(s), -1, -11);
      end
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
