// tb_lns_mul: exhaustive test of the LNS multiplier for two formats,
// (m,l) = (2,-1) and (3,-2), and for weights in ufix(2,0) against
// activations in ufix(2,-1). Every pair of codes is applied and L_P is
// compared with the integer sum of the codes, carry included.
module tb_lns_mul;
  int checks = 0, failures = 0;

  logic [3:0] lx_a, lw_a;  logic [4:0] lp_a;
  logic [5:0] lx_b, lw_b;  logic [6:0] lp_b;

  lns_mul #(.MSB(2), .LSB(-1)) dut_a (.lx(lx_a), .lw(lw_a), .lp(lp_a));
  lns_mul #(.MSB(3), .LSB(-2)) dut_b (.lx(lx_b), .lw(lw_b), .lp(lp_b));

  // weights in ufix(2,0), activations in ufix(2,-1)
  logic [3:0] lx_c;  logic [2:0] lw_c;  logic [4:0] lp_c;
  lns_mul #(.MSB(2), .LSB(-1), .W_LSB(0)) dut_c (.lx(lx_c), .lw(lw_c), .lp(lp_c));

  int carries = 0;

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        lx_a = 4'(i); lw_a = 4'(j);
        #1;
        checks++;
        if (int'(lp_a) != i + j) begin
          failures++;
          $display("FAIL (2,-1): %0d + %0d gave %0d", i, j, lp_a);
        end
        if (i + j >= 16) carries++;
      end
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++) begin
        lx_b = 6'(i); lw_b = 6'(j);
        #1;
        checks++;
        if (int'(lp_b) != i + j) begin
          failures++;
          $display("FAIL (3,-2): %0d + %0d gave %0d", i, j, lp_b);
        end
      end
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 8; j++) begin
        lx_c = 4'(i); lw_c = 3'(j);
        #1;
        checks++;
        if (int'(lp_c) != i + 2 * j) begin
          failures++;
          $display("FAIL (2,-1)+(2,0): %0d + 2*%0d gave %0d", i, j, lp_c);
        end
      end
    checks++;
    if (carries == 0) failures++;  // the carry case must have been exercised
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
