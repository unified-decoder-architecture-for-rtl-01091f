// tb_lambda_s1: LDPC lanes f(alpha, beta) and the eight turbo branch-pair
// max* values, one cycle after en.
module tb_lambda_s1;
  import udec_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, en, ldpc;
  sm_t  alpha [NLANE], beta [NLANE], lam [NLANE];
  sm_t  bg [2][NST];
  int   ex [NLANE];

  lambda_s1 dut (.clk(clk), .en(en), .ldpc(ldpc), .alpha(alpha), .beta(beta), .bg(bg), .lam(lam));

  always #5 clk = ~clk;

  initial begin
    en = 0; ldpc = 1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      en = 1; ldpc = k[0];
      for (int l = 0; l < NLANE; l++) begin
        alpha[l] = sm_t'($urandom_range(1022) - 511);
        beta[l]  = sm_t'($urandom_range(1022) - 511);
        bg[0][l] = sm_t'($urandom_range(1023));
        bg[1][l] = sm_t'($urandom_range(1023));
      end
      if (!ldpc) begin
        // keep the turbo operands within the modulo range
        for (int l = 0; l < NLANE; l++) begin
          alpha[l] = sm_t'(int'(alpha[0]) / 2 + int'($urandom_range(100)));
          bg[0][l] = sm_t'(int'(alpha[0]) / 2 + int'($urandom_range(100)));
          bg[1][l] = sm_t'(int'(alpha[0]) / 2 + int'($urandom_range(100)));
        end
      end
      for (int l = 0; l < NLANE; l++)
        if (ldpc) ex[l] = fref(int'(alpha[l]), int'(beta[l]));
        else ex[l] = mstar(w10(int'(alpha[2*(l%4)]) + int'(bg[l/4][2*(l%4)])),
                           w10(int'(alpha[2*(l%4)+1]) + int'(bg[l/4][2*(l%4)+1])));
      @(posedge clk); #1;
      for (int l = 0; l < NLANE; l++) begin
        checks++;
        if (int'(lam[l]) != ex[l]) begin
          failures++;
          $display("ldpc=%0d lane %0d got %0d exp %0d", ldpc, l, lam[l], ex[l]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
