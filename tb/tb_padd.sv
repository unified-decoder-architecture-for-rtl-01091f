// tb_padd: beta+gamma terms for every branch against the encoder model.
module tb_padd;
  import udec_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  sm_t  beta [NST];
  gam_t gamma [NLANE];
  sm_t  bg [2][NST];

  padd dut (.beta(beta), .gamma(gamma), .bg(bg));

  initial begin
    for (int k = 0; k < 500; k++) begin
      for (int s = 0; s < 8; s++) beta[s] = sm_t'($urandom_range(1023));
      for (int s = 0; s < 8; s++) gamma[s] = gam_t'($urandom_range(255));
      #1;
      for (int u = 0; u < 2; u++)
        for (int s = 0; s < 8; s++) begin
          int ex;
          ex = w10(int'(beta[enc_next(s, u)]) + int'(gamma[u * 2 + enc_par(s, u)]));
          checks++;
          if (int'(bg[u][s]) != ex) begin
            failures++;
            $display("u=%0d s=%0d got %0d exp %0d", u, s, bg[u][s], ex);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
