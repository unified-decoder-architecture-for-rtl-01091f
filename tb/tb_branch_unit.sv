// tb_branch_unit: random check of the branch metrics in both modes.
module tb_branch_unit;
  import udec_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic  ldpc;
  chan_t y [NLANE];
  apri_t la [NLANE];
  gam_t  gamma [NLANE];

  branch_unit dut (.ldpc(ldpc), .y(y), .la(la), .gamma(gamma));

  initial begin
    for (int k = 0; k < 2000; k++) begin
      int ys, yp, lav;
      ldpc = k[0];
      for (int l = 0; l < NLANE; l++) begin
        y[l]  = chan_t'($urandom_range(63) - 32);
        la[l] = apri_t'($urandom_range(127) - 64);
      end
      #1;
      ys = int'(y[0]); yp = int'(y[1]); lav = int'(la[0]);
      for (int l = 0; l < NLANE; l++) begin
        int ex;
        if (ldpc) ex = int'(y[l]) + int'(la[l]);
        else if (l < 4) ex = bm(ys, yp, lav, l / 2, l % 2);
        else ex = 0;
        checks++;
        if (int'(gamma[l]) != ex) begin
          failures++;
          $display("ldpc=%0d lane %0d got %0d exp %0d", ldpc, l, gamma[l], ex);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
