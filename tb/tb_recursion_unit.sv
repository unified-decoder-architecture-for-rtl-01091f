// tb_recursion_unit: runs an alpha unit and a beta unit side by side.
// LDPC: eight lanes from +infinity, next = f(current, gamma) each step.
// Turbo: 8-state forward and backward max* recursions against the encoder
// model of the reference package. Also checks the init mux.
module tb_recursion_unit;
  import udec_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, en, ldpc, init;
  sm_t  init_m [NLANE], fc [NLANE], fr [NLANE], bc [NLANE], br [NLANE];
  gam_t gamma [NLANE];
  int   ref_f [8], ref_b [8];

  recursion_unit #(.BACKWARD(1'b0)) u_f (.clk(clk), .en(en), .ldpc(ldpc), .init(init),
    .init_m(init_m), .gamma(gamma), .m_cur(fc), .m_reg(fr));
  recursion_unit #(.BACKWARD(1'b1)) u_b (.clk(clk), .en(en), .ldpc(ldpc), .init(init),
    .init_m(init_m), .gamma(gamma), .m_cur(bc), .m_reg(br));

  always #5 clk = ~clk;

  task automatic cmp(string what, int got, int ex);
    checks++;
    if (got != ex) begin
      failures++;
      $display("%s got %0d exp %0d", what, got, ex);
    end
  endtask

  initial begin
    en = 0; init = 0; ldpc = 1;
    for (int l = 0; l < NLANE; l++) begin init_m[l] = '0; gamma[l] = '0; end
    // ---------------- LDPC
    for (int run = 0; run < 20; run++) begin
      for (int step = 0; step < 8; step++) begin
        @(negedge clk);
        ldpc = 1; en = 1; init = (step == 0);
        for (int l = 0; l < NLANE; l++) begin
          init_m[l] = SM_INF;
          gamma[l]  = gam_t'($urandom_range(255) - 128);
          if (step == 0) ref_f[l] = 511;
          ref_f[l] = fref(ref_f[l], int'(gamma[l]) == -128 ? -127 : int'(gamma[l]));
        end
        #1;
        if (step == 0) for (int l = 0; l < NLANE; l++) cmp("ldpc init", int'(fc[l]), 511);
        @(posedge clk); #1;
        for (int l = 0; l < NLANE; l++) begin
          cmp("ldpc fwd", int'(fr[l]), ref_f[l]);
          cmp("ldpc bwd", int'(br[l]), ref_f[l]);
        end
      end
    end
    // ---------------- turbo
    for (int run = 0; run < 20; run++) begin
      for (int step = 0; step < 12; step++) begin
        int ys, yp, la;
        @(negedge clk);
        ldpc = 0; en = 1; init = (step == 0);
        ys = $urandom_range(40) - 20; yp = $urandom_range(40) - 20; la = $urandom_range(40) - 20;
        for (int s = 0; s < 8; s++) begin
          init_m[s] = (s == 0) ? sm_t'(0) : SM_NEG;
          if (step == 0) begin ref_f[s] = int'(init_m[s]); ref_b[s] = int'(init_m[s]); end
        end
        for (int k = 0; k < 4; k++) gamma[k] = gam_t'(bm(ys, yp, la, k / 2, k % 2));
        for (int k = 4; k < 8; k++) gamma[k] = '0;
        ref_f = fwd_step(ref_f, ys, yp, la);
        ref_b = bwd_step(ref_b, ys, yp, la);
        @(posedge clk); #1;
        for (int s = 0; s < 8; s++) begin
          cmp("turbo fwd", int'(fr[s]), ref_f[s]);
          cmp("turbo bwd", int'(br[s]), ref_b[s]);
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
