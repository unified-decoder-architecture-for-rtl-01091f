// tb_lambda_s2: the six-max* tree and final subtraction, one cycle after en.
module tb_lambda_s2;
  import udec_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, en;
  sm_t  s1 [NLANE], llr;
  int   ex;

  lambda_s2 dut (.clk(clk), .en(en), .s1(s1), .llr(llr));

  always #5 clk = ~clk;

  initial begin
    en = 0;
    for (int k = 0; k < 3000; k++) begin
      int base;
      @(negedge clk);
      en = 1;
      base = $urandom_range(1023) - 512;
      for (int l = 0; l < NLANE; l++) s1[l] = sm_t'(w10(base + int'($urandom_range(k % 2 ? 12 : 200))));
      ex = w10(mstar(mstar(s1[0], s1[1]), mstar(s1[2], s1[3])) -
               mstar(mstar(s1[4], s1[5]), mstar(s1[6], s1[7])));
      @(posedge clk); #1;
      checks++;
      if (int'(llr) != ex) begin
        failures++;
        $display("got %0d exp %0d", llr, ex);
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
