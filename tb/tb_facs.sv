// tb_facs: random and corner checks of the flexible ACS kernel in both modes.
// LDPC: Z must equal |f(a,b)| with X = V = |a|, Y = |b|, W = -|b|.
// Turbo: Z must equal max*(X+Y, V+W) modulo 2^10. Also checks the one-cycle
// latency and that the register holds while en is low.
module tb_facs;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, en, ldpc;
  logic signed [9:0] x, v, z;
  logic signed [7:0] y, w;
  int expz;

  facs #(.XW(10), .YW(8)) dut (.clk(clk), .en(en), .ldpc(ldpc), .x(x), .y(y), .v(v), .w(w), .z(z));

  always #5 clk = ~clk;

  task automatic apply(int ex);
    @(negedge clk);
    en = 1;
    @(posedge clk); #1;
    checks++;
    if (int'(z) != ex) begin
      failures++;
      $display("mode=%0d x=%0d y=%0d v=%0d w=%0d z=%0d exp=%0d", ldpc, x, y, v, w, z, ex);
    end
  endtask

  initial begin
    en = 0; ldpc = 1; x = 0; y = 0; v = 0; w = 0;
    // LDPC, exhaustive over small magnitudes and random large ones
    for (int a = 0; a < 40; a++)
      for (int b = 0; b < 40; b++) begin
        ldpc = 1; x = 10'(a); v = 10'(a); y = 8'(b); w = 8'(-b);
        apply(fref(a, b));
      end
    for (int k = 0; k < 2000; k++) begin
      int a, b;
      a = $urandom_range(511); b = $urandom_range(127);
      ldpc = 1; x = 10'(a); v = 10'(a); y = 8'(b); w = 8'(-b);
      apply(fref(a, b));
    end
    // turbo max*
    for (int k = 0; k < 3000; k++) begin
      int a0, a1, g0, g1;
      a0 = $urandom_range(1023) - 512; a1 = w10(a0 + int'($urandom_range(300)) - 150);
      g0 = $urandom_range(255) - 128;  g1 = $urandom_range(255) - 128;
      if (absi(w10(a0 + g0) - w10(a1 + g1)) > 500) continue;
      ldpc = 0; x = 10'(a0); y = 8'(g0); v = 10'(a1); w = 8'(g1);
      apply(mstar(w10(a0 + g0), w10(a1 + g1)));
    end
    // hold while en is low
    @(negedge clk); en = 0; expz = int'(z); x = 10'(100); y = 8'(3); ldpc = 0;
    repeat (3) @(posedge clk);
    #1 checks++;
    if (int'(z) != expz) begin failures++; $display("register did not hold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
