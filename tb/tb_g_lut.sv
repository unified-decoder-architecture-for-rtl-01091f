// tb_g_lut: exhaustive check of the single- and double-sided correction
// tables against the real-valued step approximation of log(1+exp(-x)).
module tb_g_lut;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic signed [10:0] idx;
  logic [1:0] g_s, g_d;

  g_lut #(.IW(11), .DOUBLE_SIDED(1'b0)) u_s (.idx(idx), .g(g_s));
  g_lut #(.IW(11), .DOUBLE_SIDED(1'b1)) u_d (.idx(idx), .g(g_d));

  initial begin
    for (int i = -1024; i < 1024; i++) begin
      idx = 11'(i);
      #1;
      checks += 2;
      if (int'(g_d) != gref(i)) begin
        failures++;
        $display("DLUT idx=%0d got %0d exp %0d", i, g_d, gref(i));
      end
      if (int'(g_s) != ((i >= 0) ? gref(i) : 0)) begin
        failures++;
        $display("LUT idx=%0d got %0d", i, g_s);
      end
    end
    // the nine table entries, spelled out
    foreach (idx_tab[k]) begin
      idx = 11'(k); #1; checks++;
      if (g_s != idx_tab[k]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic [1:0] idx_tab [10] = '{3, 2, 2, 2, 1, 1, 1, 1, 1, 0};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
