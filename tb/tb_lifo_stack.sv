// tb_lifo_stack: windows of several lengths are pushed; during each window
// the previous window must come back in reverse order with its valid flags,
// and never-written entries must read as invalid after reset.
module tb_lifo_stack;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en, wvalid, rvalid, last;
  logic [5:0]  len, pos;
  logic [15:0] wdata, rdata;
  logic [15:0] prev [$], cur [$];
  logic        prev_v;

  lifo_stack #(.W(16), .DEPTH(32)) dut (.clk(clk), .rst_n(rst_n), .en(en), .len(len),
    .wvalid(wvalid), .wdata(wdata), .rvalid(rvalid), .rdata(rdata), .pos(pos), .last(last));

  always #5 clk = ~clk;

  initial begin
    en = 0; len = 6'd4; wvalid = 0; wdata = 0; prev_v = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int win = 0; win < 30; win++) begin
      int L;
      L = (win < 10) ? 4 : (win < 20) ? 32 : 7;
      if (win == 10 || win == 20) prev_v = 0;   // length change: old data not compared
      cur = {};
      for (int j = 0; j < L; j++) begin
        @(negedge clk);
        en = 1; len = 6'(L); wvalid = (win % 5 != 3);
        wdata = 16'($urandom);
        #1;
        checks++;
        if (pos != 6'(j) || last != (j == L - 1)) begin failures++; $display("pos %0d exp %0d", pos, j); end
        if (win == 0) begin
          checks++;
          if (rvalid) begin failures++; $display("unwritten entry valid"); end
        end
        if (prev_v) begin
          checks += 2;
          if (rvalid != (win % 5 != 4)) begin failures++; $display("valid flag wrong"); end
          if (rdata != prev[L - 1 - j]) begin
            failures++;
            $display("win %0d j %0d got %h exp %h", win, j, rdata, prev[L - 1 - j]);
          end
        end
        cur.push_back(wdata);
        @(posedge clk);
      end
      prev = cur;
      prev_v = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
