// tb_acc_mem: clear, then random saturating delta updates on distinct
// columns per cycle, checked through the lane read ports and the extra read
// port.
module tb_acc_mem;
  localparam int N = 64, NP = 8;
  int checks = 0, failures = 0, nsat = 0;
  logic clk = 0, clr;
  logic [5:0] raddr [NP], uaddr [NP], xaddr;
  logic signed [9:0] rdata [NP], xdata;
  logic upd [NP];
  logic signed [7:0] delta [NP];
  int model [N];

  acc_mem #(.N(N), .NP(NP), .AW(10), .DLW(8)) dut (.clk(clk), .clr(clr), .raddr(raddr), .rdata(rdata),
    .upd(upd), .uaddr(uaddr), .delta(delta), .xaddr(xaddr), .xdata(xdata));

  always #5 clk = ~clk;

  initial begin
    clr = 1;
    for (int b = 0; b < N; b += NP) begin
      @(negedge clk);
      for (int p = 0; p < NP; p++) begin uaddr[p] = 6'(b + p); upd[p] = 1; delta[p] = 8'd5; raddr[p] = 0; end
      xaddr = 0;
      @(posedge clk);
    end
    for (int i = 0; i < N; i++) model[i] = 0;
    @(negedge clk); clr = 0;
    for (int p = 0; p < NP; p++) upd[p] = 0;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      for (int p = 0; p < NP; p++) begin
        uaddr[p] = 6'($urandom_range(N / NP - 1) * NP + p);
        upd[p]   = $urandom_range(1);
        delta[p] = 8'($urandom_range(255));
        if (k > 1500) delta[p] = 8'($urandom_range(127));   // drive into saturation
        raddr[p] = 6'($urandom_range(N - 1));
      end
      xaddr = 6'($urandom_range(N - 1));
      #1;
      for (int p = 0; p < NP; p++) begin
        checks++;
        if (int'(rdata[p]) != model[raddr[p]]) begin failures++; $display("col %0d got %0d exp %0d", raddr[p], rdata[p], model[raddr[p]]); end
      end
      checks++;
      if (int'(xdata) != model[xaddr]) begin failures++; $display("x port wrong"); end
      @(posedge clk);
      for (int p = 0; p < NP; p++)
        if (upd[p]) begin
          int v;
          v = model[uaddr[p]] + int'(delta[p]);
          if (v > 511) begin v = 511; nsat++; end
          if (v < -511) begin v = -511; nsat++; end
          model[uaddr[p]] = v;
        end
    end
    checks++;
    if (nsat == 0) begin failures++; $display("saturation never exercised"); end
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
