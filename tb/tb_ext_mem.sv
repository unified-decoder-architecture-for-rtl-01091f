// tb_ext_mem: random multi-lane writes and reads against a model array.
module tb_ext_mem;
  localparam int DEPTH = 200, NP = 8;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [7:0] raddr [NP], waddr [NP];
  logic signed [6:0] rdata [NP], wdata [NP];
  logic we [NP];
  int model [DEPTH];
  bit known [DEPTH];

  ext_mem #(.DEPTH(DEPTH), .NP(NP), .DW(7)) dut (.clk(clk), .raddr(raddr), .rdata(rdata),
    .we(we), .waddr(waddr), .wdata(wdata));

  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < DEPTH; i++) known[i] = 0;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      for (int p = 0; p < NP; p++) begin
        // distinct write addresses per cycle: lane p owns addresses = p mod NP
        waddr[p] = 8'((($urandom_range(DEPTH / NP - 1)) * NP) + p);
        wdata[p] = 7'($urandom);
        we[p]    = $urandom_range(1);
        raddr[p] = 8'($urandom_range(DEPTH - 1));
      end
      #1;
      for (int p = 0; p < NP; p++)
        if (known[raddr[p]]) begin
          checks++;
          if (int'(rdata[p]) != model[raddr[p]]) begin
            failures++;
            $display("addr %0d got %0d exp %0d", raddr[p], rdata[p], model[raddr[p]]);
          end
        end
      @(posedge clk);
      for (int p = 0; p < NP; p++)
        if (we[p]) begin model[waddr[p]] = int'(wdata[p]); known[waddr[p]] = 1; end
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
