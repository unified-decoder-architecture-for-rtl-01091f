// tb_nii_mem: random boundary-vector writes and reads against a model array.
module tb_nii_mem;
  import udec_pkg::*;
  localparam int NWIN = 40;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic we;
  logic [5:0] waddr, raddr;
  sm_t wdata [NST], rdata [NST];
  int model [NWIN][NST];
  bit known [NWIN];

  nii_mem #(.NWIN(NWIN)) dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata),
    .raddr(raddr), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < NWIN; i++) known[i] = 0;
    for (int k = 0; k < 1500; k++) begin
      @(negedge clk);
      we = $urandom_range(2) == 0;
      waddr = 6'($urandom_range(NWIN - 1));
      raddr = 6'($urandom_range(NWIN - 1));
      for (int s = 0; s < NST; s++) wdata[s] = sm_t'($urandom);
      #1;
      if (known[raddr])
        for (int s = 0; s < NST; s++) begin
          checks++;
          if (int'(rdata[s]) != model[raddr][s]) begin
            failures++;
            $display("window %0d state %0d got %0d exp %0d", raddr, s, rdata[s], model[raddr][s]);
          end
        end
      @(posedge clk);
      if (we) begin
        for (int s = 0; s < NST; s++) model[waddr][s] = int'(wdata[s]);
        known[waddr] = 1;
      end
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
