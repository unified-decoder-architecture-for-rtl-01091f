// acc_mem: accumulating memory of the GST LDPC decoder.
//
// Holds, for every code bit k, the sum over all groups of the latest
// extrinsic messages, Lambda_all(k). A group's a-priori input is
// Lambda_all(k) minus its own old message; when the group produces a new
// message the sum is corrected by the difference,
//   Lambda_all(k) <= Lambda_all(k) + (Lambda_new(k) - Lambda_old(k)),
// so the memory always holds the column sum without re-adding all groups.
// NP lanes each have a combinational read port and an update port that adds
// a signed delta with saturation to AW bits; clr turns every enabled update
// into a write of zero. One extra read port (xaddr/xdata) serves the hard
// decision. The update rule follows the architecture; the word length, the
// saturation and the porting are this design's. Lanes must not update the
// same bit in one cycle (true within one group by construction of the
// partition).
module acc_mem #(
  parameter int unsigned N   = 2304,
  parameter int unsigned NP  = 96,
  parameter int unsigned AW  = 10,
  parameter int unsigned DLW = 8,
  localparam int unsigned CW = $clog2(N)
) (
  input  logic                  clk,
  input  logic                  clr,
  input  logic [CW-1:0]         raddr [NP],
  output logic signed [AW-1:0]  rdata [NP],
  input  logic                  upd   [NP],
  input  logic [CW-1:0]         uaddr [NP],
  input  logic signed [DLW-1:0] delta [NP],
  input  logic [CW-1:0]         xaddr,
  output logic signed [AW-1:0]  xdata
);
  localparam logic signed [AW:0] MAXV = (AW+1)'((1 << (AW - 1)) - 1);
  localparam logic signed [AW:0] MINV = -MAXV;

  logic signed [AW-1:0] mem [N];
  logic signed [AW-1:0] nv  [NP];

  always_comb begin
    for (int p = 0; p < NP; p++) rdata[p] = mem[raddr[p]];
    xdata = mem[xaddr];
  end

  always_comb begin
    for (int p = 0; p < NP; p++) begin
      logic signed [AW:0] sum;
      sum = (AW+1)'(mem[uaddr[p]]) + (AW+1)'(delta[p]);
      if (sum > MAXV)      nv[p] = MAXV[AW-1:0];
      else if (sum < MINV) nv[p] = MINV[AW-1:0];
      else                 nv[p] = sum[AW-1:0];
    end
  end

  always_ff @(posedge clk)
    for (int p = 0; p < NP; p++)
      if (upd[p]) mem[uaddr[p]] <= clr ? '0 : nv[p];
endmodule
