// ext_mem: extrinsic memory of the GST (group sub-trellis) LDPC decoder.
//
// One word per non-zero entry of the parity-check matrix holds the most
// recent extrinsic message that the group owning that entry produced. Each
// sub-iteration reads the old message (to form the a-priori input and, later,
// the column-sum delta) and writes the new one back.
// NP independent lanes, each with a combinational read port and a write port
// (registered write). The size rule (non-zeros x word length) follows the
// architecture; the per-lane porting and the 7-bit word are this design's.
// Lanes must not write the same address in one cycle.
module ext_mem #(
  parameter int unsigned DEPTH = 8064,
  parameter int unsigned NP    = 96,
  parameter int unsigned DW    = 7,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic                 clk,
  input  logic [AW-1:0]        raddr [NP],
  output logic signed [DW-1:0] rdata [NP],
  input  logic                 we    [NP],
  input  logic [AW-1:0]        waddr [NP],
  input  logic signed [DW-1:0] wdata [NP]
);
  logic signed [DW-1:0] mem [DEPTH];

  always_comb
    for (int p = 0; p < NP; p++) rdata[p] = mem[raddr[p]];

  always_ff @(posedge clk)
    for (int p = 0; p < NP; p++)
      if (we[p]) mem[waddr[p]] <= wdata[p];
endmodule
