// lifo_stack: window-reversal stack of the SISO engine.
//
// Data arrives one entry per step in natural order, window after window,
// each window len entries long. While window w is written, the entries of
// window w-1 are read out in reverse order, so the backward (beta) recursion
// and the Lambda unit see the data of the previous window last-in first-out,
// delayed by exactly one window (latency len steps).
// One RAM of DEPTH words does both: every step reads an address and then
// writes the new entry to the same address, and the address sweep changes
// direction at each window boundary. This realisation is this design's; the
// architecture specifies a stack of depth L per data stream.
//
// Each entry carries a valid flag (wvalid/rvalid), cleared by reset, so that
// entries never written read as invalid.
// Interface: en advances one step; rdata is combinational from the current
// address (the entry pushed len steps earlier, mirrored within the window);
// pos is the step index within the current window and last flags its final
// step. len may change only at a window boundary. rst_n is asynchronous.
module lifo_stack #(
  parameter int unsigned W     = 65,
  parameter int unsigned DEPTH = 32,
  localparam int unsigned AW   = $clog2(DEPTH + 1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [AW-1:0] len,
  input  logic         wvalid,
  input  logic [W-1:0] wdata,
  output logic         rvalid,
  output logic [W-1:0] rdata,
  output logic [AW-1:0] pos,
  output logic         last
);
  logic [W-1:0]  mem [DEPTH];
  logic [DEPTH-1:0] vbit;
  logic          down;
  logic [AW-1:0] addr;

  always_comb begin
    addr  = down ? (len - 1'b1 - pos) : pos;
    rdata = mem[addr[$clog2(DEPTH)-1:0]];
    rvalid = vbit[addr[$clog2(DEPTH)-1:0]];
    last  = (pos == len - 1'b1);
  end

  always_ff @(posedge clk)
    if (en) mem[addr[$clog2(DEPTH)-1:0]] <= wdata;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      pos  <= '0;
      down <= 1'b0;
      vbit <= '0;
    end else if (en) begin
      vbit[addr[$clog2(DEPTH)-1:0]] <= wvalid;
      if (last) begin
        pos  <= '0;
        down <= ~down;
      end else begin
        pos <= pos + 1'b1;
      end
    end
endmodule
