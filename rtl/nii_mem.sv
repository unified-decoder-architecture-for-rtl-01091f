// nii_mem: boundary-metric store for next-iteration initialisation (NII) of
// the turbo backward recursion.
//
// Sliding-window decoding needs, at the right edge of every window, a beta
// vector to start the backward recursion. Instead of a training recursion,
// the beta vector that the previous iteration reached at the left edge of
// window w+1 (which is the right edge of window w) is reused. This memory
// keeps one 8-state vector per window: the SISO engine's beta_bnd output of
// window w is written at address w, and the start vector of window w is read
// from address w+1.
// NWIN entries of 8 x 10 bits; one write port, one combinational read port.
// The mechanism follows the architecture; the memory organisation and the
// size (6144-bit LTE block / 32-step windows = 192 windows) are this design's.
module nii_mem
  import udec_pkg::*;
#(
  parameter int unsigned NWIN = 192,
  localparam int unsigned AW  = $clog2(NWIN)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  sm_t           wdata [NST],
  input  logic [AW-1:0] raddr,
  output sm_t           rdata [NST]
);
  logic [NST*SMW-1:0] mem [NWIN];

  always_comb
    for (int s = 0; s < NST; s++) rdata[s] = mem[raddr][s*SMW +: SMW];

  always_ff @(posedge clk)
    if (we)
      for (int s = 0; s < NST; s++) mem[waddr][s*SMW +: SMW] <= wdata[s];
endmodule
