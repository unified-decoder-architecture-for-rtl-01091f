// branch_unit: branch metrics for the SISO engine.
//
// LDPC mode: eight independent lanes, gamma[l] = Lch[l] + La[l], the input of
// eight single-parity-check trellises.
// Turbo mode: one trellis step of a rate-1/2 constituent code. With
// ys = y[0], yp = y[1] and La = la[0], the metric of a branch carrying
// systematic bit u and parity bit p is
//   gamma(u,p) = (1-u)(ys+La) + (1-p)yp,
// placed in gamma[{u,p}] (entries 0..3; entries 4..7 are zero). This differs
// from the symmetric form by a constant common to all branches of a step,
// which cancels in every max* and difference, and it fits the 8-bit branch
// metric for 6-bit channel and 7-bit a-priori inputs without rounding.
// The unit and its input/output widths follow the architecture; the metric
// form is this design's choice. Purely combinational.
module branch_unit
  import udec_pkg::*;
(
  input  logic  ldpc,
  input  chan_t y     [NLANE],
  input  apri_t la    [NLANE],
  output gam_t  gamma [NLANE]
);
  gam_t sys;
  always_comb begin
    sys = GW'(y[0]) + GW'(la[0]);
    for (int l = 0; l < NLANE; l++) begin
      if (ldpc)
        gamma[l] = GW'(y[l]) + GW'(la[l]);
      else if (l < 4)
        gamma[l] = ((l[1] == 1'b1) ? gam_t'(0) : sys) + ((l[0] == 1'b1) ? gam_t'(0) : GW'(y[1]));
      else
        gamma[l] = '0;
    end
  end
endmodule
