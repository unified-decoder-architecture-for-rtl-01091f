// padd: adds branch metrics to beta state metrics for the turbo LLR (the
// "beta+gamma" operand of the Lambda unit).
//
// For every start state s' and input bit u, the branch s' -> next(s',u)
// carries parity p(s',u); the output is
//   bg[u][s'] = beta[next(s',u)] + gamma[{u,p(s',u)}]
// in modulo-2^10 arithmetic, like the state metrics. With alpha[s'] added
// inside the Lambda unit this gives the branch term of the APP equation.
// Only the unit and its output are given by the architecture; the indexing is
// this design's. Unused in LDPC mode. Purely combinational.
module padd
  import udec_pkg::*;
(
  input  sm_t  beta  [NST],
  input  gam_t gamma [NLANE],
  output sm_t  bg    [2][NST]
);
  always_comb begin
    for (int u = 0; u < 2; u++)
      for (int s = 0; s < NST; s++)
        bg[u][s] = beta[rsc_next(3'(s), u[0])]
                 + SMW'(gamma[{1'b0, u[0], rsc_par(3'(s), u[0])}]);
  end
endmodule
