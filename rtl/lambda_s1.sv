// lambda_s1: first stage of the Lambda (output) unit, eight FACS kernels.
//
// LDPC mode: eight lanes, Lambda[l] = f(alpha[l], beta[l]), the extrinsic
// message of one SPC trellis position (magnitude from the FACS, sign
// sign(alpha)*sign(beta) registered beside it).
// Turbo mode: the first eight ACS operations of the APP computation. FACS m
// (m = 0..3) combines the u = 0 branches leaving states 2m and 2m+1,
// X = alpha[2m], Y = bg[0][2m], V = alpha[2m+1], W = bg[0][2m+1];
// FACS 4+m does the same for u = 1. bg comes from the PADD unit.
// The eight-FACS stage and its role follow the architecture; the branch
// pairing, the sign handling and the 10-bit Y/W operands (beta+gamma is a
// state-metric quantity) are this design's.
// Timing: one cycle; lam loads when en is high.
module lambda_s1
  import udec_pkg::*;
(
  input  logic clk,
  input  logic en,
  input  logic ldpc,
  input  sm_t  alpha [NLANE],
  input  sm_t  beta  [NLANE],
  input  sm_t  bg    [2][NST],
  output sm_t  lam   [NLANE]
);
  sm_t  fx [NLANE], fy [NLANE], fv [NLANE], fw [NLANE], fz [NLANE];
  logic sgn_d [NLANE], sgn_q [NLANE];

  always_comb begin
    for (int l = 0; l < NLANE; l++) begin
      sm_t aa, bb;
      aa = alpha[l][SMW-1] ? -alpha[l] : alpha[l];
      bb = beta[l][SMW-1]  ? -beta[l]  : beta[l];
      sgn_d[l] = alpha[l][SMW-1] ^ beta[l][SMW-1];
      if (ldpc) begin
        fx[l] = aa;
        fy[l] = bb;
        fv[l] = aa;
        fw[l] = -bb;
      end else begin
        fx[l] = alpha[2*(l%4)];
        fy[l] = bg[l/4][2*(l%4)];
        fv[l] = alpha[2*(l%4)+1];
        fw[l] = bg[l/4][2*(l%4)+1];
      end
    end
  end

  for (genvar l = 0; l < NLANE; l++) begin : g_facs
    facs #(.XW(SMW), .YW(SMW)) u_facs (
      .clk(clk), .en(en), .ldpc(ldpc),
      .x(fx[l]), .y(fy[l]), .v(fv[l]), .w(fw[l]), .z(fz[l])
    );
  end

  always_ff @(posedge clk)
    if (en)
      for (int l = 0; l < NLANE; l++) sgn_q[l] <= sgn_d[l];

  always_comb begin
    for (int l = 0; l < NLANE; l++)
      lam[l] = (ldpc && sgn_q[l]) ? -fz[l] : fz[l];
  end
endmodule
