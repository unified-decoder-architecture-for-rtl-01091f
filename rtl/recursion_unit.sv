// recursion_unit: the alpha unit (BACKWARD = 0) or beta unit (BACKWARD = 1)
// of the SISO engine: eight FACS kernels whose registered outputs are fed
// back through a routing stage.
//
// The current metric vector m_cur is the register contents, or init_m when
// init is high (block or window start). Each step (en high) loads the next
// metric vector into the FACS output registers.
//
// LDPC mode: eight independent two-state SPC trellises, one per lane,
//   next[l] = f(m_cur[l], gamma[l])
// with the magnitude from the FACS (X = V = |m|, Y = |gamma|, W = -|gamma|)
// and the sign sign(m)*sign(gamma) registered beside it. The forward and
// backward LDPC recursions are the same operation.
// Turbo mode: eight trellis states; next[s] is the max* over the two branches
// into s (forward) or out of s (backward) of metric plus branch metric, where
// gamma[{u,p}] is the metric of a branch with bits u, p.
//
// The structure (routing "RT", FACS x8, register) follows the architecture.
// The routing contents, the sign handling in LDPC mode and the saturation of
// |gamma| to 127 (so that -128 cannot overflow) are this design's.
module recursion_unit
  import udec_pkg::*;
#(
  parameter bit BACKWARD = 1'b0
) (
  input  logic clk,
  input  logic en,
  input  logic ldpc,
  input  logic init,
  input  sm_t  init_m [NLANE],
  input  gam_t gamma  [NLANE],
  output sm_t  m_cur  [NLANE],
  output sm_t  m_reg  [NLANE]
);
  sm_t  fx [NLANE], fv [NLANE], fz [NLANE];
  gam_t fy [NLANE], fw [NLANE];
  logic sgn_d [NLANE], sgn_q [NLANE];

  always_comb begin
    for (int l = 0; l < NLANE; l++)
      m_cur[l] = init ? init_m[l] : m_reg[l];
  end

  // routing (RT)
  always_comb begin
    for (int l = 0; l < NLANE; l++) begin
      logic [2:0] st, n0, n1, p0, p1;
      logic       u0, u1;
      sm_t        am;
      gam_t       gm;
      st = 3'(l);
      {n0, n1, p0, p1, u0, u1} = '0;
      // LDPC lane operands
      am = m_cur[l][SMW-1] ? -m_cur[l] : m_cur[l];
      gm = gamma[l][GW-1] ? ((gamma[l] == gam_t'(-128)) ? gam_t'(127) : -gamma[l]) : gamma[l];
      sgn_d[l] = m_cur[l][SMW-1] ^ gamma[l][GW-1];
      if (ldpc) begin
        fx[l] = am;
        fy[l] = gm;
        fv[l] = am;
        fw[l] = -gm;
      end else if (!BACKWARD) begin
        p0 = rsc_prev(st[1:0], 1'b0);
        p1 = rsc_prev(st[1:0], 1'b1);
        u0 = rsc_prev_u(st[2], st[0], 1'b0);
        u1 = rsc_prev_u(st[2], st[0], 1'b1);
        fx[l] = m_cur[p0];
        fy[l] = gamma[{1'b0, u0, rsc_par(p0, u0)}];
        fv[l] = m_cur[p1];
        fw[l] = gamma[{1'b0, u1, rsc_par(p1, u1)}];
      end else begin
        n0 = rsc_next(st, 1'b0);
        n1 = rsc_next(st, 1'b1);
        fx[l] = m_cur[n0];
        fy[l] = gamma[{2'b00, rsc_par(st, 1'b0)}];
        fv[l] = m_cur[n1];
        fw[l] = gamma[{2'b01, rsc_par(st, 1'b1)}];
      end
    end
  end

  for (genvar l = 0; l < NLANE; l++) begin : g_facs
    facs #(.XW(SMW), .YW(GW)) u_facs (
      .clk(clk), .en(en), .ldpc(ldpc),
      .x(fx[l]), .y(fy[l]), .v(fv[l]), .w(fw[l]), .z(fz[l])
    );
  end

  always_ff @(posedge clk)
    if (en)
      for (int l = 0; l < NLANE; l++) sgn_q[l] <= sgn_d[l];

  always_comb begin
    for (int l = 0; l < NLANE; l++)
      m_reg[l] = (ldpc && sgn_q[l]) ? -fz[l] : fz[l];
  end
endmodule
