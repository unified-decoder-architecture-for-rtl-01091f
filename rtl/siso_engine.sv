// siso_engine: dual-mode (LDPC / turbo) soft-in soft-out decoder core.
//
// Data is processed in windows of len trellis steps (len <= LMAX). While the
// inputs of window w stream in, in natural order, the branch unit forms the
// branch metrics and the alpha unit runs the forward recursion. Branch
// metrics and alpha metrics are pushed onto two stacks. During window w+1 the
// stacks return window w in reverse order; the beta unit runs the backward
// recursion on it and the Lambda unit combines alpha, beta (and, for turbo,
// beta+gamma from the PADD unit) into the outputs, also in reverse order.
// All three units work in parallel, one trellis step per cycle, so the
// outputs of a window follow its inputs by one window.
//
// LDPC mode: eight single-parity-check trellises of length len at once (one
// per lane). alpha and beta start at +infinity at each window edge, and
// lam[l] at position r is the extrinsic message f(alpha(r), beta(r)).
// Turbo mode: one 8-state trellis cut into windows. alpha starts from state 0
// when blk_first is set on the first step of a window and otherwise carries
// on across windows. beta starts each window from beta_init, sampled on the
// first beta step of the window; in next-iteration-initialisation use this is
// the boundary metric that the same window produced in the previous
// iteration, which the engine puts out on beta_bnd when the backward pass of a
// window ends. llr is the a-posteriori LLR log P(u=0)/P(u=1).
//
// Interface: every cycle with step high consumes one input (y, la) and
// advances both passes. in_valid marks real data; after the last window the
// caller gives one window of steps with in_valid low to flush the backward
// pass. Outputs: lam / lam_valid / lam_pos one cycle after the step that
// produced them (LDPC), llr / llr_valid / llr_pos two cycles after (turbo),
// where *_pos is the position within the window (counting down).
//
// The unit structure follows the architecture (branch unit, alpha and beta
// units of eight FACS each, two stacks of depth L, PADD, Lambda-S1,
// Lambda-S2). The step/valid streaming protocol, the boundary-metric ports
// and the turbo start metrics (0 for state 0, -128 otherwise) are this
// design's.
module siso_engine
  import udec_pkg::*;
#(
  parameter int unsigned LMAX = 32,
  localparam int unsigned AW  = $clog2(LMAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ldpc,
  input  logic [AW-1:0] len,
  input  logic          step,
  input  logic          in_valid,
  input  logic          blk_first,
  input  chan_t         y         [NLANE],
  input  apri_t         la        [NLANE],
  input  sm_t           beta_init [NST],
  output sm_t           lam       [NLANE],
  output logic          lam_valid,
  output logic [AW-1:0] lam_pos,
  output sm_t           llr,
  output logic          llr_valid,
  output logic [AW-1:0] llr_pos,
  output sm_t           beta_bnd  [NST],
  output logic          beta_bnd_valid
);
  gam_t          gamma [NLANE], gam_p [NLANE];
  sm_t           a_cur [NLANE], a_reg [NLANE], a_init [NLANE], a_p [NLANE];
  sm_t           b_cur [NLANE], b_reg [NLANE], b_init [NLANE];
  sm_t           bg    [2][NST];
  logic [AW-1:0] pos, pos_b;
  logic          last, last_b, vld_p, vld_b;
  logic [NLANE*GW-1:0]  gam_w, gam_r;
  logic [NLANE*SMW-1:0] a_w, a_r;
  logic          v1, v2;
  logic [AW-1:0] pos1, pos2;

  branch_unit u_branch (.ldpc(ldpc), .y(y), .la(la), .gamma(gamma));

  always_comb begin
    for (int l = 0; l < NLANE; l++) begin
      a_init[l] = ldpc ? SM_INF : ((l == 0) ? sm_t'(0) : SM_NEG);
      b_init[l] = ldpc ? SM_INF : beta_init[l];
    end
  end

  recursion_unit #(.BACKWARD(1'b0)) u_alpha (
    .clk(clk), .en(step), .ldpc(ldpc),
    .init((pos == '0) && (ldpc || blk_first)),
    .init_m(a_init), .gamma(gamma), .m_cur(a_cur), .m_reg(a_reg)
  );

  // stacks: branch metrics and alpha metrics of the previous window, reversed
  always_comb begin
    for (int l = 0; l < NLANE; l++) begin
      gam_w[l*GW +: GW]   = gamma[l];
      a_w[l*SMW +: SMW]   = a_cur[l];
      gam_p[l]            = gam_r[l*GW +: GW];
      a_p[l]              = a_r[l*SMW +: SMW];
    end
  end

  lifo_stack #(.W(NLANE*GW), .DEPTH(LMAX)) u_stack_gamma (
    .clk(clk), .rst_n(rst_n), .en(step), .len(len),
    .wvalid(in_valid), .wdata(gam_w), .rvalid(vld_p), .rdata(gam_r),
    .pos(pos), .last(last)
  );

  lifo_stack #(.W(NLANE*SMW), .DEPTH(LMAX)) u_stack_alpha (
    .clk(clk), .rst_n(rst_n), .en(step), .len(len),
    .wvalid(in_valid), .wdata(a_w), .rvalid(vld_b), .rdata(a_r),
    .pos(pos_b), .last(last_b)
  );

  recursion_unit #(.BACKWARD(1'b1)) u_beta (
    .clk(clk), .en(step), .ldpc(ldpc),
    .init(pos == '0),
    .init_m(b_init), .gamma(gam_p), .m_cur(b_cur), .m_reg(b_reg)
  );

  padd u_padd (.beta(b_cur), .gamma(gam_p), .bg(bg));

  lambda_s1 u_s1 (
    .clk(clk), .en(step), .ldpc(ldpc),
    .alpha(a_p), .beta(b_cur), .bg(bg), .lam(lam)
  );

  lambda_s2 u_s2 (.clk(clk), .en(v1), .s1(lam), .llr(llr));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      v1 <= 1'b0;
      v2 <= 1'b0;
      pos1 <= '0;
      pos2 <= '0;
      beta_bnd_valid <= 1'b0;
    end else begin
      v1 <= step && vld_p;
      v2 <= v1 && !ldpc;
      if (step) pos1 <= len - 1'b1 - pos;
      pos2 <= pos1;
      beta_bnd_valid <= step && vld_p && last && !ldpc;
    end

  always_comb begin
    lam_valid = v1 && ldpc;
    lam_pos   = pos1;
    llr_valid = v2;
    llr_pos   = pos2;
    for (int s = 0; s < NST; s++) beta_bnd[s] = b_reg[s];
  end

  // both stacks advance together
  a_stacks_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    pos == pos_b && last == last_b && vld_p == vld_b);
endmodule
