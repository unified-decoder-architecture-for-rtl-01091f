// udec_top: unified LDPC / turbo decoder built around P dual-mode SISO
// engines.
//
// LDPC mode runs the group sub-trellis (GST) algorithm. The parity checks are
// split into S groups such that no two checks of a group share a code bit (one
// block row of a quasi-cyclic code is such a group). Each check is a two-state
// single-parity-check trellis; a group has T of them and the P = ceil(T/8)
// SISO engines, eight trellises each, decode a whole group in one
// sub-iteration. S sub-iterations make one iteration. For every code bit the
// a-priori input of a group is
//   La = Lambda_all - Lambda_old
// (the column sum of all groups' latest extrinsics minus this group's own old
// one, from the extrinsic memory); the SISO adds the channel LLR. The new
// extrinsic is written back and the column sum corrected by new - old, so the
// next group immediately sees it. After max_iter iterations the decision for
// bit k is the sign of Lch(k) + Lambda_all(k), read through rd_col.
//
// Turbo mode: SISO engine 0 is handed to the turbo stream ports (t_*); the
// turbo interleaver and the turbo iteration control are outside this design.
// The boundary metrics for next-iteration initialisation are kept here in
// nii_mem: the caller numbers the windows (t_win, with t_nwin windows in the
// block) and sets t_nii from the second iteration on.
//
// Host interface (all synchronous to clk, only while idle):
//   cfg_sel 0: code-structure entry cfg_addr = (g*T + t)*DCMAX + i, data =
//              {valid, column} of position i of trellis t of group g
//   cfg_sel 1: trellis length of group cfg_addr (<= DCMAX)
//   cfg_sel 2: channel LLR of bit cfg_addr (6-bit, q:2)
//   start: clears both message memories and runs max_iter iterations;
//   busy is high meanwhile and done pulses at the end.
// Timing of one sub-iteration with trellis length d: d feed cycles, d flush
// cycles and one drain cycle (2d+1); clearing takes ceil(max(E,N)/(8P))
// cycles, E = S*T*DCMAX.
//
// Follows the architecture: the GST schedule, P time-shared SISO engines, the
// extrinsic memory, the accumulating memory and the La / delta arithmetic.
// This design's own choices: the code structure is a host-loaded table (the
// permutation network between memories and engines is not specified), groups
// run strictly one after another with the engines drained in between,
// message words are 7 bits and the column sum 10 bits, both saturating.
module udec_top
  import udec_pkg::*;
#(
  parameter int unsigned N     = 2304,
  parameter int unsigned S     = 12,
  parameter int unsigned T     = 96,
  parameter int unsigned DCMAX = 7,
  parameter int unsigned LMAX  = 32,
  parameter int unsigned ACCW  = 10,
  parameter int unsigned NWIN  = 192,
  localparam int unsigned P    = (T + 7) / 8,
  localparam int unsigned NL   = P * NLANE,
  localparam int unsigned E    = S * T * DCMAX,
  localparam int unsigned EAW  = $clog2(E),
  localparam int unsigned CW   = $clog2(N),
  localparam int unsigned LW   = $clog2(LMAX + 1),
  localparam int unsigned WW   = $clog2(NWIN + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // configuration
  input  logic                  cfg_we,
  input  logic [1:0]            cfg_sel,
  input  logic [15:0]           cfg_addr,
  input  logic [15:0]           cfg_data,
  // LDPC run control and result
  input  logic                  start,
  input  logic [5:0]            max_iter,
  output logic                  busy,
  output logic                  done,
  input  logic [CW-1:0]         rd_col,
  output logic signed [ACCW:0]  rd_llr,
  output logic                  rd_bit,
  // turbo stream through SISO engine 0
  input  logic                  turbo_mode,
  input  logic [LW-1:0]         t_len,
  input  logic                  t_step,
  input  logic                  t_valid,
  input  logic                  t_blk_first,
  input  logic [WW-1:0]         t_win,
  input  logic [WW-1:0]         t_nwin,
  input  logic                  t_nii,
  input  chan_t                 t_ys,
  input  chan_t                 t_yp,
  input  apri_t                 t_la,
  input  sm_t                   t_beta_init [NST],
  output sm_t                   t_llr,
  output logic                  t_llr_valid,
  output logic [LW-1:0]         t_llr_pos,
  output sm_t                   t_beta_bnd [NST],
  output logic                  t_beta_bnd_valid
);
  typedef enum logic [2:0] {ST_IDLE, ST_CLEAR, ST_FEED, ST_FLUSH, ST_DRAIN, ST_DONE} state_t;
  typedef struct packed {
    logic          valid;
    logic [CW-1:0] col;
  } hent_t;

  localparam int unsigned CLRN = (E > N) ? E : N;
  localparam int unsigned CLRW = $clog2(CLRN + NL);

  state_t          state;
  hent_t           hmem [E];
  logic [LW-1:0]   glen [S];
  chan_t           lch  [N];
  logic [$clog2(S)-1:0] grp;
  logic [5:0]      iter;
  logic [LW-1:0]   j, cur_len;
  logic [CLRW-1:0] clr_base;

  // memory ports
  logic [EAW-1:0]        e_raddr [NL], e_waddr [NL];
  logic signed [LAW-1:0] e_rdata [NL], e_wdata [NL];
  logic                  e_we    [NL];
  logic [CW-1:0]         a_raddr [NL], a_uaddr [NL];
  logic signed [ACCW-1:0] a_rdata [NL];
  logic                  a_upd   [NL];
  logic signed [LAW:0]   a_delta [NL];
  logic signed [ACCW-1:0] a_x;

  // SISO ports
  logic          s_ldpc [P], s_step [P], s_inv [P], s_blk [P];
  logic [LW-1:0] s_len [P];
  chan_t         s_y  [P][NLANE];
  apri_t         s_la [P][NLANE];
  sm_t           s_binit [P][NST];
  sm_t           s_lam [P][NLANE];
  logic          s_lam_v [P];
  logic [LW-1:0] s_lam_pos [P];
  sm_t           s_llr [P];
  logic          s_llr_v [P];
  logic [LW-1:0] s_llr_pos [P];
  sm_t           s_bbnd [P][NST];
  sm_t           t_binit_sel [NST];
  logic          s_bbnd_v [P];

  function automatic apri_t sat_apri(input logic signed [ACCW:0] v);
    if (v > (ACCW+1)'((1 << (LAW - 1)) - 1))    return apri_t'((1 << (LAW - 1)) - 1);
    else if (v < (ACCW+1)'(-(1 << (LAW - 1)) + 1)) return apri_t'(-(1 << (LAW - 1)) + 1);
    else                                          return v[LAW-1:0];
  endfunction

  function automatic logic [EAW-1:0] eaddr(input logic [$clog2(S)-1:0] g, input int t,
                                           input logic [LW-1:0] i);
    return EAW'((int'(g) * T + t) * DCMAX + int'(i));
  endfunction

  assign cur_len = glen[grp];

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state    <= ST_IDLE;
      grp      <= '0;
      iter     <= '0;
      j        <= '0;
      clr_base <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        ST_IDLE:
          if (start && !turbo_mode) begin
            state    <= ST_CLEAR;
            clr_base <= '0;
          end
        ST_CLEAR: begin
          clr_base <= clr_base + CLRW'(NL);
          if (int'(clr_base) + NL >= CLRN) begin
            state <= ST_FEED;
            grp   <= '0;
            iter  <= '0;
            j     <= '0;
          end
        end
        ST_FEED:
          if (j == cur_len - 1'b1) begin
            j     <= '0;
            state <= ST_FLUSH;
          end else j <= j + 1'b1;
        ST_FLUSH:
          if (j == cur_len - 1'b1) begin
            j     <= '0;
            state <= ST_DRAIN;
          end else j <= j + 1'b1;
        ST_DRAIN:
          if (int'(grp) == S - 1) begin
            grp <= '0;
            if (iter + 1'b1 >= max_iter) state <= ST_DONE;
            else begin
              iter  <= iter + 1'b1;
              state <= ST_FEED;
            end
          end else begin
            grp   <= grp + 1'b1;
            state <= ST_FEED;
          end
        ST_DONE: begin
          done  <= 1'b1;
          state <= ST_IDLE;
        end
        default: state <= ST_IDLE;
      endcase
    end

  assign busy = (state != ST_IDLE);

  // ------------------------------------------------------- host write ports
  always_ff @(posedge clk)
    if (cfg_we && state == ST_IDLE)
      unique case (cfg_sel)
        2'd0: if (int'(cfg_addr) < E) hmem[cfg_addr[EAW-1:0]] <= hent_t'(cfg_data[CW:0]);
        2'd1: if (int'(cfg_addr) < S) glen[cfg_addr[$clog2(S)-1:0]] <= cfg_data[LW-1:0];
        2'd2: if (int'(cfg_addr) < N) lch[cfg_addr[CW-1:0]] <= cfg_data[QW-1:0];
        default: ;
      endcase

  // --------------------------------------------------- datapath per lane
  logic [CW-1:0] f_col [NL];

  // addresses: position j (feed) or the engine's reported position (write-back)
  always_comb begin
    for (int q = 0; q < NL; q++) begin
      hent_t hf, hw;
      logic  lane_ok;
      logic [EAW-1:0] ef, ew;
      lane_ok  = (q < T);
      ef       = lane_ok ? eaddr(grp, q, j) : '0;
      ew       = lane_ok ? eaddr(grp, q, s_lam_pos[q / NLANE]) : '0;
      hf       = hmem[ef];
      hw       = hmem[ew];
      f_col[q] = hf.col;
      e_raddr[q] = (state == ST_FEED) ? ef : ew;
      a_raddr[q] = hf.col;
      if (state == ST_CLEAR) begin
        e_waddr[q] = EAW'(clr_base + CLRW'(q));
        a_uaddr[q] = CW'(clr_base + CLRW'(q));
        e_we[q]    = (int'(clr_base) + q < E);
        a_upd[q]   = (int'(clr_base) + q < N);
      end else begin
        e_waddr[q] = ew;
        a_uaddr[q] = hw.col;
        e_we[q]    = lane_ok && hw.valid && s_lam_v[q / NLANE] &&
                     (state == ST_FLUSH || state == ST_DRAIN);
        a_upd[q]   = e_we[q];
      end
    end
  end

  // data: La = Lambda_all - Lambda_old into the engines (the branch unit adds
  // Lch); new extrinsic and delta = new - old back to the memories
  always_comb begin
    for (int q = 0; q < NL; q++) begin
      apri_t lam_s;
      s_y[q / NLANE][q % NLANE]  = lch[f_col[q]];
      s_la[q / NLANE][q % NLANE] = sat_apri((ACCW+1)'(a_rdata[q]) - (ACCW+1)'(e_rdata[q]));
      lam_s      = sat_apri((ACCW+1)'(s_lam[q / NLANE][q % NLANE]));
      e_wdata[q] = (state == ST_CLEAR) ? '0 : lam_s;
      a_delta[q] = (LAW+1)'(lam_s) - (LAW+1)'(e_rdata[q]);
    end
  end

  ext_mem #(.DEPTH(E), .NP(NL), .DW(LAW)) u_ext (
    .clk(clk), .raddr(e_raddr), .rdata(e_rdata),
    .we(e_we), .waddr(e_waddr), .wdata(e_wdata)
  );

  acc_mem #(.N(N), .NP(NL), .AW(ACCW), .DLW(LAW+1)) u_acc (
    .clk(clk), .clr(state == ST_CLEAR),
    .raddr(a_raddr), .rdata(a_rdata),
    .upd(a_upd), .uaddr(a_uaddr), .delta(a_delta),
    .xaddr(rd_col), .xdata(a_x)
  );

  // ------------------------------------------------------------ SISO array
  always_comb begin
    for (int p = 0; p < P; p++) begin
      s_ldpc[p] = 1'b1;
      s_step[p] = (state == ST_FEED) || (state == ST_FLUSH);
      s_inv[p]  = (state == ST_FEED);
      s_blk[p]  = 1'b0;
      s_len[p]  = cur_len;
      for (int s = 0; s < NST; s++) s_binit[p][s] = '0;
    end
    if (turbo_mode) begin
      s_ldpc[0] = 1'b0;
      s_step[0] = t_step;
      s_inv[0]  = t_valid;
      s_blk[0]  = t_blk_first;
      s_len[0]  = t_len;
      s_binit[0] = t_binit_sel;
    end
  end

  for (genvar p = 0; p < P; p++) begin : g_siso
    chan_t y_in  [NLANE];
    apri_t la_in [NLANE];
    always_comb begin
      for (int l = 0; l < NLANE; l++) begin
        y_in[l]  = s_y[p][l];
        la_in[l] = s_la[p][l];
      end
      if (p == 0 && turbo_mode) begin
        for (int l = 0; l < NLANE; l++) begin
          y_in[l]  = '0;
          la_in[l] = '0;
        end
        y_in[0]  = t_ys;
        y_in[1]  = t_yp;
        la_in[0] = t_la;
      end
    end

    siso_engine #(.LMAX(LMAX)) u_siso (
      .clk(clk), .rst_n(rst_n), .ldpc(s_ldpc[p]), .len(s_len[p]),
      .step(s_step[p]), .in_valid(s_inv[p]), .blk_first(s_blk[p]),
      .y(y_in), .la(la_in), .beta_init(s_binit[p]),
      .lam(s_lam[p]), .lam_valid(s_lam_v[p]), .lam_pos(s_lam_pos[p]),
      .llr(s_llr[p]), .llr_valid(s_llr_v[p]), .llr_pos(s_llr_pos[p]),
      .beta_bnd(s_bbnd[p]), .beta_bnd_valid(s_bbnd_v[p])
    );
  end

  // ------------------------------------------- turbo NII boundary store
  // t_win is the window being fed (t_nwin during the flush window), so the
  // backward pass works on window t_win-1. With t_nii set, its start vector
  // is the one stored for window t_win in the previous iteration; the last
  // window of the block (t_win == t_nwin) starts from t_beta_init.
  logic [WW-1:0] bw_idx;
  sm_t           nii_rd [NST];
  logic          nii_we;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) bw_idx <= '0;
    else if (turbo_mode && t_step) bw_idx <= t_win - 1'b1;

  assign nii_we = s_bbnd_v[0] && turbo_mode && (bw_idx < WW'(NWIN));

  nii_mem #(.NWIN(NWIN)) u_nii (
    .clk(clk), .we(nii_we), .waddr(bw_idx[$clog2(NWIN)-1:0]), .wdata(s_bbnd[0]),
    .raddr(t_win[$clog2(NWIN)-1:0]), .rdata(nii_rd)
  );

  always_comb
    for (int s = 0; s < NST; s++)
      t_binit_sel[s] = (t_nii && t_win < t_nwin) ? nii_rd[s] : t_beta_init[s];

  assign t_llr            = s_llr[0];
  assign t_llr_valid      = s_llr_v[0] && turbo_mode;
  assign t_llr_pos        = s_llr_pos[0];
  assign t_beta_bnd       = s_bbnd[0];
  assign t_beta_bnd_valid = s_bbnd_v[0] && turbo_mode;

  // ------------------------------------------------------- hard decision
  assign rd_llr = (ACCW+1)'(lch[rd_col]) + (ACCW+1)'(a_x);
  assign rd_bit = rd_llr[ACCW];

  a_len_ok: assert property (@(posedge clk) disable iff (!rst_n)
    state == ST_FEED |-> (cur_len != '0 && int'(cur_len) <= DCMAX));
endmodule
