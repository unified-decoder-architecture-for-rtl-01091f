// tb_siso_engine: the SISO engine against the reference recursions.
// LDPC: 8 lanes x several windows of SPC trellises (two window lengths);
// every extrinsic f(alpha(i), beta(i)) is compared, with its position, and
// the latency (first output of a window len+1 cycles after the window's
// first input) is checked.
// Turbo: one block of several windows with continuous alpha, beta starting
// each window from a given boundary vector; APP LLRs and the boundary metrics
// handed back for the next iteration are compared.
module tb_siso_engine;
  import udec_pkg::*;
  import tb_ref_pkg::*;
  localparam int LMAX = 32;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic ldpc, step, in_valid, blk_first, lam_valid, llr_valid, bb_valid;
  logic [5:0] len, lam_pos, llr_pos;
  chan_t y [NLANE];
  apri_t la [NLANE];
  sm_t   beta_init [NST], lam [NLANE], llr, bbnd [NST];
  int    cyc = 0;

  siso_engine #(.LMAX(LMAX)) dut (
    .clk(clk), .rst_n(rst_n), .ldpc(ldpc), .len(len), .step(step), .in_valid(in_valid),
    .blk_first(blk_first), .y(y), .la(la), .beta_init(beta_init),
    .lam(lam), .lam_valid(lam_valid), .lam_pos(lam_pos),
    .llr(llr), .llr_valid(llr_valid), .llr_pos(llr_pos),
    .beta_bnd(bbnd), .beta_bnd_valid(bb_valid));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // expected outputs
  typedef struct { int pos; int v [8]; int cyc; } exp_t;
  exp_t exq [$];
  int   first_cyc [$];
  int   n_out = 0, n_llr = 0, n_bb = 0;
  int   bbq [$];

  task automatic cmp(string what, int got, int ex);
    checks++;
    if (got != ex) begin failures++; $display("%s got %0d exp %0d", what, got, ex); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (lam_valid || llr_valid) begin
      exp_t e;
      if (exq.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        e = exq.pop_front();
        if (lam_valid) begin
          cmp("lam_pos", int'(lam_pos), e.pos);
          for (int l = 0; l < NLANE; l++) cmp("lam", int'(lam[l]), e.v[l]);
          if (e.cyc >= 0) cmp("latency", cyc, e.cyc);
          n_out++;
        end else begin
          cmp("llr_pos", int'(llr_pos), e.pos);
          cmp("llr", int'(llr), e.v[0]);
          n_llr++;
        end
      end
    end
    if (bb_valid) begin
      for (int s = 0; s < NST; s++) cmp("beta_bnd", int'(bbnd[s]), bbq.pop_front());
      n_bb++;
    end
  end

  task automatic do_step(bit v);
    @(negedge clk);
    step = 1; in_valid = v;
  endtask

  // ---------------------------------------------------------------- LDPC
  task automatic run_ldpc(int L, int nwin);
    int g [][][];
    g = new[nwin];
    for (int w = 0; w <= nwin; w++) begin
      int st;
      if (w < nwin) begin
        g[w] = new[L];
        for (int i = 0; i < L; i++) g[w][i] = new[8];
      end
      for (int j = 0; j < L; j++) begin
        do_step(w < nwin);
        ldpc = 1; len = 6'(L); blk_first = 0;
        if (j == 0) st = cyc;
          if (w > 0 && j == 0) begin
            // expected outputs of window w-1, reverse order
            int a [][], b [][];
            a = new[L]; b = new[L];
            for (int i = 0; i < L; i++) begin a[i] = new[8]; b[i] = new[8]; end
            for (int l = 0; l < 8; l++) begin
              a[0][l] = 511;
              for (int i = 1; i < L; i++) a[i][l] = fref(a[i-1][l], g[w-1][i-1][l]);
              b[L-1][l] = 511;
              for (int i = L - 2; i >= 0; i--) b[i][l] = fref(b[i+1][l], g[w-1][i+1][l]);
            end
            for (int r = L - 1; r >= 0; r--) begin
              exp_t e;
              e.pos = r;
              for (int l = 0; l < 8; l++) e.v[l] = fref(a[r][l], b[r][l]);
              // window w started at cycle st: output r leaves L-1-r steps later, +1
              e.cyc = (r == L - 1) ? st + 1 : -1;
              exq.push_back(e);
            end
          end
        for (int l = 0; l < NLANE; l++) begin
          y[l]  = chan_t'($urandom_range(63) - 32);
          la[l] = apri_t'($urandom_range(127) - 64);
          if (w < nwin) g[w][j][l] = int'(y[l]) + int'(la[l]);
        end
      end
    end
    @(negedge clk); step = 0;
    repeat (4) @(posedge clk);
  endtask

  // ---------------------------------------------------------------- turbo
  task automatic run_turbo(int L, int nwin);
    int ys [], yp [], lav [];
    int binit [][];
    int alpha [8], beta [8];
    int amem [][];
    ys = new[L * nwin]; yp = new[L * nwin]; lav = new[L * nwin];
    binit = new[nwin]; amem = new[L * nwin];
    for (int w = 0; w < nwin; w++) begin
      binit[w] = new[8];
      for (int s = 0; s < 8; s++) binit[w][s] = $urandom_range(40) - 20;
    end
    for (int k = 0; k < L * nwin; k++) begin
      ys[k] = $urandom_range(24) - 12; yp[k] = $urandom_range(24) - 12; lav[k] = $urandom_range(24) - 12;
    end
    // reference
    for (int s = 0; s < 8; s++) alpha[s] = (s == 0) ? 0 : -128;
    for (int k = 0; k < L * nwin; k++) begin
      amem[k] = new[8];
      for (int s = 0; s < 8; s++) amem[k][s] = alpha[s];
      alpha = fwd_step(alpha, ys[k], yp[k], lav[k]);
    end
    for (int w = 0; w < nwin; w++) begin
      for (int s = 0; s < 8; s++) beta[s] = binit[w][s];
      for (int r = L - 1; r >= 0; r--) begin
        int k, av [8];
        exp_t e;
        k = w * L + r;
        for (int s = 0; s < 8; s++) av[s] = amem[k][s];
        e.pos = r; e.cyc = -1;
        e.v[0] = app_llr(av, beta, ys[k], yp[k], lav[k]);
        exq.push_back(e);
        beta = bwd_step(beta, ys[k], yp[k], lav[k]);
      end
      for (int s = 0; s < 8; s++) bbq.push_back(beta[s]);
    end
    // stimulus
    for (int w = 0; w <= nwin; w++)
      for (int j = 0; j < L; j++) begin
        do_step(w < nwin);
        ldpc = 0; len = 6'(L); blk_first = (w == 0);
        for (int l = 0; l < NLANE; l++) begin y[l] = '0; la[l] = '0; end
        if (w < nwin) begin
          y[0] = chan_t'(ys[w * L + j]); y[1] = chan_t'(yp[w * L + j]); la[0] = apri_t'(lav[w * L + j]);
        end
        for (int s = 0; s < 8; s++) beta_init[s] = (w > 0) ? sm_t'(binit[w-1][s]) : '0;
      end
    @(negedge clk); step = 0;
    repeat (4) @(posedge clk);
  endtask

  initial begin
    step = 0; in_valid = 0; ldpc = 1; blk_first = 0; len = 6'd6;
    for (int l = 0; l < NLANE; l++) begin y[l] = '0; la[l] = '0; beta_init[l] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_ldpc(6, 6);
    run_ldpc(7, 5);
    run_ldpc(32, 2);
    run_turbo(8, 6);
    run_turbo(32, 3);
    cmp("outstanding", exq.size(), 0);
    cmp("ldpc outputs", n_out, 6 * 6 + 7 * 5 + 32 * 2);
    cmp("turbo llrs", n_llr, 8 * 6 + 32 * 3);
    cmp("boundary vectors", n_bb, 6 + 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
