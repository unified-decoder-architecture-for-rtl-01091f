// tb_udec_top_full: end-to-end test of the unified decoder at its default size (2304-bit rate-1/2 code, 12 groups of 96 checks, 12 SISO engines).
// LDPC: a quasi-cyclic code is built from a base matrix of circulant shifts
// (one block row per group), loaded through the configuration port with
// channel LLRs of the all-zero codeword plus noise. After max_iter GST
// iterations every column sum is compared bit-exactly with a reference GST
// decoder written from the algorithm (fold of f() forward and backward over
// each check, La = sum - old, sum += new - old), the hard decisions are
// checked and the run time is compared with the schedule (clear, then 2d+1
// cycles per group). Turbo: one block is streamed through engine 0 and its
// LLRs and boundary metrics are compared with a reference log-MAP.
// Mechanisms counted: memory clear, sub-iterations, group length changes,
// parallel engines writing back, turbo LLRs and boundary-metric hand-back
// (a-priori saturation events are reported, not required).
module tb_udec_top_full;
  import udec_pkg::*;
  import tb_ref_pkg::*;
  localparam int Z = 96, NBC = 24;
  localparam int N = 2304, S = 12, T = 96, DCMAX = 7, LMAX = 32;
  localparam int NITER = 10;
  localparam int P = (T + 7) / 8, NL = P * 8, E = S * T * DCMAX;
  localparam int CLRN = (E > N) ? E : N;
  localparam int CW = $clog2(N);

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic cfg_we, start, busy, done, rd_bit;
  logic [1:0] cfg_sel;
  logic [15:0] cfg_addr, cfg_data;
  logic [5:0] max_iter;
  logic [CW-1:0] rd_col;
  logic signed [10:0] rd_llr;
  logic turbo_mode, t_step, t_valid, t_blk_first, t_llr_valid, t_bb_valid, t_nii;
  logic [7:0] t_win, t_nwin;
  logic [5:0] t_len, t_llr_pos;
  chan_t t_ys, t_yp;
  apri_t t_la;
  sm_t t_beta_init [NST], t_llr, t_bbnd [NST];
  int cyc = 0;

  udec_top  dut (
    .clk(clk), .rst_n(rst_n), .cfg_we(cfg_we), .cfg_sel(cfg_sel), .cfg_addr(cfg_addr),
    .cfg_data(cfg_data), .start(start), .max_iter(max_iter), .busy(busy), .done(done),
    .rd_col(rd_col), .rd_llr(rd_llr), .rd_bit(rd_bit),
    .turbo_mode(turbo_mode), .t_len(t_len), .t_step(t_step), .t_valid(t_valid),
    .t_blk_first(t_blk_first), .t_win(t_win), .t_nwin(t_nwin), .t_nii(t_nii), .t_ys(t_ys), .t_yp(t_yp), .t_la(t_la),
    .t_beta_init(t_beta_init), .t_llr(t_llr), .t_llr_valid(t_llr_valid),
    .t_llr_pos(t_llr_pos), .t_beta_bnd(t_bbnd), .t_beta_bnd_valid(t_bb_valid));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic cmp(string what, int got, int ex);
    checks++;
    if (got != ex) begin
      failures++;
      if (failures < 20) $display("%s got %0d exp %0d", what, got, ex);
    end
  endtask

  // ------------------------------------------------------------ the code
  int rowcols [S][$];
  int lch [N];
  int hcol [E];
  bit hval [E];
  int glen [S];

  function automatic int shift_of(int r, int c);
    return (r * c * 11 + r * r * 3 + c * 7 + 3) % Z;
  endfunction

  task automatic build_code();
    for (int r = 0; r < S; r++) begin
      rowcols[r] = '{r, (r + 1) % 12, (r + 5) % 12, 12 + r, 12 + (r + 3) % 12, 12 + (r + 7) % 12};
      if (r % 2 == 0) rowcols[r].push_back(12 + (r + 9) % 12);
    end
    for (int g = 0; g < S; g++) begin
      glen[g] = rowcols[g].size();
      for (int t = 0; t < T; t++)
        for (int i = 0; i < DCMAX; i++) begin
          int e;
          e = (g * T + t) * DCMAX + i;
          hval[e] = (i < glen[g]);
          hcol[e] = hval[e] ? rowcols[g][i] * Z + (t + shift_of(g, rowcols[g][i])) % Z : 0;
        end
    end
    for (int k = 0; k < N; k++) begin
      int v;
      v = 8 + int'($urandom_range(2 * 9)) - 9;
      lch[k] = (v > 31) ? 31 : (v < -32) ? -32 : v;
    end
  endtask

  // ----------------------------------------------------- reference GST
  int ext_ref [E];
  int acc_ref [N];
  int n_la_sat = 0;

  function automatic int sat(int v, int m);
    return (v > m) ? m : (v < -m) ? -m : v;
  endfunction

  task automatic ref_decode(int iters);
    for (int e = 0; e < E; e++) ext_ref[e] = 0;
    for (int k = 0; k < N; k++) acc_ref[k] = 0;
    for (int it = 0; it < iters; it++)
      for (int g = 0; g < S; g++) begin
        int L, nw [T][DCMAX];
        L = glen[g];
        for (int t = 0; t < T; t++) begin
          int gm [DCMAX], a [DCMAX], b [DCMAX];
          for (int i = 0; i < L; i++) begin
            int e, lav;
            e = (g * T + t) * DCMAX + i;
            lav = acc_ref[hcol[e]] - ext_ref[e];
            if (lav > 63 || lav < -63) n_la_sat++;
            gm[i] = lch[hcol[e]] + sat(lav, 63);
          end
          a[0] = 511;
          for (int i = 1; i < L; i++) a[i] = fref(a[i-1], gm[i-1]);
          b[L-1] = 511;
          for (int i = L - 2; i >= 0; i--) b[i] = fref(b[i+1], gm[i+1]);
          for (int i = 0; i < L; i++) nw[t][i] = sat(fref(a[i], b[i]), 63);
        end
        for (int t = 0; t < T; t++)
          for (int i = 0; i < L; i++) begin
            int e;
            e = (g * T + t) * DCMAX + i;
            acc_ref[hcol[e]] = sat(acc_ref[hcol[e]] + nw[t][i] - ext_ref[e], 511);
            ext_ref[e] = nw[t][i];
          end
      end
  endtask

  // ------------------------------------------------------- monitors
  int n_clear = 0, n_sub = 0, n_lenchg = 0, n_wb_multi = 0, n_llr = 0, n_bb = 0;
  int n_nii_wr = 0, n_nii_use = 0;
  int last_len = -1;
  always @(posedge clk) if (rst_n) begin
    if (int'(dut.state) == 1 && dut.clr_base == 0) n_clear++;
    if (int'(dut.state) == 4) n_sub++;
    if (int'(dut.state) == 2 && dut.j == 0) begin
      if (last_len >= 0 && int'(dut.cur_len) != last_len) n_lenchg++;
      last_len = int'(dut.cur_len);
    end
    if (P > 1 && dut.e_we[0] && dut.e_we[NL - 1] && int'(dut.state) != 1) n_wb_multi++;
  end

  // turbo expectations
  typedef struct { int pos; int v; } texp_t;
  texp_t tq [$];
  int bbq [$];
  always @(posedge clk) if (rst_n) begin
    if (t_llr_valid) begin
      texp_t e;
      n_llr++;
      if (tq.size() == 0) begin failures++; $display("unexpected turbo LLR"); end
      else begin
        e = tq.pop_front();
        cmp("turbo pos", int'(t_llr_pos), e.pos);
        cmp("turbo llr", int'(t_llr), e.v);
      end
    end
    if (turbo_mode && t_step && t_nii && t_win > 0 && t_win < t_nwin) n_nii_use++;
    if (dut.nii_we) n_nii_wr++;
    if (t_bb_valid) begin
      n_bb++;
      for (int s = 0; s < NST; s++) cmp("turbo boundary", int'(t_bbnd[s]), bbq.pop_front());
    end
  end

  task automatic cfg(int sel, int addr, int data);
    @(negedge clk);
    cfg_we = 1; cfg_sel = 2'(sel); cfg_addr = 16'(addr); cfg_data = 16'(data);
  endtask

  // Two passes over one block: the first starts every backward window from
  // the t_beta_init port, the second (t_nii set) from the boundary metrics
  // stored in the first pass, except for the last window of the block.
  task automatic run_turbo(int L, int nwin);
    int ys [], yp [], lav [], binit [][], amem [][], bstart [][], bleft [][];
    int alpha [8], beta [8];
    ys = new[L * nwin]; yp = new[L * nwin]; lav = new[L * nwin];
    binit = new[nwin]; amem = new[L * nwin]; bstart = new[nwin]; bleft = new[nwin];
    for (int w = 0; w < nwin; w++) begin
      binit[w] = new[8]; bstart[w] = new[8]; bleft[w] = new[8];
      for (int s = 0; s < 8; s++) binit[w][s] = $urandom_range(40) - 20;
    end
    for (int k = 0; k < L * nwin; k++) begin
      ys[k] = $urandom_range(24) - 12; yp[k] = $urandom_range(24) - 12; lav[k] = $urandom_range(24) - 12;
    end
    for (int s = 0; s < 8; s++) alpha[s] = (s == 0) ? 0 : -128;
    for (int k = 0; k < L * nwin; k++) begin
      amem[k] = new[8];
      for (int s = 0; s < 8; s++) amem[k][s] = alpha[s];
      alpha = fwd_step(alpha, ys[k], yp[k], lav[k]);
    end
    for (int pass = 0; pass < 2; pass++) begin
    for (int w = 0; w < nwin; w++)
      for (int s = 0; s < 8; s++)
        bstart[w][s] = (pass == 1 && w < nwin - 1) ? bleft[w + 1][s] : binit[w][s];
    for (int w = 0; w < nwin; w++) begin
      for (int s = 0; s < 8; s++) beta[s] = bstart[w][s];
      for (int r = L - 1; r >= 0; r--) begin
        int k, av [8];
        texp_t e;
        k = w * L + r;
        for (int s = 0; s < 8; s++) av[s] = amem[k][s];
        e.pos = r;
        e.v = app_llr(av, beta, ys[k], yp[k], lav[k]);
        tq.push_back(e);
        beta = bwd_step(beta, ys[k], yp[k], lav[k]);
      end
      for (int s = 0; s < 8; s++) bbq.push_back(beta[s]);
      if (pass == 0) for (int s = 0; s < 8; s++) bleft[w][s] = beta[s];
    end
    for (int w = 0; w <= nwin; w++)
      for (int j = 0; j < L; j++) begin
        @(negedge clk);
        turbo_mode = 1; t_step = 1; t_valid = (w < nwin); t_len = 6'(L); t_blk_first = (w == 0);
        t_win = 8'(w); t_nwin = 8'(nwin); t_nii = (pass == 1);
        t_ys = '0; t_yp = '0; t_la = '0;
        if (w < nwin) begin
          t_ys = chan_t'(ys[w * L + j]); t_yp = chan_t'(yp[w * L + j]); t_la = apri_t'(lav[w * L + j]);
        end
        for (int s = 0; s < 8; s++) t_beta_init[s] = (w > 0) ? sm_t'(binit[w-1][s]) : '0;
      end
    @(negedge clk); t_step = 0;
    repeat (4) @(posedge clk);
    end
    @(negedge clk); turbo_mode = 0; t_nii = 0;
  endtask

  initial begin
    int t0, t1, expcyc, sumg, err_in, err_out;
    cfg_we = 0; cfg_sel = 0; cfg_addr = 0; cfg_data = 0; start = 0; max_iter = 6'(NITER);
    rd_col = '0; turbo_mode = 0; t_step = 0; t_valid = 0; t_blk_first = 0; t_len = 6'd8;
    t_win = '0; t_nwin = '0; t_nii = 0;
    t_ys = '0; t_yp = '0; t_la = '0;
    for (int s = 0; s < NST; s++) t_beta_init[s] = '0;
    build_code();
    repeat (3) @(posedge clk);
    rst_n = 1;
    // turbo mode through engine 0
    run_turbo(8, 4);
    // load the LDPC code and the channel values
    for (int e = 0; e < E; e++) cfg(0, e, hval[e] ? (1 << CW) | hcol[e] : 0);
    for (int g = 0; g < S; g++) cfg(1, g, glen[g]);
    for (int k = 0; k < N; k++) cfg(2, k, lch[k] & 63);
    @(negedge clk); cfg_we = 0;
    ref_decode(NITER);
    // run
    @(negedge clk); start = 1;
    @(posedge clk); t0 = cyc;
    @(negedge clk); start = 0;
    while (!done) @(posedge clk);
    t1 = cyc;
    sumg = 0;
    for (int g = 0; g < S; g++) sumg += 2 * glen[g] + 1;
    expcyc = (CLRN + NL - 1) / NL + NITER * sumg + 2;
    cmp("LDPC run cycles", t1 - t0, expcyc);
    @(negedge clk);
    err_in = 0; err_out = 0;
    for (int k = 0; k < N; k++) begin
      rd_col = CW'(k);
      #1;
      cmp("column LLR", int'(rd_llr), lch[k] + acc_ref[k]);
      cmp("hard decision", int'(rd_bit), (lch[k] + acc_ref[k]) < 0);
      if (lch[k] < 0) err_in++;
      if (rd_bit) err_out++;
    end
    $display("LDPC: %0d bit errors in the channel, %0d after %0d iterations (%0d cycles)",
             err_in, err_out, NITER, t1 - t0);
    cmp("decoder did not reduce errors", (err_out < err_in || err_in == 0), 1);
    // mechanisms
    $display("mechanisms: clear=%0d subiter=%0d lenchange=%0d multi_engine_wb=%0d la_sat=%0d turbo_llr=%0d boundary=%0d nii_store=%0d nii_start=%0d",
             n_clear, n_sub, n_lenchg, n_wb_multi, n_la_sat, n_llr, n_bb, n_nii_wr, n_nii_use);
    cmp("clear happened", n_clear > 0, 1);
    cmp("sub-iterations", n_sub, S * NITER);
    cmp("group length change", n_lenchg > 0, 1);
    cmp("parallel engines", (P == 1) || (n_wb_multi > 0), 1);
    cmp("turbo LLRs", n_llr, 2 * 8 * 4);
    cmp("boundary metrics", n_bb, 2 * 4);
    cmp("NII boundary stores", n_nii_wr, 2 * 4);
    cmp("NII window starts", n_nii_use, 8 * 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
