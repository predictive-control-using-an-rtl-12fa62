// mpc_soc_top_tb: end-to-end test of the controller hardware with every
// parameter at its default (horizon 12, 12 states, 17 inputs, 1000 FGM
// iterations), playing the part of the processor that drives it.
//
// 1. Target calculation: loads F_s, H_s, bounds, M_s, L_s and beta, sends
//    b_s, and checks the 41 outputs against the chained integer models, the
//    total of 63,603 cycles, and the FGM start NS cycles before subsystem
//    #1 ends.
// 2. Regulator linear solve: writes the 516 band rows (81 lanes) of a
//    symmetric, indefinite, diagonally dominant banded matrix and a random
//    b. The preconditioner unit fills M as the rows are written; the test
//    then runs 51 preconditioned MINRES iterations and checks the output
//    order, the cycle count 1 + 2Z + 52 P + 51 (4Z + 7) with
//    P = Z + V + 4 + ceil(log2(2V-1)), and the residual max |b - A z|
//    (double precision) against 1e-4 max |b|.
// 3. Line search: full step, backtracking and zero-step cases.
// Mechanisms counted (each must happen at least once): FGM hand-off,
// variables clipped to a bound, preconditioner entries written, MINRES
// iterations, converged solves (solution update frozen), solution outputs,
// full steps, backtracked steps and zero steps.
module mpc_soc_top_tb;
  import tc_pkg::*;
  import fp32_pkg::*;
  import tc_ref_pkg::*;
  import fp_ref_pkg::*;

  localparam int N = 12;
  localparam int V = 2*NX + NU, BAND = 2*V - 1, Z = N*V + 2*NX;
  localparam int ZW = $clog2(Z);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic tc_cfg_we = 0, tc_bs_valid = 0;
  cfg_sel_e tc_cfg_sel = SEL_F;
  logic [5:0] tc_cfg_row = 0;
  logic [4:0] tc_cfg_col = 0;
  vec_t tc_cfg_data = 0, tc_bs_data = 0;
  logic tc_h_valid, tc_busy, tc_fgm_start;
  logic [$clog2(NH)-1:0] tc_h_idx;
  vec_t tc_h_data;
  logic [$clog2(NS+1)-1:0] tc_clip_count;
  logic kkt_we = 0;
  logic [ZW-1:0] kkt_row = 0;
  fp32_t kkt_data [BAND];
  logic prec_valid;
  logic mr_b_we = 0, mr_start = 0, mr_busy, mr_z_valid, mr_done;
  logic [ZW-1:0] mr_b_idx = 0, mr_z_idx;
  fp32_t mr_b_data = 0, mr_z_data;
  logic [$clog2(52)-1:0] mr_iter_count;
  logic ls_valid = 0, ls_first = 0, ls_last = 0, ls_alpha_valid;
  fp32_t ls_v = 0, ls_dv = 0, ls_alpha;
  logic [4:0] ls_alpha_exp;

  mpc_soc_top dut (.*);

  int checks = 0, failures = 0;
  int n_handoff = 0, n_clipped = 0, n_prec = 0, n_z = 0, n_iter = 0, n_frozen = 0;
  int n_full = 0, n_back = 0, n_zero = 0;

  always @(posedge clk) begin
    if (tc_fgm_start) n_handoff++;
    if (prec_valid) n_prec++;
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs_(input real x);
    return x < 0.0 ? -x : x;
  endfunction

  task automatic cfg(input cfg_sel_e s, input int r, input int c, input longint d);
    @(negedge clk);
    tc_cfg_we = 1; tc_cfg_sel = s; tc_cfg_row = 6'(r); tc_cfg_col = 5'(c); tc_cfg_data = vec_t'(d);
  endtask

  // ---------------- 1. target calculator ----------------
  task automatic target_calc();
    longint F [], H [], tmx [], tmn [], Ms [], L [], b [], f [], tb_ [], th [], h [];
    longint beta_i;
    int clips, seen, tlast, tstart, total;
    beta_i = 64'sd15099494;   // 0.9
    F = new[NS*NB]; H = new[NS*NS]; tmx = new[NS]; tmn = new[NS]; Ms = new[NS]; L = new[NH*NS];
    b = new[NB];
    for (int i = 0; i < NS*NB; i++) F[i] = longint'($urandom_range(0, 262144)) - 131072;
    for (int r = 0; r < NS; r++)
      for (int c = r; c < NS; c++) begin
        longint v;
        if (r == c) v = 64'sd3355443 + longint'($urandom_range(0, 3355443));  // 0.4..0.8
        else        v = longint'($urandom_range(0, 2*41943)) - 41943;         // +-0.005
        H[r*NS + c] = v; H[c*NS + r] = v;
      end
    for (int j = 0; j < NS; j++) begin
      tmx[j] = 64'sd524288 + longint'($urandom_range(0, 1048576));
      tmn[j] = -(64'sd524288 + longint'($urandom_range(0, 1048576)));
      Ms[j]  = 64'sd262144 + longint'($urandom_range(0, 3932160));
    end
    for (int i = 0; i < NH*NS; i++) L[i] = longint'($urandom_range(0, 65536)) - 32768;
    for (int i = 0; i < NB; i++) b[i] = longint'($urandom_range(0, 4194304)) - 2097152;
    matvec(NS, NB, F_FRAC, F, b, f);
    fgm_fixed(NS, IFG, H, f, tmx, tmn, beta_i, tb_, clips);
    th = new[NS];
    for (int i = 0; i < NS; i++) th[i] = rs(Ms[i] * tb_[i], M_FRAC);
    matvec(NH, NS, L_FRAC, L, th, h);

    for (int r = 0; r < NS; r++) for (int c = 0; c < NB; c++) cfg(SEL_F, r, c, F[r*NB+c]);
    for (int r = 0; r < NS; r++) for (int c = 0; c < NS; c++) cfg(SEL_H, r, c, H[r*NS+c]);
    for (int r = 0; r < NS; r++) begin
      cfg(SEL_TMAX, r, 0, tmx[r]); cfg(SEL_TMIN, r, 0, tmn[r]); cfg(SEL_MS, r, 0, Ms[r]);
    end
    for (int r = 0; r < NH; r++) for (int c = 0; c < NS; c++) cfg(SEL_LS, r, c, L[r*NS+c]);
    cfg(SEL_BETA, 0, 0, beta_i);
    @(negedge clk); tc_cfg_we = 0;

    total = (IFG + NB + NU + 2*NX) * NS + 33 * IFG + NB + 24;
    seen = 0; tlast = -1; tstart = -1;
    fork
      begin
        for (int i = 0; i < NB; i++) begin
          tc_bs_valid = 1; tc_bs_data = vec_t'(b[i]);
          @(negedge clk);
        end
        tc_bs_valid = 0;
      end
      begin
        for (int c = 0; c < total + 50; c++) begin
          if (tc_fgm_start) tstart = c;
          if (tc_h_valid) begin
            checks++;
            if (int'(tc_h_idx) != seen || longint'(tc_h_data) != h[seen]) begin
              failures++;
              $display("h[%0d] (idx %0d) = %0d, model %0d", seen, tc_h_idx, tc_h_data, h[seen]);
            end
            seen++;
            tlast = c;
          end
          @(negedge clk);
        end
      end
    join
    checks++;
    if (seen != NH || tlast != total - 1) begin
      failures++; $display("%0d outputs, last in cycle %0d, want %0d", seen, tlast, total - 1);
    end
    checks++;
    if (tstart != NB + NS*NB + 10 - NS) begin failures++; $display("FGM start cycle %0d", tstart); end
    checks++;
    if (int'(tc_clip_count) != clips) begin
      failures++; $display("clip count %0d, model %0d", tc_clip_count, clips);
    end
    n_clipped += clips;
    $display("target calculation: %0d cycles, %0d of %0d variables on a bound", tlast + 1, clips, NS);
  endtask

  // ---------------- 2. MINRES solve ----------------
  fp32_t A [Z][BAND];

  task automatic minres_solve();
    fp32_t Bv [Z];
    real zr [Z];
    real rmax, bmax;
    int seen, prec0, cyc, want_cyc;
    // symmetric band: A[i][l] pairs with A[j][2V-2-l], j = i + l - (V-1)
    for (int i = 0; i < Z; i++)
      for (int l = 0; l < BAND; l++) A[i][l] = FP_ZERO;
    for (int i = 0; i < Z; i++)
      for (int l = V; l < BAND; l++) begin
        int j;
        j = i + l - (V - 1);
        if (j < Z) begin
          fp32_t v;
          if ($urandom_range(0, 2) == 0) v = FP_ZERO;
          else v = rand_fp(-6, 2);
          A[i][l] = v;
          A[j][2*V - 2 - l] = v;
        end
      end
    // indefinite, diagonal twice the rest of the row in magnitude
    for (int i = 0; i < Z; i++) begin
      real s;
      s = 0.0;
      for (int l = 0; l < BAND; l++) s += rabs_(fp2r(A[i][l]));
      A[i][V - 1] = r2fp(($urandom_range(0, 1) == 1 ? -2.0 : 2.0) * (s + 0.5));
      Bv[i] = rand_fp(-3, 3);
    end
    prec0 = n_prec;
    for (int i = 0; i < Z; i++) begin
      @(negedge clk);
      kkt_we = 1; kkt_row = ZW'(i); kkt_data = A[i];
      mr_b_we = 1; mr_b_idx = ZW'(i); mr_b_data = Bv[i];
    end
    @(negedge clk); kkt_we = 0; mr_b_we = 0;
    repeat (20) @(negedge clk);
    checks++;
    if (n_prec - prec0 != Z) begin failures++; $display("%0d preconditioner entries", n_prec - prec0); end
    mr_start = 1;
    @(negedge clk); mr_start = 0;
    seen = 0; cyc = 1;
    forever begin
      if (mr_z_valid) begin
        checks++;
        if (int'(mr_z_idx) != seen) begin failures++; $display("z order %0d vs %0d", mr_z_idx, seen); end
        zr[seen] = fp2r(mr_z_data);
        seen++;
        n_z++;
      end
      if (mr_done) break;
      @(negedge clk); cyc++;
    end
    checks++;
    if (seen != Z) begin failures++; $display("%0d solution outputs", seen); end
    n_iter += int'(mr_iter_count);
    if (dut.u_mr.frozen) n_frozen++;
    checks++;
    if (int'(mr_iter_count) != 51) begin failures++; $display("%0d MINRES iterations", mr_iter_count); end
    want_cyc = 1 + 2*Z + 52 * (Z + V + 4 + $clog2(BAND)) + 51 * (4*Z + 7);
    checks++;
    if (cyc != want_cyc) begin failures++; $display("solve took %0d cycles, expected %0d", cyc, want_cyc); end
    // residual b - A z in double precision
    rmax = 0.0; bmax = 0.0;
    for (int i = 0; i < Z; i++) begin
      real r;
      r = fp2r(Bv[i]);
      for (int l = 0; l < BAND; l++) begin
        int j;
        j = i + l - (V - 1);
        if (j >= 0 && j < Z) r -= fp2r(A[i][l]) * zr[j];
      end
      if (rabs_(r) > rmax) rmax = rabs_(r);
      if (rabs_(fp2r(Bv[i])) > bmax) bmax = rabs_(fp2r(Bv[i]));
    end
    checks++;
    if (rmax > 1e-4 * bmax) begin failures++; $display("residual %g of max |b| %g", rmax, bmax); end
    $display("MINRES solve: %0d unknowns, %0d iterations, %0d cycles, max residual %g (max |b| %g)",
             seen, mr_iter_count, cyc, rmax, bmax);
  endtask

  // ---------------- 3. line search ----------------
  task automatic line_search(input int need);
    // need < 0: full step; 0..16: one element forces alpha <= 2^-need;
    // 17+: no step possible.
    localparam int NC = 2 * N * NU;   // inequality constraints (input bounds)
    fp32_t vb [2*NC], dvb [2*NC];
    int k, jexp, got;
    for (int i = 0; i < 2*NC; i++) begin
      vb[i]  = {1'b0, 8'(126 + int'($urandom_range(0, 3))), 23'($urandom)};
      dvb[i] = {1'b0, 8'(120), 23'($urandom)};
      if ($urandom_range(0, 1) == 1) dvb[i][31] = 1'b1;
    end
    jexp = 0;
    if (need >= 0) begin
      k = int'($urandom_range(0, 2*NC - 1));
      dvb[k] = r2fp(-fp2r(vb[k]) * (2.0 ** need) * 1.5);
      jexp = (need >= 17) ? 17 : need + 1;
      if (need == 0) jexp = 1;
    end
    for (int i = 0; i < 2*NC; i++) begin
      @(negedge clk);
      ls_valid = 1; ls_first = (i == 0); ls_last = (i == 2*NC - 1);
      ls_v = vb[i]; ls_dv = dvb[i];
    end
    @(negedge clk); ls_valid = 0; ls_first = 0; ls_last = 0;
    got = -1;
    for (int c = 0; c < 4; c++) begin
      if (ls_alpha_valid) got = int'(ls_alpha_exp);
      @(negedge clk);
    end
    checks++;
    if (got != jexp) begin failures++; $display("line search exponent %0d, want %0d", got, jexp); end
    if (got == 0) n_full++;
    else if (got == 17) n_zero++;
    else if (got > 0) n_back++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    target_calc();
    minres_solve();
    line_search(-1);
    line_search(4);
    line_search(11);
    line_search(20);
    checks++;
    if (n_handoff == 0 || n_clipped == 0 || n_prec == 0 || n_z == 0 || n_iter == 0 || n_frozen == 0 ||
        n_full == 0 || n_back == 0 || n_zero == 0) begin
      failures++;
    end
    $display("mechanisms: hand-off %0d, clipped %0d, preconditioner writes %0d, MINRES iterations %0d, converged solves %0d, solution outputs %0d, full steps %0d, backtracks %0d, zero steps %0d",
             n_handoff, n_clipped, n_prec, n_iter, n_frozen, n_z, n_full, n_back, n_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
