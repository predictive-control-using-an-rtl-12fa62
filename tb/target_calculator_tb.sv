// target_calculator_tb: end-to-end test of the target calculator at its
// default sizes (29 variables, 13-element b_s, 41 outputs, 1000 FGM
// iterations).
//
// Builds a random problem: F_s, a diagonally dominant scaled Hessian,
// bounds tight enough that part of the solution sits on a bound, a
// positive scaling diagonal M_s and L_s. Runs two solves with different
// b_s and compares all 41 outputs with the chained integer models
// (f = F b, fixed-point FGM, unscaling, L theta), and with the same chain
// in real arithmetic (absolute tolerance 0.02). Checks the document's total
// cycle count (IFG + NB + NU + 2NX)*NS + 33*IFG + NB + 24 from the first
// b_s element to the last output, and that the FGM is started NS cycles
// before subsystem #1 finishes.
module target_calculator_tb;
  import tc_pkg::*;
  import tc_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic cfg_we = 0, bs_valid = 0;
  cfg_sel_e cfg_sel = SEL_F;
  logic [5:0] cfg_row = 0;
  logic [4:0] cfg_col = 0;
  vec_t cfg_data = 0, bs_data = 0;
  logic h_valid, busy, fgm_start_evt;
  logic [$clog2(NH)-1:0] h_idx;
  vec_t h_data;
  logic [$clog2(NS+1)-1:0] clip_count;

  target_calculator dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  longint F [], H [], tmx [], tmn [], Ms [], L [];
  longint beta_i = 64'sd14260634;   // 0.85 in sfix25_En24

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cfg(input cfg_sel_e s, input int r, input int c, input longint d);
    @(negedge clk);
    cfg_we = 1; cfg_sel = s; cfg_row = 6'(r); cfg_col = 5'(c); cfg_data = vec_t'(d);
  endtask

  task automatic run_solve(input int clips_min);
    longint b [], f [], tb_ [], th [], h [];
    real fr [], hr [], tmxr [], tmnr [], Fr [], br [], treal [], hreal [];
    int clips, seen, t0, tlast, tstart, total;
    b = new[NB];
    for (int i = 0; i < NB; i++) b[i] = longint'($urandom_range(0, 4194304)) - 2097152;
    matvec(NS, NB, F_FRAC, F, b, f);
    fgm_fixed(NS, IFG, H, f, tmx, tmn, beta_i, tb_, clips);
    th = new[NS];
    for (int i = 0; i < NS; i++) th[i] = rs(Ms[i] * tb_[i], M_FRAC);
    matvec(NH, NS, L_FRAC, L, th, h);
    // real-valued chain
    begin
      real Hr [], fr2 [];
      Hr = new[NS*NS]; fr2 = new[NS]; tmxr = new[NS]; tmnr = new[NS];
      for (int i = 0; i < NS*NS; i++) Hr[i] = real'(H[i]) / 8388608.0;
      for (int r = 0; r < NS; r++) begin
        fr2[r] = 0.0;
        for (int c = 0; c < NB; c++) fr2[r] += real'(F[r*NB+c]) / 262144.0 * real'(b[c]) / 2097152.0;
        tmxr[r] = real'(tmx[r]) / 2097152.0;
        tmnr[r] = real'(tmn[r]) / 2097152.0;
      end
      fgm_real(NS, IFG, Hr, fr2, tmxr, tmnr, 0.85, treal);
      hreal = new[NH];
      for (int r = 0; r < NH; r++) begin
        hreal[r] = 0.0;
        for (int c = 0; c < NS; c++)
          hreal[r] += real'(L[r*NS+c]) / 65536.0 * real'(Ms[c]) / 524288.0 * treal[c];
      end
    end
    @(negedge clk); cfg_we = 0;
    t0 = cyc; seen = 0; tlast = -1; tstart = -1;
    total = (IFG + NB + NU + 2*NX) * NS + 33 * IFG + NB + 24;
    fork
      begin
        for (int i = 0; i < NB; i++) begin
          bs_valid = 1; bs_data = vec_t'(b[i]);
          @(negedge clk);
        end
        bs_valid = 0;
      end
      begin
        for (int c = 0; c < total + 50; c++) begin
          if (fgm_start_evt) tstart = c;
          if (h_valid) begin
            checks++;
            if (int'(h_idx) != seen) begin failures++; $display("order %0d vs %0d", h_idx, seen); end
            checks++;
            if (longint'(h_data) != h[seen]) begin
              failures++; $display("h[%0d] = %0d, model %0d", seen, h_data, h[seen]);
            end
            checks++;
            if (rabs(real'(h_data) / 2097152.0 - hreal[seen]) > 0.02) begin
              failures++;
              $display("h[%0d] = %f, real chain %f", seen, real'(h_data) / 2097152.0, hreal[seen]);
            end
            seen++;
            tlast = c;
          end
          @(negedge clk);
        end
      end
    join
    checks++;
    if (seen != NH) begin failures++; $display("%0d outputs", seen); end
    checks++;
    if (tlast != total - 1) begin
      failures++; $display("last output in cycle %0d, want %0d", tlast, total - 1);
    end
    checks++;
    if (tstart != NB + NS*NB + 10 - NS) begin
      failures++; $display("FGM started in cycle %0d, want %0d", tstart, NB + NS*NB + 10 - NS);
    end
    checks++;
    if (int'(clip_count) != clips || clips < clips_min) begin
      failures++; $display("clip count %0d, model %0d", clip_count, clips);
    end
    $display("solve: %0d cycles, %0d variables on a bound", tlast + 1, clips);
  endtask

  function automatic real rabs(input real x);
    return x < 0.0 ? -x : x;
  endfunction

  initial begin
    F = new[NS*NB]; H = new[NS*NS]; tmx = new[NS]; tmn = new[NS]; Ms = new[NS]; L = new[NH*NS];
    for (int i = 0; i < NS*NB; i++) F[i] = longint'($urandom_range(0, 262144)) - 131072;  // +-0.5
    for (int r = 0; r < NS; r++)
      for (int c = r; c < NS; c++) begin
        longint v;
        if (r == c) v = 64'sd2516582 + longint'($urandom_range(0, 2516582));
        else        v = longint'($urandom_range(0, 2*83886)) - 83886;
        H[r*NS + c] = v; H[c*NS + r] = v;
      end
    for (int j = 0; j < NS; j++) begin
      tmx[j] = 64'sd524288 + longint'($urandom_range(0, 1048576));     // 0.25..0.75
      tmn[j] = -(64'sd524288 + longint'($urandom_range(0, 1048576)));
      Ms[j]  = 64'sd262144 + longint'($urandom_range(0, 3932160));     // 0.5..8
    end
    for (int i = 0; i < NH*NS; i++) L[i] = longint'($urandom_range(0, 65536)) - 32768; // +-0.5
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < NS; r++) for (int c = 0; c < NB; c++) cfg(SEL_F, r, c, F[r*NB+c]);
    for (int r = 0; r < NS; r++) for (int c = 0; c < NS; c++) cfg(SEL_H, r, c, H[r*NS+c]);
    for (int r = 0; r < NS; r++) begin
      cfg(SEL_TMAX, r, 0, tmx[r]);
      cfg(SEL_TMIN, r, 0, tmn[r]);
      cfg(SEL_MS, r, 0, Ms[r]);
    end
    for (int r = 0; r < NH; r++) for (int c = 0; c < NS; c++) cfg(SEL_LS, r, c, L[r*NS+c]);
    cfg(SEL_BETA, 0, 0, beta_i);
    run_solve(1);
    run_solve(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
