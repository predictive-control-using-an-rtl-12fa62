// minres_solver_tb: self-checking test of the preconditioned MINRES solve.
//
// Small problem (horizon 2, 2 states, 1 input: V = 5, Z = 14) with
// I_MR = 2Z: in exact arithmetic MINRES reaches the exact solution within Z
// iterations, so every solve also has to reach the converged state where
// the solution update is frozen (checked), and stay accurate after it.
// The matrix is symmetric, banded with half-band V-1, and indefinite
// (diagonal entries of both signs, each larger in magnitude than the rest
// of its row). The preconditioner diagonal follows eq. (8),
// M_i = 1/sqrt(sum_j |A_ij|). Three right-hand sides are solved; each z is
// compared with a double-precision Gaussian-elimination solution
// (max error below 1e-4 of max |z|), the output order is checked, and the
// solve time is checked to be the same for every solve and equal to
// 1 + 2 Z + (I_MR + 1) * P + I_MR * (4 Z + 7) with P = Z + V + 4 +
// ceil(log2(2V-1)) the product time.
module minres_solver_tb;
  import fp_ref_pkg::*;

  localparam int N = 2, NX = 2, NU = 1, I_MR = 28;
  localparam int V = 2*NX + NU, BAND = 2*V - 1, Z = N*V + 2*NX;
  localparam int ZW = $clog2(Z);
  localparam int LV = $clog2(BAND);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic a_we = 0, m_we = 0, b_we = 0, start = 0;
  logic [ZW-1:0] a_row = 0, m_idx = 0, b_idx = 0;
  logic [31:0] a_data [BAND];
  logic [31:0] m_data = 0, b_data = 0;
  logic busy, z_valid, done;
  logic [ZW-1:0] z_idx;
  logic [31:0] z_data;
  logic [$clog2(I_MR+1)-1:0] iter_count;

  minres_solver #(.N(N), .NX(NX), .NU(NU), .I_MR(I_MR)) dut (.*);

  int checks = 0, failures = 0;
  real A [Z][Z];
  logic [31:0] Af [Z][Z];
  logic [31:0] B [Z];
  int first_time = -1;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Gaussian elimination with partial pivoting.
  task automatic ref_solve(output real x [Z]);
    real G [Z][Z+1];
    for (int i = 0; i < Z; i++) begin
      for (int j = 0; j < Z; j++) G[i][j] = fp2r(Af[i][j]);
      G[i][Z] = fp2r(B[i]);
    end
    for (int c = 0; c < Z; c++) begin
      int p = c;
      for (int r = c + 1; r < Z; r++) if (rabs(G[r][c]) > rabs(G[p][c])) p = r;
      for (int j = 0; j <= Z; j++) begin real t = G[c][j]; G[c][j] = G[p][j]; G[p][j] = t; end
      for (int r = c + 1; r < Z; r++) begin
        real f = G[r][c] / G[c][c];
        for (int j = c; j <= Z; j++) G[r][j] -= f * G[c][j];
      end
    end
    for (int i = Z - 1; i >= 0; i--) begin
      real s = G[i][Z];
      for (int j = i + 1; j < Z; j++) s -= G[i][j] * x[j];
      x[i] = s / G[i][i];
    end
  endtask

  task automatic run_solve();
    real xr [Z];
    real zmax, emax;
    int seen, cyc;
    ref_solve(xr);
    for (int i = 0; i < Z; i++) begin
      @(negedge clk); b_we = 1; b_idx = ZW'(i); b_data = B[i];
    end
    @(negedge clk); b_we = 0; start = 1;
    @(negedge clk); start = 0;
    cyc = 1; seen = 0; zmax = 0.0; emax = 0.0;
    forever begin
      if (z_valid) begin
        checks++;
        if (int'(z_idx) != seen) begin failures++; $display("order %0d vs %0d", z_idx, seen); end
        if (rabs(xr[seen]) > zmax) zmax = rabs(xr[seen]);
        if (rabs(fp2r(z_data) - xr[seen]) > emax) emax = rabs(fp2r(z_data) - xr[seen]);
        seen++;
      end
      if (done) break;
      @(negedge clk); cyc++;
    end
    checks++;
    if (seen != Z) begin failures++; $display("%0d outputs", seen); end
    checks++;
    if (emax > 1e-4 * zmax) begin failures++; $display("max error %g, max |z| %g", emax, zmax); end
    else $display("solve: max error %g of max |z| %g, %0d cycles", emax, zmax, cyc);
    checks++;
    if (int'(iter_count) != I_MR) begin failures++; $display("iterations %0d", iter_count); end
    checks++;
    if (cyc != 1 + 2 * Z + (I_MR + 1) * (Z + V + 4 + LV) + I_MR * (4 * Z + 7)) begin
      failures++;
      $display("solve took %0d cycles, expected %0d", cyc,
               1 + 2 * Z + (I_MR + 1) * (Z + V + 4 + LV) + I_MR * (4 * Z + 7));
    end
    checks++;
    if (!dut.frozen) begin failures++; $display("update never frozen"); end
    checks++;
    if (busy) begin failures++; $display("busy after done"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < Z; i++)
      for (int j = i; j < Z; j++) begin
        if (j - i < V && j != i) A[i][j] = fp2r(rand_fp(-2, 1));
        else A[i][j] = 0.0;
        A[j][i] = A[i][j];
      end
    for (int i = 0; i < Z; i++) begin
      real s;
      s = 0.0;
      for (int j = 0; j < Z; j++) s += rabs(A[i][j]);
      A[i][i] = ($urandom_range(1) ? 1.0 : -1.0) * (s + 1.0 + $urandom_range(100) / 50.0);
    end
    for (int i = 0; i < Z; i++)
      for (int j = 0; j < Z; j++) Af[i][j] = r2fp(A[i][j]);
    for (int i = 0; i < Z; i++) begin
      real s;
      s = 0.0;
      for (int j = 0; j < Z; j++) s += rabs(fp2r(Af[i][j]));
      @(negedge clk);
      a_we = 1; a_row = ZW'(i);
      for (int l = 0; l < BAND; l++) begin
        int j;
        j = i + l - (V - 1);
        a_data[l] = (j >= 0 && j < Z) ? Af[i][j] : 32'h0;
      end
      m_we = 1; m_idx = ZW'(i); m_data = r2fp(1.0 / $sqrt(s));
    end
    @(negedge clk); a_we = 0; m_we = 0;
    for (int t = 0; t < 3; t++) begin
      for (int i = 0; i < Z; i++) B[i] = rand_fp(-3, 4);
      run_solve();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
