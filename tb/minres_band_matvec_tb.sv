// minres_band_matvec_tb: self-checking test of the preconditioned banded
// matrix-vector datapath.
//
// Uses a small problem (horizon 3, 3 states, 2 inputs: half-band 8, 15
// lanes, 30 rows) so that every row, the band edges and the zero padding
// at both ends of the vectors are exercised. Fills the band with random
// single-precision values, the preconditioner diagonal with random positive
// values, and x with random values, runs two products back to back with
// different x, and compares each y_i with sum_j M_i A_ij M_j x_j evaluated
// in double precision (tolerance 1e-5 of sum_j |M_i A_ij M_j x_j|). Also
// checks the output order and that y_i appears in cycle
// i + V + 4 + ceil(log2(2V-1)) after start.
module minres_band_matvec_tb;
  import fp_ref_pkg::*;

  localparam int N = 3, NX = 3, NU = 2;
  localparam int V = 2*NX + NU, BAND = 2*V - 1, Z = N*V + 2*NX;
  localparam int ZW = $clog2(Z);
  localparam int LV = $clog2(BAND);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic a_we = 0, m_we = 0, x_we = 0, start = 0;
  logic [ZW-1:0] a_row = 0, m_idx = 0, x_idx = 0;
  logic [31:0] a_data [BAND];
  logic [31:0] m_data = 0, x_data = 0;
  logic busy, y_valid;
  logic [ZW-1:0] y_idx;
  logic [31:0] y_data;

  minres_band_matvec #(.N(N), .NX(NX), .NU(NU)) dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] A [Z][BAND];
  logic [31:0] M [Z];
  logic [31:0] X [Z];

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_product();
    real yref [Z], ymag [Z];
    int seen;
    for (int i = 0; i < Z; i++) begin
      yref[i] = 0.0; ymag[i] = 0.0;
      for (int l = 0; l < BAND; l++) begin
        int j;
        real t;
        j = i + l - (V - 1);
        if (j >= 0 && j < Z) begin
          t = fp2r(M[i]) * fp2r(A[i][l]) * fp2r(M[j]) * fp2r(X[j]);
          yref[i] += t;
          ymag[i] += rabs(t);
        end
      end
    end
    for (int i = 0; i < Z; i++) begin
      @(negedge clk); x_we = 1; x_idx = ZW'(i); x_data = X[i];
    end
    @(negedge clk); x_we = 0; start = 1;
    @(negedge clk); start = 0;
    seen = 0;
    for (int c = 1; c < Z + V + 4 + LV + 10; c++) begin
      if (y_valid) begin
        checks++;
        if (int'(y_idx) != seen) begin failures++; $display("order %0d vs %0d", y_idx, seen); end
        checks++;
        if (rabs(fp2r(y_data) - yref[seen]) > 1e-5 * ymag[seen] + 1e-30) begin
          failures++;
          $display("y[%0d] = %g, reference %g", seen, fp2r(y_data), yref[seen]);
        end
        checks++;
        if (c != seen + V + 4 + LV) begin
          failures++; $display("y[%0d] in cycle %0d, want %0d", seen, c, seen + V + 4 + LV);
        end
        seen++;
      end
      @(negedge clk);
    end
    checks++;
    if (seen != Z) begin failures++; $display("%0d outputs", seen); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < Z; i++) begin
      for (int l = 0; l < BAND; l++) A[i][l] = rand_fp(-4, 4);
      M[i] = {1'b0, rand_fp(-3, 2)};
      M[i][31] = 1'b0;
      X[i] = rand_fp(-2, 3);
    end
    for (int i = 0; i < Z; i++) begin
      @(negedge clk);
      a_we = 1; a_row = ZW'(i); a_data = A[i];
      m_we = 1; m_idx = ZW'(i); m_data = M[i];
    end
    @(negedge clk); a_we = 0; m_we = 0;
    run_product();
    for (int i = 0; i < Z; i++) X[i] = rand_fp(-6, 6);
    run_product();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
