// tc_fgm_tb: self-checking test of the fixed-point FGM (subsystem #2).
//
// Loads a random, diagonally dominant scaled Hessian (eigenvalues inside
// (0,1)), a random linear term and box bounds tight enough that some
// variables end on a bound, runs N_ITER iterations and compares every
// output with a bit-exact integer model and with a real-valued FGM. Also
// checks the run length NS + N_ITER*(NS + 33) cycles and the output order.
module tc_fgm_tb;
  import tc_pkg::*;
  import tc_ref_pkg::*;

  localparam int N    = NS;
  localparam int ITER = 60;
  localparam int IW   = $clog2(N);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic h_we = 0, bnd_we = 0, bnd_max = 0, f_we = 0, start = 0;
  logic [IW-1:0] h_row = 0, h_col = 0, bnd_idx = 0, f_idx = 0;
  mat_t h_wdata = 0, beta = 0;
  vec_t bnd_wdata = 0, f_wdata = 0;
  logic busy, out_valid;
  logic [IW-1:0] out_idx;
  vec_t out_data;
  logic [$clog2(N+1)-1:0] clip_count;

  tc_fgm #(.N_S(N), .N_ITER(ITER), .LAT(33)) dut (.*);

  int checks = 0, failures = 0;
  longint h [], f [], tmx [], tmn [], tref [];
  real hr [], fr [], tmxr [], tmnr [], treal [];
  int clips_ref;
  longint beta_i;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int seen, t0, tlast;
    h = new[N*N]; f = new[N]; tmx = new[N]; tmn = new[N];
    hr = new[N*N]; fr = new[N]; tmxr = new[N]; tmnr = new[N];
    for (int r = 0; r < N; r++)
      for (int c = r; c < N; c++) begin
        longint v;
        if (r == c) v = 64'sd2516582 + longint'($urandom_range(0, 2516582)); // 0.3..0.6
        else        v = longint'($urandom_range(0, 2*83886)) - 83886;        // +-0.01
        h[r*N + c] = v; h[c*N + r] = v;
      end
    for (int j = 0; j < N; j++) begin
      f[j]   = longint'($urandom_range(0, 2*2097152)) - 2097152;      // +-1.0
      tmx[j] = 64'sd1048576 + longint'($urandom_range(0, 2097152));   // 0.5..1.5
      tmn[j] = -(64'sd1048576 + longint'($urandom_range(0, 2097152)));
    end
    beta_i = 64'sd14260634;   // 0.85
    for (int i = 0; i < N*N; i++) hr[i] = real'(h[i]) / 8388608.0;
    for (int j = 0; j < N; j++) begin
      fr[j] = real'(f[j]) / 2097152.0;
      tmxr[j] = real'(tmx[j]) / 2097152.0;
      tmnr[j] = real'(tmn[j]) / 2097152.0;
    end
    fgm_fixed(N, ITER, h, f, tmx, tmn, beta_i, tref, clips_ref);
    fgm_real(N, ITER, hr, fr, tmxr, tmnr, 0.85, treal);

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    beta  = mat_t'(beta_i);
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        @(negedge clk); h_we = 1; h_row = IW'(r); h_col = IW'(c); h_wdata = mat_t'(h[r*N+c]);
      end
    for (int j = 0; j < N; j++) begin
      @(negedge clk); h_we = 0;
      f_we = 1; f_idx = IW'(j); f_wdata = vec_t'(f[j]);
      bnd_we = 1; bnd_max = 1; bnd_idx = IW'(j); bnd_wdata = vec_t'(tmx[j]);
      @(negedge clk); f_we = 0;
      bnd_max = 0; bnd_wdata = vec_t'(tmn[j]);
    end
    @(negedge clk); bnd_we = 0;
    start = 1;
    t0 = 0; seen = 0; tlast = 0;
    @(posedge clk); #1 start = 0;
    t0 = 1;   // cycle index of the clock edge after the start cycle
    for (int cyc = 1; cyc < N + ITER*(N+33) + 20; cyc++) begin
      @(negedge clk);
      if (out_valid) begin
        checks++;
        if (out_idx != IW'(seen)) begin
          failures++; $display("order: got %0d want %0d", out_idx, seen);
        end
        checks++;
        if (longint'(out_data) != tref[seen]) begin
          failures++;
          $display("t[%0d] = %0d, model %0d", seen, out_data, tref[seen]);
        end
        checks++;
        if ((real'(out_data) / 2097152.0 - treal[seen]) > 1e-3 ||
            (treal[seen] - real'(out_data) / 2097152.0) > 1e-3) begin
          failures++;
          $display("t[%0d] = %f, real FGM %f", seen, real'(out_data)/2097152.0, treal[seen]);
        end
        seen++;
        tlast = cyc;
      end
      @(posedge clk);
    end
    checks++;
    if (seen != N) begin failures++; $display("outputs: %0d", seen); end
    // start is cycle 0; the last output must be in cycle NS + ITER*(NS+33) - 1
    checks++;
    if (tlast != N + ITER*(N+33) - 1) begin
      failures++; $display("last output in cycle %0d, want %0d", tlast, N + ITER*(N+33) - 1);
    end
    checks++;
    if (int'(clip_count) != clips_ref || clips_ref == 0) begin
      failures++; $display("clip count %0d, model %0d", clip_count, clips_ref);
    end
    $display("clipped variables at the end: %0d", clips_ref);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
