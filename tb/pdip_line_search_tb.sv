// pdip_line_search_tb: self-checking test of the backtracking line search.
//
// Sends vectors of strictly positive (v, dv) pairs built so that the
// expected step is known: a full step, a step that needs backtracking to a
// chosen 2^-j, and one where no trial succeeds (alpha = 0). The expected
// step is also recomputed by a plain backtracking loop in real arithmetic.
// Checks alpha, its exponent, and that the result comes two cycles after
// the last pair.
module pdip_line_search_tb;
  import fp_ref_pkg::*;

  localparam int T = 17;
  localparam int NEL = 40;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_first = 0, in_last = 0;
  logic [31:0] in_v = 0, in_dv = 0;
  logic alpha_valid;
  logic [31:0] alpha;
  logic [$clog2(T+1)-1:0] alpha_exp;

  pdip_line_search #(.TRIALS(T)) dut (.*);

  int checks = 0, failures = 0;
  int full_steps = 0, backtracks = 0, zero_steps = 0;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: plain backtracking in real arithmetic.
  function automatic int ref_step(input real v [], input real dv []);
    real a;
    a = 1.0;
    for (int j = 0; j < T; j++) begin
      bit ok;
      ok = 1;
      foreach (v[i]) if (!(v[i] + a * dv[i] > 0.0)) ok = 0;
      if (ok) return j;
      a = a / 2.0;
    end
    return T;
  endfunction

  task automatic run_case(input int target);
    real v [], dv [];
    logic [31:0] vb [], dvb [];
    int jref, lastcyc, gotcyc;
    v = new[NEL]; dv = new[NEL]; vb = new[NEL]; dvb = new[NEL];
    for (int i = 0; i < NEL; i++) begin
      vb[i]  = {1'b0, 8'(127 + int'($urandom_range(0, 6)) - 3), 23'($urandom)};
      v[i]   = fp2r(vb[i]);
      // mostly harmless increments
      dvb[i] = {1'($urandom_range(0, 1)), 8'(127 - 4 - int'($urandom_range(0, 3))), 23'($urandom)};
      dv[i]  = fp2r(dvb[i]);
      if (dv[i] < 0.0 && v[i] + dv[i] <= 0.0) begin dvb[i][31] = 1'b0; dv[i] = -dv[i]; end
    end
    if (target >= 0) begin
      // one element that needs alpha <= 2^-target: dv = -v * 2^target * 1.5
      int k;
      k = int'($urandom_range(0, NEL - 1));
      dv[k]  = -v[k] * (2.0 ** target) * 1.5;
      dvb[k] = r2fp(dv[k]);
      dv[k]  = fp2r(dvb[k]);
    end
    jref = ref_step(v, dv);
    for (int i = 0; i < NEL; i++) begin
      @(negedge clk);
      in_valid = 1; in_first = (i == 0); in_last = (i == NEL - 1);
      in_v = vb[i]; in_dv = dvb[i];
    end
    lastcyc = 0;
    @(negedge clk); in_valid = 0; in_first = 0; in_last = 0;
    gotcyc = -1;
    for (int c = 1; c < 6; c++) begin
      if (alpha_valid && gotcyc < 0) begin
        gotcyc = c;
        checks++;
        if (int'(alpha_exp) != jref) begin
          failures++; $display("alpha exponent %0d, reference %0d", alpha_exp, jref);
        end
        checks++;
        if (fp2r(alpha) != ((jref == T) ? 0.0 : 2.0 ** (-jref))) begin
          failures++; $display("alpha %h for exponent %0d", alpha, jref);
        end
        if (jref == 0) full_steps++;
        else if (jref == T) zero_steps++;
        else backtracks++;
      end
      @(negedge clk);
    end
    // pair presented in cycle 0 relative to the negedge loop -> result 2 cycles later
    checks++;
    if (gotcyc != 2) begin failures++; $display("alpha valid after %0d cycles", gotcyc); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_case(-1);
    for (int t = 0; t < 20; t++) run_case(int'($urandom_range(0, 19)));
    run_case(18);
    run_case(3);
    checks++;
    if (full_steps == 0 || backtracks == 0 || zero_steps == 0) begin
      failures++;
      $display("coverage: full %0d backtrack %0d zero %0d", full_steps, backtracks, zero_steps);
    end
    $display("full steps %0d, backtracked %0d, zero %0d", full_steps, backtracks, zero_steps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
