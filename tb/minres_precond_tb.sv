// minres_precond_tb: self-checking test of the on-line diagonal
// preconditioner M_ii = 1/sqrt(sum_j |A_ij|).
//
// Streams random band rows (widely varying magnitudes, random signs, some
// entries zero, one all-zero row) one per clock and compares each result
// with 1/sqrt of the absolute row sum in double precision (relative error
// below 2e-6), an all-zero row with 1.0, and checks the index order and
// the latency of ceil(log2(2V-1)) + 5 cycles.
module minres_precond_tb;
  import fp_ref_pkg::*;

  localparam int NX = 12, NU = 17;
  localparam int BAND = 2*(2*NX + NU) - 1;
  localparam int LV = $clog2(BAND);
  localparam int ROWS = 60;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic row_valid = 0;
  logic [9:0] row_idx = 0;
  logic [31:0] row_data [BAND];
  logic m_valid;
  logic [9:0] m_idx;
  logic [31:0] m_data;

  minres_precond #(.NX(NX), .NU(NU), .IW(10)) dut (.*);

  int checks = 0, failures = 0;
  real mref [ROWS];
  int  sent_cyc [ROWS];
  int  cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker
  initial begin
    int seen;
    seen = 0;
    forever begin
      @(negedge clk);
      if (m_valid) begin
        checks++;
        if (int'(m_idx) != seen) begin failures++; $display("order %0d vs %0d", m_idx, seen); end
        checks++;
        if (rabs(fp2r(m_data) - mref[seen]) > 2e-6 * mref[seen]) begin
          failures++; $display("M[%0d] = %g, reference %g", seen, fp2r(m_data), mref[seen]);
        end
        checks++;
        if (cyc - sent_cyc[seen] != LV + 5) begin
          failures++; $display("latency %0d", cyc - sent_cyc[seen]);
        end
        seen++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < ROWS; r++) begin
      real s;
      int lo, hi;
      logic [31:0] rd [BAND];
      lo = int'($urandom_range(0, 20)) - 12;
      hi = lo + 1 + int'($urandom_range(0, 8));
      s = 0.0;
      for (int l = 0; l < BAND; l++) begin
        if (r == 7 || $urandom_range(0, 3) == 0) rd[l] = 32'd0;
        else rd[l] = rand_fp(lo, hi);
        s += rabs(fp2r(rd[l]));
      end
      mref[r] = (s == 0.0) ? 1.0 : 1.0 / $sqrt(s);
      @(negedge clk);
      row_valid = 1; row_idx = 10'(r); row_data = rd;
      sent_cyc[r] = cyc;
    end
    @(negedge clk); row_valid = 0;
    repeat (LV + 10) @(negedge clk);
    checks++;
    if (checks != 3 * ROWS + 1) begin failures++; $display("only %0d results", (checks - 1) / 3); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
