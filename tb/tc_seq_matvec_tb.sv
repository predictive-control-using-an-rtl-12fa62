// tc_seq_matvec_tb: self-checking test of the sequential matrix-vector
// product in both of its uses: 29 x 13 with F_s scaling (subsystem #1, the
// defaults) and 41 x 29 with L_s scaling (subsystem #4). Random matrices
// and vectors, including a run with large values that saturates some
// outputs, are compared with an integer model; the test also checks the
// index order, the cycle of the last result (COLS + ROWS*COLS + 10 - 1
// after the first input) and the hand-off pulse NS cycles before the end.
module tc_seq_matvec_tb;
  import tc_pkg::*;
  import tc_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, saturated = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // DUT A: subsystem #1 shape (defaults)
  localparam int RA = NS, CA = NB;
  logic a_mwe = 0, a_iv = 0, a_ov, a_ho, a_busy;
  logic [$clog2(RA*CA)-1:0] a_maddr = 0;
  mat_t a_mw = 0;
  vec_t a_id = 0, a_od;
  logic [$clog2(RA)-1:0] a_oi;
  tc_seq_matvec dut_a (
    .clk, .rst_n, .m_we(a_mwe), .m_addr(a_maddr), .m_wdata(a_mw),
    .in_valid(a_iv), .in_data(a_id), .out_valid(a_ov), .out_idx(a_oi),
    .out_data(a_od), .handoff(a_ho), .busy(a_busy));

  // DUT B: subsystem #4 shape
  localparam int RB = NH, CB = NS;
  logic b_mwe = 0, b_iv = 0, b_ov, b_ho, b_busy;
  logic [$clog2(RB*CB)-1:0] b_maddr = 0;
  mat_t b_mw = 0;
  vec_t b_id = 0, b_od;
  logic [$clog2(RB)-1:0] b_oi;
  tc_seq_matvec #(.ROWS(RB), .COLS(CB), .MFRAC(L_FRAC), .TAIL(10), .HANDOFF(NS)) dut_b (
    .clk, .rst_n, .m_we(b_mwe), .m_addr(b_maddr), .m_wdata(b_mw),
    .in_valid(b_iv), .in_data(b_id), .out_valid(b_ov), .out_idx(b_oi),
    .out_data(b_od), .handoff(b_ho), .busy(b_busy));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input bit use_b, input int vbits, input int mbits);
    int rows, cols, frac, seen, t0, tlast, tho;
    longint m [], v [], o [];
    rows = use_b ? RB : RA; cols = use_b ? CB : CA; frac = use_b ? L_FRAC : F_FRAC;
    m = new[rows*cols]; v = new[cols];
    for (int i = 0; i < rows*cols; i++)
      m[i] = longint'($urandom_range(0, (1 << mbits) - 1)) - (64'sd1 <<< (mbits - 1));
    for (int i = 0; i < cols; i++)
      v[i] = (longint'($urandom) % (64'sd1 <<< vbits));
    matvec(rows, cols, frac, m, v, o);
    for (int i = 0; i < rows*cols; i++) begin
      @(negedge clk);
      if (use_b) begin b_mwe = 1; b_maddr = $bits(b_maddr)'(i); b_mw = mat_t'(m[i]); end
      else       begin a_mwe = 1; a_maddr = $bits(a_maddr)'(i); a_mw = mat_t'(m[i]); end
    end
    @(negedge clk); a_mwe = 0; b_mwe = 0;
    t0 = cyc;
    seen = 0; tlast = -1; tho = -1;
    fork
      begin
        for (int i = 0; i < cols; i++) begin
          if (use_b) begin b_iv = 1; b_id = vec_t'(v[i]); end
          else       begin a_iv = 1; a_id = vec_t'(v[i]); end
          @(negedge clk);
        end
        a_iv = 0; b_iv = 0;
      end
      begin
        for (int c = 0; c < cols + rows*cols + 20; c++) begin
          logic ov, ho;
          logic [5:0] oi;
          vec_t od;
          ov = use_b ? b_ov : a_ov;
          ho = use_b ? b_ho : a_ho;
          oi = use_b ? 6'(b_oi) : 6'(a_oi);
          od = use_b ? b_od : a_od;
          if (ho) tho = c;
          if (ov) begin
            checks++;
            if (int'(oi) != seen) begin failures++; $display("order %0d vs %0d", oi, seen); end
            checks++;
            if (longint'(od) != o[seen]) begin
              failures++; $display("row %0d: %0d, model %0d", seen, od, o[seen]);
            end
            if (o[seen] == (64'sd1 <<< 34) - 1 || o[seen] == -(64'sd1 <<< 34)) saturated++;
            seen++;
            tlast = c;
          end
          @(negedge clk);
        end
      end
    join
    checks++;
    if (seen != rows) begin failures++; $display("%0d results", seen); end
    checks++;
    if (tlast != cols + rows*cols + 10 - 1) begin
      failures++; $display("last result in cycle %0d, want %0d", tlast, cols + rows*cols + 9);
    end
    checks++;
    if (tho != cols + rows*cols + 10 - NS) begin
      failures++; $display("handoff in cycle %0d, want %0d", tho, cols + rows*cols + 10 - NS);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(0, 30, 25);
    run(0, 20, 12);
    run(1, 30, 25);
    run(1, 24, 10);
    checks++;
    if (saturated == 0) begin failures++; $display("no saturated result seen"); end
    $display("saturated results: %0d", saturated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
