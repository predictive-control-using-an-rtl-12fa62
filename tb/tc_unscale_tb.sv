// tc_unscale_tb: self-checking test of the element-wise unscaling
// theta_s = diag(M_s) * theta_bar (subsystem #3). Streams NS random
// elements on consecutive clocks (twice, with a gap) and compares each
// output with an integer model, its index, and the four-cycle latency.
module tc_unscale_tb;
  import tc_pkg::*;
  import tc_ref_pkg::*;

  localparam int IW = $clog2(NS);
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic m_we = 0, in_valid = 0, out_valid;
  logic [IW-1:0] m_idx = 0, in_idx = 0, out_idx;
  mat_t m_wdata = 0;
  vec_t in_data = 0, out_data;

  tc_unscale dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  longint md [NS];
  longint exp_q [$];
  int     exp_i [$];
  int     exp_t [$];

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("unexpected output");
      end else begin
        longint e; int ei, et;
        e = exp_q.pop_front(); ei = exp_i.pop_front(); et = exp_t.pop_front();
        if (longint'(out_data) != e || int'(out_idx) != ei || cyc - et != 4) begin
          failures++;
          $display("idx %0d data %0d latency %0d, want idx %0d data %0d", out_idx, out_data, cyc - et, ei, e);
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NS; i++) begin
      md[i] = longint'($urandom_range(0, (1 << 25) - 1)) - (64'sd1 <<< 24);
      @(negedge clk); m_we = 1; m_idx = IW'(i); m_wdata = mat_t'(md[i]);
    end
    @(negedge clk); m_we = 0;
    for (int rep = 0; rep < 2; rep++) begin
      for (int i = 0; i < NS; i++) begin
        longint v;
        v = longint'($urandom) % (64'sd1 <<< (rep == 0 ? 30 : 34));
        exp_q.push_back(rs(md[i] * v, M_FRAC));
        exp_i.push_back(i);
        exp_t.push_back(cyc);
        in_valid = 1; in_idx = IW'(i); in_data = vec_t'(v);
        @(negedge clk);
      end
      in_valid = 0;
      repeat (8) @(negedge clk);
    end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d outputs missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
