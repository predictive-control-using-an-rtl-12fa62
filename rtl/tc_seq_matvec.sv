// tc_seq_matvec: sequential fixed-point matrix-vector product, one multiply
// and one add per clock (target-calculator subsystems #1 and #4).
//
// Subsystem #1 forms f_s = F_s * b_s (29 x 13), subsystem #4 the 41 values
// L_s * theta_s handed to the regulator. Both happen once per sample, so a
// single multiplier and accumulator walk the matrix row by row.
//
// Interface and timing. The matrix sits in a RAM written through m_we /
// m_addr (row-major, addr = row*COLS + col). A run starts when the first
// element of the input vector arrives on in_valid; the COLS elements must
// arrive on consecutive clocks (cycles 0..COLS-1, an assertion checks it).
// The ROWS*COLS multiply-adds follow in cycles COLS..COLS+ROWS*COLS-1, and
// the result of row r appears on out_valid/out_idx/out_data TAIL cycles
// after its last multiply was issued. The last result therefore leaves in
// cycle COLS + ROWS*COLS + TAIL - 1: a run takes COLS + ROWS*COLS + TAIL
// cycles, the count given for both subsystems with TAIL = 10. The natural
// pipeline (RAM read, multiply, accumulate, round) is four deep; the rest of
// TAIL is a delay line so that the schedule matches those counts. handoff
// pulses in cycle COLS + ROWS*COLS + TAIL - HANDOFF, which lets the next
// stage start HANDOFF cycles before this one ends.
//
// Arithmetic: MW-bit matrix with MFRAC fraction bits times VW-bit vector
// with VF fraction bits, accumulated exactly, then rounded and saturated to
// the VW/VF output format (tc_pkg::round_sat).
module tc_seq_matvec
  import tc_pkg::*;
#(
  parameter int ROWS    = NS,
  parameter int COLS    = NB,
  parameter int MFRAC   = F_FRAC,
  parameter int TAIL    = 10,
  parameter int HANDOFF = NS
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // matrix load
  input  logic                           m_we,
  input  logic [$clog2(ROWS*COLS)-1:0]   m_addr,
  input  mat_t                           m_wdata,
  // input vector stream
  input  logic                           in_valid,
  input  vec_t                           in_data,
  // result stream
  output logic                           out_valid,
  output logic [$clog2(ROWS)-1:0]        out_idx,
  output vec_t                           out_data,
  output logic                           handoff,
  output logic                           busy
);
  localparam int TOTAL = COLS + ROWS * COLS + TAIL;
  localparam int PIPE  = 4;
  localparam int DLY   = TAIL - PIPE;
  localparam int CW    = $clog2(TOTAL + 1);
  localparam int RW    = $clog2(ROWS);
  localparam int KW    = (COLS > 1) ? $clog2(COLS) : 1;
  localparam int AW    = $clog2(ROWS * COLS);
  localparam int ACCW  = MW + VW + $clog2(COLS) + 1;

  mat_t mem [ROWS*COLS];
  vec_t vin [COLS];

  logic          active;
  logic [CW-1:0] cyc;
  logic [RW-1:0] r_cnt;
  logic [KW-1:0] c_cnt;
  logic          issue;

  assign issue = active && (cyc >= CW'(COLS)) && (cyc < CW'(COLS + ROWS * COLS));
  assign busy  = active;
  assign handoff = active && (cyc == CW'(TOTAL - HANDOFF));

  always_ff @(posedge clk) begin
    if (m_we) mem[m_addr] <= m_wdata;
  end

  // Run counter and input capture.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      cyc    <= '0;
      r_cnt  <= '0;
      c_cnt  <= '0;
    end else if (!active) begin
      if (in_valid) begin
        active <= 1'b1;
        cyc    <= CW'(1);
        r_cnt  <= '0;
        c_cnt  <= '0;
      end
    end else begin
      cyc <= cyc + CW'(1);
      if (cyc == CW'(TOTAL - 1)) active <= 1'b0;
      if (issue) begin
        if (c_cnt == KW'(COLS - 1)) begin
          c_cnt <= '0;
          r_cnt <= r_cnt + RW'(1);
        end else begin
          c_cnt <= c_cnt + KW'(1);
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!active && in_valid) vin[0] <= in_data;
    else if (active && cyc < CW'(COLS) && in_valid) vin[cyc[KW-1:0]] <= in_data;
  end

  // Stage 1: RAM read.
  mat_t          s1_m;
  logic [KW-1:0] s1_c;
  logic [RW-1:0] s1_r;
  logic          s1_v, s1_first, s1_last;
  // Stage 2: product.
  logic signed [MW+VW-1:0] s2_p;
  logic [RW-1:0] s2_r;
  logic          s2_v, s2_first, s2_last;
  // Stage 3: accumulator; stage 4: rounded row result.
  logic signed [ACCW-1:0] acc;
  logic [RW-1:0] s3_r;
  logic          s3_done;
  vec_t          s4_d;
  logic [RW-1:0] s4_r;
  logic          s4_v;

  always_ff @(posedge clk) begin
    s1_m     <= mem[AW'(r_cnt) * AW'(COLS) + AW'(c_cnt)];
    s1_c     <= c_cnt;
    s1_r     <= r_cnt;
    s1_first <= (c_cnt == '0);
    s1_last  <= (c_cnt == KW'(COLS - 1));
    s2_p     <= s1_m * vin[s1_c];
    s2_r     <= s1_r;
    s2_first <= s1_first;
    s2_last  <= s1_last;
    if (s2_v) acc <= s2_first ? ACCW'(s2_p) : acc + ACCW'(s2_p);
    s3_r     <= s2_r;
    s4_d     <= round_sat(128'(acc), MFRAC);
    s4_r     <= s3_r;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 1'b0; s2_v <= 1'b0; s3_done <= 1'b0; s4_v <= 1'b0;
    end else begin
      s1_v    <= issue;
      s2_v    <= s1_v;
      s3_done <= s2_v && s2_last;
      s4_v    <= s3_done;
    end
  end

  // Delay line up to the scheduled output cycle.
  logic          dl_v [DLY+1];
  logic [RW-1:0] dl_r [DLY+1];
  vec_t          dl_d [DLY+1];
  assign dl_v[0] = s4_v;
  assign dl_r[0] = s4_r;
  assign dl_d[0] = s4_d;
  for (genvar i = 1; i <= DLY; i++) begin : g_dly
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) dl_v[i] <= 1'b0;
      else        dl_v[i] <= dl_v[i-1];
    end
    always_ff @(posedge clk) begin
      dl_r[i] <= dl_r[i-1];
      dl_d[i] <= dl_d[i-1];
    end
  end
  assign out_valid = dl_v[DLY];
  assign out_idx   = dl_r[DLY];
  assign out_data  = dl_d[DLY];

  // The input vector must arrive on consecutive clocks.
  a_in_contiguous: assert property (@(posedge clk) disable iff (!rst_n)
    active && cyc < CW'(COLS) |-> in_valid);
  initial begin
    if (TAIL < PIPE) $error("tc_seq_matvec: TAIL must be at least %0d", PIPE);
  end
endmodule
