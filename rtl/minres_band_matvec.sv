// minres_band_matvec: matrix-vector datapath of the parallel MINRES
// accelerator, with on-line diagonal preconditioning.
//
// The KKT matrix A_k of each interior-point iteration becomes banded once
// primal and dual variables are interleaved: half-band V = 2*NX + NU, so
// every row has at most 2V-1 non-zeros around the diagonal. MINRES spends
// its time in products y = (M A M) x, where M is the diagonal
// preconditioner of eq. (8) and A is stored unpreconditioned. This block
// produces one element of y per clock:
//   - the band of row i (2V-1 single-precision words) is read from 2V-1
//     RAMs at once;
//   - a first bank of multipliers at the RAM output applies the
//     preconditioner, A_ij * M_j * M_i (two multipliers per lane);
//   - a second bank multiplies by x_j, and an adder tree (fp32_adder_tree)
//     sums the 2V-1 products.
// The windows of x and M that lane l needs (index j = i + l - (V-1)) are
// shift registers fed one element per clock, so each vector is read
// sequentially from a single-port memory. Entries outside 0..Z-1 read as
// zero.
//
// Sizes: Z = N*(2*NX + NU) + 2*NX rows (516 for the N = 12 airliner
// problem) and 2V-1 = 81 lanes. Band storage here is plain (Z x (2V-1)
// words); the document's reduced storage scheme for repeated and constant
// entries is not reproduced.
//
// Interface and timing: rows of the band are written whole through a_we /
// a_row / a_data (lane l holds A[i][i + l - (V-1)]), M and x element-wise
// through m_we / x_we. A pulse on start begins a product: the windows are
// filled for V cycles, then one row enters the pipeline per clock, and
// y_i leaves on y_valid/y_idx/y_data 3 + ceil(log2(2V-1)) cycles after its
// row entered the pipeline. Counting the start cycle as 0, y_i appears in
// cycle i + V + 4 + ceil(log2(2V-1)), so a product over Z rows ends in cycle
// Z + V + 3 + ceil(log2(2V-1)) (607 cycles for the default sizes). Floating point: fp32_pkg (round to nearest even, subnormals
// flushed), one register per multiplier or adder level.
module minres_band_matvec
  import fp32_pkg::*;
#(
  parameter int N  = 12,
  parameter int NX = 12,
  parameter int NU = 17
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // band rows
  input  logic                          a_we,
  input  logic [$clog2(N*(2*NX+NU)+2*NX)-1:0] a_row,
  input  fp32_t                         a_data [2*(2*NX+NU)-1],
  // preconditioner diagonal
  input  logic                          m_we,
  input  logic [$clog2(N*(2*NX+NU)+2*NX)-1:0] m_idx,
  input  fp32_t                         m_data,
  // input vector
  input  logic                          x_we,
  input  logic [$clog2(N*(2*NX+NU)+2*NX)-1:0] x_idx,
  input  fp32_t                         x_data,
  // run
  input  logic                          start,
  output logic                          busy,
  output logic                          y_valid,
  output logic [$clog2(N*(2*NX+NU)+2*NX)-1:0] y_idx,
  output fp32_t                         y_data
);
  localparam int V    = 2 * NX + NU;
  localparam int BAND = 2 * V - 1;
  localparam int Z    = N * V + 2 * NX;
  localparam int ZW   = $clog2(Z);
  localparam int QW   = $clog2(Z + V + 1);

  // Band storage, one RAM per lane.
  fp32_t amem [BAND][Z];
  fp32_t mmem [Z];
  fp32_t xmem [Z];

  always_ff @(posedge clk) begin
    if (a_we) for (int l = 0; l < BAND; l++) amem[l][a_row] <= a_data[l];
    if (m_we) mmem[m_idx] <= m_data;
    if (x_we) xmem[x_idx] <= x_data;
  end

  // Feed counter q: element q enters the top of the windows at the end of
  // cycle q; row i = q - (V-1) is read in the same cycle.
  logic          run;
  logic [QW-1:0] q;
  logic          row_rd;
  logic [QW-1:0] row_i;
  assign row_i  = q - QW'(V - 1);
  assign row_rd = run && (q >= QW'(V - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0;
      q   <= '0;
    end else if (!run) begin
      if (start) begin run <= 1'b1; q <= '0; end
    end else begin
      q <= q + QW'(1);
      if (q == QW'(Z + V - 2)) run <= 1'b0;
    end
  end

  fp32_t xw [BAND];
  fp32_t mw [BAND];
  always_ff @(posedge clk) begin
    if (!run && start) begin
      for (int l = 0; l < BAND; l++) begin xw[l] <= FP_ZERO; mw[l] <= FP_ZERO; end
    end else if (run) begin
      for (int l = 0; l < BAND - 1; l++) begin xw[l] <= xw[l+1]; mw[l] <= mw[l+1]; end
      xw[BAND-1] <= (q < QW'(Z)) ? xmem[ZW'(q)] : FP_ZERO;
      mw[BAND-1] <= (q < QW'(Z)) ? mmem[ZW'(q)] : FP_ZERO;
    end
  end

  // Stage 0: band row read (valid in the cycle after row_rd, together
  // with the windows for that row).
  fp32_t         s0_a [BAND];
  logic          s0_v;
  logic [ZW-1:0] s0_i;
  always_ff @(posedge clk) begin
    for (int l = 0; l < BAND; l++) s0_a[l] <= amem[l][ZW'(row_i)];
    s0_i <= ZW'(row_i);
  end

  // Stage 1: A_ij * M_j; stage 2: * M_i; stage 3: * x_j.
  fp32_t s1_a [BAND], s1_x [BAND], s1_mi;
  fp32_t s2_a [BAND], s2_x [BAND];
  fp32_t s3_p [BAND];
  logic [ZW-1:0] s1_i, s2_i, s3_i;
  logic          s1_v, s2_v, s3_v;
  always_ff @(posedge clk) begin
    for (int l = 0; l < BAND; l++) begin
      s1_a[l] <= fp_mul(s0_a[l], mw[l]);
      s1_x[l] <= xw[l];
      s2_a[l] <= fp_mul(s1_a[l], s1_mi);
      s2_x[l] <= s1_x[l];
      s3_p[l] <= fp_mul(s2_a[l], s2_x[l]);
    end
    s1_mi <= mw[V-1];
    s1_i <= s0_i; s2_i <= s1_i; s3_i <= s2_i;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s0_v <= 1'b0; s1_v <= 1'b0; s2_v <= 1'b0; s3_v <= 1'b0;
    end else begin
      s0_v <= row_rd; s1_v <= s0_v; s2_v <= s1_v; s3_v <= s2_v;
    end
  end

  fp32_adder_tree #(.N(BAND), .TW(ZW)) u_tree (
    .clk, .rst_n,
    .in_valid (s3_v),
    .in_tag   (s3_i),
    .din      (s3_p),
    .out_valid(y_valid),
    .out_tag  (y_idx),
    .sum      (y_data)
  );

  assign busy = run | s0_v | s1_v | s2_v | s3_v;
endmodule
