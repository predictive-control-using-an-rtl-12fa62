// tc_fgm: fixed-point fast gradient method for the scaled target QP
// (target-calculator subsystem #2).
//
// Solves min 1/2 t' H t + f' t subject to tmin <= t <= tmax, where H is the
// diagonally scaled Hessian (entries in [-1,1], eigenvalues in (0,1]), so
// the gradient step 1/L is 1 and needs no multiplier. Each of IFG
// iterations computes, row by row,
//   g_j   = (H y)_j + f_j
//   t_j'  = clamp(y_j - g_j, tmin_j, tmax_j)
//   y_j'  = t_j' + beta * (t_j' - t_j)
// H is held one column per RAM, so a whole row of H meets the whole vector
// y in one clock: NS multipliers work in parallel and a pipelined adder tree
// (sfix_adder_tree) sums the products. New y and t values go to a second
// buffer, which becomes the current y when the iteration's last row is
// written back.
//
// Timing: start in cycle 0. Cycles 0..NS-1 clear y and t (one element per
// clock). Iteration k occupies cycles NS + k*(NS+LAT) onward for NS+LAT
// cycles: row j is issued in its cycle j and written back in cycle j+LAT.
// A run therefore lasts NS + IFG*(NS+LAT) cycles; with LAT = 33 that is the
// document's count. The arithmetic pipeline is 7 + ceil(log2(NS)) deep (12
// for NS = 29); the remaining stages are a delay line that keeps this
// schedule. During the last
// iteration each written-back t_j is also sent out on out_valid/out_idx/
// out_data, so the results leave in the last NS cycles of the run.
//
// Formats: H sfix25_En23, y, t, f and bounds sfix35_En21 (from the
// document); beta sfix25_En24 (this design's choice). Rounding is
// round-half-up, with saturation to 35 bits.
module tc_fgm
  import tc_pkg::*;
#(
  parameter int N_S   = NS,
  parameter int N_ITER = IFG,
  parameter int LAT   = 33
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // configuration
  input  logic                   h_we,
  input  logic [$clog2(N_S)-1:0] h_row,
  input  logic [$clog2(N_S)-1:0] h_col,
  input  mat_t                   h_wdata,
  input  logic                   bnd_we,
  input  logic                   bnd_max,     // 1: theta_max, 0: theta_min
  input  logic [$clog2(N_S)-1:0] bnd_idx,
  input  vec_t                   bnd_wdata,
  input  mat_t                   beta,
  // linear term, written whenever it is produced (subsystem #1)
  input  logic                   f_we,
  input  logic [$clog2(N_S)-1:0] f_idx,
  input  vec_t                   f_wdata,
  // run
  input  logic                   start,
  output logic                   busy,
  output logic                   out_valid,
  output logic [$clog2(N_S)-1:0] out_idx,
  output vec_t                   out_data,
  // count of rows clipped to a bound in the last iteration
  output logic [$clog2(N_S+1)-1:0] clip_count
);
  localparam int IW    = $clog2(N_S);
  localparam int KW    = $clog2(N_ITER + 1);
  localparam int PW    = $clog2(N_S + LAT + 1);
  localparam int PIPE  = 2 + $clog2(N_S) + 5;   // read, multiply, tree, 5 update stages
  localparam int DLY   = LAT - PIPE;
  localparam int PRODW = MW + VW;
  localparam int SUMW  = PRODW + $clog2(N_S);

  // Storage: column c of H in hcol[c]; y and t current and next.
  mat_t hcol [N_S][N_S];
  vec_t y_cur [N_S];
  vec_t y_nxt [N_S];
  vec_t t_cur [N_S];
  vec_t tmax [N_S];
  vec_t tmin [N_S];
  vec_t fvec [N_S];

  typedef enum logic [1:0] {S_IDLE, S_INIT, S_ITER} state_e;
  state_e        state;
  logic [IW-1:0] init_cnt;
  logic [KW-1:0] iter;
  logic [PW-1:0] p;

  logic issue;
  assign issue = (state == S_ITER) && (p < PW'(N_S));
  assign busy  = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (h_we) hcol[h_col][h_row] <= h_wdata;
    if (f_we) fvec[f_idx] <= f_wdata;
    if (bnd_we && bnd_max)  tmax[bnd_idx] <= bnd_wdata;
    if (bnd_we && !bnd_max) tmin[bnd_idx] <= bnd_wdata;
  end

  // ---------------- datapath ----------------
  // s1: row of H read from the column RAMs.
  mat_t          s1_h [N_S];
  // s2: products.
  logic signed [PRODW-1:0] s2_p [N_S];
  // tree output after $clog2(N_S) more cycles.
  logic signed [SUMW-1:0]  tree_sum;
  // index pipeline alongside
  localparam int TREE = $clog2(N_S);
  logic [IW-1:0] jd [PIPE+1];
  logic          vd [PIPE+1];
  logic          ld [PIPE+1];   // row belongs to the last iteration

  always_ff @(posedge clk) begin
    for (int c = 0; c < N_S; c++) s1_h[c] <= hcol[c][p[IW-1:0]];
    for (int c = 0; c < N_S; c++) s2_p[c] <= s1_h[c] * y_cur[c];
  end

  sfix_adder_tree #(.N(N_S), .IW(PRODW), .OW(SUMW)) u_tree (
    .clk (clk),
    .din (s2_p),
    .sum (tree_sum)
  );

  // Update stages; row j's tree sum is present in cycle j + 2 + TREE.
  logic signed [VW+1:0] u1_g;                 // gradient
  vec_t                 u2_t;                 // projected step
  logic                 u2_clip;
  logic signed [VW:0]   u3_d;                 // t' - t
  vec_t                 u3_t;
  logic                 u3_clip;
  logic signed [MW+VW:0] u4_bd;               // beta * (t' - t)
  vec_t                 u4_t;
  logic                 u4_clip;
  vec_t                 u5_y, u5_t;
  logic                 u5_clip;

  localparam int J_U1 = 2 + TREE;   // index of jd[] aligned with u1 input
  logic signed [VW+2:0] step;
  always_comb begin
    step = (VW+3)'(y_cur[jd[J_U1+1]]) - (VW+3)'(u1_g);
  end

  always_ff @(posedge clk) begin
    // u1: g = round(sum >> H_FRAC) + f
    u1_g <= (VW+2)'(round_sat(128'(tree_sum), H_FRAC)) + (VW+2)'(fvec[jd[J_U1]]);
    // u2: projection on the bounds
    if (step > (VW+3)'(tmax[jd[J_U1+1]])) begin
      u2_t <= tmax[jd[J_U1+1]]; u2_clip <= 1'b1;
    end else if (step < (VW+3)'(tmin[jd[J_U1+1]])) begin
      u2_t <= tmin[jd[J_U1+1]]; u2_clip <= 1'b1;
    end else begin
      u2_t <= vec_t'(step); u2_clip <= 1'b0;
    end
    // u3: difference to the previous iterate
    u3_d    <= (VW+1)'(u2_t) - (VW+1)'(t_cur[jd[J_U1+2]]);
    u3_t    <= u2_t;
    u3_clip <= u2_clip;
    // u4: momentum product
    u4_bd   <= beta * u3_d;
    u4_t    <= u3_t;
    u4_clip <= u3_clip;
    // u5: y' = t' + beta*(t' - t)
    u5_y    <= round_sat(128'(u4_bd) + (128'(u4_t) <<< BETA_FRAC), BETA_FRAC);
    u5_t    <= u4_t;
    u5_clip <= u4_clip;
  end

  // Delay line from the end of the arithmetic to the write-back cycle.
  vec_t dy [DLY+1];
  vec_t dt [DLY+1];
  logic dc [DLY+1];
  assign dy[0] = u5_y;
  assign dt[0] = u5_t;
  assign dc[0] = u5_clip;
  for (genvar i = 1; i <= DLY; i++) begin : g_dly
    always_ff @(posedge clk) begin
      dy[i] <= dy[i-1];
      dt[i] <= dt[i-1];
      dc[i] <= dc[i-1];
    end
  end

  // Row index / valid / last-iteration pipeline.
  assign jd[0] = p[IW-1:0];
  assign vd[0] = issue;
  assign ld[0] = (iter == KW'(N_ITER - 1));
  logic [IW-1:0] jw [LAT+1];
  logic          vw [LAT+1];
  logic          lw [LAT+1];
  assign jw[0] = jd[0];
  assign vw[0] = vd[0];
  assign lw[0] = ld[0];
  for (genvar i = 1; i <= LAT; i++) begin : g_tag
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) vw[i] <= 1'b0;
      else        vw[i] <= vw[i-1];
    end
    always_ff @(posedge clk) begin
      jw[i] <= jw[i-1];
      lw[i] <= lw[i-1];
    end
  end
  for (genvar i = 1; i <= PIPE; i++) begin : g_tagj
    assign jd[i] = jw[i];
    assign vd[i] = vw[i];
    assign ld[i] = lw[i];
  end

  logic          wb;
  logic [IW-1:0] wb_j;
  assign wb   = vw[LAT];
  assign wb_j = jw[LAT];

  // ---------------- control and state ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      init_cnt <= '0;
      iter     <= '0;
      p        <= '0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          state    <= S_INIT;
          init_cnt <= IW'(1);
        end
        S_INIT: begin
          if (init_cnt == IW'(N_S - 1)) begin
            state <= S_ITER;
            iter  <= '0;
            p     <= '0;
          end
          init_cnt <= init_cnt + IW'(1);
        end
        S_ITER: begin
          if (p == PW'(N_S + LAT - 1)) begin
            p <= '0;
            if (iter == KW'(N_ITER - 1)) state <= S_IDLE;
            else iter <= iter + KW'(1);
          end else begin
            p <= p + PW'(1);
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    // clear y and t, one element per clock, during the first NS cycles
    if (state == S_IDLE && start) begin
      y_cur[0] <= '0; t_cur[0] <= '0;
    end else if (state == S_INIT) begin
      y_cur[init_cnt] <= '0; t_cur[init_cnt] <= '0;
    end
    if (wb) begin
      t_cur[wb_j] <= dt[DLY];
      y_nxt[wb_j] <= dy[DLY];
      if (wb_j == IW'(N_S - 1)) begin
        for (int c = 0; c < N_S - 1; c++) y_cur[c] <= y_nxt[c];
        y_cur[N_S-1] <= dy[DLY];
      end
    end
  end

  // Last-iteration results and clip count.
  logic [$clog2(N_S+1)-1:0] clip_acc;
  assign out_valid = wb && lw[LAT];
  assign out_idx   = wb_j;
  assign out_data  = dt[DLY];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clip_acc   <= '0;
      clip_count <= '0;
    end else if (out_valid) begin
      if (wb_j == '0) clip_acc <= ($clog2(N_S+1))'(dc[DLY]);
      else            clip_acc <= clip_acc + ($clog2(N_S+1))'(dc[DLY]);
      if (wb_j == IW'(N_S - 1)) clip_count <= clip_acc + ($clog2(N_S+1))'(dc[DLY]);
    end
  end

  initial begin
    if (LAT < PIPE) $error("tc_fgm: LAT must be at least %0d", PIPE);
    if (LAT < N_S)  $error("tc_fgm: LAT must be at least N_S");
  end
endmodule
