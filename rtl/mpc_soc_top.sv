// mpc_soc_top: the custom hardware of the FPGA model-predictive controller
// for the airliner: a fixed-point steady-state target calculator and the
// single-precision datapaths of the interior-point regulator QP solver.
//
// In the complete system a soft processor moves data between an Ethernet
// link and the two solvers over an on-chip bus: it sends the state and
// disturbance estimate and the references, starts the target calculator,
// forwards the target-calculator results to the regulator, and returns the
// control move. The processor, the bus, the Ethernet MAC/PHY and the
// regulator's instruction-driven sequential stage are outside this RTL;
// their side of every connection is a port of this module.
//
// Contents:
//   u_tc      target_calculator: b_s in, 41 cost-term values out.
//   u_prec    minres_precond: computes M_ii = 1/sqrt(sum_j |A_ij|) from each
//             band row as it is written, and writes it into u_mr.
//   u_mr      minres_solver: I_MR preconditioned MINRES iterations for
//             A z = b around the banded product engine (one element of
//             (M A M) v per clock).
//   u_ls      pdip_line_search: backtracking step length of the
//             interior-point iteration.
// Writing a band row (kkt_we) stores it in the accelerator and, five plus
// ceil(log2(2V-1)) cycles later, its preconditioner entry. Timing of each
// part is described in its own file.
module mpc_soc_top
  import tc_pkg::*;
  import fp32_pkg::*;
#(
  parameter int N      = 12,     // prediction horizon
  parameter int TC_ITER = IFG,   // FGM iterations
  parameter int I_MR   = 51      // MINRES iterations per solve
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // ---- target calculator (processor side) ----
  input  logic                    tc_cfg_we,
  input  cfg_sel_e                tc_cfg_sel,
  input  logic [5:0]              tc_cfg_row,
  input  logic [4:0]              tc_cfg_col,
  input  vec_t                    tc_cfg_data,
  input  logic                    tc_bs_valid,
  input  vec_t                    tc_bs_data,
  output logic                    tc_h_valid,
  output logic [$clog2(NH)-1:0]   tc_h_idx,
  output vec_t                    tc_h_data,
  output logic                    tc_busy,
  output logic [$clog2(NS+1)-1:0] tc_clip_count,
  output logic                    tc_fgm_start,
  // ---- regulator: KKT band rows from the sequential stage ----
  input  logic                    kkt_we,
  input  logic [$clog2(N*(2*NX+NU)+2*NX)-1:0] kkt_row,
  input  fp32_t                   kkt_data [2*(2*NX+NU)-1],
  output logic                    prec_valid,
  // ---- regulator: MINRES solve of A z = b ----
  input  logic                    mr_b_we,
  input  logic [$clog2(N*(2*NX+NU)+2*NX)-1:0] mr_b_idx,
  input  fp32_t                   mr_b_data,
  input  logic                    mr_start,
  output logic                    mr_busy,
  output logic                    mr_z_valid,
  output logic [$clog2(N*(2*NX+NU)+2*NX)-1:0] mr_z_idx,
  output fp32_t                   mr_z_data,
  output logic                    mr_done,
  output logic [$clog2(I_MR+1)-1:0] mr_iter_count,
  // ---- regulator: line search ----
  input  logic                    ls_valid,
  input  logic                    ls_first,
  input  logic                    ls_last,
  input  fp32_t                   ls_v,
  input  fp32_t                   ls_dv,
  output logic                    ls_alpha_valid,
  output fp32_t                   ls_alpha,
  output logic [4:0]              ls_alpha_exp
);
  localparam int ZW = $clog2(N * (2 * NX + NU) + 2 * NX);

  target_calculator #(.N_ITER(TC_ITER)) u_tc (
    .clk, .rst_n,
    .cfg_we       (tc_cfg_we),
    .cfg_sel      (tc_cfg_sel),
    .cfg_row      (tc_cfg_row),
    .cfg_col      (tc_cfg_col),
    .cfg_data     (tc_cfg_data),
    .bs_valid     (tc_bs_valid),
    .bs_data      (tc_bs_data),
    .h_valid      (tc_h_valid),
    .h_idx        (tc_h_idx),
    .h_data       (tc_h_data),
    .busy         (tc_busy),
    .clip_count   (tc_clip_count),
    .fgm_start_evt(tc_fgm_start)
  );

  logic [ZW-1:0] m_idx;
  fp32_t         m_data;
  minres_precond #(.NX(NX), .NU(NU), .IW(ZW)) u_prec (
    .clk, .rst_n,
    .row_valid(kkt_we),
    .row_idx  (kkt_row),
    .row_data (kkt_data),
    .m_valid  (prec_valid),
    .m_idx    (m_idx),
    .m_data   (m_data)
  );

  minres_solver #(.N(N), .NX(NX), .NU(NU), .I_MR(I_MR)) u_mr (
    .clk, .rst_n,
    .a_we      (kkt_we),
    .a_row     (kkt_row),
    .a_data    (kkt_data),
    .m_we      (prec_valid),
    .m_idx     (m_idx),
    .m_data    (m_data),
    .b_we      (mr_b_we),
    .b_idx     (mr_b_idx),
    .b_data    (mr_b_data),
    .start     (mr_start),
    .busy      (mr_busy),
    .z_valid   (mr_z_valid),
    .z_idx     (mr_z_idx),
    .z_data    (mr_z_data),
    .done      (mr_done),
    .iter_count(mr_iter_count)
  );

  pdip_line_search #(.TRIALS(17)) u_ls (
    .clk, .rst_n,
    .in_valid   (ls_valid),
    .in_first   (ls_first),
    .in_last    (ls_last),
    .in_v       (ls_v),
    .in_dv      (ls_dv),
    .alpha_valid(ls_alpha_valid),
    .alpha      (ls_alpha),
    .alpha_exp  (ls_alpha_exp)
  );
endmodule
