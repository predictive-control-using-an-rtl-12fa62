// target_calculator: fixed-point steady-state target calculator.
//
// Given b_s = [w_hat; r] (estimated disturbance and references), it solves
// the scaled, bound-constrained target QP with the fast gradient method and
// returns the 41 values [T_Q^-1 Q x_s; T_R^-1 R u_s; T_Q^-1 P x_s] from
// which the regulator builds its linear cost term. Four subsystems run in a
// chain:
//   #1 tc_seq_matvec  f_s = F_s b_s            NB + NS*NB + 10 cycles
//   #2 tc_fgm         FGM, IFG iterations      NS + IFG*(NS + 33) cycles
//   #3 tc_unscale     theta_s = M_s theta_bar  NS + 4 cycles
//   #4 tc_seq_matvec  L_s theta_s              NS + NH*NS + 10 cycles
// Each stage starts NS cycles before the previous one ends (the hand-off
// overlap), so a whole solve takes
//   (IFG + NB + NU + 2*NX)*NS + 33*IFG + NB + 24 cycles
// from the first element of b_s to the last output: 63,603 cycles, about
// 0.25 ms at 250 MHz, for the default sizes.
//
// Interface: all matrices, bounds and beta are written through one
// configuration port (cfg_we, cfg_sel, cfg_row, cfg_col, cfg_data; see
// tc_pkg::cfg_sel_e; matrix entries use the low 25 bits of cfg_data). A solve
// starts when b_s is streamed in on bs_valid/bs_data, NB elements on
// consecutive clocks. Results leave on h_valid/h_idx/h_data in index order.
// The chaining and the cycle counts follow the document; the configuration
// port is this design's stand-in for the processor bus.
module target_calculator
  import tc_pkg::*;
#(
  parameter int N_ITER = IFG
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // configuration port
  input  logic                    cfg_we,
  input  cfg_sel_e                cfg_sel,
  input  logic [5:0]              cfg_row,
  input  logic [4:0]              cfg_col,
  input  vec_t                    cfg_data,
  // right-hand side b_s
  input  logic                    bs_valid,
  input  vec_t                    bs_data,
  // results
  output logic                    h_valid,
  output logic [$clog2(NH)-1:0]   h_idx,
  output vec_t                    h_data,
  output logic                    busy,
  output logic [$clog2(NS+1)-1:0] clip_count,
  output logic                    fgm_start_evt
);
  localparam int IW = $clog2(NS);

  // beta register
  mat_t beta_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) beta_q <= '0;
    else if (cfg_we && cfg_sel == SEL_BETA) beta_q <= mat_t'(cfg_data);
  end

  // #1: f_s = F_s b_s
  logic          f_valid, f_handoff, s1_busy;
  logic [IW-1:0] f_idx;
  vec_t          f_data;
  tc_seq_matvec #(.ROWS(NS), .COLS(NB), .MFRAC(F_FRAC), .TAIL(10), .HANDOFF(NS)) u_sub1 (
    .clk, .rst_n,
    .m_we     (cfg_we && cfg_sel == SEL_F),
    .m_addr   ($clog2(NS*NB)'(cfg_row) * $clog2(NS*NB)'(NB) + $clog2(NS*NB)'(cfg_col)),
    .m_wdata  (mat_t'(cfg_data)),
    .in_valid (bs_valid),
    .in_data  (bs_data),
    .out_valid(f_valid),
    .out_idx  (f_idx),
    .out_data (f_data),
    .handoff  (f_handoff),
    .busy     (s1_busy)
  );

  // #2: FGM
  logic          tb_valid, s2_busy;
  logic [IW-1:0] tb_idx;
  vec_t          tb_data;
  tc_fgm #(.N_S(NS), .N_ITER(N_ITER), .LAT(33)) u_sub2 (
    .clk, .rst_n,
    .h_we     (cfg_we && cfg_sel == SEL_H),
    .h_row    (IW'(cfg_row)),
    .h_col    (IW'(cfg_col)),
    .h_wdata  (mat_t'(cfg_data)),
    .bnd_we   (cfg_we && (cfg_sel == SEL_TMAX || cfg_sel == SEL_TMIN)),
    .bnd_max  (cfg_sel == SEL_TMAX),
    .bnd_idx  (IW'(cfg_row)),
    .bnd_wdata(cfg_data),
    .beta     (beta_q),
    .f_we     (f_valid),
    .f_idx    (f_idx),
    .f_wdata  (f_data),
    .start    (f_handoff),
    .busy     (s2_busy),
    .out_valid(tb_valid),
    .out_idx  (tb_idx),
    .out_data (tb_data),
    .clip_count(clip_count)
  );
  assign fgm_start_evt = f_handoff;

  // #3: unscaling
  logic          th_valid;
  logic [IW-1:0] th_idx;
  vec_t          th_data;
  tc_unscale #(.N_S(NS), .LAT(4)) u_sub3 (
    .clk, .rst_n,
    .m_we     (cfg_we && cfg_sel == SEL_MS),
    .m_idx    (IW'(cfg_row)),
    .m_wdata  (mat_t'(cfg_data)),
    .in_valid (tb_valid),
    .in_idx   (tb_idx),
    .in_data  (tb_data),
    .out_valid(th_valid),
    .out_idx  (th_idx),
    .out_data (th_data)
  );

  // #4: L_s theta_s
  logic s4_handoff, s4_busy;
  tc_seq_matvec #(.ROWS(NH), .COLS(NS), .MFRAC(L_FRAC), .TAIL(10), .HANDOFF(NS)) u_sub4 (
    .clk, .rst_n,
    .m_we     (cfg_we && cfg_sel == SEL_LS),
    .m_addr   ($clog2(NH*NS)'(cfg_row) * $clog2(NH*NS)'(NS) + $clog2(NH*NS)'(cfg_col)),
    .m_wdata  (mat_t'(cfg_data)),
    .in_valid (th_valid),
    .in_data  (th_data),
    .out_valid(h_valid),
    .out_idx  (h_idx),
    .out_data (h_data),
    .handoff  (s4_handoff),
    .busy     (s4_busy)
  );

  assign busy = s1_busy | s2_busy | th_valid | s4_busy;

  // Subsystem #3 must deliver theta_s in index order, since subsystem #4
  // takes its input vector by arrival order.
  a_th_order: assert property (@(posedge clk) disable iff (!rst_n)
    th_valid && th_idx != '0 |-> $past(th_valid) && $past(th_idx) == th_idx - IW'(1));
endmodule
