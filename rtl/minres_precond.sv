// minres_precond: on-line diagonal preconditioner of eq. (8),
//   M_ii = 1 / sqrt( sum_j |A_ij| ),
// computed row by row from the banded KKT matrix.
//
// Each band row (2V-1 single-precision words, the same layout as
// minres_band_matvec) arrives with row_valid/row_idx. The absolute values
// are summed by a pipelined adder tree and the inverse square root is
// formed from a bit-pattern estimate refined by three Newton steps
// (y <- y*(1.5 - a/2*y*y)), one register per step, which reaches single
// precision to a few units in the last place. A zero row gives M_ii = 1.
// The result leaves on m_valid/m_idx/m_data ceil(log2(2V-1)) + 5 cycles
// after the row arrived, ready to be written into the accelerator's M
// memory; one row is accepted per clock.
//
// The preconditioner formula follows the document. There it is computed by
// the instruction sequence of the sequential stage; a dedicated pipelined
// unit, and the inverse-square-root method, are this design's choices.
module minres_precond
  import fp32_pkg::*;
#(
  parameter int NX = 12,
  parameter int NU = 17,
  parameter int IW = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          row_valid,
  input  logic [IW-1:0] row_idx,
  input  fp32_t         row_data [2*(2*NX+NU)-1],
  output logic          m_valid,
  output logic [IW-1:0] m_idx,
  output fp32_t         m_data
);
  localparam int BAND = 2 * (2 * NX + NU) - 1;
  localparam int NEWTON = 3;

  fp32_t absd [BAND];
  always_comb begin
    for (int l = 0; l < BAND; l++) absd[l] = fp_abs(row_data[l]);
  end

  logic          t_v;
  logic [IW-1:0] t_i;
  fp32_t         t_s;
  fp32_adder_tree #(.N(BAND), .TW(IW)) u_tree (
    .clk, .rst_n,
    .in_valid (row_valid),
    .in_tag   (row_idx),
    .din      (absd),
    .out_valid(t_v),
    .out_tag  (t_i),
    .sum      (t_s)
  );

  // Seed stage then NEWTON refinement stages.
  fp32_t         a_q [NEWTON+1];
  fp32_t         y_q [NEWTON+1];
  logic          z_q [NEWTON+1];
  logic          v_q [NEWTON+1];
  logic [IW-1:0] i_q [NEWTON+1];

  always_ff @(posedge clk) begin
    a_q[0] <= t_s;
    y_q[0] <= fp_rsqrt_seed(t_s);
    z_q[0] <= (t_s[30:23] == 8'd0);
    i_q[0] <= t_i;
    for (int k = 1; k <= NEWTON; k++) begin
      a_q[k] <= a_q[k-1];
      y_q[k] <= fp_rsqrt_step(a_q[k-1], y_q[k-1]);
      z_q[k] <= z_q[k-1];
      i_q[k] <= i_q[k-1];
    end
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k <= NEWTON; k++) v_q[k] <= 1'b0;
    end else begin
      v_q[0] <= t_v;
      for (int k = 1; k <= NEWTON; k++) v_q[k] <= v_q[k-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) m_valid <= 1'b0;
    else        m_valid <= v_q[NEWTON];
  end
  always_ff @(posedge clk) begin
    m_idx  <= i_q[NEWTON];
    m_data <= z_q[NEWTON] ? FP_ONE : y_q[NEWTON];
  end
endmodule
