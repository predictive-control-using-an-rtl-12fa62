// minres_solver: preconditioned MINRES solve of the interior-point linear
// system A z = b around the banded product engine.
//
// The system is solved in its diagonally preconditioned form
// (M A M) w = M b, z = M w, with M from eq. (8), for a fixed number of
// iterations I_MR (no convergence test, so the solve time is fixed).
// MINRES is written in its short-recurrence form for symmetric (also
// indefinite) matrices, with x0 = 0:
//   r = M b; p0 = r; s0 = (MAM) p0; p1 = p0; s1 = s0
//   repeat I_MR times:
//     (p2, p1) <- (p1, p0);  (s2, s1) <- (s1, s0)
//     alpha = <r, s1> / <s1, s1>
//     w += alpha p1;  r -= alpha s1
//     s0 = (MAM) s1
//     beta1 = <s0, s1> / <s1, s1>;  beta2 = <s0, s2> / <s2, s2> (0 at first)
//     p0 = s1 - beta1 p1 - beta2 p2;  s0 = s0 - beta1 s1 - beta2 s2
//   z = M w
// The product (M A M) v runs on minres_band_matvec (one row per clock,
// 81-lane multiplier bank and adder tree). Everything else is done by
// vector passes over the Z elements, one element per clock, with the two
// dot products of a pass accumulated alongside.
//
// The iteration count is fixed, but in single precision the recurrence
// breaks down once the residual reaches rounding level: <s1,s1> keeps
// shrinking until it underflows. The solution update (alpha) is therefore
// frozen from the iteration where <r,r> <= 2^-40 <r0,r0> or <s1,s1> = 0;
// the remaining iterations still run, so the solve time does not change. The buffers p0/p1/p2 and
// s0/s1/s2 rotate by renaming, not by copying. The reciprocal of <s1,s1>
// (always positive) is the square of an inverse square root: a bit-pattern
// estimate and three Newton steps.
//
// The document specifies MINRES with a fixed iteration count, the
// preconditioning M A M w = M b with z = M w, and a parallel dot-product
// engine. This recurrence form, the pass structure and the scalar
// reciprocal are this design's choices. A pass uses one multiply-add per
// element in a single clock (no pipelining). In the original the sequential
// stage forms M b and recovers z = M w; here the solver does both, so that
// it takes and returns the unpreconditioned system.
//
// Interface: band rows (a_we/a_row/a_data) and the preconditioner
// diagonal (m_we/m_idx/m_data) go to the product engine; the diagonal is
// also kept here to form M b and M w. b is written through b_we/b_idx/
// b_data. start begins a solve; z leaves on z_valid/z_idx/z_data in index
// order, one element per clock; done is high with the last element. A solve
// takes 1 + 2Z + (I_MR + 1) P + I_MR (4Z + 7) cycles, where
// P = Z + V + 4 + ceil(log2(2V-1)) is the product time: per iteration four
// vector passes, one product and 7 scalar cycles. With the default sizes
// (Z = 516, I_MR = 51) that is 136,190 cycles.
module minres_solver
  import fp32_pkg::*;
#(
  parameter int N    = 12,
  parameter int NX   = 12,
  parameter int NU   = 17,
  parameter int I_MR = 51
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          a_we,
  input  logic [$clog2(N*(2*NX+NU)+2*NX)-1:0] a_row,
  input  fp32_t                         a_data [2*(2*NX+NU)-1],
  input  logic                          m_we,
  input  logic [$clog2(N*(2*NX+NU)+2*NX)-1:0] m_idx,
  input  fp32_t                         m_data,
  input  logic                          b_we,
  input  logic [$clog2(N*(2*NX+NU)+2*NX)-1:0] b_idx,
  input  fp32_t                         b_data,
  input  logic                          start,
  output logic                          busy,
  output logic                          z_valid,
  output logic [$clog2(N*(2*NX+NU)+2*NX)-1:0] z_idx,
  output fp32_t                         z_data,
  output logic                          done,
  output logic [$clog2(I_MR+1)-1:0]     iter_count
);
  localparam int V  = 2 * NX + NU;
  localparam int Z  = N * V + 2 * NX;
  localparam int ZW = $clog2(Z);
  localparam int KW = $clog2(I_MR + 1);

  // Vector storage.
  fp32_t mvec [Z];
  fp32_t bvec [Z];
  fp32_t wvec [Z];
  fp32_t rvec [Z];
  fp32_t pbuf [3][Z];
  fp32_t sbuf [3][Z];

  // Buffer roles (rotated by renaming).
  logic [1:0] ip0, ip1, ip2, is0, is1, is2;

  typedef enum logic [3:0] {
    S_IDLE,    // wait for start
    S_INIT,    // r = p0 = M b, w = 0, p0 -> product input
    S_MV,      // s = (MAM) v
    S_ROT,     // rotate buffer roles
    S_DOT1,    // <r,s1>, <s1,s1>
    S_RECIP,   // 1/<s1,s1>, alpha
    S_UPD,     // w += alpha p1, r -= alpha s1, s1 -> product input
    S_DOT2,    // <s0,s1>, <s0,s2>
    S_BETA,    // beta1, beta2
    S_ORTH,    // p0 = s1 - b1 p1 - b2 p2, s0 -= b1 s1 + b2 s2
    S_OUT      // z = M w
  } state_e;
  state_e state;

  logic [ZW-1:0] i;
  logic [KW-1:0] k;
  logic          first_mv;   // the product that forms s0 = (MAM) p0
  logic [2:0]    sc;         // scalar step counter
  fp32_t acc1, acc2, acc3;   // dot-product accumulators
  logic  frozen;             // converged: solution no longer updated
  fp32_t rr_thr;             // 2^-40 <r0,r0>
  fp32_t d_ss, recip, recip_prev, alpha, beta1, beta2, ry;

  // Product engine.
  logic          mv_x_we, mv_start, mv_busy, mv_y_valid;
  logic [ZW-1:0] mv_x_idx, mv_y_idx;
  fp32_t         mv_x_data, mv_y_data;
  minres_band_matvec #(.N(N), .NX(NX), .NU(NU)) u_mv (
    .clk, .rst_n,
    .a_we, .a_row, .a_data,
    .m_we, .m_idx, .m_data,
    .x_we   (mv_x_we),
    .x_idx  (mv_x_idx),
    .x_data (mv_x_data),
    .start  (mv_start),
    .busy   (mv_busy),
    .y_valid(mv_y_valid),
    .y_idx  (mv_y_idx),
    .y_data (mv_y_data)
  );

  always_ff @(posedge clk) begin
    if (m_we) mvec[m_idx] <= m_data;
    if (b_we) bvec[b_idx] <= b_data;
  end

  // Product input writes happen during the INIT and UPD passes.
  always_comb begin
    mv_x_we   = 1'b0;
    mv_x_idx  = i;
    mv_x_data = FP_ZERO;
    if (state == S_INIT) begin
      mv_x_we   = 1'b1;
      mv_x_data = fp_mul(mvec[i], bvec[i]);
    end else if (state == S_UPD) begin
      mv_x_we   = 1'b1;
      mv_x_data = sbuf[is1][i];
    end
  end

  logic last_i;
  assign last_i = (i == ZW'(Z - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      i          <= '0;
      k          <= '0;
      sc         <= '0;
      first_mv   <= 1'b0;
      mv_start   <= 1'b0;
      done       <= 1'b0;
      z_valid    <= 1'b0;
      iter_count <= '0;
      ip0 <= 2'd0; ip1 <= 2'd1; ip2 <= 2'd2;
      is0 <= 2'd0; is1 <= 2'd1; is2 <= 2'd2;
    end else begin
      mv_start <= 1'b0;
      done     <= 1'b0;
      z_valid  <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state <= S_INIT;
          i     <= '0;
          k     <= '0;
          ip0 <= 2'd0; ip1 <= 2'd1; ip2 <= 2'd2;
          is0 <= 2'd0; is1 <= 2'd1; is2 <= 2'd2;
        end
        S_INIT: begin
          i <= i + ZW'(1);
          if (last_i) begin
            state    <= S_MV;
            first_mv <= 1'b1;
            mv_start <= 1'b1;
            i        <= '0;
          end
        end
        S_MV: begin
          if (mv_y_valid && mv_y_idx == ZW'(Z - 1)) begin
            if (first_mv) begin
              state    <= S_ROT;
              first_mv <= 1'b0;
            end else begin
              state <= S_DOT2;
            end
            i <= '0;
          end
        end
        S_ROT: begin
          // (p2, p1, p0) <- (p1, p0, old p2); same for s.
          ip2 <= ip1; ip1 <= ip0; ip0 <= ip2;
          is2 <= is1; is1 <= is0; is0 <= is2;
          state <= S_DOT1;
          i     <= '0;
        end
        S_DOT1: begin
          i <= i + ZW'(1);
          if (last_i) begin state <= S_RECIP; sc <= '0; i <= '0; end
        end
        S_RECIP: begin
          sc <= sc + 3'd1;
          if (sc == 3'd4) state <= S_UPD;
        end
        S_UPD: begin
          i <= i + ZW'(1);
          if (last_i) begin
            state    <= S_MV;
            mv_start <= 1'b1;
            i        <= '0;
          end
        end
        S_DOT2: begin
          i <= i + ZW'(1);
          if (last_i) begin state <= S_BETA; i <= '0; end
        end
        S_BETA: state <= S_ORTH;
        S_ORTH: begin
          i <= i + ZW'(1);
          if (last_i) begin
            i <= '0;
            k <= k + KW'(1);
            if (k == KW'(I_MR - 1)) state <= S_OUT;
            else                    state <= S_ROT;
          end
        end
        S_OUT: begin
          i       <= i + ZW'(1);
          z_valid <= 1'b1;
          if (last_i) begin
            state      <= S_IDLE;
            done       <= 1'b1;
            iter_count <= k;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Datapath of the passes.
  always_ff @(posedge clk) begin
    case (state)
      S_IDLE: frozen <= 1'b0;
      S_INIT: begin
        wvec[i]      <= FP_ZERO;
        rvec[i]      <= fp_mul(mvec[i], bvec[i]);
        pbuf[ip0][i] <= fp_mul(mvec[i], bvec[i]);
      end
      S_MV: begin
        if (mv_y_valid) sbuf[is0][mv_y_idx] <= mv_y_data;
      end
      S_ROT: begin
        acc1 <= FP_ZERO;
        acc2 <= FP_ZERO;
        acc3 <= FP_ZERO;
      end
      S_DOT1: begin
        acc1 <= fp_add(acc1, fp_mul(rvec[i], sbuf[is1][i]));
        acc2 <= fp_add(acc2, fp_mul(sbuf[is1][i], sbuf[is1][i]));
        acc3 <= fp_add(acc3, fp_mul(rvec[i], rvec[i]));
      end
      S_RECIP: begin
        // sc 0: seed; 1..3: Newton; 4: square and alpha
        // Both compared values are non-negative, so their bit patterns
        // order like their values.
        if (sc == 3'd0) begin
          d_ss <= acc2;
          ry   <= fp_rsqrt_seed(acc2);
          if (k == '0) rr_thr <= fp_scale2n(acc3, 40);
          else if (acc3 <= rr_thr) frozen <= 1'b1;
          if (!fp_gt0(acc2)) frozen <= 1'b1;
        end else if (sc <= 3'd3) begin
          ry <= fp_rsqrt_step(d_ss, ry);
        end else begin
          recip_prev <= recip;
          recip      <= fp_gt0(d_ss) ? fp_mul(ry, ry) : FP_ZERO;
          alpha      <= frozen ? FP_ZERO : fp_mul(acc1, fp_mul(ry, ry));
        end
      end
      S_UPD: begin
        wvec[i] <= fp_add(wvec[i], fp_mul(alpha, pbuf[ip1][i]));
        rvec[i] <= fp_sub(rvec[i], fp_mul(alpha, sbuf[is1][i]));
        acc1 <= FP_ZERO;
        acc2 <= FP_ZERO;
      end
      S_DOT2: begin
        acc1 <= fp_add(acc1, fp_mul(sbuf[is0][i], sbuf[is1][i]));
        acc2 <= fp_add(acc2, fp_mul(sbuf[is0][i], sbuf[is2][i]));
      end
      S_BETA: begin
        beta1 <= fp_mul(acc1, recip);
        beta2 <= (k == '0) ? FP_ZERO : fp_mul(acc2, recip_prev);
      end
      S_ORTH: begin
        pbuf[ip0][i] <= fp_sub(fp_sub(sbuf[is1][i], fp_mul(beta1, pbuf[ip1][i])),
                               fp_mul(beta2, pbuf[ip2][i]));
        sbuf[is0][i] <= fp_sub(fp_sub(sbuf[is0][i], fp_mul(beta1, sbuf[is1][i])),
                               fp_mul(beta2, sbuf[is2][i]));
      end
      S_OUT: begin
        z_idx  <= i;
        z_data <= fp_mul(mvec[i], wvec[i]);
      end
      default: ;
    endcase
  end

  assign busy = (state != S_IDLE) || mv_busy;
endmodule
