// pdip_line_search: step length of the primal-dual interior-point method
// (step 5 of the algorithm),
//   alpha = max alpha in (0,1] such that lambda + alpha*dlambda > 0
//                                   and  s      + alpha*ds      > 0,
// found by backtracking: alpha = 1, 1/2, 1/4, ... for at most TRIALS
// trials (17 in the document), and zero if none succeeds.
//
// Instead of repeating a pass over the vectors for each trial, every
// element is tested against all TRIALS candidate steps at once: alpha =
// 2^-j only changes the exponent of the increment, so each trial costs one
// single-precision adder and a sign test. A running AND per trial records
// whether the trial holds for all elements so far. The result is the first
// trial that held for every element; since the iterates are strictly
// positive, feasibility is monotone in alpha and this is what backtracking
// would return.
//
// Interface and timing: the pairs (v, dv) of lambda and s (in any order,
// one pair per clock) stream in on in_valid/in_v/in_dv, the first pair with
// in_first and the last with in_last. alpha_valid pulses two cycles after
// the last pair, with alpha (single precision) and alpha_exp = j (TRIALS
// when alpha = 0). One register stage after the input and one for the
// result are this design's choices.
module pdip_line_search
  import fp32_pkg::*;
#(
  parameter int TRIALS = 17
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic                          in_first,
  input  logic                          in_last,
  input  fp32_t                         in_v,
  input  fp32_t                         in_dv,
  output logic                          alpha_valid,
  output fp32_t                         alpha,
  output logic [$clog2(TRIALS+1)-1:0]   alpha_exp
);
  localparam int JW = $clog2(TRIALS + 1);

  // Stage 1: feasibility of each trial for this element.
  logic [TRIALS-1:0] ok1;
  logic              v1, f1, l1;
  always_ff @(posedge clk) begin
    for (int j = 0; j < TRIALS; j++)
      ok1[j] <= fp_gt0(fp_add(in_v, fp_scale2n(in_dv, j)));
    f1 <= in_first;
    l1 <= in_last;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= in_valid;
  end

  // Running AND over the elements.
  logic [TRIALS-1:0] all_ok, all_next;
  assign all_next = f1 ? ok1 : (all_ok & ok1);
  always_ff @(posedge clk) begin
    if (v1) all_ok <= all_next;
  end

  // Stage 2: first trial that held everywhere.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      alpha_valid <= 1'b0;
      alpha       <= FP_ZERO;
      alpha_exp   <= '0;
    end else begin
      alpha_valid <= v1 && l1;
      if (v1 && l1) begin
        alpha     <= FP_ZERO;
        alpha_exp <= JW'(TRIALS);
        for (int j = TRIALS - 1; j >= 0; j--) begin
          if (all_next[j]) begin
            alpha     <= {1'b0, 8'(127 - j), 23'd0};
            alpha_exp <= JW'(j);
          end
        end
      end
    end
  end
endmodule
