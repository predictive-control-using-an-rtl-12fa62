// fp32_adder_tree: pipelined tree reduction of N single-precision numbers.
//
// Each level adds neighbouring pairs with fp32_pkg::fp_add and registers the
// results; an odd element passes to the next level unchanged. The sum of the
// N inputs presented with in_valid in cycle t appears with out_valid in
// cycle t + LEVELS, LEVELS = ceil(log2(N)); a tag travels alongside. A new
// set is accepted every clock. This is the reduction tree behind the
// parallel dot products of the MINRES accelerator and the row sums of the
// preconditioner. One register per level is this design's choice (a vendor
// floating-point adder would take several cycles per level).
module fp32_adder_tree
  import fp32_pkg::*;
#(
  parameter int N  = 81,
  parameter int TW = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [TW-1:0] in_tag,
  input  fp32_t         din [N],
  output logic          out_valid,
  output logic [TW-1:0] out_tag,
  output fp32_t         sum
);
  localparam int LEVELS = (N > 1) ? $clog2(N) : 1;

  fp32_t         lvl [LEVELS+1][N];
  logic          vld [LEVELS+1];
  logic [TW-1:0] tag [LEVELS+1];

  always_comb begin
    for (int i = 0; i < N; i++) lvl[0][i] = din[i];
    vld[0] = in_valid;
    tag[0] = in_tag;
  end

  for (genvar l = 1; l <= LEVELS; l++) begin : g_lvl
    localparam int NIN  = (N + (1 << (l - 1)) - 1) >> (l - 1);
    localparam int NOUT = (NIN + 1) / 2;
    always_ff @(posedge clk) begin
      for (int i = 0; i < NOUT; i++) begin
        if (2 * i + 1 < NIN) lvl[l][i] <= fp_add(lvl[l-1][2*i], lvl[l-1][2*i+1]);
        else                 lvl[l][i] <= lvl[l-1][2*i];
      end
      tag[l] <= tag[l-1];
    end
    for (genvar i = NOUT; i < N; i++) begin : g_unused
      always_ff @(posedge clk) lvl[l][i] <= FP_ZERO;
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) vld[l] <= 1'b0;
      else        vld[l] <= vld[l-1];
    end
  end

  assign sum       = lvl[LEVELS][0];
  assign out_valid = vld[LEVELS];
  assign out_tag   = tag[LEVELS];
endmodule
