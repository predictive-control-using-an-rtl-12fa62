// sfix_adder_tree: pipelined tree reduction of N signed fixed-point words.
//
// Level l adds neighbouring pairs of level l-1 and registers the sums; an odd
// word is carried to the next level unchanged. The sum of the N inputs
// presented in cycle t appears on sum in cycle t + LEVELS, LEVELS =
// ceil(log2(N)), one new set per clock. Inputs are sign-extended to the
// output width OW, so OW >= IW + ceil(log2(N)) never overflows. Used by the
// target calculator's FGM row products.
module sfix_adder_tree #(
  parameter int N  = 29,
  parameter int IW = 60,
  parameter int OW = IW + $clog2(N)
) (
  input  logic                 clk,
  input  logic signed [IW-1:0] din [N],
  output logic signed [OW-1:0] sum
);
  localparam int LEVELS = (N > 1) ? $clog2(N) : 1;

  // lvl[l] holds the partial sums of level l; only the first
  // ceil(N / 2^l) entries of each level are used.
  logic signed [OW-1:0] lvl [LEVELS+1][N];

  always_comb begin
    for (int i = 0; i < N; i++) lvl[0][i] = OW'(din[i]);
  end

  for (genvar l = 1; l <= LEVELS; l++) begin : g_lvl
    localparam int NIN  = (N + (1 << (l - 1)) - 1) >> (l - 1);
    localparam int NOUT = (NIN + 1) / 2;
    always_ff @(posedge clk) begin
      for (int i = 0; i < NOUT; i++) begin
        if (2 * i + 1 < NIN) lvl[l][i] <= lvl[l-1][2*i] + lvl[l-1][2*i+1];
        else                 lvl[l][i] <= lvl[l-1][2*i];
      end
    end
    // Unused entries of the level are held at zero.
    for (genvar i = NOUT; i < N; i++) begin : g_unused
      always_ff @(posedge clk) lvl[l][i] <= '0;
    end
  end

  assign sum = lvl[LEVELS][0];
endmodule
