// tc_pkg: sizes, word formats and fixed-point helpers of the steady-state
// target calculator.
//
// The sizes are those of the airliner case study: 12 model states, 17
// manipulated inputs, 10 disturbance states and 3 tracked references, so the
// target-calculator QP has NS = NX + NU = 29 decision variables and its
// right-hand side b_s has NB = ND + NR = 13 entries. Subsystem #4 produces
// 2*NX + NU = 41 values. The word formats (signed width / fraction bits) are
// the ones listed for the target calculator: vectors sfix35_En21, F_s
// sfix25_En18, H_s sfix25_En23, M_s sfix25_En19, L_s sfix25_En16. The format
// of the FGM momentum coefficient beta is not listed; sfix25_En24 is this
// design's choice. Rounding is round-half-up on the dropped bits and results
// are saturated to the target width (also this design's choice).
package tc_pkg;
  localparam int NX  = 12;             // prediction-model states
  localparam int NU  = 17;             // manipulated inputs
  localparam int ND  = 10;             // disturbance states
  localparam int NR  = 3;              // tracked references
  localparam int NS  = NX + NU;        // 29, target QP size
  localparam int NB  = ND + NR;        // 13, length of b_s
  localparam int NH  = 2 * NX + NU;    // 41, outputs of subsystem #4
  localparam int IFG = 1000;           // FGM iterations

  localparam int VW  = 35;             // vector word width
  localparam int VF  = 21;             // vector fraction bits
  localparam int MW  = 25;             // matrix word width
  localparam int F_FRAC = 18;          // F_s fraction bits
  localparam int H_FRAC = 23;          // H_s fraction bits
  localparam int M_FRAC = 19;          // diag(M_s) fraction bits
  localparam int L_FRAC = 16;          // L_s fraction bits
  localparam int BETA_FRAC = 24;       // beta fraction bits (assumed)

  typedef logic signed [VW-1:0] vec_t;
  typedef logic signed [MW-1:0] mat_t;

  // What a write on the configuration port addresses.
  typedef enum logic [2:0] {
    SEL_F    = 3'd0,  // F_s[row][col]
    SEL_H    = 3'd1,  // H_s[row][col]
    SEL_TMAX = 3'd2,  // theta_max[row]
    SEL_TMIN = 3'd3,  // theta_min[row]
    SEL_MS   = 3'd4,  // diag(M_s)[row]
    SEL_LS   = 3'd5,  // L_s[row][col]
    SEL_BETA = 3'd6   // beta
  } cfg_sel_e;

  // Arithmetic shift right by sh with round-half-up, then saturate to VW bits.
  function automatic vec_t round_sat(input logic signed [127:0] v, input int sh);
    logic signed [127:0] r;
    logic signed [127:0] vmax, vmin;
    vmax = (128'sd1 <<< (VW - 1)) - 1;
    vmin = -(128'sd1 <<< (VW - 1));
    if (sh > 0) r = (v + (128'sd1 <<< (sh - 1))) >>> sh;
    else        r = v;
    if (r > vmax)      return vec_t'(vmax);
    else if (r < vmin) return vec_t'(vmin);
    else               return vec_t'(r);
  endfunction
endpackage
