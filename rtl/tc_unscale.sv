// tc_unscale: reverses the diagonal scaling of the target-QP solution,
// element by element (target-calculator subsystem #3).
//
// theta_s[i] = diag(M_s)[i] * theta_bar[i]. The elements of theta_bar arrive
// as a stream (in_valid, in_idx, in_data) and each leaves LAT = 4 cycles
// later on out_valid/out_idx/out_data, so NS consecutive elements take
// NS + 4 cycles, the count given for this subsystem. The diagonal is
// written through m_we/m_idx/m_wdata. The pipeline is: multiply, round and
// saturate, then two delay registers that keep the four-cycle latency.
// Formats from the document: M_s sfix25_En19, vectors sfix35_En21.
module tc_unscale
  import tc_pkg::*;
#(
  parameter int N_S = NS,
  parameter int LAT = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   m_we,
  input  logic [$clog2(N_S)-1:0] m_idx,
  input  mat_t                   m_wdata,
  input  logic                   in_valid,
  input  logic [$clog2(N_S)-1:0] in_idx,
  input  vec_t                   in_data,
  output logic                   out_valid,
  output logic [$clog2(N_S)-1:0] out_idx,
  output vec_t                   out_data
);
  localparam int IW  = $clog2(N_S);
  localparam int DLY = LAT - 2;

  mat_t mdiag [N_S];
  always_ff @(posedge clk) begin
    if (m_we) mdiag[m_idx] <= m_wdata;
  end

  logic signed [MW+VW-1:0] p1;
  logic [IW-1:0]           i1, i2;
  logic                    v1, v2;
  vec_t                    d2;

  always_ff @(posedge clk) begin
    p1 <= mdiag[in_idx] * in_data;
    i1 <= in_idx;
    d2 <= round_sat(128'(p1), M_FRAC);
    i2 <= i1;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin v1 <= 1'b0; v2 <= 1'b0; end
    else begin v1 <= in_valid; v2 <= v1; end
  end

  logic          dv [DLY+1];
  logic [IW-1:0] di [DLY+1];
  vec_t          dd [DLY+1];
  assign dv[0] = v2;
  assign di[0] = i2;
  assign dd[0] = d2;
  for (genvar k = 1; k <= DLY; k++) begin : g_dly
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) dv[k] <= 1'b0;
      else        dv[k] <= dv[k-1];
    end
    always_ff @(posedge clk) begin
      di[k] <= di[k-1];
      dd[k] <= dd[k-1];
    end
  end
  assign out_valid = dv[DLY];
  assign out_idx   = di[DLY];
  assign out_data  = dd[DLY];

  initial begin
    if (LAT < 2) $error("tc_unscale: LAT must be at least 2");
  end
endmodule
