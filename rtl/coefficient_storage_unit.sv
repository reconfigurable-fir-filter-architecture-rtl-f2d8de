// coefficient_storage_unit (CSU): read-only store of the coefficient sets of
// the reconfigurable filter.
//
// The store holds NUM_SETS sets of N coefficients h(0 .. N-1). The set chosen
// by sel is cut into M = N/L coefficient vectors of L words,
//   c_vec[m][j] = h(mL + j),  m = 0 .. M-1,  j = 0 .. L-1,
// one per inner product unit. The table is a constant array, which an FPGA
// tool maps onto LUTs used as ROM; its contents come from the COEFS parameter
// (by default the two sets in fir_pkg). A sel beyond the last set reads set 0.
//
// Timing: purely combinational; a new sel is seen by the filter in the same
// clock.
//
// Keeping the coefficients in a LUT ROM follows the published architecture;
// the number of sets, the sel port and the contents of set 1 are choices of
// this implementation.
module coefficient_storage_unit #(
  parameter int unsigned L        = fir_pkg::L_DEF,
  parameter int unsigned N        = fir_pkg::N_DEF,
  parameter int unsigned COEF_W   = fir_pkg::COEF_W_DEF,
  parameter int unsigned NUM_SETS = fir_pkg::NUM_SETS_DEF,
  parameter int          COEFS [NUM_SETS][N] = fir_pkg::COEF_ROM,
  parameter int unsigned SEL_W    = (NUM_SETS > 1) ? $clog2(NUM_SETS) : 1
) (
  input  logic        [SEL_W-1:0]  sel,
  output logic signed [COEF_W-1:0] c_vec [N/L][L]
);

  localparam int unsigned M = N / L;

  // The ROM itself, converted once to the coefficient width.
  logic signed [COEF_W-1:0] rom [NUM_SETS][N];

  always_comb begin
    for (int s = 0; s < NUM_SETS; s++)
      for (int n = 0; n < N; n++)
        rom[s][n] = COEF_W'(COEFS[s][n]);
  end

  always_comb begin
    for (int m = 0; m < M; m++)
      for (int j = 0; j < L; j++)
        c_vec[m][j] = (int'(sel) < NUM_SETS) ? rom[sel][m*L + j] : rom[0][m*L + j];
  end

  initial begin
    assert (N % L == 0) else $error("CSU: N must be a multiple of L");
  end

endmodule
