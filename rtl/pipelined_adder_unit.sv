// pipelined_adder_unit (PAU): adds partial output blocks that belong to
// different input blocks, in transpose form.
//
// Input r_in[m] is a block of L partial sums computed from input block k that
// must be added to the output of block k + m. The unit computes
//   y_k = sum_{m=0}^{STAGES-1} r_in[m] (of block k - m)
// with one chain of adders and block-delay registers, as in a transposed FIR
// filter: d[STAGES-2] <= r_in[STAGES-1], d[m] <= r_in[m+1] + d[m+1], and the
// output register takes r_in[0] + d[0]. Each adder sits between two
// registers, so the chain never gets longer than one addition per clock,
// whatever STAGES is. All L lanes are independent.
//
// Timing: the delay registers and the output register advance on a clock edge
// with en high (one step per input block); y_blk is valid from the clock after
// that edge. Reset clears the registers, i.e. blocks before the first are zero.
//
// The published architecture gives this unit's job, not its insides; the
// adder and register chain here is this implementation's realisation of it.
module pipelined_adder_unit #(
  parameter int unsigned L      = fir_pkg::L_DEF,
  parameter int unsigned STAGES = fir_pkg::N_DEF / fir_pkg::L_DEF,
  parameter int unsigned IN_W   = fir_pkg::DATA_W_DEF + fir_pkg::COEF_W_DEF + $clog2(fir_pkg::L_DEF),
  parameter int unsigned OUT_W  = IN_W + $clog2(STAGES)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic signed [IN_W-1:0]  r_in  [STAGES][L],
  output logic signed [OUT_W-1:0] y_blk [L]
);

  // t[m][l] = r_in[m][l] + d[m][l]: everything output block k still needs
  // from stage m on. d[m][l] holds t[m+1][l] of the previous block;
  // d[STAGES-1] is always zero.
  logic signed [OUT_W-1:0] d [STAGES][L];
  logic signed [OUT_W-1:0] t [STAGES][L];

  always_comb begin
    for (int m = 0; m < STAGES; m++)
      for (int l = 0; l < L; l++)
        t[m][l] = OUT_W'(r_in[m][l]) + d[m][l];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int m = 0; m < STAGES; m++)
        for (int l = 0; l < L; l++) d[m][l] <= '0;
      for (int l = 0; l < L; l++) y_blk[l] <= '0;
    end else if (en) begin
      for (int m = 0; m < STAGES - 1; m++)
        for (int l = 0; l < L; l++) d[m][l] <= t[m+1][l];
      for (int l = 0; l < L; l++) d[STAGES-1][l] <= '0;
      for (int l = 0; l < L; l++) y_blk[l] <= t[0][l];
    end
  end

endmodule
