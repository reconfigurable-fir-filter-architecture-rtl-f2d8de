// eeg_fir_top: the two block FIR filters for EEG samples side by side.
//
// One stream of EEG sample blocks (L samples per block, x_blk[j] = x(kL - j))
// feeds both filters:
//  - rfir_block_filter, whose coefficients come from the coefficient storage
//    unit and can be switched per block with coef_sel (set 0: the 32 Hz EEG
//    low-pass, set 1: a 14 Hz low-pass);
//  - mcm_block_filter, the multiplier-free version hard-wired to coefficient
//    set 0.
// With coef_sel held at 0 the two outputs are equal sample for sample, which
// makes each filter a check of the other.
//
// Timing: both filters take one block per clock with in_valid high and
// produce the matching output block two clocks later with out_valid high.
//
// Both filters are published designs; placing them side by side on one stream
// is a choice of this implementation.
module eeg_fir_top #(
  parameter int unsigned L        = fir_pkg::L_DEF,
  parameter int unsigned N        = fir_pkg::N_DEF,
  parameter int unsigned DATA_W   = fir_pkg::DATA_W_DEF,
  parameter int unsigned COEF_W   = fir_pkg::COEF_W_DEF,
  parameter int unsigned NUM_SETS = fir_pkg::NUM_SETS_DEF,
  parameter int          COEFS [NUM_SETS][N] = fir_pkg::COEF_ROM,
  parameter int          FIXED_COEFS [N]     = fir_pkg::COEF_LP32,
  parameter int unsigned SEL_W    = (NUM_SETS > 1) ? $clog2(NUM_SETS) : 1,
  parameter int unsigned OUT_W    = DATA_W + COEF_W + $clog2(N)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] x_blk [L],
  input  logic        [SEL_W-1:0]  coef_sel,
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  y_rfir [L],
  output logic signed [OUT_W-1:0]  y_mcm  [L]
);

  logic rfir_valid;
  logic mcm_valid;

  rfir_block_filter #(
    .L(L), .N(N), .DATA_W(DATA_W), .COEF_W(COEF_W), .NUM_SETS(NUM_SETS),
    .COEFS(COEFS), .SEL_W(SEL_W), .OUT_W(OUT_W)
  ) u_rfir (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .x_blk     (x_blk),
    .coef_sel  (coef_sel),
    .out_valid (rfir_valid),
    .y_blk     (y_rfir)
  );

  mcm_block_filter #(
    .L(L), .N(N), .DATA_W(DATA_W), .COEF_W(COEF_W), .COEFS(FIXED_COEFS), .OUT_W(OUT_W)
  ) u_mcm (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .x_blk     (x_blk),
    .out_valid (mcm_valid),
    .y_blk     (y_mcm)
  );

  assign out_valid = rfir_valid;

  // Both filters have the same latency.
  assert property (@(posedge clk) rfir_valid == mcm_valid)
    else $error("eeg_fir_top: filter output strobes out of step");

endmodule
