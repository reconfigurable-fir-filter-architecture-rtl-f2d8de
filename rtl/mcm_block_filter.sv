// mcm_block_filter: block FIR filter with fixed coefficients built from
// multiple constant multiplication (MCM).
//
// It computes the same y(n) = sum_{i=0}^{N-1} h(i) x(n-i), L samples per
// clock, with the same block ordering as rfir_block_filter (x_blk[j] =
// x(kL - j), y_blk[l] = y(kL - l)). With constant coefficients the
// coefficient store and the general multipliers are not needed:
//  - the register unit holds the L samples of the incoming block;
//  - L MCM units, one per sample, multiply it by all N coefficients with
//    shifts and adds;
//  - the adder network sums, for every output lane l and every block delay q,
//    the products that output block k + q needs from this block;
//  - the pipelined adder unit adds those sums in transpose form, delaying the
//    sums for delay q by q blocks.
// Because every product of a sample is formed while the sample is in its own
// block, older samples never have to be stored; the block delays live in the
// adder chain instead.
//
// Interface and timing: in_valid marks a clock with an input block; y_blk and
// out_valid follow two clocks later (input register, then the PAU output
// register). Results are full precision, DATA_W + COEF_W + clog2(N) bits.
//
// The chain register unit, one MCM unit per sample, adder network and
// pipelined adder unit follows the published block diagram; the in_valid
// strobe, the reset and the latency are choices of this implementation.
module mcm_block_filter #(
  parameter int unsigned L      = fir_pkg::L_DEF,
  parameter int unsigned N      = fir_pkg::N_DEF,
  parameter int unsigned DATA_W = fir_pkg::DATA_W_DEF,
  parameter int unsigned COEF_W = fir_pkg::COEF_W_DEF,
  parameter int          COEFS [N] = fir_pkg::COEF_LP32,
  parameter int unsigned OUT_W  = DATA_W + COEF_W + $clog2(N)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] x_blk [L],
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  y_blk [L]
);

  localparam int unsigned PROD_W = DATA_W + COEF_W;
  localparam int unsigned Q      = (N + 2*L - 2) / L;
  localparam int unsigned SUM_W  = PROD_W + $clog2(L);

  logic signed [DATA_W-1:0] x_reg [L];
  logic                     x_valid;
  logic signed [PROD_W-1:0] prod  [L][N];
  logic signed [SUM_W-1:0]  p_blk [Q][L];

  // Register unit of the fixed filter: the current block only.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < L; j++) x_reg[j] <= '0;
      x_valid   <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      if (in_valid)
        for (int j = 0; j < L; j++) x_reg[j] <= x_blk[j];
      x_valid   <= in_valid;
      out_valid <= x_valid;
    end
  end

  for (genvar j = 0; j < L; j++) begin : g_mcm
    mcm_unit #(
      .N(N), .DATA_W(DATA_W), .COEF_W(COEF_W), .COEFS(COEFS)
    ) u_mcm (
      .x    (x_reg[j]),
      .prod (prod[j])
    );
  end

  adder_network #(
    .L(L), .N(N), .PROD_W(PROD_W), .Q(Q), .SUM_W(SUM_W)
  ) u_an (
    .prod  (prod),
    .p_out (p_blk)
  );

  pipelined_adder_unit #(
    .L(L), .STAGES(Q), .IN_W(SUM_W), .OUT_W(OUT_W)
  ) u_pau (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (x_valid),
    .r_in  (p_blk),
    .y_blk (y_blk)
  );

endmodule
