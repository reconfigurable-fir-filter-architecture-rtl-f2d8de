// inner_product_unit (IPU): one coefficient vector c_m applied to the whole
// input matrix S_k^0.
//
// It holds L inner product cells; cell l takes row l of S_k^0 and c_m and
// yields r_blk[l] = sum_j x(kL - l - j) h(mL + j), the part of output
// y(kL - l) that coefficient vector c_m contributes. Every IPU of a filter
// sees the same S_k^0; they differ only in their coefficient vector.
//
// Timing: the L results are registered on a clock edge with en high, so they
// appear one clock after the block that produced them. Reset clears them.
//
// L cells sharing one coefficient vector is the published unit; the output
// register is a pipelining choice of this implementation.
module inner_product_unit #(
  parameter int unsigned L      = fir_pkg::L_DEF,
  parameter int unsigned DATA_W = fir_pkg::DATA_W_DEF,
  parameter int unsigned COEF_W = fir_pkg::COEF_W_DEF,
  parameter int unsigned ACC_W  = DATA_W + COEF_W + $clog2(L)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic signed [DATA_W-1:0] s_mat [L][L],
  input  logic signed [COEF_W-1:0] c_vec [L],
  output logic signed [ACC_W-1:0]  r_blk [L]
);

  logic signed [ACC_W-1:0] r_comb [L];

  for (genvar l = 0; l < L; l++) begin : g_ipc
    inner_product_cell #(
      .L(L), .DATA_W(DATA_W), .COEF_W(COEF_W), .ACC_W(ACC_W)
    ) u_ipc (
      .s_row (s_mat[l]),
      .c_vec (c_vec),
      .r     (r_comb[l])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < L; l++) r_blk[l] <= '0;
    end else if (en) begin
      for (int l = 0; l < L; l++) r_blk[l] <= r_comb[l];
    end
  end

endmodule
