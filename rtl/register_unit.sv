// register_unit: builds the input matrix S_k^0 of the block FIR filter.
//
// Each accepted clock brings a block of L new samples, x_blk[j] = x(kL - j)
// (j = 0 is the newest). Row l of S_k^0 is the window of L samples ending at
// x(kL - l):  s_mat[l][j] = x(kL - l - j),  l, j = 0 .. L-1.
// The rows reach back L-1 samples into the previous block, so the unit keeps
// the L-1 newest samples of the previous block, x_blk[0 .. L-2], in L-1
// registers, one block delay each; everything else is wiring. The matrix is
// constant along its anti-diagonals, which is what lets the inner product
// units share one set of registers.
//
// Timing: s_mat is combinational from x_blk and the registers; the registers
// load x_blk on a clock edge with en high. Reset (rst_n low, asynchronous)
// clears them, i.e. the samples before the first block are taken as zero.
//
// The L-1 one-block delays feeding the matrix are the published register
// unit; the reset, the enable and the sample ordering are choices of this
// implementation.
module register_unit #(
  parameter int unsigned L      = fir_pkg::L_DEF,
  parameter int unsigned DATA_W = fir_pkg::DATA_W_DEF
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic signed [DATA_W-1:0] x_blk [L],
  output logic signed [DATA_W-1:0] s_mat [L][L]
);

  // prev[j] = x(kL - L - j): the previous block's x_blk[j]
  logic signed [DATA_W-1:0] prev [L-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < L - 1; j++) prev[j] <= '0;
    end else if (en) begin
      for (int j = 0; j < L - 1; j++) prev[j] <= x_blk[j];
    end
  end

  always_comb begin
    for (int l = 0; l < L; l++) begin
      for (int j = 0; j < L; j++) begin
        if (l + j < L) s_mat[l][j] = x_blk[l + j];
        else           s_mat[l][j] = prev[l + j - L];
      end
    end
  end

endmodule
