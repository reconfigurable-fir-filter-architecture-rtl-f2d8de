// inner_product_cell (IPC): inner product of one row of S_k^0 with one
// coefficient vector,
//   r = sum_{j=0}^{L-1} s_row[j] * c_vec[j],
// which is one output sample's share r(kL - l) of coefficient vector c_m.
// There are L general multipliers, because the coefficients are run-time
// values, followed by a balanced adder tree: products 0+1, 2+3, ... are
// added first, then the pair sums, and so on down to one result.
//
// Timing: purely combinational. The result is kept at full precision,
// DATA_W + COEF_W + clog2(L) bits, so nothing overflows.
//
// The L multipliers and the adder tree are the published cell; the word
// widths are a choice of this implementation.
module inner_product_cell #(
  parameter int unsigned L      = fir_pkg::L_DEF,
  parameter int unsigned DATA_W = fir_pkg::DATA_W_DEF,
  parameter int unsigned COEF_W = fir_pkg::COEF_W_DEF,
  parameter int unsigned ACC_W  = DATA_W + COEF_W + $clog2(L)
) (
  input  logic signed [DATA_W-1:0] s_row [L],
  input  logic signed [COEF_W-1:0] c_vec [L],
  output logic signed [ACC_W-1:0]  r
);

  localparam int unsigned PROD_W = DATA_W + COEF_W;

  logic signed [PROD_W-1:0] prod [L];
  // Adder tree stored as a heap: node i adds nodes 2i+1 and 2i+2,
  // the leaves L-1 .. 2L-2 are the products, node 0 is the result.
  logic signed [ACC_W-1:0]  node [2*L-1];

  always_comb begin
    for (int j = 0; j < L; j++) begin
      prod[j]         = s_row[j] * c_vec[j];
      node[L - 1 + j] = ACC_W'(prod[j]);
    end
    for (int i = L - 2; i >= 0; i--)
      node[i] = node[2*i + 1] + node[2*i + 2];
  end

  assign r = node[0];

endmodule
