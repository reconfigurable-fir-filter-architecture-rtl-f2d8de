// adder_network: gathers the MCM products of one input block into the
// partial output blocks of the fixed-coefficient block filter.
//
// prod[j][i] = h(i) x(kL - j) comes from the MCM unit of input sample j.
// Output y(kL - l) needs h(i) x(kL - l - i); the sample x(kL - l - i) lies in
// block k - q with q = (l + i) div L, at position j = (l + i) mod L. So the
// products of block k that belong to output block k + q, lane l, are
//   p_out[q][l] = sum_{j=0}^{L-1} prod[j][qL + j - l]   (0 <= qL + j - l < N),
// for q = 0 .. Q-1, Q = ceil((N + L - 1) / L). The pipelined adder unit then
// delays p_out[q] by q blocks and adds. Each sum has at most L terms.
//
// Timing: purely combinational.
//
// The published block diagram names the adder network; grouping the products
// by block delay is this implementation's derivation from the filter
// equation.
module adder_network #(
  parameter int unsigned L      = fir_pkg::L_DEF,
  parameter int unsigned N      = fir_pkg::N_DEF,
  parameter int unsigned PROD_W = fir_pkg::DATA_W_DEF + fir_pkg::COEF_W_DEF,
  parameter int unsigned Q      = (N + 2*L - 2) / L,
  parameter int unsigned SUM_W  = PROD_W + $clog2(L)
) (
  input  logic signed [PROD_W-1:0] prod  [L][N],
  output logic signed [SUM_W-1:0]  p_out [Q][L]
);

  always_comb begin
    for (int q = 0; q < Q; q++) begin
      for (int l = 0; l < L; l++) begin
        p_out[q][l] = '0;
        for (int j = 0; j < L; j++) begin
          if (q*L + j >= l && q*L + j - l < N)
            p_out[q][l] = p_out[q][l] + SUM_W'(prod[j][q*L + j - l]);
        end
      end
    end
  end

endmodule
