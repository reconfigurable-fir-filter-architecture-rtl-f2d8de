// rfir_block_filter: reconfigurable block FIR filter in transpose form.
//
// The filter computes y(n) = sum_{i=0}^{N-1} h(i) x(n-i) for L samples per
// clock. Input block k is x_blk[j] = x(kL - j) and output block k is
// y_blk[l] = y(kL - l), j, l = 0 .. L-1 (index 0 is the newest sample).
// The coefficient vector is cut into M = N/L vectors c_m = h(mL .. mL+L-1),
// and with S_k^0 the L x L matrix of input windows (register unit),
//   y_k = sum_{m=0}^{M-1} S_{k-m}^0 c_m .
// All M inner product units multiply the current S_k^0, each by its own c_m,
// and the pipelined adder unit delays the result of c_m by m blocks before
// adding it in. The unit that applies c_m is drawn as IPU-(M-m) in the usual
// block diagram: the one with c_{M-1} feeds the far end of the adder chain.
// The coefficient storage unit supplies the c_m of the set selected by
// coef_sel; changing coef_sel reconfigures the filter between blocks.
//
// Interface: in_valid marks a clock that carries an input block; the filter
// does nothing on other clocks, so blocks may arrive at any rate. coef_sel is
// read together with each block; an output block mixes, for its terms from
// block k - m, the set that was selected when block k - m came in, exactly as
// a transposed filter whose coefficients are switched on the fly.
// Timing: y_blk and out_valid follow in_valid by two clocks (IPU register,
// then the PAU output register). Results are full precision,
// DATA_W + COEF_W + clog2(N) bits, in units of 2^-COEF_FRAC of the input.
//
// The split into units and which coefficient vector each inner product unit
// gets follow the published architecture; N, the word widths, in_valid, the
// reset, the two-clock latency and per-block coefficient switching are
// choices of this implementation.
module rfir_block_filter #(
  parameter int unsigned L        = fir_pkg::L_DEF,
  parameter int unsigned N        = fir_pkg::N_DEF,
  parameter int unsigned DATA_W   = fir_pkg::DATA_W_DEF,
  parameter int unsigned COEF_W   = fir_pkg::COEF_W_DEF,
  parameter int unsigned NUM_SETS = fir_pkg::NUM_SETS_DEF,
  parameter int          COEFS [NUM_SETS][N] = fir_pkg::COEF_ROM,
  parameter int unsigned SEL_W    = (NUM_SETS > 1) ? $clog2(NUM_SETS) : 1,
  parameter int unsigned OUT_W    = DATA_W + COEF_W + $clog2(N)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] x_blk [L],
  input  logic        [SEL_W-1:0]  coef_sel,
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  y_blk [L]
);

  localparam int unsigned M     = N / L;
  localparam int unsigned ACC_W = DATA_W + COEF_W + $clog2(L);

  logic signed [DATA_W-1:0] s_mat [L][L];
  logic signed [COEF_W-1:0] c_vec [M][L];
  logic signed [ACC_W-1:0]  r_blk [M][L];
  logic                     r_valid;

  register_unit #(.L(L), .DATA_W(DATA_W)) u_ru (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (in_valid),
    .x_blk (x_blk),
    .s_mat (s_mat)
  );

  coefficient_storage_unit #(
    .L(L), .N(N), .COEF_W(COEF_W), .NUM_SETS(NUM_SETS), .COEFS(COEFS), .SEL_W(SEL_W)
  ) u_csu (
    .sel   (coef_sel),
    .c_vec (c_vec)
  );

  for (genvar m = 0; m < M; m++) begin : g_ipu
    inner_product_unit #(
      .L(L), .DATA_W(DATA_W), .COEF_W(COEF_W), .ACC_W(ACC_W)
    ) u_ipu (
      .clk   (clk),
      .rst_n (rst_n),
      .en    (in_valid),
      .s_mat (s_mat),
      .c_vec (c_vec[m]),
      .r_blk (r_blk[m])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_valid   <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      r_valid   <= in_valid;
      out_valid <= r_valid;
    end
  end

  pipelined_adder_unit #(
    .L(L), .STAGES(M), .IN_W(ACC_W), .OUT_W(OUT_W)
  ) u_pau (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (r_valid),
    .r_in  (r_blk),
    .y_blk (y_blk)
  );

  initial begin
    assert (N % L == 0) else $error("rfir_block_filter: N must be a multiple of L");
  end

endmodule
