// tb_eeg_fir_top_resized: the top at sizes other than the defaults, to show
// the parameters hold together: block size L = 4, filter length N = 20
// (M = 5 inner product units, Q = 6 adder-chain stages in the MCM filter),
// 10-bit samples and coefficients, three coefficient sets of arbitrary
// (non-symmetric) taps, and a select value past the last set, which must read
// set 0. Both outputs are checked against direct-form convolution, the
// reconfigurable one with the per-block set history.
module tb_eeg_fir_top_resized;
  localparam int L = 4;
  localparam int N = 20;
  localparam int DW = 10;
  localparam int CW = 10;
  localparam int NS = 3;
  localparam int OW = DW + CW + 5;
  localparam int NB = 300;
  localparam int H0 [N] =
    '{ 511, -512,   3,  -3, 100, 200, -77,   0,   1,  -1, 341, -341, 255, 17, -200, 9, 64, -64, 5, 12};
  localparam int H [NS][N] = '{
    '{ 511, -512,   3,  -3, 100, 200, -77,   0,   1,  -1, 341, -341, 255, 17, -200, 9, 64, -64, 5, 12},
    '{  -9,   8,   7,   6,   5,   4,   3,   2,   1,   0,  -1,   -2,  -3, -4,   -5, -6, -7, -8, -9, 400},
    '{   1,   2,   4,   8,  16,  32,  64, 128, 256, 511, -512, -256, -128, -64, -32, -16, -8, -4, -2, -1}
  };

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [DW-1:0] x_blk [L];
  logic [1:0] coef_sel = '0;
  logic out_valid;
  logic signed [OW-1:0] y_rfir [L];
  logic signed [OW-1:0] y_mcm [L];
  int checks = 0;
  int failures = 0;
  int sel_used [4] = '{0, 0, 0, 0};

  eeg_fir_top #(
    .L(L), .N(N), .DATA_W(DW), .COEF_W(CW), .NUM_SETS(NS), .COEFS(H),
    .FIXED_COEFS(H0), .SEL_W(2), .OUT_W(OW)
  ) dut (.*);

  always #5 clk = ~clk;

  int xs [0:NB*L-1];
  int sel_of [0:NB-1];
  longint exp_r [$];
  longint exp_m [$];
  bit vpipe [2];

  function automatic longint ref_y(int n, int b, bit fixed_set);
    longint acc = 0;
    int s;
    for (int i = 0; i < N; i++)
      if (n - i >= 0 && b - i / L >= 0) begin
        s = fixed_set ? 0 : sel_of[b - i / L];
        if (s >= NS) s = 0;
        acc += longint'(H[s][i]) * xs[n - i];
      end
    return acc;
  endfunction

  initial begin
    repeat (20 * NB) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      checks++;
      if (out_valid !== vpipe[1]) begin
        failures++;
        $display("FAIL out_valid=%0d expected %0d", out_valid, vpipe[1]);
      end
      if (out_valid) begin
        for (int l = 0; l < L; l++) begin
          longint er, em;
          er = exp_r.pop_front();
          em = exp_m.pop_front();
          checks += 2;
          if (longint'(y_rfir[l]) != er) begin
            failures++;
            if (failures < 10) $display("FAIL rfir lane %0d y=%0d expected %0d", l, y_rfir[l], er);
          end
          if (longint'(y_mcm[l]) != em) begin
            failures++;
            if (failures < 10) $display("FAIL mcm lane %0d y=%0d expected %0d", l, y_mcm[l], em);
          end
        end
      end
    end
  end

  initial begin
    int b;
    for (int j = 0; j < L; j++) x_blk[j] = '0;
    vpipe = '{0, 0};
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    b = 0;
    while (b < NB) begin
      @(posedge clk);
      vpipe[1] = vpipe[0];
      vpipe[0] = in_valid;
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      if (in_valid) begin
        if (b % 23 == 22) coef_sel = 2'($urandom_range(0, 3));
        sel_of[b] = int'(coef_sel);
        sel_used[coef_sel]++;
        for (int j = 0; j < L; j++) begin
          x_blk[j] = (b % 50 == 10) ? -(2**(DW-1)) : DW'($urandom);
          xs[b*L + L-1-j] = int'(x_blk[j]);
        end
        for (int l = 0; l < L; l++) begin
          exp_r.push_back(ref_y(b*L + L-1-l, b, 1'b0));
          exp_m.push_back(ref_y(b*L + L-1-l, b, 1'b1));
        end
        b++;
      end
    end
    @(posedge clk);
    vpipe[1] = vpipe[0];
    vpipe[0] = in_valid;
    @(negedge clk) in_valid = 1'b0;
    repeat (4) begin
      @(posedge clk);
      vpipe[1] = vpipe[0];
      vpipe[0] = in_valid;
    end
    checks++;
    if (exp_r.size() != 0) failures++;
    $display("blocks per select value: %0d %0d %0d %0d", sel_used[0], sel_used[1], sel_used[2], sel_used[3]);
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (sel_used[s] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
