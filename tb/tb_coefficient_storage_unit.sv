// tb_coefficient_storage_unit: recomputes both coefficient sets from their
// definition (Hamming-windowed ideal low-pass, fs = 173.6 Hz, fc = 32 Hz and
// 14 Hz, unity DC gain, rounded to 2^-11) with real arithmetic and checks
// that every c_vec[m][j] the unit presents equals h(mL + j) of the selected
// set.
module tb_coefficient_storage_unit;
  localparam int L = 8;
  localparam int N = 16;
  localparam int M = N / L;
  localparam real PI = 3.14159265358979;

  logic [0:0] sel;
  logic signed [11:0] c_vec [M][L];
  int checks = 0;
  int failures = 0;
  int expect_h [2][N];

  coefficient_storage_unit dut (.sel(sel), .c_vec(c_vec));

  function automatic void design_lowpass(real fc, output int h [N]);
    real hr [N];
    real wc, t, g;
    wc = 2.0 * fc / 173.6;
    g = 0.0;
    for (int n = 0; n < N; n++) begin
      t = n - (N - 1) / 2.0;
      hr[n] = wc * $sin(PI * wc * t) / (PI * wc * t);
      hr[n] = hr[n] * (0.54 - 0.46 * $cos(2.0 * PI * n / (N - 1)));
      g += hr[n];
    end
    for (int n = 0; n < N; n++) begin
      real v;
      v = hr[n] / g * 2048.0;
      h[n] = (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
    end
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    design_lowpass(32.0, expect_h[0]);
    design_lowpass(14.0, expect_h[1]);
    for (int s = 0; s < 2; s++) begin
      sel = 1'(s);
      #1;
      for (int m = 0; m < M; m++)
        for (int j = 0; j < L; j++) begin
          checks++;
          if (int'(c_vec[m][j]) != expect_h[s][m*L + j]) begin
            failures++;
            $display("FAIL set %0d c_%0d[%0d]=%0d expected %0d", s, m, j,
                     c_vec[m][j], expect_h[s][m*L + j]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
