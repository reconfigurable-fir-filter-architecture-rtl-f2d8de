// tb_eeg_fir_top: end-to-end run of both block filters, at the default sizes,
// over one EEG-length record: 4104 samples (513 blocks of 8), the length of a
// 23.6 s single-channel recording at 173.6 Hz.
//
// The test signal is built in the testbench: a 10 Hz alpha rhythm of
// amplitude 400 plus 50 Hz mains interference of amplitude 300, and from
// block 100 on a random noise of +-63 as well. Checks:
//  - every output sample of both filters against the direct-form convolution
//    (for the reconfigurable filter, with the taps of the set selected when
//    the block each tap's product comes from entered);
//  - out_valid exactly two clocks after in_valid;
//  - while no set-1 product is in flight, both filters agree exactly;
//  - filtering: over the noise-free part the 32 Hz low-pass output matches
//    the alpha rhythm, scaled by the filter's gain at 10 Hz (0.997) and
//    delayed by its 7.5-sample group delay, within 12 units, i.e. the mains
//    component has been removed.
// Counted mechanisms, each of which must happen: idle clocks between blocks,
// switches to set 1 and back to set 0, blocks filtered with set 1, and
// samples passing the mains-rejection check.
module tb_eeg_fir_top;
  localparam int L = 8;
  localparam int N = 16;
  localparam int DW = 12;
  localparam int OW = 28;
  localparam int NB = 513;
  localparam real PI = 3.14159265358979;
  localparam real FS = 173.6;
  localparam int H [2][N] = '{
    '{  5,  11,   2, -50, -86,  49, 390, 704, 704, 390,  49, -86, -50,   2,  11,   5},
    '{ -5,  -2,  10,  48, 117, 208, 297, 351, 351, 297, 208, 117,  48,  10,  -2,  -5}
  };

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [DW-1:0] x_blk [L];
  logic [0:0] coef_sel = '0;
  logic out_valid;
  logic signed [OW-1:0] y_rfir [L];
  logic signed [OW-1:0] y_mcm [L];
  int checks = 0;
  int failures = 0;

  // mechanism counters
  int idles = 0;
  int to_set1 = 0;
  int to_set0 = 0;
  int set1_blocks = 0;
  int agree_checks = 0;
  int mains_checks = 0;

  eeg_fir_top dut (.*);

  always #5 clk = ~clk;

  int xs [0:NB*L-1];
  int sel_of [0:NB-1];
  longint exp_r [$];
  longint exp_m [$];
  int out_n [$];     // sample number of each expected output
  int out_b [$];     // block number of each expected output
  bit vpipe [2];

  function automatic longint ref_y(int n, int b, bit fixed_set);
    longint acc = 0;
    for (int i = 0; i < N; i++)
      if (n - i >= 0 && b - i / L >= 0)
        acc += longint'(H[fixed_set ? 0 : sel_of[b - i / L]][i]) * xs[n - i];
    return acc;
  endfunction

  function automatic int sample(int n, bit noisy);
    real v;
    v = 400.0 * $sin(2.0 * PI * 10.0 * n / FS) + 300.0 * $sin(2.0 * PI * 50.0 * n / FS + 0.3);
    if (noisy) v += real'($signed($urandom_range(0, 126)) - 63);
    return int'($floor(v + 0.5));
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
          int n, b;
          bit clean;
          er = exp_r.pop_front();
          em = exp_m.pop_front();
          n  = out_n.pop_front();
          b  = out_b.pop_front();
          checks += 2;
          if (longint'(y_rfir[l]) != er) begin
            failures++;
            if (failures < 10) $display("FAIL rfir n=%0d y=%0d expected %0d", n, y_rfir[l], er);
          end
          if (longint'(y_mcm[l]) != em) begin
            failures++;
            if (failures < 10) $display("FAIL mcm n=%0d y=%0d expected %0d", n, y_mcm[l], em);
          end
          clean = 1'b1;
          for (int m = 0; m < N / L; m++) if (b - m >= 0 && sel_of[b - m] != 0) clean = 1'b0;
          if (clean) begin
            agree_checks++;
            checks++;
            if (y_rfir[l] != y_mcm[l]) begin
              failures++;
              if (failures < 10) $display("FAIL filters disagree at n=%0d", n);
            end
          end
          if (b < 100 && n >= N) begin
            real alpha, got;
            alpha = 0.997 * 400.0 * $sin(2.0 * PI * 10.0 * (n - 7.5) / FS);
            got = real'(y_mcm[l]) / 2048.0;
            mains_checks++;
            checks++;
            if (got - alpha > 12.0 || alpha - got > 12.0) begin
              failures++;
              if (failures < 10) $display("FAIL mains not removed at n=%0d: %f vs %f", n, got, alpha);
            end
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
      // blocks arrive in bursts with gaps, as from a slow sample source
      in_valid = ($urandom_range(0, 3) != 0);
      if (in_valid) begin
        if (b == 150 || b == 300) begin coef_sel = 1'b1; to_set1++; end
        if (b == 200 || b == 420) begin coef_sel = 1'b0; to_set0++; end
        sel_of[b] = int'(coef_sel);
        if (coef_sel) set1_blocks++;
        for (int j = 0; j < L; j++) begin
          xs[b*L + L-1-j] = sample(b*L + L-1-j, b >= 100);
          x_blk[j] = DW'(xs[b*L + L-1-j]);
        end
        for (int l = 0; l < L; l++) begin
          exp_r.push_back(ref_y(b*L + L-1-l, b, 1'b0));
          exp_m.push_back(ref_y(b*L + L-1-l, b, 1'b1));
          out_n.push_back(b*L + L-1-l);
          out_b.push_back(b);
        end
        b++;
      end else begin
        idles++;
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
    if (exp_r.size() != 0) begin
      failures++;
      $display("FAIL %0d outputs never appeared", exp_r.size());
    end
    $display("blocks=%0d idle_clocks=%0d switches_to_set1=%0d switches_to_set0=%0d set1_blocks=%0d agree_checks=%0d mains_checks=%0d",
             NB, idles, to_set1, to_set0, set1_blocks, agree_checks, mains_checks);
    checks += 6;
    if (idles == 0) failures++;
    if (to_set1 == 0) failures++;
    if (to_set0 == 0) failures++;
    if (set1_blocks == 0) failures++;
    if (agree_checks == 0) failures++;
    if (mains_checks == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
