// tb_mcm_block_filter: streams random sample blocks, with idle clocks, through
// the fixed-coefficient (MCM) filter. The expected outputs come from the
// direct-form convolution y(n) = sum_i h(i) x(n - i) with the EEG low-pass
// taps. Checks every output sample, that out_valid follows in_valid by
// exactly two clocks, and that idle clocks happened.
module tb_mcm_block_filter;
  localparam int L = 8;
  localparam int N = 16;
  localparam int DW = 12;
  localparam int OW = 28;
  localparam int NB = 400;
  localparam int H [2][N] = '{
    '{  5,  11,   2, -50, -86,  49, 390, 704, 704, 390,  49, -86, -50,   2,  11,   5},
    '{ -5,  -2,  10,  48, 117, 208, 297, 351, 351, 297, 208, 117,  48,  10,  -2,  -5}
  };

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [DW-1:0] x_blk [L];
  logic out_valid;
  logic signed [OW-1:0] y_blk [L];
  int checks = 0;
  int failures = 0;
  int idles = 0;

  mcm_block_filter dut (.*);

  always #5 clk = ~clk;

  int xs [0:NB*L-1];
  int sel_of [0:NB-1];
  longint expq [$];
  bit vpipe [2];

  function automatic longint ref_y(int n, int b);
    longint acc = 0;
    for (int i = 0; i < N; i++)
      if (n - i >= 0 && b - i / L >= 0) acc += longint'(H[sel_of[b - i / L]][i]) * xs[n - i];
    return acc;
  endfunction

  initial begin
    repeat (20 * NB) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // latency and output checks, sampled just after each rising edge
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
          longint e;
          e = expq.pop_front();
          checks++;
          if (longint'(y_blk[l]) != e) begin
            failures++;
            if (failures < 10) $display("FAIL lane %0d y=%0d expected %0d", l, y_blk[l], e);
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
        sel_of[b] = 0;
        for (int j = 0; j < L; j++) begin
          x_blk[j] = DW'($urandom);
          xs[b*L + L-1-j] = int'(x_blk[j]);
        end
        for (int l = 0; l < L; l++) expq.push_back(ref_y(b*L + L-1-l, b));
        b++;
      end else begin
        idles++;
        for (int j = 0; j < L; j++) x_blk[j] = DW'($urandom);
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
    if (expq.size() != 0) begin
      failures++;
      $display("FAIL %0d outputs never appeared", expq.size());
    end
    checks++;
    if (idles == 0) failures++;
    $display("idle_clocks=%0d blocks=%0d", idles, NB);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
