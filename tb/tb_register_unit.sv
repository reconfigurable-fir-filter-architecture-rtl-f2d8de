// tb_register_unit: checks that the register unit presents, for every block,
// the matrix s_mat[l][j] = x(kL - l - j) built from the current block and the
// previous accepted block, and that blocks with en low leave the stored
// samples alone. Samples are random; the expected matrix is read from a
// record of every sample sent, indexed by absolute sample number.
module tb_register_unit;
  localparam int L = 8;
  localparam int W = 12;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0;
  logic signed [W-1:0] x_blk [L];
  logic signed [W-1:0] s_mat [L][L];
  int checks = 0;
  int failures = 0;
  int hold_seen = 0;

  register_unit #(.L(L), .DATA_W(W)) dut (.*);

  always #5 clk = ~clk;

  // xs[n]: samples in time order; block b holds n = bL .. bL+L-1
  logic signed [W-1:0] xs [0:4095];

  function automatic logic signed [W-1:0] xat(int n);
    return (n < 0) ? '0 : xs[n];
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int b;
    for (int j = 0; j < L; j++) x_blk[j] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    b = 0;
    for (int cyc = 0; cyc < 300; cyc++) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      for (int j = 0; j < L; j++) begin
        x_blk[j] = W'($urandom);
        if (cyc % 50 == 7) x_blk[j] = (j % 2) ? -(2**(W-1)) : (2**(W-1)) - 1;
      end
      // record the presented block as block b (whether or not en is high)
      for (int j = 0; j < L; j++) xs[b*L + L-1-j] = x_blk[j];
      #1;
      for (int l = 0; l < L; l++)
        for (int j = 0; j < L; j++) begin
          checks++;
          if (s_mat[l][j] !== xat(b*L + L-1 - l - j)) begin
            failures++;
            if (failures < 10)
              $display("FAIL block %0d s[%0d][%0d]=%0d expected %0d", b, l, j,
                       s_mat[l][j], xat(b*L + L-1 - l - j));
          end
        end
      if (en) b++;
      else hold_seen++;
    end
    checks++;
    if (hold_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
