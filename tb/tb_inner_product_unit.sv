// tb_inner_product_unit: random matrices and coefficient vectors; checks that
// r_blk[l] equals the inner product of row l with c_vec one clock after an
// edge with en high, and that it holds its value while en is low.
module tb_inner_product_unit;
  localparam int L = 8;
  localparam int DW = 12;
  localparam int CW = 12;
  localparam int AW = DW + CW + 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0;
  logic signed [DW-1:0] s_mat [L][L];
  logic signed [CW-1:0] c_vec [L];
  logic signed [AW-1:0] r_blk [L];
  int checks = 0;
  int failures = 0;
  longint exp_r [L];

  inner_product_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l < L; l++) exp_r[l] = 0;
    for (int l = 0; l < L; l++) for (int j = 0; j < L; j++) s_mat[l][j] = '0;
    for (int j = 0; j < L; j++) c_vec[j] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      for (int l = 0; l < L; l++) for (int j = 0; j < L; j++) s_mat[l][j] = DW'($urandom);
      for (int j = 0; j < L; j++) c_vec[j] = CW'($urandom);
      if (en)
        for (int l = 0; l < L; l++) begin
          exp_r[l] = 0;
          for (int j = 0; j < L; j++) exp_r[l] += longint'(s_mat[l][j]) * longint'(c_vec[j]);
        end
      @(posedge clk);
      #1;
      for (int l = 0; l < L; l++) begin
        checks++;
        if (longint'(r_blk[l]) != exp_r[l]) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d r[%0d]=%0d expected %0d", t, l, r_blk[l], exp_r[l]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
