// tb_inner_product_cell: random and extreme rows and coefficient vectors;
// the expected inner product is summed in 64-bit integers in the testbench.
module tb_inner_product_cell;
  localparam int L = 8;
  localparam int DW = 12;
  localparam int CW = 12;
  localparam int AW = DW + CW + 3;

  logic signed [DW-1:0] s_row [L];
  logic signed [CW-1:0] c_vec [L];
  logic signed [AW-1:0] r;
  int checks = 0;
  int failures = 0;

  inner_product_cell dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint exp_r;
    for (int t = 0; t < 2000; t++) begin
      for (int j = 0; j < L; j++) begin
        case (t % 4)
          0: begin s_row[j] = -(2**(DW-1)); c_vec[j] = -(2**(CW-1)); end
          1: begin s_row[j] = (2**(DW-1)) - 1; c_vec[j] = -(2**(CW-1)); end
          default: begin s_row[j] = DW'($urandom); c_vec[j] = CW'($urandom); end
        endcase
      end
      #1;
      exp_r = 0;
      for (int j = 0; j < L; j++) exp_r += longint'(s_row[j]) * longint'(c_vec[j]);
      checks++;
      if (longint'(r) != exp_r) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d r=%0d expected %0d", t, r, exp_r);
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
