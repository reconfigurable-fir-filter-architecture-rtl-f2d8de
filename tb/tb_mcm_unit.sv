// tb_mcm_unit: checks prod[i] = h(i) * x for random and extreme samples, both
// for the default EEG low-pass coefficients and for a second instance with
// coefficients chosen to stress the canonic signed digit recoding (full-scale
// values, alternating bit patterns, runs of ones, zero, every kind of shared
// digit pair).
module tb_mcm_unit;
  localparam int N = 16;
  localparam int DW = 12;
  localparam int CW = 12;
  localparam int PW = DW + CW;
  localparam int H0 [N] = '{5, 11, 2, -50, -86, 49, 390, 704, 704, 390, 49, -86, -50, 2, 11, 5};
  localparam int H1 [N] = '{-2048, 2047, 1365, -1366, 0, 1, -1, 1023, -1024, 1911, -1911, 3, -3, 7, 13, -683};

  logic signed [DW-1:0] x;
  logic signed [PW-1:0] prod0 [N];
  logic signed [PW-1:0] prod1 [N];
  int checks = 0;
  int failures = 0;

  mcm_unit dut0 (.x(x), .prod(prod0));
  mcm_unit #(.COEFS(H1)) dut1 (.x(x), .prod(prod1));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      case (t)
        0: x = -(2**(DW-1));
        1: x = (2**(DW-1)) - 1;
        2: x = 0;
        3: x = -1;
        default: x = DW'($urandom);
      endcase
      #1;
      for (int i = 0; i < N; i++) begin
        checks += 2;
        if (longint'(prod0[i]) != longint'(x) * H0[i]) begin
          failures++;
          if (failures < 10) $display("FAIL set0 x=%0d h(%0d): %0d", x, i, prod0[i]);
        end
        if (longint'(prod1[i]) != longint'(x) * H1[i]) begin
          failures++;
          if (failures < 10) $display("FAIL set1 x=%0d h=%0d: %0d", x, H1[i], prod1[i]);
        end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
