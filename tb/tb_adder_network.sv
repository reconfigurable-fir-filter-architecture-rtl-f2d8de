// tb_adder_network: random product arrays; the expected sums are gathered
// tap by tap: for output lane l and tap i the sample x(kL - l - i) sits at
// position j = (l + i) mod L of the block that is q = (l + i) div L blocks
// older, so prod[j][i] belongs to p_out[q][l].
module tb_adder_network;
  localparam int L = 8;
  localparam int N = 16;
  localparam int PW = 24;
  localparam int Q = 3;
  localparam int SW = PW + 3;

  logic signed [PW-1:0] prod [L][N];
  logic signed [SW-1:0] p_out [Q][L];
  int checks = 0;
  int failures = 0;
  longint e [Q][L];

  adder_network dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      for (int j = 0; j < L; j++)
        for (int i = 0; i < N; i++)
          prod[j][i] = (t == 0) ? -(2**(PW-1)) : PW'($urandom);
      #1;
      for (int q = 0; q < Q; q++) for (int l = 0; l < L; l++) e[q][l] = 0;
      for (int l = 0; l < L; l++)
        for (int i = 0; i < N; i++)
          e[(l + i) / L][l] += longint'(prod[(l + i) % L][i]);
      for (int q = 0; q < Q; q++)
        for (int l = 0; l < L; l++) begin
          checks++;
          if (longint'(p_out[q][l]) != e[q][l]) begin
            failures++;
            if (failures < 10) $display("FAIL q=%0d l=%0d %0d expected %0d", q, l, p_out[q][l], e[q][l]);
          end
        end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
