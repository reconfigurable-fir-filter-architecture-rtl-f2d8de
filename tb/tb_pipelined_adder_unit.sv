// tb_pipelined_adder_unit: feeds random partial blocks, with idle clocks in
// between, to a three-stage unit and checks y_k = r_in[0](k) + r_in[1](k-1)
// + r_in[2](k-2) for every lane, one clock after the block's en edge.
module tb_pipelined_adder_unit;
  localparam int L = 8;
  localparam int S = 3;
  localparam int IW = 20;
  localparam int OW = 22;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0;
  logic signed [IW-1:0] r_in [S][L];
  logic signed [OW-1:0] y_blk [L];
  int checks = 0;
  int failures = 0;
  int idle_seen = 0;
  longint hist [0:1023][S][L];

  pipelined_adder_unit #(.L(L), .STAGES(S), .IN_W(IW), .OUT_W(OW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k;
    longint e;
    for (int m = 0; m < S; m++) for (int l = 0; l < L; l++) r_in[m][l] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    k = 0;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      en = ($urandom_range(0, 2) != 0);
      for (int m = 0; m < S; m++)
        for (int l = 0; l < L; l++) begin
          r_in[m][l] = IW'($urandom);
          if (t % 40 == 3) r_in[m][l] = -(2**(IW-1));
        end
      if (en) begin
        for (int m = 0; m < S; m++) for (int l = 0; l < L; l++) hist[k][m][l] = longint'(r_in[m][l]);
        @(posedge clk);
        #1;
        for (int l = 0; l < L; l++) begin
          e = 0;
          for (int m = 0; m < S; m++) if (k - m >= 0) e += hist[k-m][m][l];
          checks++;
          if (longint'(y_blk[l]) != e) begin
            failures++;
            if (failures < 10) $display("FAIL block %0d lane %0d y=%0d expected %0d", k, l, y_blk[l], e);
          end
        end
        k++;
      end else begin
        idle_seen++;
      end
    end
    checks++;
    if (idle_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
