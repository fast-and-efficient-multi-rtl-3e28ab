// tb_da_lut: random template writes; every LUT entry is compared with the sum
// of the template elements its address selects, for all layer pairs and rows.
module tb_da_lut;
  localparam int N = 1, LAYERS = 2, TW = 8, K = 2*N+1, NA = 1 << K;
  localparam int PLW = TW + $clog2(K) + 1;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a real falling edge for the asynchronous reset
  always #5 clk = ~clk;
  logic cfg_we = 1'b0;
  logic [0:0] cfg_p = '0, cfg_q = '0;
  logic [1:0] cfg_k = '0, cfg_l = '0;
  logic signed [TW-1:0] cfg_data = '0;
  logic signed [PLW-1:0] lut [LAYERS][LAYERS][K][NA];
  int t [LAYERS][LAYERS][K][K];

  da_lut #(.N(N), .LAYERS(LAYERS), .TW(TW)) dut (.*);

  task automatic check_all();
    for (int p = 0; p < LAYERS; p++) for (int q = 0; q < LAYERS; q++)
      for (int k = 0; k < K; k++) for (int a = 0; a < NA; a++) begin
        int e = 0;
        for (int l = 0; l < K; l++) if (a[l]) e += t[p][q][k][l];
        checks++;
        if (int'(lut[p][q][k][a]) != e) begin
          failures++;
          if (failures < 5) $display("lut[%0d][%0d][%0d][%0d] = %0d, expected %0d", p, q, k, a, lut[p][q][k][a], e);
        end
      end
  endtask

  initial begin
    for (int p = 0; p < LAYERS; p++) for (int q = 0; q < LAYERS; q++)
      for (int k = 0; k < K; k++) for (int l = 0; l < K; l++) t[p][q][k][l] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check_all();
    for (int n = 0; n < 120; n++) begin
      @(negedge clk);
      cfg_we = 1'b1;
      cfg_p = 1'($urandom); cfg_q = 1'($urandom);
      cfg_k = 2'($urandom_range(K-1)); cfg_l = 2'($urandom_range(K-1));
      cfg_data = (n % 17 == 0) ? -(TW'(1) <<< (TW-1)) : TW'($urandom);
      t[cfg_p][cfg_q][cfg_k][cfg_l] = int'(cfg_data);
      @(negedge clk);
      cfg_we = 1'b0;
      if (n % 10 == 9) check_all();
    end
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
