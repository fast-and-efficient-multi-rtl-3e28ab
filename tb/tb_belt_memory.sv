// tb_belt_memory: random writes and column reads of the belt memory compared
// with a shadow copy; checks the write-first bypass on the slot being written.
module tb_belt_memory;
  localparam int N = 1, LAYERS = 2, SW = 8, CW = 6, W = 8;
  localparam int K = 2*N+1, L = 2*N+1, CL = N+1;
  int checks = 0, failures = 0, n_bypass = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic wr_en = 1'b0;
  logic [1:0] wr_slot = '0, rd_slot [K];
  logic [0:0] cwr_slot = '0, crd_slot = '0;
  logic [2:0] wr_col = '0, rd_col = '0, crd_col = '0;
  logic signed [SW-1:0] wr_state [LAYERS], rd_state [K][LAYERS];
  logic signed [CW-1:0] wr_const [LAYERS], rd_const [LAYERS];

  belt_memory #(.N(N), .LAYERS(LAYERS), .SW(SW), .CW(CW), .W(W)) dut (.*);

  logic signed [SW-1:0] sm [L][W][LAYERS];
  logic signed [CW-1:0] cm [CL][W][LAYERS];

  initial begin
    // fill every cell once so that the shadow is defined
    for (int s = 0; s < L; s++)
      for (int col = 0; col < W; col++) begin
        @(negedge clk);
        wr_en = 1'b1; wr_slot = 2'(s); cwr_slot = 1'(s % CL); wr_col = 3'(col);
        for (int q = 0; q < LAYERS; q++) begin
          wr_state[q] = SW'($urandom); wr_const[q] = CW'($urandom);
          sm[s][col][q] = wr_state[q]; cm[s % CL][col][q] = wr_const[q];
        end
      end
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      wr_en = 1'($urandom);
      wr_slot = 2'($urandom_range(L-1)); cwr_slot = 1'($urandom_range(CL-1));
      wr_col = 3'($urandom);
      for (int q = 0; q < LAYERS; q++) begin wr_state[q] = SW'($urandom); wr_const[q] = CW'($urandom); end
      rd_col = ($urandom_range(3) == 0) ? wr_col : 3'($urandom);
      for (int k = 0; k < K; k++) rd_slot[k] = 2'($urandom_range(L-1));
      crd_slot = 1'($urandom_range(CL-1)); crd_col = 3'($urandom);
      #1;
      for (int k = 0; k < K; k++)
        for (int q = 0; q < LAYERS; q++) begin
          logic signed [SW-1:0] e;
          if (wr_en && rd_slot[k] == wr_slot && rd_col == wr_col) begin e = wr_state[q]; n_bypass++; end
          else e = sm[rd_slot[k]][rd_col][q];
          checks++;
          if (rd_state[k][q] !== e) begin failures++; $display("state read mismatch k=%0d q=%0d", k, q); end
        end
      for (int q = 0; q < LAYERS; q++) begin
        checks++;
        if (rd_const[q] !== cm[crd_slot][crd_col][q]) begin failures++; $display("const read mismatch"); end
      end
      if (wr_en)
        for (int q = 0; q < LAYERS; q++) begin
          sm[wr_slot][wr_col][q] = wr_state[q];
          cm[cwr_slot][wr_col][q] = wr_const[q];
        end
    end
    checks++;
    if (n_bypass == 0) begin failures++; $display("bypass never exercised"); end
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
