// tb_mixer: random shift and fill clocks on the window register, compared
// with a shadow window after every clock.
module tb_mixer;
  localparam int N = 1, LAYERS = 2, SW = 8, K = 2*N+1;
  int checks = 0, failures = 0, n_fill = 0, n_shift = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic shift_en = 1'b0, fill = 1'b0;
  logic signed [SW-1:0] col_in [K][LAYERS];
  logic signed [SW-1:0] win [K][K][LAYERS];
  logic signed [SW-1:0] ref_w [K][K][LAYERS];

  mixer #(.N(N), .LAYERS(LAYERS), .SW(SW)) dut (.*);

  initial begin
    // start with a fill so that the window is defined
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      fill = (t == 0) || ($urandom_range(7) == 0);
      shift_en = 1'($urandom);
      for (int k = 0; k < K; k++)
        for (int q = 0; q < LAYERS; q++) col_in[k][q] = SW'($urandom);
      if (fill) begin
        n_fill++;
        for (int k = 0; k < K; k++) for (int l = 0; l < K; l++) for (int q = 0; q < LAYERS; q++)
          ref_w[k][l][q] = col_in[k][q];
      end else if (shift_en) begin
        n_shift++;
        for (int k = 0; k < K; k++) for (int q = 0; q < LAYERS; q++) begin
          for (int l = 0; l < K-1; l++) ref_w[k][l][q] = ref_w[k][l+1][q];
          ref_w[k][K-1][q] = col_in[k][q];
        end
      end
      @(posedge clk); #1;
      for (int k = 0; k < K; k++) for (int l = 0; l < K; l++) for (int q = 0; q < LAYERS; q++) begin
        checks++;
        if (win[k][l][q] !== ref_w[k][l][q]) begin
          failures++;
          if (failures < 5) $display("window mismatch at %0d,%0d,%0d", k, l, q);
        end
      end
    end
    checks++;
    if (n_fill < 2 || n_shift == 0) failures++;
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
