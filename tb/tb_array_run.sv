// tb_array_run: reusable self-checking harness around a 2 x 2 falcon_array
// with one layer.
//
// An image of H rows is cut into two overlapping W-wide stripes, one per
// processor column; the overlap is ROWS*N columns on each inner side, which is
// what ROWS iterations per pass consume, so the image is 2*W - 2*ROWS*N wide.
// First an input pass computes g = B'*u + h*I (B' in the top row of cores, a
// zero template in the bottom row, which then only forwards g). Then PASSES
// iteration passes run (A' in every core), each performing ROWS = 2 Euler
// iterations; after each pass the valid parts of the two stripes are joined
// and compared with the reference model applied to the whole image. Column 0
// streams without gaps and its clocks per pass are checked against the
// schedule; column 1 has random input gaps and output back-pressure.
// Templates are random (TKIND = 0) or the halftoning example (TKIND = 1,
// h = 25/128, 7 template fraction bits).
// Mechanisms counted (a failure if one never happens): input gaps, output
// back-pressure, results limited to +-1, both modes, image boundary cells,
// overlap columns discarded.
// The instantiating testbench prints the TB_RESULT line.
module tb_array_run
  import falcon_pkg::*;
  import falcon_ref_pkg::*;
#(
  parameter int N      = 1,
  parameter int SW     = 24,
  parameter int SFRAC  = 22,
  parameter int CW     = 24,
  parameter int CFRAC  = 20,
  parameter int TW     = 24,
  parameter int TFRAC  = 20,
  parameter int BPC    = 24,
  parameter arith_e ARITH = ARITH_DA,
  parameter int MULTS  = 2*N+1,
  parameter int W      = 256,
  parameter int H      = 16,
  parameter int PASSES = 2,
  parameter int TKIND  = 0,
  parameter int SEED   = 1
) (
  output int checks,
  output int failures,
  output bit finished,
  output int clocks       // clocks of all iteration passes, column 0
);
  localparam int ROWS = 2, COLS = 2, LAYERS = 1;
  localparam int K    = 2*N + 1;
  localparam int KW   = $clog2(K);
  localparam int CPC  = (ARITH == ARITH_MULT) ? (K*K + MULTS - 1) / MULTS : SW / BPC;
  localparam int HALO = ROWS * N;
  localparam int WS   = W;                                  // stripe width
  localparam int WT   = COLS * WS - 2 * (COLS - 1) * HALO;  // image width

  int n_gap = 0, n_bp = 0, n_sat = 0, n_halo = 0, n_modes = 0;
  int n_top = 0, n_bot = 0, n_left = 0, n_right = 0;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a real falling edge for the asynchronous reset
  always #5 clk = ~clk;

  logic start = 1'b0;
  mode_e mode = MODE_ITERATE;
  logic [$clog2(W+1)-1:0] img_w = ($clog2(W+1))'(WS);
  logic [15:0] img_h = 16'(H);
  logic busy;
  logic cfg_we = 1'b0;
  logic [0:0] cfg_row = '0, cfg_col = '0;
  logic [0:0] cfg_p = '0, cfg_q = '0;
  logic [KW-1:0] cfg_k = '0, cfg_l = '0;
  logic signed [TW-1:0] cfg_data = '0;
  logic in_valid [COLS], in_ready [COLS], out_valid [COLS], out_ready [COLS];
  logic signed [SW-1:0] in_state [COLS][LAYERS], out_state [COLS][LAYERS];
  logic signed [CW-1:0] in_const [COLS][LAYERS], out_const [COLS][LAYERS];

  falcon_array #(
    .ROWS(ROWS), .COLS(COLS), .N(N), .LAYERS(LAYERS), .SW(SW), .SFRAC(SFRAC),
    .CW(CW), .CFRAC(CFRAC), .TW(TW), .TFRAC(TFRAC), .BPC(BPC), .ARITH(ARITH),
    .MULTS(MULTS), .W(W)
  ) dut (.*);

  longint x[], c[], ta[], tb[], tz[], xe[], ce[], xn[], cn[];
  int tfr[] = '{TFRAC};   // one layer
  int pass_cycles [COLS];

  function automatic longint rnd_signed(int bits);
    longint span = longint'(1) <<< bits;
    return longint'($urandom_range(32'(span - 1))) - (span >>> 1);
  endfunction

  function automatic int stripe_start(int j);
    return j * (WS - 2*HALO);
  endfunction

  task automatic load(int row, int col, longint t[]);
    for (int k = 0; k < K; k++)
      for (int l = 0; l < K; l++) begin
        @(negedge clk);
        cfg_we = 1'b1; cfg_row = 1'(row); cfg_col = 1'(col);
        cfg_p = '0; cfg_q = '0; cfg_k = KW'(k); cfg_l = KW'(l);
        cfg_data = TW'(t[k*K + l]);
      end
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  // one column: feed stripe j of (xi, ci), collect its output into (xn, cn)
  task automatic run_column(int j, bit stalls, longint xi[], longint ci[]);
    int idx = 0, oidx = 0, t0 = $time / 10;
    int s0 = stripe_start(j);
    fork
      begin
        while (idx < H*WS) begin
          @(posedge clk);
          if (in_valid[j] && in_ready[j]) idx++;
          if (idx < H*WS && (!stalls || $urandom_range(3) != 0)) begin
            in_valid[j] <= 1'b1;
            in_state[j][0] <= SW'(xi[(idx / WS)*WT + s0 + idx % WS]);
            in_const[j][0] <= CW'(ci[(idx / WS)*WT + s0 + idx % WS]);
          end else begin
            if (idx < H*WS && in_ready[j]) n_gap++;
            in_valid[j] <= 1'b0;
          end
        end
      end
      begin
        while (oidx < H*WS) begin
          @(posedge clk);
          if (out_valid[j] && out_ready[j]) begin
            int i = oidx / WS, jl = oidx % WS, g = s0 + oidx % WS;
            bit valid_col = (j == 0 || jl >= HALO) && (j == COLS-1 || jl < WS - HALO);
            if (valid_col) begin
              xn[i*WT + g] = out_state[j][0];
              cn[i*WT + g] = out_const[j][0];
            end else n_halo++;
            oidx++;
          end else if (out_valid[j] && !out_ready[j]) n_bp++;
          out_ready[j] <= !stalls || $urandom_range(3) != 0;
        end
        pass_cycles[j] = $time / 10 - t0;
      end
    join
  endtask

  task automatic run_pass(mode_e m, longint xi[], longint ci[]);
    @(negedge clk);
    mode = m; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    fork
      run_column(0, 1'b0, xi, ci);
      run_column(1, 1'b1, xi, ci);
    join
    @(negedge clk);
    for (int j = 0; j < COLS; j++) out_ready[j] = 1'b0;
    wait (!busy);
    n_modes++;
  endtask

  task automatic compare(string what);
    for (int i = 0; i < H; i++)
      for (int g = 0; g < WT; g++) begin
        checks += 2;
        if (xn[i*WT + g] != xe[i*WT + g] || cn[i*WT + g] != ce[i*WT + g]) begin
          failures++;
          if (failures < 10) $display("%s: cell (%0d,%0d) got %0d/%0d expected %0d/%0d",
                                      what, i, g, xn[i*WT+g], cn[i*WT+g], xe[i*WT+g], ce[i*WT+g]);
        end
        if (i == 0) n_top++;
        if (i == H-1) n_bot++;
        if (g == 0) n_left++;
        if (g == WT-1) n_right++;
      end
  endtask

  initial begin
    longint xt[], ct[];
    void'($urandom(SEED));
    checks = 0; failures = 0; finished = 1'b0; clocks = 0;
    for (int j = 0; j < COLS; j++) begin
      in_valid[j] = 1'b0; out_ready[j] = 1'b0;
      in_state[j][0] = '0; in_const[j][0] = '0;
    end
    x = new[H*WT]; c = new[H*WT]; xn = new[H*WT]; cn = new[H*WT];
    ta = new[K*K]; tb = new[K*K]; tz = new[K*K];
    for (int e = 0; e < K*K; e++) begin
      if (TKIND == 1) begin
        // h = 25/128, TFRAC = 7: A' = (1-h)*delta + h*A, B' = h*B
        ta[e] = (longint'(HA[e]) * 25 + 50) / 100 + ((e == 12) ? 128 - 25 : 0);
        tb[e] = (longint'(HB[e]) * 25 + 50) / 100;
      end else begin
        ta[e] = rnd_signed(TFRAC);
        tb[e] = rnd_signed(TFRAC - 1);
      end
      tz[e] = 0;
    end
    for (int e = 0; e < H*WT; e++) begin
      x[e] = rnd_signed(SFRAC + 1);
      c[e] = rnd_signed(CFRAC - 1);
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // input pass: top row computes g, bottom row forwards it
    for (int j = 0; j < COLS; j++) begin load(0, j, tb); load(1, j, tz); end
    void'(cnn_step(1, H, WT, N, SW, SFRAC, CW, CFRAC, tfr, 1'b1, x, c, tb, xe, ce));
    run_pass(MODE_INPUT, x, c);
    compare("input pass");
    c = ce;

    // iteration passes: ROWS Euler steps each
    for (int i = 0; i < ROWS; i++)
      for (int j = 0; j < COLS; j++) load(i, j, ta);
    for (int p = 0; p < PASSES; p++) begin
      xt = x; ct = c;
      for (int r = 0; r < ROWS; r++) begin
        n_sat += cnn_step(1, H, WT, N, SW, SFRAC, CW, CFRAC, tfr, 1'b0, xt, ct, ta, xe, ce);
        xt = xe; ct = ce;
      end
      run_pass(MODE_ITERATE, x, c);
      compare("iteration pass");
      clocks += pass_cycles[0];
      checks++;
      if (pass_cycles[0] < CPC*H*WS || pass_cycles[0] > CPC*(H + ROWS*N)*(WS + N) + 20*ROWS) begin
        failures++;
        $display("column 0 pass took %0d clocks", pass_cycles[0]);
      end
      x = xn; c = cn;
    end

    checks++;
    if (n_gap == 0 || n_bp == 0 || n_sat == 0 || n_halo == 0 || n_modes < 2 ||
        n_top == 0 || n_bot == 0 || n_left == 0 || n_right == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("%0d x %0d image on 2 x 2 cores: %0d Euler steps in %0d clocks (column 0), %0d clocks per pass",
             H, WT, ROWS*PASSES, clocks, pass_cycles[0]);
    $display("mechanisms: input_gaps=%0d backpressure=%0d saturations=%0d halo_cells=%0d passes=%0d boundary=%0d/%0d/%0d/%0d",
             n_gap, n_bp, n_sat, n_halo, n_modes, n_top, n_bot, n_left, n_right);
    finished = 1'b1;
  end
endmodule
