// tb_core_run: reusable self-checking harness around one falcon_core.
//
// Builds a random image (or the halftoning example when TKIND = 1), writes
// the control template B' and runs one pass in MODE_INPUT to obtain g, then
// writes the feedback template A' and runs ITERS passes in MODE_ITERATE, each
// fed with the previous result. Every result cell is compared with
// falcon_ref_pkg::cnn_step. With STALLS set, the input stream has random gaps
// and the output random back-pressure; without, the clocks per pass are
// checked against the schedule (SW/BPC clocks for each of (H+N)*(Wd+N) steps
// plus a short pipeline latency). Mechanisms counted (a failure if one never
// happens): top/bottom/left/right boundary cells, results limited to +-1,
// input gaps, output back-pressure (only with STALLS), both modes.
// The instantiating testbench prints the TB_RESULT line.
module tb_core_run
  import falcon_pkg::*;
  import falcon_ref_pkg::*;
#(
  parameter int N      = 1,
  parameter int LAYERS = 1,
  parameter int SW     = 12,
  parameter int SFRAC  = 10,
  parameter int CW     = 12,
  parameter int CFRAC  = 8,
  parameter int TW     = 10,
  parameter int TFRAC  = 7,
  parameter logic [8*LAYERS-1:0] TFRAC_L = {LAYERS{8'(TFRAC)}},
  parameter int BPC    = 12,
  parameter arith_e ARITH = ARITH_DA,
  parameter int MULTS  = 2*N+1,
  parameter int W      = 16,
  parameter int HIMG   = 6,
  parameter int WIMG   = 11,
  parameter int ITERS  = 2,
  parameter bit STALLS = 1'b0,
  parameter int TKIND  = 0,
  parameter int SEED   = 1
) (
  output int checks,
  output int failures,
  output bit finished
);
  localparam int K    = 2*N + 1;
  localparam int CPC  = (ARITH == ARITH_MULT) ? (K*K + MULTS - 1) / MULTS : SW / BPC;
  localparam int LW   = (LAYERS > 1) ? $clog2(LAYERS) : 1;
  localparam int KW   = $clog2(K);
  localparam int NCELL = LAYERS * HIMG * WIMG;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a real falling edge for the asynchronous reset
  always #5 clk = ~clk;

  logic start = 1'b0;
  mode_e mode = MODE_ITERATE;
  logic busy;
  logic cfg_we = 1'b0;
  logic [LW-1:0] cfg_p = '0, cfg_q = '0;
  logic [KW-1:0] cfg_k = '0, cfg_l = '0;
  logic signed [TW-1:0] cfg_data = '0;
  logic in_valid = 1'b0, in_ready;
  logic signed [SW-1:0] in_state [LAYERS];
  logic signed [CW-1:0] in_const [LAYERS];
  logic out_valid, out_ready = 1'b0;
  logic signed [SW-1:0] out_state [LAYERS];
  logic signed [CW-1:0] out_const [LAYERS];

  falcon_core #(
    .N(N), .LAYERS(LAYERS), .SW(SW), .SFRAC(SFRAC), .CW(CW), .CFRAC(CFRAC),
    .TW(TW), .TFRAC(TFRAC), .TFRAC_L(TFRAC_L), .BPC(BPC), .ARITH(ARITH), .MULTS(MULTS), .W(W)
  ) dut (
    .clk, .rst_n, .start, .mode,
    .img_w ($bits(dut.img_w)'(WIMG)), .img_h (16'(HIMG)), .busy,
    .cfg_we, .cfg_p, .cfg_q, .cfg_k, .cfg_l, .cfg_data,
    .in_valid, .in_ready, .in_state, .in_const,
    .out_valid, .out_ready, .out_state, .out_const
  );

  longint x[], c[], ta[], tb[], xo[], co[], gx[], gc[];
  int tfr[];
  int n_sat = 0, n_gap = 0, n_bp = 0, n_top = 0, n_bot = 0, n_left = 0, n_right = 0;
  int n_modes = 0;

  function automatic longint rnd_signed(int bits);
    longint span = longint'(1) <<< bits;
    return longint'($urandom_range(32'(span - 1))) - (span >>> 1);
  endfunction

  task automatic load_template(input longint t[]);
    for (int p = 0; p < LAYERS; p++)
      for (int q = 0; q < LAYERS; q++)
        for (int k = 0; k < K; k++)
          for (int l = 0; l < K; l++) begin
            @(negedge clk);
            cfg_we = 1'b1; cfg_p = LW'(p); cfg_q = LW'(q); cfg_k = KW'(k); cfg_l = KW'(l);
            cfg_data = TW'(t[((p*LAYERS + q)*K + k)*K + l]);
          end
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  // streams x/c through the core in the given mode; returns clocks used
  task automatic run_pass(input mode_e m, input longint xi[], input longint ci[],
                          input longint xe[], input longint ce[], output int cycles);
    int idx = 0, oidx = 0, t0;
    @(negedge clk);
    mode = m; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    t0 = $time / 10;
    fork
      begin
        while (idx < HIMG*WIMG) begin
          @(posedge clk);
          if (in_valid && in_ready) idx++;
          if (idx < HIMG*WIMG && (!STALLS || $urandom_range(3) != 0)) begin
            in_valid <= 1'b1;
            for (int q = 0; q < LAYERS; q++) begin
              in_state[q] <= SW'(xi[q*HIMG*WIMG + idx]);
              in_const[q] <= CW'(ci[q*HIMG*WIMG + idx]);
            end
          end else begin
            if (idx < HIMG*WIMG && in_ready) n_gap++;
            in_valid <= 1'b0;
          end
        end
      end
      begin
        while (oidx < HIMG*WIMG) begin
          @(posedge clk);
          if (out_valid && out_ready) begin
            int i = oidx / WIMG, j = oidx % WIMG;
            for (int p = 0; p < LAYERS; p++) begin
              int o = (p*HIMG + i)*WIMG + j;
              checks += 2;
              if (longint'(out_state[p]) != xe[o]) begin
                failures++;
                if (failures < 10) $display("state mismatch layer %0d cell (%0d,%0d): got %0d expected %0d", p, i, j, out_state[p], xe[o]);
              end
              if (longint'(out_const[p]) != ce[o]) begin
                failures++;
                if (failures < 10) $display("const mismatch layer %0d cell (%0d,%0d): got %0d expected %0d", p, i, j, out_const[p], ce[o]);
              end
            end
            if (i == 0) n_top++;
            if (i == HIMG-1) n_bot++;
            if (j == 0) n_left++;
            if (j == WIMG-1) n_right++;
            oidx++;
          end else if (out_valid && !out_ready) n_bp++;
          out_ready <= !STALLS || $urandom_range(3) != 0;
        end
        cycles = $time / 10 - t0;
      end
    join
    @(negedge clk);
    out_ready = 1'b0;
    wait (!busy);
    n_modes++;
  endtask

  initial begin
    int cyc, lo, hi;
    void'($urandom(SEED));
    checks = 0; failures = 0; finished = 1'b0;
    for (int q = 0; q < LAYERS; q++) begin in_state[q] = '0; in_const[q] = '0; end
    x  = new[NCELL]; c = new[NCELL];
    tfr = new[LAYERS];
    for (int p = 0; p < LAYERS; p++) tfr[p] = int'(TFRAC_L[8*p +: 8]);
    ta = new[LAYERS*LAYERS*K*K]; tb = new[LAYERS*LAYERS*K*K];
    if (TKIND == 1) begin
      // h = 25/128, TFRAC = 7: A' = (1-h)*delta + h*A, B' = h*B
      for (int e = 0; e < 25; e++) begin
        ta[e] = (longint'(HA[e]) * 25 + 50) / 100;
        tb[e] = (longint'(HB[e]) * 25 + 50) / 100;
      end
      ta[12] += 128 - 25;
    end else begin
      for (int e = 0; e < LAYERS*LAYERS*K*K; e++) begin
        int tf = int'(TFRAC_L[8*(e / (LAYERS*K*K)) +: 8]);   // fraction bits of output layer p
        ta[e] = rnd_signed(tf);         // |A'| < 0.5
        tb[e] = rnd_signed(tf - 1);     // |B'| < 0.25
      end
    end
    for (int e = 0; e < NCELL; e++) begin
      x[e] = rnd_signed(SFRAC + 1);     // states in [-1, 1)
      c[e] = rnd_signed(CFRAC - 1);     // h*I in [-0.25, 0.25)
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // input pass: g = B'*u + h*I
    load_template(tb);
    void'(cnn_step(LAYERS, HIMG, WIMG, N, SW, SFRAC, CW, CFRAC, tfr, 1'b1, x, c, tb, gx, gc));
    run_pass(MODE_INPUT, x, c, gx, gc, cyc);

    // iterations: x(m+1) = A'*x(m) + g
    load_template(ta);
    lo = CPC * HIMG * WIMG;
    hi = CPC * (HIMG + N) * (WIMG + N) + 2*CPC + 6;
    for (int it = 0; it < ITERS; it++) begin
      n_sat += cnn_step(LAYERS, HIMG, WIMG, N, SW, SFRAC, CW, CFRAC, tfr, 1'b0, x, gc, ta, xo, co);
      run_pass(MODE_ITERATE, x, gc, xo, co, cyc);
      if (!STALLS) begin
        checks++;
        if (cyc < lo || cyc > hi) begin
          failures++;
          $display("pass took %0d clocks, expected %0d..%0d", cyc, lo, hi);
        end
      end
      x = xo;
    end
    $display("%0d x %0d x %0d layers: last pass %0d clocks, %0.2f clocks per cell",
             HIMG, WIMG, LAYERS, cyc, real'(cyc) / real'(HIMG * WIMG));

    checks += 6;
    if (n_top == 0 || n_bot == 0 || n_left == 0 || n_right == 0) begin failures++; $display("boundary cells missing"); end
    if (n_sat == 0) begin failures++; $display("no result was limited to +-1"); end
    if (n_modes < 2) begin failures++; $display("mode switch missing"); end
    if (STALLS && n_gap == 0) begin failures++; $display("no input gap"); end
    if (STALLS && n_bp == 0) begin failures++; $display("no back-pressure"); end
    if (failures == 0) checks++;
    $display("mechanisms: saturations=%0d input_gaps=%0d backpressure=%0d boundary(t/b/l/r)=%0d/%0d/%0d/%0d passes=%0d",
             n_sat, n_gap, n_bp, n_top, n_bot, n_left, n_right, n_modes);
    finished = 1'b1;
  end

endmodule
