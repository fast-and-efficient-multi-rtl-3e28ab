// tb_au_run: reusable self-checking harness for one arithmetic unit
// (da_arith_unit when ARITH = ARITH_DA, else mult_arith_unit), 2 layers, 3x3
// templates, 8-bit states. Random windows, constants and templates; results
// are compared with a direct multiply-accumulate model in both modes. In the
// first phase the output is always taken and the latency (clocks per cell + 1)
// and the back-to-back rate are checked; in the second phase the output has
// random back-pressure. The instantiating testbench prints TB_RESULT.
module tb_au_run
  import falcon_pkg::*;
#(
  parameter arith_e ARITH = ARITH_DA,
  parameter int BPC   = 2,   // DA: bit planes per clock
  parameter int MULTS = 3,   // multiplier unit: multipliers per template
  parameter int SEED  = 1
) (
  output int checks,
  output int failures,
  output bit finished
);
  localparam int N = 1, LAYERS = 2, SW = 8, SFRAC = 6, CW = 8, CFRAC = 5;
  localparam int TW = 6, TFRAC = 4, K = 2*N+1;
  localparam int CPC = (ARITH == ARITH_DA) ? SW / BPC : (K*K + MULTS - 1) / MULTS;
  localparam int CSH = TFRAC + SFRAC - CFRAC;
  int n_sat = 0, n_bp = 0, n_b2b = 0;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a real falling edge for the asynchronous reset
  always #5 clk = ~clk;
  logic cfg_we = 1'b0;
  logic [0:0] cfg_p = '0, cfg_q = '0;
  logic [1:0] cfg_k = '0, cfg_l = '0;
  logic signed [TW-1:0] cfg_data = '0;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b1, busy;
  mode_e in_mode = MODE_ITERATE;
  logic signed [SW-1:0] in_win [K][K][LAYERS];
  logic signed [CW-1:0] in_const [LAYERS];
  logic signed [SW-1:0] out_state [LAYERS];
  logic signed [CW-1:0] out_const [LAYERS];

  if (ARITH == ARITH_DA) begin : g_da
    da_arith_unit #(.N(N), .LAYERS(LAYERS), .SW(SW), .SFRAC(SFRAC), .CW(CW), .CFRAC(CFRAC),
                    .TW(TW), .TFRAC(TFRAC), .BPC(BPC)) dut (.*);
  end else begin : g_mult
    mult_arith_unit #(.N(N), .LAYERS(LAYERS), .SW(SW), .SFRAC(SFRAC), .CW(CW), .CFRAC(CFRAC),
                      .TW(TW), .TFRAC(TFRAC), .MULTS(MULTS)) dut (.*);
  end

  int t [LAYERS][LAYERS][K][K];
  longint exp_s [$], exp_c [$];
  int acc_time [$];
  int cyc = 0;
  bit phase2 = 1'b0, sent = 1'b0;
  int last_out = -100;
  always @(posedge clk) cyc++;

  function automatic longint rnd_shift(longint v, int s);
    return (s == 0) ? v : (v + (longint'(1) <<< (s-1))) >>> s;
  endfunction

  // expected results of the window currently on the inputs
  task automatic push_expected();
    for (int p = 0; p < LAYERS; p++) begin
      longint full = longint'(in_const[p]) <<< CSH;
      longint smax = longint'(1) <<< SFRAC, cmax = (longint'(1) <<< (CW-1)) - 1;
      longint vs, vc;
      for (int q = 0; q < LAYERS; q++) for (int k = 0; k < K; k++) for (int l = 0; l < K; l++)
        full += longint'(t[p][q][k][l]) * longint'(in_win[k][l][q]);
      vs = rnd_shift(full, TFRAC);
      vc = rnd_shift(full, CSH);
      if (in_mode == MODE_ITERATE) begin
        if (vs > smax || vs < -smax) n_sat++;
        exp_s.push_back((vs > smax) ? smax : (vs < -smax) ? -smax : vs);
        exp_c.push_back(in_const[p]);
      end else begin
        exp_s.push_back(in_win[N][N][p]);
        exp_c.push_back((vc > cmax) ? cmax : (vc < -cmax-1) ? -cmax-1 : vc);
      end
    end
  endtask

  always @(posedge clk) begin
    if (in_valid && in_ready) begin
      push_expected();
      acc_time.push_back(cyc);
    end
    if (out_valid && !out_ready) n_bp++;
    if (out_valid && out_ready) begin
      automatic int ta = acc_time.pop_front();
      if (!phase2) begin
        checks++;
        if (cyc - ta != CPC + 1) begin failures++; $display("latency %0d, expected %0d", cyc - ta, CPC + 1); end
        if (cyc - last_out == CPC) n_b2b++;
      end
      last_out = cyc;
      for (int p = 0; p < LAYERS; p++) begin
        automatic longint es = exp_s.pop_front();
        automatic longint ec = exp_c.pop_front();
        checks += 2;
        if (longint'(out_state[p]) != es || longint'(out_const[p]) != ec) begin
          failures++;
          if (failures < 8) $display("layer %0d: got %0d/%0d expected %0d/%0d", p, out_state[p], out_const[p], es, ec);
        end
      end
    end
  end

  task automatic load_random_template(int range_bits);
    for (int p = 0; p < LAYERS; p++) for (int q = 0; q < LAYERS; q++)
      for (int k = 0; k < K; k++) for (int l = 0; l < K; l++) begin
        @(negedge clk);
        cfg_we = 1'b1; cfg_p = 1'(p); cfg_q = 1'(q); cfg_k = 2'(k); cfg_l = 2'(l);
        cfg_data = TW'(int'($urandom_range((1 << range_bits) - 1)) - (1 << (range_bits - 1)));
        t[p][q][k][l] = int'(cfg_data);
      end
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  task automatic send(int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_mode = mode_e'($urandom_range(3) == 0);
      for (int k = 0; k < K; k++) for (int l = 0; l < K; l++) for (int q = 0; q < LAYERS; q++)
        in_win[k][l][q] = SW'($urandom);
      for (int p = 0; p < LAYERS; p++) in_const[p] = CW'($urandom);
      if (i == 0) in_win[0][0][0] = -(SW'(1) <<< (SW-1));   // most negative state
      while (!in_ready) @(negedge clk);
      if (phase2) begin
        @(negedge clk);
        in_valid = 1'b0;
        repeat ($urandom_range(2)) @(negedge clk);
      end else begin
        @(posedge clk);
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    checks = 0; failures = 0; finished = 1'b0;
    void'($urandom(SEED));
    for (int q = 0; q < LAYERS; q++) in_const[q] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    load_random_template(TW);
    send(60);
    repeat (3*CPC) @(negedge clk);
    phase2 = 1'b1;
    fork
      begin send(80); sent = 1'b1; end
      while (!sent) begin @(negedge clk); out_ready = 1'($urandom); end
    join
    out_ready = 1'b1;
    repeat (3*CPC) @(negedge clk);
    checks += 3;
    if (exp_s.size() != 0) begin failures++; $display("%0d results missing", exp_s.size()); end
    if (n_sat == 0 || n_bp == 0) begin failures++; $display("saturation %0d back-pressure %0d", n_sat, n_bp); end
    if (n_b2b < 50) begin failures++; $display("only %0d back-to-back results", n_b2b); end
    finished = 1'b1;
  end
endmodule
