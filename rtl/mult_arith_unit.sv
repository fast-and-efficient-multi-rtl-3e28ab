// mult_arith_unit: the conventional (multiplier based) arithmetic unit of a
// Falcon core.
//
// For each output layer p it computes the same sum as da_arith_unit,
//     y_p = sum_q sum_k sum_l T[p][q][k][l] * x[q][k][l] + c_p,
// but with multipliers. Every single-layer template (p, q) has MULTS
// multipliers: (2N+1)^2 multipliers do the whole template in one clock, 2N+1
// (the default) do one template row per clock, one multiplier does one tap per
// clock. Any count from 1 to (2N+1)^2 may be used; the cell then takes
// S = ceil((2N+1)^2 / MULTS) clocks, and when MULTS does not divide (2N+1)^2
// some multipliers idle in the last clock (for example 3 multipliers on a 5x5
// template: 9 clocks, one multiplier used in the last). An adder tree adds the
// products of all input layers and an accumulator register collects them over
// the S clocks of a cell, taps taken in row-major order. The
// window is held in a small register copy meanwhile. Rounding, limiting and
// the two modes are those of da_arith_unit (see cnn_round_sat).
//
// Interface and timing: identical to da_arith_unit: valid/ready on both
// sides, a window is taken in a load clock, the next S clocks
// process it, and the result then waits on out_valid until out_ready (latency
// S+1 clocks, one cell per S clocks back to back). Templates are written
// through cfg_* and kept in registers. The three multiplier counts, the
// adder tree and the accumulator follow the document; the handshakes and the
// register copy of the window are this design's own.
module mult_arith_unit
  import falcon_pkg::*;
#(
  parameter int N      = 1,
  parameter int LAYERS = 1,
  parameter int SW     = 24,
  parameter int SFRAC  = 22,
  parameter int CW     = 24,
  parameter int CFRAC  = 20,
  parameter int TW     = 24,
  parameter int TFRAC  = 20,
  // template fraction bits for each output layer p (the templates A_pq, all q),
  // one 8-bit field per layer: layer p in TFRAC_L[8*p +: 8]
  parameter logic [8*LAYERS-1:0] TFRAC_L = {LAYERS{8'(TFRAC)}},
  parameter int MULTS  = 2*N+1,  // multipliers per single-layer template
  localparam int K     = 2*N+1,
  localparam int S     = (K*K + MULTS - 1) / MULTS,
  localparam int SCW   = (S > 1) ? $clog2(S) : 1,
  localparam int LW    = (LAYERS > 1) ? $clog2(LAYERS) : 1,
  localparam int KW    = $clog2(K),
  localparam int PW    = SW + TW,
  localparam int RW    = PW + $clog2(LAYERS*MULTS) + 1,
  localparam int ACCW  = PW + $clog2(LAYERS*K*K) + 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cfg_we,
  input  logic [LW-1:0]        cfg_p,
  input  logic [LW-1:0]        cfg_q,
  input  logic [KW-1:0]        cfg_k,
  input  logic [KW-1:0]        cfg_l,
  input  logic signed [TW-1:0] cfg_data,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  mode_e                in_mode,
  input  logic signed [SW-1:0] in_win   [K][K][LAYERS],
  input  logic signed [CW-1:0] in_const [LAYERS],
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic signed [SW-1:0] out_state [LAYERS],
  output logic signed [CW-1:0] out_const [LAYERS],
  output logic                 busy
);

  logic signed [TW-1:0]   tmpl   [LAYERS][LAYERS][K][K];
  logic signed [SW-1:0]   wq     [K][K][LAYERS];
  logic signed [CW-1:0]   cval   [LAYERS];
  logic signed [SW-1:0]   centre [LAYERS];
  mode_e                  mode_q;
  logic signed [ACCW-1:0] acc    [LAYERS];
  logic [SCW-1:0]         stp;

  if (MULTS < 1 || MULTS > K*K) begin : g_chk_mults
    $error("MULTS must be 1 .. (2N+1)^2");
  end

  logic fin, out_free, adv;
  assign fin      = busy && (int'(stp) == S-1);
  assign out_free = !out_valid || out_ready;
  assign adv      = busy && (!fin || out_free);
  assign in_ready = !busy || (fin && out_free);

  // MULTS multipliers per single-layer template, adder tree, accumulator
  logic [KW-1:0]          tk [MULTS];
  logic [KW-1:0]          tl [MULTS];
  logic                   tv [MULTS];   // multiplier m has a tap this clock
  logic signed [PW-1:0]   prod [LAYERS][LAYERS][MULTS];
  logic signed [RW-1:0]   rsum [LAYERS];
  logic signed [ACCW-1:0] acc_next [LAYERS];

  always_comb begin
    // tap handled by multiplier m in this clock, row-major order
    for (int m = 0; m < MULTS; m++) begin
      tv[m] = (int'(stp) * MULTS + m) < K*K;
      tk[m] = tv[m] ? KW'((int'(stp) * MULTS + m) / K) : '0;
      tl[m] = tv[m] ? KW'((int'(stp) * MULTS + m) % K) : '0;
    end
    for (int p = 0; p < LAYERS; p++) begin
      rsum[p] = '0;
      for (int q = 0; q < LAYERS; q++)
        for (int m = 0; m < MULTS; m++) begin
          prod[p][q][m] = tv[m] ? PW'(tmpl[p][q][tk[m]][tl[m]]) * PW'(wq[tk[m]][tl[m]][q]) : '0;
          rsum[p] = rsum[p] + RW'(prod[p][q][m]);
        end
      acc_next[p] = acc[p] + ACCW'(rsum[p]);
    end
  end

  logic signed [SW-1:0] res_s [LAYERS];
  logic signed [CW-1:0] res_c [LAYERS];

  for (genvar p = 0; p < LAYERS; p++) begin : g_rs
    localparam int TF_P = int'(TFRAC_L[8*p +: 8]);
    if (TF_P < 1 || TF_P + SFRAC < CFRAC) begin : g_chk_frac
      $error("need template fraction bits >= 1 and >= CFRAC - SFRAC");
    end
    cnn_round_sat #(.AW(ACCW), .SW(SW), .SFRAC(SFRAC), .CW(CW), .CFRAC(CFRAC), .TFRAC(TF_P)) u_rs (
      .acc (acc_next[p]), .c (cval[p]), .y_state (res_s[p]), .y_const (res_c[p])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < LAYERS; p++)
        for (int q = 0; q < LAYERS; q++)
          for (int k = 0; k < K; k++)
            for (int l = 0; l < K; l++) tmpl[p][q][k][l] <= '0;
    end else if (cfg_we) begin
      tmpl[cfg_p][cfg_q][cfg_k][cfg_l] <= cfg_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      stp       <= '0;
      out_valid <= 1'b0;
      mode_q    <= MODE_ITERATE;
      for (int p = 0; p < LAYERS; p++) begin
        acc[p]       <= '0;
        cval[p]      <= '0;
        centre[p]    <= '0;
        out_state[p] <= '0;
        out_const[p] <= '0;
      end
      for (int k = 0; k < K; k++)
        for (int l = 0; l < K; l++)
          for (int q = 0; q < LAYERS; q++) wq[k][l][q] <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (adv) begin
        for (int p = 0; p < LAYERS; p++) acc[p] <= acc_next[p];
        stp <= stp + 1'b1;
        if (fin) begin
          busy      <= 1'b0;
          stp       <= '0;
          out_valid <= 1'b1;
          for (int p = 0; p < LAYERS; p++) begin
            out_state[p] <= (mode_q == MODE_INPUT) ? centre[p] : res_s[p];
            out_const[p] <= (mode_q == MODE_INPUT) ? res_c[p]  : cval[p];
          end
        end
      end
      if (in_valid && in_ready) begin
        busy   <= 1'b1;
        stp    <= '0;
        mode_q <= in_mode;
        for (int p = 0; p < LAYERS; p++) begin
          acc[p]    <= '0;
          cval[p]   <= in_const[p];
          centre[p] <= in_win[N][N][p];
        end
        wq <= in_win;
      end
    end
  end

  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_state[0]) && $stable(out_const[0]));

endmodule
