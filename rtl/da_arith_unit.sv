// da_arith_unit: the arithmetic unit of a Falcon core, built as a
// two-dimensional distributed-arithmetic (DA) FIR filter.
//
// For each output layer p it computes
//     y_p = sum_q sum_k sum_l T[p][q][k][l] * x[q][k][l] + c_p
// over a (2N+1) x (2N+1) window of every layer, without multipliers. The window
// is loaded in parallel into shift registers (the parallel-to-serial
// converters) and consumed BPC bit planes per clock, least significant first.
// For every bit plane, each template row's bits address its partial-product
// LUT (da_lut); an adder tree adds the rows of all input layers; the plane of
// the two's-complement sign bit is subtracted instead of added. A scaling
// accumulator shifts its content right by BPC bits per clock and adds the new
// partial products at the top, so after SW/BPC clocks it holds the exact sum
// (nothing is rounded until the end). BPC = SW gives the fully parallel filter
// (one cell per clock), BPC = 1 the bit-serial one; any divisor of SW may be
// used, which is the speed/area trade-off of the design.
//
// Number formats (two's complement): state SW bits with SFRAC fraction bits,
// constant CW/CFRAC, template TW/TFRAC_L[p] (the radix point of the templates
// can be placed separately for each output layer p). The exact sum is rounded to nearest
// once. In MODE_ITERATE the new state is rounded to the state format and
// limited to [-1, +1] (full-range model) and the constant is passed on; in
// MODE_INPUT the sum (g = B'*u + h*I) is rounded and saturated to the constant
// format and the centre input cell is passed on as the state.
//
// Interface and timing: valid/ready handshakes on both sides. A window is
// taken when in_valid && in_ready (the load clock), the next SW/BPC clocks
// consume its bit planes, and the result is on out_valid after the last of
// them (latency SW/BPC + 1 clocks); it is held until out_ready. A new window is accepted in the
// clock that finishes the previous one, so the unit sustains one cell per
// SW/BPC clocks. Templates are written through the cfg_* port (see da_lut)
// and must not change while the unit is busy.
module da_arith_unit
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
  parameter int BPC    = 24,   // bit planes per clock; SW/BPC clocks per cell
  localparam int K     = 2*N+1,
  localparam int NA    = 1 << K,
  localparam int LW    = (LAYERS > 1) ? $clog2(LAYERS) : 1,
  localparam int KW    = $clog2(K),
  localparam int CPC   = SW / BPC,
  localparam int CNTW  = (CPC > 1) ? $clog2(CPC) : 1,
  localparam int PLW   = TW + $clog2(K) + 1,
  localparam int PPW   = PLW + $clog2(LAYERS*K) + 1,
  localparam int GW    = PPW + BPC + 1,
  localparam int ACCW  = PPW + SW + 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // template configuration
  input  logic                 cfg_we,
  input  logic [LW-1:0]        cfg_p,
  input  logic [LW-1:0]        cfg_q,
  input  logic [KW-1:0]        cfg_k,
  input  logic [KW-1:0]        cfg_l,
  input  logic signed [TW-1:0] cfg_data,
  // window in
  input  logic                 in_valid,
  output logic                 in_ready,
  input  mode_e                in_mode,
  input  logic signed [SW-1:0] in_win   [K][K][LAYERS],
  input  logic signed [CW-1:0] in_const [LAYERS],
  // result out
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic signed [SW-1:0] out_state [LAYERS],
  output logic signed [CW-1:0] out_const [LAYERS],
  output logic                 busy
);

  if (SW % BPC != 0) begin : g_chk_bpc
    $error("BPC must divide SW");
  end
  if (SFRAC > SW - 2) begin : g_chk_one
    $error("state format must hold +1");
  end

  logic signed [PLW-1:0] lut  [LAYERS][LAYERS][K][NA];

  da_lut #(.N(N), .LAYERS(LAYERS), .TW(TW)) u_lut (
    .clk, .rst_n, .cfg_we, .cfg_p, .cfg_q, .cfg_k, .cfg_l, .cfg_data,
    .lut
  );

  // parallel-to-serial converters / bit shift registers
  logic signed [SW-1:0]   shreg  [K][K][LAYERS];
  logic signed [CW-1:0]   cval   [LAYERS];
  logic signed [SW-1:0]   centre [LAYERS];
  mode_e                  mode_q;
  logic signed [ACCW-1:0] acc    [LAYERS];
  logic [CNTW-1:0]        cnt;

  logic fin, out_free, adv;
  assign fin      = busy && (int'(cnt) == CPC-1);
  assign out_free = !out_valid || out_ready;
  assign adv      = busy && (!fin || out_free);
  assign in_ready = !busy || (fin && out_free);

  // partial products, adder tree, add/subtract and scaling accumulator input
  logic [K-1:0]           addr [BPC][LAYERS][K];
  logic signed [PPW-1:0]  pp   [BPC][LAYERS];
  logic signed [GW-1:0]   gsum [LAYERS];
  logic signed [ACCW-1:0] acc_next [LAYERS];

  always_comb begin
    for (int j = 0; j < BPC; j++)
      for (int q = 0; q < LAYERS; q++)
        for (int k = 0; k < K; k++)
          for (int l = 0; l < K; l++)
            addr[j][q][k][l] = shreg[k][l][q][j];
    for (int p = 0; p < LAYERS; p++) begin
      gsum[p] = '0;
      for (int j = 0; j < BPC; j++) begin
        pp[j][p] = '0;
        for (int q = 0; q < LAYERS; q++)
          for (int k = 0; k < K; k++)
            pp[j][p] = pp[j][p] + PPW'(lut[p][q][k][addr[j][q][k]]);
        // the last plane of the last clock carries the sign bit: subtract it
        if (j == BPC-1 && int'(cnt) == CPC-1)
          gsum[p] = gsum[p] - (GW'(pp[j][p]) <<< j);
        else
          gsum[p] = gsum[p] + (GW'(pp[j][p]) <<< j);
      end
      acc_next[p] = (acc[p] >>> BPC) + (ACCW'(gsum[p]) <<< (SW - BPC));
    end
  end

  // final rounding, saturation and output selection
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
      busy      <= 1'b0;
      cnt       <= '0;
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
          for (int q = 0; q < LAYERS; q++) shreg[k][l][q] <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (adv) begin
        for (int p = 0; p < LAYERS; p++) acc[p] <= acc_next[p];
        for (int k = 0; k < K; k++)
          for (int l = 0; l < K; l++)
            for (int q = 0; q < LAYERS; q++) shreg[k][l][q] <= shreg[k][l][q] >>> BPC;
        cnt <= cnt + 1'b1;
        if (fin) begin
          busy      <= 1'b0;
          cnt       <= '0;
          out_valid <= 1'b1;
          for (int p = 0; p < LAYERS; p++) begin
            out_state[p] <= (mode_q == MODE_INPUT) ? centre[p] : res_s[p];
            out_const[p] <= (mode_q == MODE_INPUT) ? res_c[p]  : cval[p];
          end
        end
      end
      if (in_valid && in_ready) begin
        busy   <= 1'b1;
        cnt    <= '0;
        mode_q <= in_mode;
        for (int p = 0; p < LAYERS; p++) begin
          acc[p]    <= '0;
          cval[p]   <= in_const[p];
          centre[p] <= in_win[N][N][p];
        end
        for (int k = 0; k < K; k++)
          for (int l = 0; l < K; l++)
            for (int q = 0; q < LAYERS; q++) shreg[k][l][q] <= in_win[k][l][q];
      end
    end
  end

  // a result is held until it is taken
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_state[0]) && $stable(out_const[0]));

endmodule
