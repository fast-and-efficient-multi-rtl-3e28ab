// falcon_array: a ROWS x COLS grid of Falcon processor cores.
//
// The image is cut into vertical stripes, one per processor column; every
// column is a chain of ROWS cores. The cells of a stripe enter the top core,
// which computes one Euler iteration and streams its results straight into
// the core below, which computes the next iteration, and so on: one pass of
// the stripe through a column performs ROWS iterations, and adding columns
// adds input bandwidth. Each core also forwards the constant (g) of every
// cell, so the stream that leaves the bottom core can be fed to the top again
// for the next ROWS iterations.
//
// Stripes do not exchange data: each column applies the zero-flux boundary at
// its own stripe edges. A stripe that is part of a wider image must therefore
// be sent with ROWS*N extra columns of its neighbours on each side that hold
// the neighbours' values, and those extra columns of the result are dropped;
// this overlap scheme is this design's own choice, the document leaves open
// how stripes meet.
//
// Interface and timing: start, mode, img_w (stripe width, <= W) and img_h are
// shared by all cores. Templates are written per core through cfg_* with
// cfg_row/cfg_col selecting the core (each core has its own templates, so a
// pass may use different templates per row, e.g. B' in the top row and zeros
// below to compute g in MODE_INPUT). Each column has its own valid/ready input
// and output stream. Rate: one cell per SW/BPC clocks per column.
module falcon_array
  import falcon_pkg::*;
#(
  parameter int ROWS   = 2,
  parameter int COLS   = 2,
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
  parameter int BPC    = 24,
  parameter arith_e ARITH = ARITH_DA,
  parameter int MULTS  = 2*N+1,  // multipliers per template of the multiplier unit
  parameter int W      = 256,
  parameter int HW     = 16,
  localparam int K     = 2*N+1,
  localparam int IWW   = $clog2(W+1),
  localparam int LW    = (LAYERS > 1) ? $clog2(LAYERS) : 1,
  localparam int KW    = $clog2(K),
  localparam int RW    = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int CLW   = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  mode_e                mode,
  input  logic [IWW-1:0]       img_w,
  input  logic [HW-1:0]        img_h,
  output logic                 busy,
  input  logic                 cfg_we,
  input  logic [RW-1:0]        cfg_row,
  input  logic [CLW-1:0]       cfg_col,
  input  logic [LW-1:0]        cfg_p,
  input  logic [LW-1:0]        cfg_q,
  input  logic [KW-1:0]        cfg_k,
  input  logic [KW-1:0]        cfg_l,
  input  logic signed [TW-1:0] cfg_data,
  input  logic                 in_valid  [COLS],
  output logic                 in_ready  [COLS],
  input  logic signed [SW-1:0] in_state  [COLS][LAYERS],
  input  logic signed [CW-1:0] in_const  [COLS][LAYERS],
  output logic                 out_valid [COLS],
  input  logic                 out_ready [COLS],
  output logic signed [SW-1:0] out_state [COLS][LAYERS],
  output logic signed [CW-1:0] out_const [COLS][LAYERS]
);

  logic c_busy [ROWS][COLS];

  for (genvar j = 0; j < COLS; j++) begin : g_col
    for (genvar i = 0; i < ROWS; i++) begin : g_row
      // input side of core (i, j): the array input for row 0, else the core above
      logic                 u_valid;
      logic                 u_ready;
      logic signed [SW-1:0] u_state [LAYERS];
      logic signed [CW-1:0] u_const [LAYERS];
      // output side of core (i, j)
      logic                 d_valid;
      logic                 d_ready;
      logic signed [SW-1:0] d_state [LAYERS];
      logic signed [CW-1:0] d_const [LAYERS];

      if (i == 0) begin : g_first
        assign u_valid     = in_valid[j];
        assign in_ready[j] = u_ready;
        assign u_state     = in_state[j];
        assign u_const     = in_const[j];
      end else begin : g_chain
        assign u_valid                 = g_row[i-1].d_valid;
        assign g_row[i-1].d_ready      = u_ready;
        assign u_state                 = g_row[i-1].d_state;
        assign u_const                 = g_row[i-1].d_const;
      end
      if (i == ROWS-1) begin : g_last
        assign out_valid[j] = d_valid;
        assign d_ready      = out_ready[j];
        assign out_state[j] = d_state;
        assign out_const[j] = d_const;
      end

      falcon_core #(
        .N(N), .LAYERS(LAYERS), .SW(SW), .SFRAC(SFRAC), .CW(CW), .CFRAC(CFRAC),
        .TW(TW), .TFRAC(TFRAC), .TFRAC_L(TFRAC_L), .BPC(BPC), .ARITH(ARITH), .MULTS(MULTS), .W(W), .HW(HW)
      ) u_core (
        .clk, .rst_n, .start, .mode, .img_w, .img_h,
        .busy      (c_busy[i][j]),
        .cfg_we    (cfg_we && int'(cfg_row) == i && int'(cfg_col) == j),
        .cfg_p, .cfg_q, .cfg_k, .cfg_l, .cfg_data,
        .in_valid  (u_valid),
        .in_ready  (u_ready),
        .in_state  (u_state),
        .in_const  (u_const),
        .out_valid (d_valid),
        .out_ready (d_ready),
        .out_state (d_state),
        .out_const (d_const)
      );
    end
  end

  always_comb begin
    busy = 1'b0;
    for (int i = 0; i < ROWS; i++)
      for (int j = 0; j < COLS; j++) busy |= c_busy[i][j];
  end

endmodule
