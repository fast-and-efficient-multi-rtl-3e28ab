// falcon_core: one Falcon (single-layer) or Falcon-ML (LAYERS-layer)
// processor core. It computes one forward-Euler iteration of a CNN,
//     x_p(m+1)[i][j] = sum_q sum_k sum_l A'[p][q][k][l] * x_q(m)[i+k-N][j+l-N] + g_p[i][j],
// over an image of img_h rows and img_w (<= W) columns that streams through it
// in raster order, one cell (all layers: a state and a constant each) per
// update. Cells outside the array take the value of the nearest edge cell
// (zero-flux boundary).
//
// Datapath: belt_memory keeps the last 2N+1 state lines and N+1 constant lines,
// so every cell is read from outside once per iteration; the mixer holds the
// (2N+1)x(2N+1) window; the arithmetic unit evaluates the template on it:
// da_arith_unit by default, mult_arith_unit with MULTS multipliers per
// template when ARITH = ARITH_MULT. The controller walks a grid of (img_h+N) x (img_w+N) steps:
// step (r, c) stores input cell (r, c) when it exists, moves column c (clamped
// to the last column) of rows r-2N..r (clamped to the image) into the mixer,
// and, when r >= N and c >= N, hands the window of output cell (r-N, c-N) and
// its constant to the arithmetic unit. In the first column of a line the mixer
// is filled with the column to realise the left boundary; the clamped row
// slots realise the top and bottom boundaries.
//
// Interface and timing: start (while busy is low) latches img_w, img_h and
// mode; cells are then taken on in_valid && in_ready and results leave on
// out_valid && out_ready, each in raster order, with the constant of the cell
// travelling with it (in MODE_INPUT the constant output carries the computed
// g instead, see da_arith_unit). Throughput is one cell per SW/BPC clocks
// (DA) or per ceil((2N+1)^2/MULTS) clocks (multipliers);
// the first result leaves after about N lines plus N cells of input. Templates
// are written through cfg_* while the core is idle. The belt sizes, the window
// and the arithmetic follow the document; the step schedule, the handshakes
// and the mode port are this design's own.
module falcon_core
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
  parameter int BPC    = 24,   // bit planes per clock of the DA unit
  parameter arith_e ARITH = ARITH_DA,
  parameter int MULTS  = 2*N+1,  // multipliers per template of the multiplier unit
  parameter int W      = 256,
  parameter int HW     = 16,   // width of the row counter (image height)
  localparam int K     = 2*N+1,
  localparam int L     = 2*N+1,
  localparam int CL    = N+1,
  localparam int SLW   = (L  > 1) ? $clog2(L)  : 1,
  localparam int CSLW  = (CL > 1) ? $clog2(CL) : 1,
  localparam int COLW  = (W  > 1) ? $clog2(W)  : 1,
  localparam int IWW   = $clog2(W+1),
  localparam int LW    = (LAYERS > 1) ? $clog2(LAYERS) : 1,
  localparam int KW    = $clog2(K)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // frame control
  input  logic                 start,
  input  mode_e                mode,
  input  logic [IWW-1:0]       img_w,
  input  logic [HW-1:0]        img_h,
  output logic                 busy,
  // template configuration
  input  logic                 cfg_we,
  input  logic [LW-1:0]        cfg_p,
  input  logic [LW-1:0]        cfg_q,
  input  logic [KW-1:0]        cfg_k,
  input  logic [KW-1:0]        cfg_l,
  input  logic signed [TW-1:0] cfg_data,
  // cell stream in
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [SW-1:0] in_state [LAYERS],
  input  logic signed [CW-1:0] in_const [LAYERS],
  // cell stream out
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic signed [SW-1:0] out_state [LAYERS],
  output logic signed [CW-1:0] out_const [LAYERS]
);

  // ---------------------------------------------------------------- control
  logic            run;
  mode_e           mode_q;
  logic [IWW-1:0]  wi;
  logic [HW-1:0]   hi;
  logic [HW:0]     r;
  logic [IWW:0]    c;
  logic [SLW-1:0]  wslot, hslot;
  logic [CSLW-1:0] cslot;
  logic            win_pending;
  logic            da_in_ready, da_busy;

  logic need_in, emits, slot_free, step;
  assign need_in   = (r < (HW+1)'(hi)) && (c < (IWW+1)'(wi));
  assign emits     = (r >= (HW+1)'(N)) && (c >= (IWW+1)'(N));
  assign slot_free = !win_pending || da_in_ready;
  assign step      = run && (!need_in || in_valid) && slot_free;
  assign in_ready  = run && need_in && slot_free;

  logic last_col, last_row;
  assign last_col = (c == (IWW+1)'(wi) + (IWW+1)'(N) - 1'b1);
  assign last_row = (r == (HW+1)'(hi) + (HW+1)'(N) - 1'b1);

  // ---------------------------------------------------------------- belt
  logic [SLW-1:0]       rd_slot [K];
  logic [COLW-1:0]      rd_col, crd_col;
  logic [CSLW-1:0]      crd_slot;
  logic signed [SW-1:0] col_data [K][LAYERS];
  logic signed [CW-1:0] rd_const [LAYERS];

  always_comb begin
    rd_col   = (c < (IWW+1)'(wi)) ? COLW'(c) : COLW'(wi - 1'b1);
    crd_col  = COLW'(c - (IWW+1)'(N));
    crd_slot = (int'(cslot) == CL-1) ? '0 : cslot + 1'b1;
    for (int k = 0; k < K; k++) begin
      // window row k holds image row r - d, d = 2N - k, clamped to the image
      automatic int d = 2*N - k;
      if (r < (HW+1)'(d))
        rd_slot[k] = '0;                      // above the image: row 0
      else if (r - (HW+1)'(d) > (HW+1)'(hi) - 1'b1)
        rd_slot[k] = hslot;                   // below the image: last row
      else if (int'(wslot) >= d)
        rd_slot[k] = SLW'(int'(wslot) - d);
      else
        rd_slot[k] = SLW'(int'(wslot) + L - d);
    end
  end

  belt_memory #(.N(N), .LAYERS(LAYERS), .SW(SW), .CW(CW), .W(W)) u_belt (
    .clk,
    .wr_en    (step && need_in),
    .wr_slot  (wslot),
    .cwr_slot (cslot),
    .wr_col   (COLW'(c)),
    .wr_state (in_state),
    .wr_const (in_const),
    .rd_slot,
    .rd_col,
    .rd_state (col_data),
    .crd_slot,
    .crd_col,
    .rd_const
  );

  // ---------------------------------------------------------------- mixer
  logic signed [SW-1:0] win [K][K][LAYERS];
  logic signed [CW-1:0] cq  [LAYERS];

  mixer #(.N(N), .LAYERS(LAYERS), .SW(SW)) u_mixer (
    .clk,
    .shift_en (step),
    .fill     (step && c == '0),
    .col_in   (col_data),
    .win
  );

  // ---------------------------------------------------------------- arithmetic
  logic da_out_valid;

  if (ARITH == ARITH_DA) begin : g_da
    da_arith_unit #(
      .N(N), .LAYERS(LAYERS), .SW(SW), .SFRAC(SFRAC), .CW(CW), .CFRAC(CFRAC),
      .TW(TW), .TFRAC(TFRAC), .TFRAC_L(TFRAC_L), .BPC(BPC)
    ) u_au (
      .clk, .rst_n,
      .cfg_we, .cfg_p, .cfg_q, .cfg_k, .cfg_l, .cfg_data,
      .in_valid  (win_pending),
      .in_ready  (da_in_ready),
      .in_mode   (mode_q),
      .in_win    (win),
      .in_const  (cq),
      .out_valid (da_out_valid),
      .out_ready,
      .out_state,
      .out_const,
      .busy      (da_busy)
    );
  end else begin : g_mult
    mult_arith_unit #(
      .N(N), .LAYERS(LAYERS), .SW(SW), .SFRAC(SFRAC), .CW(CW), .CFRAC(CFRAC),
      .TW(TW), .TFRAC(TFRAC), .TFRAC_L(TFRAC_L), .MULTS(MULTS)
    ) u_au (
      .clk, .rst_n,
      .cfg_we, .cfg_p, .cfg_q, .cfg_k, .cfg_l, .cfg_data,
      .in_valid  (win_pending),
      .in_ready  (da_in_ready),
      .in_mode   (mode_q),
      .in_win    (win),
      .in_const  (cq),
      .out_valid (da_out_valid),
      .out_ready,
      .out_state,
      .out_const,
      .busy      (da_busy)
    );
  end
  assign out_valid = da_out_valid;
  assign busy      = run || win_pending || da_busy || da_out_valid;

  // ---------------------------------------------------------------- sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run         <= 1'b0;
      mode_q      <= MODE_ITERATE;
      wi          <= '0;
      hi          <= '0;
      r           <= '0;
      c           <= '0;
      wslot       <= '0;
      hslot       <= '0;
      cslot       <= '0;
      win_pending <= 1'b0;
      for (int p = 0; p < LAYERS; p++) cq[p] <= '0;
    end else begin
      if (win_pending && da_in_ready) win_pending <= 1'b0;
      if (!busy && start) begin
        run    <= 1'b1;
        mode_q <= mode;
        wi     <= img_w;
        hi     <= img_h;
        r      <= '0;
        c      <= '0;
        wslot  <= '0;
        cslot  <= '0;
      end else if (step) begin
        win_pending <= emits;
        if (emits) cq <= rd_const;
        if (r == (HW+1)'(hi) - 1'b1) hslot <= wslot;
        if (last_col) begin
          c     <= '0;
          r     <= r + 1'b1;
          wslot <= (int'(wslot) == L-1)  ? '0 : wslot + 1'b1;
          cslot <= (int'(cslot) == CL-1) ? '0 : cslot + 1'b1;
          if (last_row) run <= 1'b0;
        end else begin
          c <= c + 1'b1;
        end
      end
    end
  end

  // an input cell is only taken while the core is running
  a_in_run: assert property (@(posedge clk) disable iff (!rst_n) in_ready |-> run);

endmodule
