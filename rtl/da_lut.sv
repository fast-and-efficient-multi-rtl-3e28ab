// da_lut: partial-product look-up tables of the distributed-arithmetic unit.
//
// Distributed arithmetic replaces the multiplications of a template operation
// by table look-ups: for one bit position b of the 2N+1 states of a template
// row, the sum of the template elements whose state has that bit set is
// pre-computed for every one of the 2^(2N+1) bit patterns. The coefficients
// are grouped one template row per table (3 inputs for a 3x3 template, which
// fits a 4-input FPGA LUT); an adder tree outside adds the rows.
//
// For a multi-layer core there is one table set per pair (p, q): output layer
// p, input layer q, row k. The table contents cannot change while the core is
// running; they are (re)built here whenever a template element is written:
// the element is stored, and the 2^K entries of its row are recomputed from
// the stored row with the new element in one clock.
//
// Interface and timing: cfg_we writes template element (p, q, k, l) = cfg_data
// (signed, TW bits); the stored template and lut are updated at the clock edge. lut[p][q][k][a]
// = sum over l with a[l] = 1 of template element (p, q, k, l); address bit l selects template
// column l. Both arrays reset to zero. The grouping by template row follows the
// document; the write-time rebuild is this design's own choice.
module da_lut #(
  parameter int N      = 1,
  parameter int LAYERS = 1,
  parameter int TW     = 24,
  localparam int K     = 2*N+1,
  localparam int NA    = 1 << K,
  localparam int LW    = (LAYERS > 1) ? $clog2(LAYERS) : 1,
  localparam int KW    = $clog2(K),
  localparam int PLW   = TW + $clog2(K) + 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  cfg_we,
  input  logic [LW-1:0]         cfg_p,
  input  logic [LW-1:0]         cfg_q,
  input  logic [KW-1:0]         cfg_k,
  input  logic [KW-1:0]         cfg_l,
  input  logic signed [TW-1:0]  cfg_data,
  output logic signed [PLW-1:0] lut  [LAYERS][LAYERS][K][NA]
);

  logic signed [TW-1:0]  tmpl [LAYERS][LAYERS][K][K];

  // the template row being written, with the new element substituted
  logic signed [TW-1:0]  new_row [K];
  logic signed [PLW-1:0] new_ent [NA];

  always_comb begin
    for (int l = 0; l < K; l++)
      new_row[l] = (l == int'(cfg_l)) ? cfg_data : tmpl[cfg_p][cfg_q][cfg_k][l];
    for (int a = 0; a < NA; a++) begin
      new_ent[a] = '0;
      for (int l = 0; l < K; l++)
        if (a[l]) new_ent[a] = new_ent[a] + PLW'(new_row[l]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < LAYERS; p++)
        for (int q = 0; q < LAYERS; q++)
          for (int k = 0; k < K; k++) begin
            for (int l = 0; l < K; l++)  tmpl[p][q][k][l] <= '0;
            for (int a = 0; a < NA; a++) lut[p][q][k][a]  <= '0;
          end
    end else if (cfg_we) begin
      tmpl[cfg_p][cfg_q][cfg_k][cfg_l] <= cfg_data;
      for (int a = 0; a < NA; a++) lut[cfg_p][cfg_q][cfg_k][a] <= new_ent[a];
    end
  end

endmodule
