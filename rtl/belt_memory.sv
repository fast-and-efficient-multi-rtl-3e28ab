// belt_memory: the on-chip belt of the cell array (memory unit).
//
// A core never holds the whole picture. To update the cells of one line it
// needs the 2N+1 lines around it, so the memory keeps a belt of L = 2N+1 state
// lines and N+1 constant lines, each W cells wide and LAYERS values deep. Lines
// are kept in circular slots; the controller tracks which slot holds which row
// and passes slot numbers in, so no modulo arithmetic is needed here.
// Storage = ((2N+1)*SW + (N+1)*CW) * W * LAYERS bits, as given for the belt.
//
// Interface and timing:
//   * one write per clock (wr_en): a state line cell and a constant line cell,
//     at (wr_slot, wr_col) and (cwr_slot, wr_col);
//   * one column read per clock: rd_slot[k] gives the slot that supplies
//     window row k at column rd_col; reads are asynchronous (distributed RAM);
//     a read of the cell being written in the same clock returns the new data
//     (write-first bypass), so the newest line can be used while it arrives;
//   * one constant read per clock at (crd_slot, crd_col), asynchronous.
// The slot scheme, the asynchronous reads and the bypass are this design's
// choices; the belt sizes follow the document.
module belt_memory #(
  parameter int N      = 1,    // neighbourhood radius
  parameter int LAYERS = 1,    // CNN layers held per cell
  parameter int SW     = 24,   // state width in bits
  parameter int CW     = 24,   // constant width in bits
  parameter int W      = 256,  // width of the cell array slice
  localparam int K     = 2*N+1,
  localparam int L     = 2*N+1,
  localparam int CL    = N+1,
  localparam int SLW   = (L  > 1) ? $clog2(L)  : 1,
  localparam int CSLW  = (CL > 1) ? $clog2(CL) : 1,
  localparam int COLW  = (W  > 1) ? $clog2(W)  : 1
) (
  input  logic                 clk,
  // write port
  input  logic                 wr_en,
  input  logic [SLW-1:0]       wr_slot,
  input  logic [CSLW-1:0]      cwr_slot,
  input  logic [COLW-1:0]      wr_col,
  input  logic signed [SW-1:0] wr_state [LAYERS],
  input  logic signed [CW-1:0] wr_const [LAYERS],
  // state column read port
  input  logic [SLW-1:0]       rd_slot  [K],
  input  logic [COLW-1:0]      rd_col,
  output logic signed [SW-1:0] rd_state [K][LAYERS],
  // constant read port
  input  logic [CSLW-1:0]      crd_slot,
  input  logic [COLW-1:0]      crd_col,
  output logic signed [CW-1:0] rd_const [LAYERS]
);

  logic signed [SW-1:0] smem [L][W][LAYERS];
  logic signed [CW-1:0] cmem [CL][W][LAYERS];

  always_ff @(posedge clk) begin
    if (wr_en) begin
      for (int q = 0; q < LAYERS; q++) begin
        smem[wr_slot][wr_col][q]  <= wr_state[q];
        cmem[cwr_slot][wr_col][q] <= wr_const[q];
      end
    end
  end

  always_comb begin
    for (int k = 0; k < K; k++) begin
      for (int q = 0; q < LAYERS; q++) begin
        if (wr_en && rd_slot[k] == wr_slot && rd_col == wr_col)
          rd_state[k][q] = wr_state[q];
        else
          rd_state[k][q] = smem[rd_slot[k]][rd_col][q];
      end
    end
    for (int q = 0; q < LAYERS; q++)
      rd_const[q] = cmem[crd_slot][crd_col][q];
  end

endmodule
