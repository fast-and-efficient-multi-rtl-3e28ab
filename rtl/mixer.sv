// mixer: holds the (2N+1) x (2N+1) window of the belt that the arithmetic
// unit works on (the vertical stripe of the belt around the cell being
// updated).
//
// Each shift clock one new column of 2N+1 values (one per belt line, every
// layer) enters at the right-hand edge and the oldest column leaves at the
// left. A fill clock writes the incoming column into every position instead;
// at the start of a line this duplicates the first column into the columns
// left of the array, which is the zero-flux boundary condition (edge cells
// duplicated).
//
// Interface and timing: win[k][l][q] is window row k (top to bottom), column l
// (left to right), layer q, registered; it changes one clock after shift_en or
// fill. fill has priority over shift_en. The window role follows the document;
// the fill mechanism for the boundary is this design's choice.
module mixer #(
  parameter int N      = 1,
  parameter int LAYERS = 1,
  parameter int SW     = 24,
  localparam int K     = 2*N+1
) (
  input  logic                 clk,
  input  logic                 shift_en,
  input  logic                 fill,
  input  logic signed [SW-1:0] col_in [K][LAYERS],
  output logic signed [SW-1:0] win    [K][K][LAYERS]
);

  always_ff @(posedge clk) begin
    for (int k = 0; k < K; k++) begin
      for (int q = 0; q < LAYERS; q++) begin
        if (fill) begin
          for (int l = 0; l < K; l++) win[k][l][q] <= col_in[k][q];
        end else if (shift_en) begin
          for (int l = 0; l < K-1; l++) win[k][l][q] <= win[k][l+1][q];
          win[k][K-1][q] <= col_in[k][q];
        end
      end
    end
  end

endmodule
