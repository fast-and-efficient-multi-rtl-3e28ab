// cnn_round_sat: final rounding and limiting of a template sum (combinational).
//
// acc is the exact template sum in units of 2^-(TFRAC+SFRAC); the constant c
// (CW bits, CFRAC fraction bits) is aligned and added. The total is rounded to
// nearest (ties toward +infinity) once:
//   y_state = total rounded to SFRAC fraction bits and limited to [-1, +1]
//             (the full-range CNN model keeps states inside that interval);
//   y_const = total rounded to CFRAC fraction bits, saturated to CW bits
//             (used when the datapath computes g = B'*u + h*I).
// Rounding to nearest and saturating g are this design's choices; the
// document only says that no rounding happens before the final step.
module cnn_round_sat #(
  parameter int AW    = 48,
  parameter int SW    = 24,
  parameter int SFRAC = 22,
  parameter int CW    = 24,
  parameter int CFRAC = 20,
  parameter int TFRAC = 20,
  localparam int CSH  = TFRAC + SFRAC - CFRAC,
  localparam int FW   = ((AW > CW + CSH) ? AW : CW + CSH) + 2
) (
  input  logic signed [AW-1:0] acc,
  input  logic signed [CW-1:0] c,
  output logic signed [SW-1:0] y_state,
  output logic signed [CW-1:0] y_const
);

  localparam logic signed [FW-1:0] RND_S = FW'(1) <<< (TFRAC - 1);
  localparam logic signed [FW-1:0] RND_C = (CSH > 0) ? (FW'(1) <<< ((CSH > 0) ? CSH - 1 : 0)) : '0;
  localparam logic signed [FW-1:0] S_MAX = FW'(1) <<< SFRAC;
  localparam logic signed [FW-1:0] C_MAX = (FW'(1) <<< (CW - 1)) - FW'(1);
  localparam logic signed [FW-1:0] C_MIN = -(FW'(1) <<< (CW - 1));

  logic signed [FW-1:0] full, rs, rc;

  always_comb begin
    full    = FW'(acc) + (FW'(c) <<< CSH);
    rs      = (full + RND_S) >>> TFRAC;
    rc      = (full + RND_C) >>> CSH;
    if (rs > S_MAX)       y_state = SW'(S_MAX);
    else if (rs < -S_MAX) y_state = SW'(-S_MAX);
    else                  y_state = SW'(rs);
    if (rc > C_MAX)           y_const = CW'(C_MAX);
    else if (rc < C_MIN)      y_const = CW'(C_MIN);
    else                      y_const = CW'(rc);
  end

endmodule
