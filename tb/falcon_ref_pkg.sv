// falcon_ref_pkg: reference model for the Falcon testbenches.
//
// Computes one forward-Euler CNN step with plain integer multiply-accumulate,
// independently of the distributed-arithmetic datapath:
//   full = sum_q sum_k sum_l T[p][q][k][l] * x[q][clamp(i+k-N)][clamp(j+l-N)]
//          + c[p][i][j] * 2^(TFRAC[p]+SFRAC-CFRAC)
// MODE_ITERATE: x' = clamp(round(full / 2^TFRAC[p]), -2^SFRAC, 2^SFRAC), c' = c.
// MODE_INPUT:   c' = saturate_CW(round(full / 2^(TFRAC[p]+SFRAC-CFRAC))), x' = x.
// Rounding is to nearest, ties toward +infinity. Images are flat arrays
// indexed (layer*H + row)*Wd + col; templates ((p*R + q)*K + k)*K + l.
package falcon_ref_pkg;

  // halftoning example, values in hundredths (middle row of B assumed)
  localparam int HA [25] = '{ -3,  -9, -13,  -9,  -3,
                              -9, -36, -60, -36,  -9,
                             -13, -60,   5, -60, -13,
                              -9, -36, -60, -36,  -9,
                              -3,  -9, -13,  -9,  -3};
  localparam int HB [25] = '{  0,   0,   7,   0,   0,
                               0,  36,  76,  36,   0,
                               7,  76,  76,  76,   7,
                               0,  36,  76,  36,   0,
                               0,   0,   7,   0,   0};

  function automatic longint rshift_round(longint v, int s);
    if (s == 0) return v;
    return (v + (longint'(1) <<< (s - 1))) >>> s;
  endfunction

  function automatic int clampi(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  // returns the number of state results that were limited to +-1
  function automatic int cnn_step(
    input int R, H, Wd, N, SW, SFRAC, CW, CFRAC,
    input int TFRAC[],   // template fraction bits of each output layer
    input bit mode_input,
    input longint x[], input longint c[], input longint t[],
    output longint xo[], output longint co[]);
    int K = 2*N + 1;
    longint smax = longint'(1) <<< SFRAC;
    longint cmax = (longint'(1) <<< (CW - 1)) - 1;
    int nsat = 0;
    xo = new[R*H*Wd];
    co = new[R*H*Wd];
    for (int p = 0; p < R; p++)
      for (int i = 0; i < H; i++)
        for (int j = 0; j < Wd; j++) begin
          int csh = TFRAC[p] + SFRAC - CFRAC;
          longint full = c[(p*H + i)*Wd + j] <<< csh;
          int o = (p*H + i)*Wd + j;
          for (int q = 0; q < R; q++)
            for (int k = 0; k < K; k++)
              for (int l = 0; l < K; l++) begin
                int ii = clampi(i + k - N, 0, H - 1);
                int jj = clampi(j + l - N, 0, Wd - 1);
                full += t[((p*R + q)*K + k)*K + l] * x[(q*H + ii)*Wd + jj];
              end
          if (mode_input) begin
            longint v = rshift_round(full, csh);
            co[o] = (v > cmax) ? cmax : (v < -cmax - 1) ? -cmax - 1 : v;
            xo[o] = x[o];
          end else begin
            longint v = rshift_round(full, TFRAC[p]);
            if (v > smax || v < -smax) nsat++;
            xo[o] = (v > smax) ? smax : (v < -smax) ? -smax : v;
            co[o] = c[o];
          end
        end
    return nsat;
  endfunction

endpackage
