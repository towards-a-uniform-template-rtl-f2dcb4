// Reference arithmetic for the accelerator testbenches: direct (non-Winograd)
// convolution and the textbook F(2,3) matrices, written independently of
// the RTL's adder networks.
package wino_ref_pkg;
  // B^T, 2*G and A^T of Winograd F(2,3)
  const int BT [4][4] = '{'{1, 0, -1, 0}, '{0, 1, 1, 0}, '{0, -1, 1, 0}, '{0, 1, 0, -1}};
  const int G2 [4][3] = '{'{2, 0, 0}, '{1, 1, 1}, '{1, -1, 1}, '{0, 0, 2}};
  const int AT [2][4] = '{'{1, 1, 1, 0}, '{0, 1, -1, -1}};

  typedef longint ltile4_t [4][4][4];
  typedef longint ltile3_t [3][3][3];
  typedef longint lout_t   [2][2][2];

  // direct valid convolution (correlation) of a 4x4(x4) window with a
  // 3x3(x3) filter; 2D uses plane 0 of both and returns depth 0 only
  function automatic lout_t conv(input ltile4_t x, input ltile3_t w, input bit mode3d);
    lout_t o;
    for (int z = 0; z < 2; z++)
      for (int r = 0; r < 2; r++)
        for (int c = 0; c < 2; c++) begin
          o[z][r][c] = 0;
          if (mode3d || z == 0)
            for (int kz = 0; kz < (mode3d ? 3 : 1); kz++)
              for (int kr = 0; kr < 3; kr++)
                for (int kc = 0; kc < 3; kc++)
                  o[z][r][c] += x[z+kz][r+kr][c+kc] * w[kz][kr][kc];
        end
    return o;
  endfunction

  // plane p of the depth-transformed window (B^T along depth)
  function automatic ltile4_t depth_tx(input ltile4_t x);
    ltile4_t t;
    for (int p = 0; p < 4; p++)
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          t[p][r][c] = 0;
          for (int k = 0; k < 4; k++) t[p][r][c] += BT[p][k] * x[k][r][c];
        end
    return t;
  endfunction

  // depth-transformed filter (2*G along depth), 4 planes of 3x3
  function automatic longint depth_tw(input ltile3_t w, input int p, input int r, input int c);
    longint s = 0;
    for (int k = 0; k < 3; k++) s += G2[p][k] * w[k][r][c];
    return s;
  endfunction
endpackage
