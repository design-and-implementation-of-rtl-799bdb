// h264_ref_pkg: reference models of H.264 residual arithmetic for the
// testbenches, written in matrix form directly from the standard's
// equations (independent of the butterfly structure of the RTL).
package h264_ref_pkg;
  // LevelScale v table, [qp%6][class]
  int V [6][3] = '{'{10, 16, 13}, '{11, 18, 14}, '{13, 20, 16}, '{14, 23, 18}, '{16, 25, 20}, '{18, 29, 23}};

  function automatic int ls(int m, int i, int j);
    if ((i % 2 == 0) && (j % 2 == 0)) return V[m][0];
    if ((i % 2 == 1) && (j % 2 == 1)) return V[m][1];
    return V[m][2];
  endfunction

  function automatic void dequant(input int c[16], input int qp, input bit dcb, output int d[16]);
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++)
      d[i*4+j] = (c[i*4+j] * ls(qp % 6, i, j)) * (1 << (qp / 6));
    if (dcb) d[0] = c[0];
  endfunction

  // inverse transform: rows then columns, each as the matrix
  // [1 1 1 1/2; 1 1/2 -1 -1; 1 -1/2 -1 1; 1 -1 1 -1/2] (halves as >>1)
  function automatic int t1(int k, int n, int x);   // contribution of input k to output n
    int M [4][4] = '{'{2, 2, 2, 2}, '{2, 1, -1, -2}, '{2, -2, -2, 2}, '{1, -2, 2, -1}};
    // M[k][n] is twice the kernel entry; odd entries mean a halved input
    if (M[k][n] == 1) return x >>> 1;
    if (M[k][n] == -1) return -(x >>> 1);
    return (M[k][n] / 2) * x;
  endfunction

  function automatic void idct(input int d[16], output int r[16]);
    int f[16], h[16];
    for (int i = 0; i < 4; i++) for (int n = 0; n < 4; n++) begin
      f[i*4+n] = 0;
      for (int k = 0; k < 4; k++) f[i*4+n] += t1(k, n, d[i*4+k]);
    end
    for (int j = 0; j < 4; j++) for (int n = 0; n < 4; n++) begin
      h[n*4+j] = 0;
      for (int k = 0; k < 4; k++) h[n*4+j] += t1(k, n, f[k*4+j]);
    end
    for (int i = 0; i < 16; i++) r[i] = (h[i] + 32) >>> 6;
  endfunction
endpackage
