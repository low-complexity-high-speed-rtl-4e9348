// tcm_ref_pkg: reference models used by the testbenches, written apart from
// the RTL: the 4-D mapping straight from its integer formula, the parity bit
// from the parity-check equation over the bit history (not from the encoder
// register), and the 8PSK correlation metric in floating point.
package tcm_ref_pkg;

  // Z0..Z3 of a 12-bit word, as integers
  function automatic logic [11:0] ref_map(logic [11:0] x);
    int w, z [4];
    w    = 4*x[11] + 2*x[8] + x[4];
    z[0] = w;
    z[1] = w + 4*x[10] + 2*x[6] + x[2];
    z[2] = w + 4*x[9]  + 2*x[5] + x[1];
    z[3] = w + 4*(x[10] + x[9] + x[7]) + 2*(x[6] + x[5] + x[3]) + x[2] + x[1] + x[0];
    return {3'(z[3] % 8), 3'(z[2] % 8), 3'(z[1] % 8), 3'(z[0] % 8)};
  endfunction

  // Parity bit x0(n) from the parity-check equation
  //   sum_j H0[j] x0(n-j) + sum_i sum_j Hi[j] xi(n-j) = 0, j = 0..6,
  // with histories hist_xi[d] = xi(n-d), d = 1..6 (index 0 unused).
  function automatic logic ref_parity(logic [6:0] h0, logic [6:0] h1, logic [6:0] h2,
                                      logic [6:0] h3, logic [6:0] hx0, logic [6:0] hx1,
                                      logic [6:0] hx2, logic [6:0] hx3);
    logic p;
    p = 1'b0;
    for (int j = 1; j <= 6; j++)
      p ^= (h0[j] & hx0[j]) ^ (h1[j] & hx1[j]) ^ (h2[j] & hx2[j]) ^ (h3[j] & hx3[j]);
    return p;
  endfunction

  // Correlation of sample (i, q) with 8PSK point s at phase s*pi/4.
  function automatic real corr(int i, int q, int s);
    return $itor(i) * $cos(3.14159265358979 * s / 4.0) + $itor(q) * $sin(3.14159265358979 * s / 4.0);
  endfunction

endpackage
