// Reference model of the 2D code for the testbenches.
//
// Written straight from the named equations (D1 = X1^Y2^Z1^W2 and so on,
// with X1 = A0 .. X4 = A3, Y1 = A4 .. W4 = A15) rather than from the loop
// form used in the design, so that the two can be compared. Returns the 16
// redundancy bits in the codeword order {C[7:0], P[3:0], D[3:0]}, with
// C = {Cw24,Cw13,Cz24,Cz13,Cy24,Cy13,Cx24,Cx13}.
package ecc2d_ref_pkg;

  function automatic logic [15:0] ref_red(logic [15:0] a);
    logic [4:1] x, y, z, w;
    logic [4:1] d, p;
    logic [7:0] c;
    x = a[3:0];
    y = a[7:4];
    z = a[11:8];
    w = a[15:12];
    d[1] = x[1] ^ y[2] ^ z[1] ^ w[2];
    d[2] = x[2] ^ y[1] ^ z[2] ^ w[1];
    d[3] = x[3] ^ y[4] ^ z[3] ^ w[4];
    d[4] = x[4] ^ y[3] ^ z[4] ^ w[3];
    p[1] = x[1] ^ y[1] ^ z[1] ^ w[1];
    p[2] = x[2] ^ y[2] ^ z[2] ^ w[2];
    p[3] = x[3] ^ y[3] ^ z[3] ^ w[3];
    p[4] = x[4] ^ y[4] ^ z[4] ^ w[4];
    c[0] = x[1] ^ x[3];  // Cx13
    c[1] = x[2] ^ x[4];  // Cx24
    c[2] = y[1] ^ y[3];
    c[3] = y[2] ^ y[4];
    c[4] = z[1] ^ z[3];
    c[5] = z[2] ^ z[4];
    c[6] = w[1] ^ w[3];
    c[7] = w[2] ^ w[4];
    return {c, p, d};
  endfunction

  // Error pattern number m (0..255) inside region r (1..3): bit 2g of m
  // hits the lower column of the region in group g, bit 2g+1 the upper.
  function automatic logic [15:0] region_pattern(int r, int m);
    int lo;
    logic [15:0] e;
    lo = (r == 1) ? 0 : (r == 2) ? 2 : 1;   // region 3 = indices 2&3
    e = '0;
    for (int g = 0; g < 4; g++) begin
      e[4*g + lo]     = m[2*g];
      e[4*g + lo + 1] = m[2*g+1];
    end
    return e;
  endfunction

endpackage
