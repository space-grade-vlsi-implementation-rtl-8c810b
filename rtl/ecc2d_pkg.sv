// Shared types and the redundancy function of the two-dimensional (2D)
// divide-symbol error-correcting code.
//
// A 16-bit data word A15..A0 is split into four 4-bit groups X, Y, Z, W and
// viewed as a 4x4 array: groups along one axis, bit index 1..4 along the
// other. Group g (X=0, Y=1, Z=2, W=3) holds A[4g+3:4g], so X1 = A0,
// X4 = A3, W4 = A15. Sixteen redundancy bits are added, giving a 32-bit
// codeword:
//   diagonal bits  D1 = X1^Y2^Z1^W2   D2 = X2^Y1^Z2^W1
//                  D3 = X3^Y4^Z3^W4   D4 = X4^Y3^Z4^W3
//   parity bits    Pi = Xi^Yi^Zi^Wi                        (i = 1..4)
//   check bits     Cg13 = G1^G3, Cg24 = G2^G4               (G = X,Y,Z,W)
// The equations for D1, D2, P1, P2 and the X/Y check bits follow the
// published code; D3, D4 extend the same 2x2 diagonal pattern to indices 3
// and 4. The grouping of the input bits and the order of the redundancy
// bits inside the codeword are this design's own choice.
//
// Codeword layout (LSB first): data[15:0], D4..D1 in [19:16], P4..P1 in
// [23:20], check bits {Cw24,Cw13,Cz24,Cz13,Cy24,Cy13,Cx24,Cx13} in [31:24].
// The syndrome uses the same {C, P, D} layout.
package ecc2d_pkg;

  localparam int unsigned DATA_W = 16;
  localparam int unsigned NGROUP = 4;   // X, Y, Z, W
  localparam int unsigned GROUP_W = 4;  // bit index 1..4

  typedef logic [DATA_W-1:0] data_t;

  // Redundancy bits, and equally the syndrome (stored XOR recalculated).
  typedef struct packed {
    logic [7:0] c;   // c[2g] = Cg13, c[2g+1] = Cg24
    logic [3:0] p;   // p[i-1] = Pi
    logic [3:0] d;   // d[i-1] = Di
  } red_t;

  typedef struct packed {
    red_t  red;
    data_t data;
  } code_t;

  // Outcome of decoding one codeword.
  typedef enum logic [1:0] {
    ST_NO_ERROR       = 2'd0,  // syndrome all zero
    ST_CORRECTED      = 2'd1,  // data error confined to one region, repaired
    ST_REDUNDANCY_ERR = 2'd2,  // only stored D/P bits disturbed, data intact
    ST_UNCORRECTABLE  = 2'd3   // detected, but no region explains it
  } status_t;

  // Bit of group g at (zero-based) index i.
  function automatic logic bit_at(data_t a, int unsigned g, int unsigned i);
    return a[GROUP_W*g + i];
  endfunction

  // Redundancy calculation shared by the encoder and the syndrome unit.
  function automatic red_t calc_red(data_t a);
    red_t r;
    for (int unsigned i = 0; i < GROUP_W; i++) begin
      // Diagonal: within the index pair {2k, 2k+1}, groups X and Z take
      // the same index as the diagonal bit, groups Y and W the other one.
      r.d[i] = 1'b0;
      r.p[i] = 1'b0;
      for (int unsigned g = 0; g < NGROUP; g++) begin
        r.d[i] ^= bit_at(a, g, i ^ (g & 1));
        r.p[i] ^= bit_at(a, g, i);
      end
    end
    for (int unsigned g = 0; g < NGROUP; g++) begin
      r.c[2*g]   = bit_at(a, g, 0) ^ bit_at(a, g, 2);
      r.c[2*g+1] = bit_at(a, g, 1) ^ bit_at(a, g, 3);
    end
    return r;
  endfunction

endpackage
