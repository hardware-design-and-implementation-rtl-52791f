// mdr_pkg: constants shared by the multidimensional reconciliation sender.
//
// The rotation matrices of the d-dimensional reconciliation (d = 4 or 8) form
// a family A_1..A_d whose nonzero entries are +/-1 and never share a position.
// All of them therefore fit in one combined sign matrix A'_d. Entry (r, c) of
// A'_d belongs to family member A_{k+1} with k = r XOR c (0-based indices);
// this index map is the multiplication rule of the quaternion (d = 4) and
// octonion (d = 8) units and reproduces the four matrices A_1..A_4 exactly.
// a_neg() returns 1 where the combined matrix holds -1.
// The combined sign matrices follow the published matrix family; the XOR
// index map is this design's reading of it, checked by the testbenches.
package mdr_pkg;

  // Rows of A'_8; a 1 marks a -1 entry, leftmost character is column 0.
  localparam logic [7:0] A8_NEG [8] = '{
    8'b0111_1111,
    8'b0001_0110,
    8'b0100_0011,
    8'b0010_0101,
    8'b0111_0000,
    8'b0010_1010,
    8'b0001_1001,
    8'b0100_1100
  };

  // Rows of A'_4, same coding.
  localparam logic [3:0] A4_NEG [4] = '{
    4'b0111,
    4'b0001,
    4'b0100,
    4'b0010
  };

  function automatic logic a_neg(int d, int r, int c);
    if (d == 4) return A4_NEG[r][3 - c];
    return A8_NEG[r][7 - c];
  endfunction

  // Index (0-based) of the alpha coefficient that sits at (r, c) of M'.
  function automatic int a_idx(int r, int c);
    return r ^ c;
  endfunction

  // Pipeline latencies of the front-end blocks (clock cycles) for dimension d.
  // Normalization: square, log2(d) adder levels, square root, divide (6 for d = 8).
  function automatic int norm_lat(int d);
    return 3 + $clog2(d);
  endfunction
  // Data mapping: multiply, log2(d) adder levels.
  function automatic int map_lat(int d);
    return 1 + $clog2(d);
  endfunction
  // LLR initialization: two multiplies, float-to-fixed conversion.
  localparam int LLR_LAT = 3;

endpackage
