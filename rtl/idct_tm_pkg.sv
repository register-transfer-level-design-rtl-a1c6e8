// idct_tm_pkg: types and helpers shared by the transpose memories of the
// HEVC 2-D inverse transform.
//
// HEVC uses four square transform-unit (TU) sizes, 4x4, 8x8, 16x16 and 32x32,
// with 16-bit intermediate samples between the two 1-D passes. The size is
// carried alongside every row or column vector as a 2-bit code, and helper
// functions turn the code into a point count. The encoding of the code is a
// choice of this design.
package idct_tm_pkg;

  // TU size code: the TU is (4 << code) samples on a side.
  typedef enum logic [1:0] {
    TU4  = 2'd0,
    TU8  = 2'd1,
    TU16 = 2'd2,
    TU32 = 2'd3
  } tu_size_e;

  // Number of points of a TU side, 4 to 32.
  function automatic logic [5:0] tu_len(tu_size_e s);
    return 6'd4 << s;
  endfunction

endpackage
