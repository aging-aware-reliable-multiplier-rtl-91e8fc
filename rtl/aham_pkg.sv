// aham_pkg: types and helpers shared by the aging-aware variable-latency
// multiplier.
//
// bypass_e selects which bypassing array multiplier sits inside an
// aging-aware multiplier. The column-bypassing array skips work for every
// zero bit of the multiplicand. The row-bypassing array skips work for every
// zero bit of the multiplier. The adaptive hold logic therefore counts the
// zeros of the multiplicand in the first case and of the multiplier in the
// second. count_zeros is that count. It is written as a loop so that every
// width M gets the same function.
package aham_pkg;

  typedef enum logic {
    BYPASS_COLUMN = 1'b0,  // column-bypassing multiplier, judge the multiplicand
    BYPASS_ROW    = 1'b1   // row-bypassing multiplier, judge the multiplier
  } bypass_e;

  // Number of 0 bits in the low `width` bits of v (v is at most 64 bits).
  function automatic int unsigned count_zeros(input logic [63:0] v, input int unsigned width);
    int unsigned n;
    n = 0;
    for (int unsigned i = 0; i < 64; i++) begin
      if (i < width && !v[i]) n++;
    end
    return n;
  endfunction

endpackage
