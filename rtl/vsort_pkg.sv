// vsort_pkg: types and helper functions shared by the sorter blocks.
//
// A comparator state C (and a bit pair B) holds one bit of key X and the bit of
// the same significance of key Y, packed as {x, y}. The values 00 and 11 mean
// "equal so far" (written e); 10 means X > Y and 01 means X < Y at the most
// significant differing position seen. The latency helpers give the clock
// counts of the systolic blocks so that testbenches and controllers agree.
package vsort_pkg;

  typedef logic [1:0] pair_t;

  localparam pair_t PAIR_E = 2'b00;

  // True when a pair is 00 or 11, that is when it carries no decision.
  function automatic logic pair_is_e(input pair_t p);
    return p[1] == p[0];
  endfunction

  // Number of B/C cell columns of an R-row matrix comparator (columns 0..R-1).
  // A decision needs R-1 clocks to spread over the R rows of its own column,
  // and the columns that follow inherit it from their east neighbour, which
  // leaves the last cell column one clock early: R columns cover both.
  function automatic int mc_cols(input int r);
    return r;
  endfunction

  // Clocks from a column entering the comparator to it leaving the R cells.
  function automatic int mc_latency(input int r);
    return mc_cols(r) + 1;
  endfunction

endpackage
