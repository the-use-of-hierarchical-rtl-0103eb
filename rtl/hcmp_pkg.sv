// hcmp_pkg -- shared constants, types and helpers of the hierarchical comparator.
//
// A hierarchical comparator is described by its depth T (LEVELS) and, for every
// level t = 1 .. T-1, the number N_t of level-t comparators that one level-(t+1)
// comparator is built from. Level 1 is always a 2-bit comparator (M_1 = 2), so the
// width of a level-t comparator is M_t = N_{t-1} * M_{t-1}, and the input width of the
// whole comparator is M_T = 2 * N_1 * N_2 * ... * N_{T-1}.
//
// The fan-in list is kept in a fixed-length array, fanin_t, whose entry [t-1] holds
// N_t; entries at and beyond index LEVELS-1 are ignored. The fixed length lets a
// comparator pass the same list unchanged to the comparators it is built from, each
// of which only looks at the entries below its own level. MAX_LEVELS = 12 allows a
// comparator of up to 2^12 bits built only from fan-in-2 levels; it is a choice of
// this implementation.
package hcmp_pkg;

  localparam int unsigned MAX_LEVELS = 12;

  // FANIN[t-1] = N_t, for t = 1 .. LEVELS-1.
  typedef int unsigned fanin_t [MAX_LEVELS-1];

  // Input width M_T of a comparator of depth `levels` with fan-in list `fanin`.
  function automatic int unsigned hcmp_width(int unsigned levels, fanin_t fanin);
    int unsigned w;
    w = 2;
    for (int unsigned t = 0; t + 1 < levels; t++) w = w * fanin[t];
    return w;
  endfunction

endpackage
