// cmp_cl -- combining circuit "CL" of one level of the hierarchical comparator.
//
// Takes the results (g_in[n], e_in[n]) of N comparators that each compare one slice of
// the words, slice N-1 being the most significant, and forms g and e of the whole
// words:
//
//   g = g[N-1] | e[N-1].g[N-2] | e[N-1].e[N-2].g[N-3] | ... | e[N-1]...e[1].g[0]
//   e = e[N-1] . e[N-2] . ... . e[0]
//
// i.e. the words differ in favour of A exactly when some slice says "greater" and all
// more significant slices say "equal". Every product term is formed in parallel, so
// there is no carry rippling from slice to slice. Both equations are those of the
// method this design implements; the index order (highest index = most significant
// slice) is read from the order of the terms in the "greater" equation.
// Purely combinational: no clock, no reset. N must be at least 1.
module cmp_cl #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] g_in,
  input  logic [N-1:0] e_in,
  output logic         g,
  output logic         e
);

  // One product term per slice: g_in[n] AND all e_in above n.
  logic [N-1:0] term;

  always_comb begin
    for (int unsigned n = 0; n < N; n++) begin
      term[n] = g_in[n];
      for (int unsigned k = n + 1; k < N; k++) term[n] = term[n] & e_in[k];
    end
    g = |term;
    e = &e_in;
  end

endmodule
