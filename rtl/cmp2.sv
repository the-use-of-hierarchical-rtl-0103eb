// cmp2 -- first-level 2-bit comparator of the hierarchical comparator.
//
// Compares A = (a[1], a[0]) with B = (b[1], b[0]), bit 1 being the more significant,
// and forms "greater than" g (A > B) and "equal to" e (A = B). Each output depends on
// the four input bits only, so on an FPGA with 4-input look-up tables each output is
// a single LUT; this is why every hierarchical structure starts from 2-bit comparators.
//
// e is written as the unminimised sum of the four minterms with A = B (00, 01, 10, 11);
// g is the minimised sum of products a1.~b1 + a0.~b1.~b0 + a1.a0.~b0. Both equations
// follow the method this design implements. Purely combinational: no clock, no reset.
module cmp2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic       g,
  output logic       e
);

  always_comb begin
    e = (~a[1] & ~a[0] & ~b[1] & ~b[0])
      | (~a[1] &  a[0] & ~b[1] &  b[0])
      | ( a[1] & ~a[0] &  b[1] & ~b[0])
      | ( a[1] &  a[0] &  b[1] &  b[0]);

    g = (a[1] & ~b[1])
      | (a[0] & ~b[1] & ~b[0])
      | (a[1] &  a[0] & ~b[0]);
  end

endmodule
