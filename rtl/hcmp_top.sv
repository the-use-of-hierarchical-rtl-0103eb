// hcmp_top -- 512-bit high-speed comparator built as a hierarchical structure.
//
// Compares two unsigned words a and b and drives the three comparator functions:
// g (a > b), e (a = b) and l (a < b). g and e come from the hierarchical comparator
// hcmp; l is not built as a tree of its own but derived as l = ~g & ~e, which holds
// because exactly one of the three relations is true.
//
// The parameters select the hierarchical structure and are passed to hcmp unchanged;
// the default is the 512-bit comparator C512 x 4-128 x 4-32 x 4-8 x 4-2 (see hcmp).
// The 512-bit size is the largest the method is evaluated at; the fan-ins are this
// implementation's choice.
//
// Timing: purely combinational, no clock and no reset; l adds one gate after g and e.
module hcmp_top
  import hcmp_pkg::*;
#(
  parameter int unsigned LEVELS = 5,
  parameter fanin_t      FANIN  = '{0: 4, 1: 4, 2: 4, 3: 4, default: 1},
  localparam int unsigned WIDTH = hcmp_width(LEVELS, FANIN)
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic             g,
  output logic             e,
  output logic             l
);

  hcmp #(
    .LEVELS(LEVELS),
    .FANIN (FANIN)
  ) u_hcmp (
    .a(a),
    .b(b),
    .g(g),
    .e(e)
  );

  assign l = ~g & ~e;

  // "Greater" and "equal" can never hold together.
  always_comb begin
    assert final (!(g && e))
      else $error("hcmp_top: g and e both asserted");
  end

endmodule
