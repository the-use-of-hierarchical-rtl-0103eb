// hcmp -- hierarchical binary comparator of configurable structure.
//
// Compares two unsigned words a and b of WIDTH bits and forms g (a > b) and e (a = b).
// The structure is C M_T x N_{T-1} - M_{T-1} x ... x N_1 - M_1 with M_1 = 2:
//
//   * level 1 holds WIDTH/2 two-bit comparators (cmp2), comparator i on bits 2i+1:2i;
//   * level t > 1 holds WIDTH/M_t comparators of M_t bits; each is one combining
//     circuit (cmp_cl) that merges N_{t-1} = FANIN[t-2] neighbouring results of level
//     t-1, the higher-numbered ones being the more significant slices;
//   * level LEVELS holds one comparator, whose results are g and e.
//
// A level-t comparator is thus the two-level structure (N_{t-1} comparators of width
// M_{t-1} and one combining circuit) applied on top of level t-1, built out level by
// level with generate loops rather than by recursion. The width follows from the
// structure, WIDTH = 2 * FANIN[0] * ... * FANIN[LEVELS-2]; each fan-in must be at
// least 2.
//
// Defaults: the 512-bit comparator C512 x 4-128 x 4-32 x 4-8 x 4-2 (LEVELS = 5, all
// fan-ins 4). The 512-bit size is the largest the method is evaluated at; the fan-in of
// 4 at every level is a choice of this implementation, since the best structure is
// found per FPGA family by trying them.
//
// Timing: purely combinational, no clock and no reset. The logic depth is one cmp2
// plus LEVELS-1 combining circuits.
module hcmp
  import hcmp_pkg::*;
#(
  parameter int unsigned LEVELS = 5,
  parameter fanin_t      FANIN  = '{0: 4, 1: 4, 2: 4, 3: 4, default: 1},
  localparam int unsigned WIDTH = hcmp_width(LEVELS, FANIN)
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic             g,
  output logic             e
);

  if (LEVELS < 1 || LEVELS > MAX_LEVELS) begin : g_bad_levels
    $fatal(1, "hcmp: LEVELS must lie in 1..%0d", MAX_LEVELS);
  end

  // Level t (1 .. LEVELS) holds WIDTH / M_t comparators; comparator i of level t
  // covers bits [i*M_t +: M_t] and its results are lvl[t].res_g[i], lvl[t].res_e[i].
  for (genvar t = 1; t <= LEVELS; t++) begin : lvl
    localparam int unsigned CNT = WIDTH / hcmp_width(t, FANIN);

    logic [CNT-1:0] res_g;
    logic [CNT-1:0] res_e;

    if (t == 1) begin : g_leaf
      for (genvar i = 0; i < CNT; i++) begin : g_cmp
        cmp2 u_cmp2 (
          .a(a[2*i +: 2]),
          .b(b[2*i +: 2]),
          .g(res_g[i]),
          .e(res_e[i])
        );
      end
    end else begin : g_merge
      localparam int unsigned N = FANIN[t-2];

      if (N < 2) begin : g_bad_fanin
        $fatal(1, "hcmp: fan-in of level %0d must be at least 2", t - 1);
      end

      for (genvar i = 0; i < CNT; i++) begin : g_cl
        cmp_cl #(
          .N(N)
        ) u_cl (
          .g_in(lvl[t-1].res_g[i*N +: N]),
          .e_in(lvl[t-1].res_e[i*N +: N]),
          .g   (res_g[i]),
          .e   (res_e[i])
        );
      end
    end
  end

  assign g = lvl[LEVELS].res_g[0];
  assign e = lvl[LEVELS].res_e[0];

endmodule
