// hcmp_checker -- drives one hcmp instance of a given structure and checks it.
//
// Test vectors, all compared with the plain relations a > b and a == b on the whole
// WIDTH-bit words:
//   * equal words (random value, plus all zeros and all ones);
//   * for every bit position i: words that agree above bit i, differ at bit i and
//     are random below it, in both directions -- so every first-level comparator and
//     every slice of every combining circuit decides the result at least once;
//   * NRAND pairs of fully random words.
// Results go to the counters of tb_hcmp_pkg.
module hcmp_checker
  import hcmp_pkg::*;
#(
  parameter int unsigned LEVELS = 1,
  parameter fanin_t      FANIN  = '{default: 1},
  parameter int          NRAND  = 20
);

  localparam int unsigned WIDTH = hcmp_width(LEVELS, FANIN);

  logic [WIDTH-1:0] a, b;
  logic             g, e;

  hcmp #(.LEVELS(LEVELS), .FANIN(FANIN)) dut (.a(a), .b(b), .g(g), .e(e));

  task automatic rand_word(output logic [WIDTH-1:0] w);
    for (int k = 0; k < WIDTH; k++) w[k] = 1'($urandom());
  endtask

  task automatic check();
    #1;
    tb_hcmp_pkg::checks++;
    if (g !== (a > b) || e !== (a == b)) begin
      tb_hcmp_pkg::failures++;
      $display("FAIL width=%0d levels=%0d a=%h b=%h: g=%0b e=%0b", WIDTH, LEVELS, a, b, g, e);
    end
    if (a > b) tb_hcmp_pkg::n_gt++;
    else if (a == b) tb_hcmp_pkg::n_eq++;
    else tb_hcmp_pkg::n_lt++;
  endtask

  initial begin
    tb_hcmp_pkg::active++;
    tb_hcmp_pkg::structures++;
    #1;
    a = '0; b = '0; check();
    a = '1; b = '1; check();
    rand_word(a); b = a; check();
    for (int i = 0; i < int'(WIDTH); i++) begin
      for (int dir = 0; dir < 2; dir++) begin
        rand_word(a);
        rand_word(b);
        for (int k = i + 1; k < int'(WIDTH); k++) b[k] = a[k];
        a[i] = (dir == 0);
        b[i] = (dir != 0);
        check();
      end
    end
    for (int r = 0; r < NRAND; r++) begin
      rand_word(a);
      rand_word(b);
      check();
    end
    tb_hcmp_pkg::active--;
  end

endmodule
