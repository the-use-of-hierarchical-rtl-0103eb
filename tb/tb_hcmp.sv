// tb_hcmp -- self-checking testbench of the hierarchical comparator hcmp.
//
// Checks six structures of different depth and fan-in, from the bare 2-bit
// comparator to the 512-bit default, each with hcmp_checker (equal words, a single
// deciding bit at every position in both directions, random words). Every outcome
// (greater, equal, less) must occur. A watchdog ends a run that hangs.
module tb_hcmp;
  import hcmp_pkg::*;

  hcmp_checker #(.LEVELS(1), .FANIN('{default: 1}))                     c_2   ();
  hcmp_checker #(.LEVELS(2), .FANIN('{0: 2, default: 1}))               c_4   ();
  hcmp_checker #(.LEVELS(3), .FANIN('{0: 4, 1: 2, default: 1}))         c_16  ();
  hcmp_checker #(.LEVELS(4), .FANIN('{0: 2, 1: 8, 2: 2, default: 1}))   c_64  ();
  hcmp_checker #(.LEVELS(3), .FANIN('{0: 3, 1: 5, default: 1}))         c_30  ();
  hcmp_checker #(.LEVELS(5), .FANIN('{0: 4, 1: 4, 2: 4, 3: 4, default: 1}), .NRAND(200)) c_512 ();

  initial begin
    #1000000;
    tb_hcmp_pkg::failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", tb_hcmp_pkg::checks, tb_hcmp_pkg::failures);
    $finish;
  end

  initial begin
    #1;
    wait (tb_hcmp_pkg::active == 0);
    tb_hcmp_pkg::checks++;
    if (tb_hcmp_pkg::n_gt == 0 || tb_hcmp_pkg::n_eq == 0 || tb_hcmp_pkg::n_lt == 0)
      tb_hcmp_pkg::failures++;
    $display("cases: greater=%0d equal=%0d less=%0d",
             tb_hcmp_pkg::n_gt, tb_hcmp_pkg::n_eq, tb_hcmp_pkg::n_lt);
    $display("TB_RESULT checks=%0d failures=%0d", tb_hcmp_pkg::checks, tb_hcmp_pkg::failures);
    $finish;
  end

endmodule
