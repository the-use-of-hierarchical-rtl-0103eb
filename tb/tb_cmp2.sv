// tb_cmp2 -- exhaustive self-checking testbench of the 2-bit comparator cmp2.
//
// Applies all 16 combinations of the two 2-bit words and compares g and e with the
// integer relations a > b and a == b. Every "greater", "equal" and "less" case is
// counted; a relation that never occurs counts as a failure. A watchdog ends the run
// with a failure if the test does not finish in time.
module tb_cmp2;

  logic [1:0] a, b;
  logic       g, e;
  int         checks   = 0;
  int         failures = 0;
  int         n_gt = 0, n_eq = 0, n_lt = 0;

  cmp2 dut (.a(a), .b(b), .g(g), .e(e));

  initial begin
    #10000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ia = 0; ia < 4; ia++) begin
      for (int ib = 0; ib < 4; ib++) begin
        a = 2'(ia);
        b = 2'(ib);
        #1;
        checks++;
        if (g !== (ia > ib) || e !== (ia == ib)) begin
          failures++;
          $display("FAIL a=%0d b=%0d: g=%0b e=%0b", ia, ib, g, e);
        end
        if (ia > ib) n_gt++;
        else if (ia == ib) n_eq++;
        else n_lt++;
      end
    end
    checks++;
    if (n_gt == 0 || n_eq == 0 || n_lt == 0) failures++;
    $display("cases: greater=%0d equal=%0d less=%0d", n_gt, n_eq, n_lt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
