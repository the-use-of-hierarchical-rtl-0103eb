// tb_hcmp_top -- end-to-end testbench of the 512-bit comparator at its default structure.
//
// Drives hcmp_top with no parameter overrides and checks g, e and l against the plain
// relations a > b, a == b and a < b of the 512-bit words. The vectors are:
//   * equal words (zeros, ones, random);
//   * for every bit position i, in both directions, words that agree above i, differ
//     at i and are random below it -- the position decides the result, so each of the
//     256 first-level 2-bit comparators and each input of every combining circuit is
//     the deciding one at least once;
//   * random words, and random words that differ only in their low bits.
// Counted and required to occur: each outcome (greater, equal, less) and each
// first-level comparator deciding a result. A watchdog ends a run that hangs.
module tb_hcmp_top;
  import hcmp_pkg::*;

  localparam int W = 512;

  logic [W-1:0] a, b;
  logic         g, e, l;
  int           checks   = 0;
  int           failures = 0;
  int           n_gt = 0, n_eq = 0, n_lt = 0;
  int           decided_by [W/2];

  hcmp_top dut (.a(a), .b(b), .g(g), .e(e), .l(l));

  initial begin
    #1000000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rand_word(output logic [W-1:0] w);
    for (int k = 0; k < W; k += 32) w[k +: 32] = $urandom();
  endtask

  task automatic check();
    int top_diff;
    #1;
    checks++;
    if (g !== (a > b) || e !== (a == b) || l !== (a < b)) begin
      failures++;
      $display("FAIL a=%h b=%h: g=%0b e=%0b l=%0b", a, b, g, e, l);
    end
    if (a > b) n_gt++;
    else if (a == b) n_eq++;
    else n_lt++;
    // Which first-level comparator holds the most significant differing bit.
    top_diff = -1;
    for (int k = W - 1; k >= 0; k--) begin
      if (a[k] != b[k]) begin
        top_diff = k;
        break;
      end
    end
    if (top_diff >= 0) decided_by[top_diff / 2]++;
  endtask

  initial begin
    int covered;
    foreach (decided_by[j]) decided_by[j] = 0;
    #1;
    a = '0; b = '0; check();
    a = '1; b = '1; check();
    rand_word(a); b = a; check();
    for (int i = 0; i < W; i++) begin
      for (int dir = 0; dir < 2; dir++) begin
        rand_word(a);
        rand_word(b);
        for (int k = i + 1; k < W; k++) b[k] = a[k];
        a[i] = (dir == 0);
        b[i] = (dir != 0);
        check();
      end
    end
    for (int r = 0; r < 500; r++) begin
      rand_word(a);
      rand_word(b);
      check();
      b = a;
      b[7:0] = 8'($urandom());
      check();
    end
    covered = 0;
    foreach (decided_by[j]) if (decided_by[j] > 0) covered++;
    checks++;
    if (n_gt == 0 || n_eq == 0 || n_lt == 0) failures++;
    checks++;
    if (covered != W / 2) failures++;
    $display("cases: greater=%0d equal=%0d less=%0d", n_gt, n_eq, n_lt);
    $display("first-level comparators that decided a result: %0d of %0d", covered, W / 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
