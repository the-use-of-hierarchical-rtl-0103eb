// tb_hcmp_structures -- checks every hierarchical structure of 2 to 256 bits, and some of 512.
//
// A comparator of 2^k bits with 2-bit first-level comparators is built from fan-ins
// that multiply to 2^(k-1); choosing them amounts to splitting k-1 into an ordered sum
// of parts p_1 + p_2 + ... (fan-in N_t = 2^p_t), so there are 2^(k-2) structures for
// k >= 2. For 2, 4, ..., 256 bits that is 1+1+2+4+8+16+32+64 = 128 structures; for
// 512 bits there are 128 more. Structure number c of width 2^k is decoded from the
// bits of c: bit j set means "a new part starts after unit j+1".
// All 128 structures of 2 to 256 bits are checked. Of the 128 structures of 512 bits
// three are checked (C512_SET): the default structure, fan-ins 4-4-4-4 (c = 42), the
// fan-ins 2-4-4-4-2 (c = 85) and the deepest, all fan-ins 2 (c = 127). Checking all
// 512-bit structures would take several times longer to compile.
//
// Each structure gets an hcmp_checker (equal words, a single deciding bit at every
// position in both directions, random words). The number of structures checked must
// equal the number enumerated, and every outcome must occur. A watchdog ends a run
// that hangs.
module tb_hcmp_structures;
  import hcmp_pkg::*;

  localparam int KMAX = 8;   // every structure of widths 2^1 .. 2^8 = 256 bits
  localparam int N512 = 3;   // sampled structures of 512 bits
  localparam int C512_SET [N512] = '{42, 85, 127};

  function automatic int ncomp(int k);
    return (k < 2) ? 1 : (1 << (k - 2));
  endfunction

  function automatic int levels_of(int k, int c);
    int parts;
    if (k < 2) return 1;
    parts = 1;
    for (int j = 0; j < k - 2; j++) if (((c >> j) & 1) != 0) parts++;
    return parts + 1;
  endfunction

  function automatic fanin_t fanin_of(int k, int c);
    fanin_t f;
    int     p;
    int     len;
    f = '{default: 1};
    if (k < 2) return f;
    p   = 0;
    len = 1;
    for (int j = 0; j < k - 2; j++) begin
      if (((c >> j) & 1) != 0) begin
        f[p] = 1 << len;
        p++;
        len = 1;
      end else begin
        len++;
      end
    end
    f[p] = 1 << len;
    return f;
  endfunction

  function automatic int total_structures();
    int n;
    n = 0;
    for (int k = 1; k <= KMAX; k++) n += ncomp(k);
    return n + N512;
  endfunction

  for (genvar k = 1; k <= KMAX; k++) begin : g_w
    for (genvar c = 0; c < ncomp(k); c++) begin : g_s
      hcmp_checker #(
        .LEVELS(levels_of(k, c)),
        .FANIN (fanin_of(k, c)),
        .NRAND (20)
      ) u_chk ();
    end
  end

  for (genvar i = 0; i < N512; i++) begin : g_512
    hcmp_checker #(
      .LEVELS(levels_of(9, C512_SET[i])),
      .FANIN (fanin_of(9, C512_SET[i])),
      .NRAND (20)
    ) u_chk ();
  end

  initial begin
    #10000000;
    tb_hcmp_pkg::failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", tb_hcmp_pkg::checks, tb_hcmp_pkg::failures);
    $finish;
  end

  initial begin
    #1;
    wait (tb_hcmp_pkg::active == 0);
    tb_hcmp_pkg::checks++;
    if (tb_hcmp_pkg::structures != total_structures()) tb_hcmp_pkg::failures++;
    tb_hcmp_pkg::checks++;
    if (tb_hcmp_pkg::n_gt == 0 || tb_hcmp_pkg::n_eq == 0 || tb_hcmp_pkg::n_lt == 0)
      tb_hcmp_pkg::failures++;
    $display("structures checked: %0d of %0d", tb_hcmp_pkg::structures, total_structures());
    $display("cases: greater=%0d equal=%0d less=%0d",
             tb_hcmp_pkg::n_gt, tb_hcmp_pkg::n_eq, tb_hcmp_pkg::n_lt);
    $display("TB_RESULT checks=%0d failures=%0d", tb_hcmp_pkg::checks, tb_hcmp_pkg::failures);
    $finish;
  end

endmodule
