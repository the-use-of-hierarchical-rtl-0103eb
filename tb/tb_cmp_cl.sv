// tb_cmp_cl -- self-checking testbench of the combining circuit cmp_cl.
//
// Three instances, with N = 2, 4 and 7 inputs, each receive every combination of
// valid slice results: per slice "greater" (g=1,e=0), "equal" (g=0,e=1) or "less"
// (g=0,e=0), i.e. 3^N combinations. The expected result is computed independently:
// the slices' "greater" flags form a binary number GA and their "less" flags a number
// LB; the whole words compare as GA compares with LB, since the most significant
// slice that is not "equal" decides. A watchdog ends a run that hangs.
module tb_cmp_cl;

  localparam int NCFG = 3;
  localparam int NS [NCFG] = '{2, 4, 7};

  int checks   = 0;
  int failures = 0;
  int n_gt = 0, n_eq = 0, n_lt = 0;
  logic [NCFG-1:0] done = '0;

  initial begin
    #100000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar i = 0; i < NCFG; i++) begin : g_cfg
    localparam int N = NS[i];
    logic [N-1:0] g_in, e_in;
    logic         g, e;

    cmp_cl #(.N(N)) dut (.g_in(g_in), .e_in(e_in), .g(g), .e(e));

    initial begin
      int total;
      int code;
      logic [N-1:0] ga, lb;
      total = 1;
      for (int k = 0; k < N; k++) total *= 3;
      for (int c = 0; c < total; c++) begin
        code = c;
        for (int k = 0; k < N; k++) begin
          ga[k] = (code % 3) == 1;   // slice "greater"
          lb[k] = (code % 3) == 2;   // slice "less"
          code  = code / 3;
        end
        g_in = ga;
        e_in = ~(ga | lb);
        #1;
        checks++;
        if (g !== (ga > lb) || e !== (ga == lb)) begin
          failures++;
          $display("FAIL N=%0d g_in=%b e_in=%b: g=%0b e=%0b", N, g_in, e_in, g, e);
        end
        if (ga > lb) n_gt++;
        else if (ga == lb) n_eq++;
        else n_lt++;
      end
      done[i] = 1'b1;
    end
  end

  initial begin
    wait (&done);
    checks++;
    if (n_gt == 0 || n_eq == 0 || n_lt == 0) failures++;
    $display("cases: greater=%0d equal=%0d less=%0d", n_gt, n_eq, n_lt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
