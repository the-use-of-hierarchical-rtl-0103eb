// tb_hcmp_pkg -- counters shared by the hierarchical-comparator testbenches.
//
// Every hcmp_checker instance registers itself in `active` at time 0, adds its checks
// and failures to the totals and deregisters when it is done, so a testbench with any
// number of checkers can wait for all of them and print one result line.
package tb_hcmp_pkg;
  int checks   = 0;
  int failures = 0;
  int active   = 0;
  int structures = 0;
  int n_gt     = 0;
  int n_eq     = 0;
  int n_lt     = 0;
endpackage
