// l1_dcache_cfg_tb: end-to-end tests of the whole L1 in the configurations
// other than the default, each running the random program of
// l1_dcache_run against its own cache and L2 model, all at once:
//  * 3 ways of 8 KB (24 KB) with PredictPha and a 512 B stack cache, the
//    configuration for area-constrained designs;
//  * 4 ways of 8 KB probed with the Fall Back Phased scheme;
//  * 4 ways of 8 KB with PredictPha and the MRU-avoiding adaptive fill.
// The first and last follow the document's recommended and studied
// configurations; running them side by side is this testbench's choice.
// Passes when every run has finished with no failed check. A watchdog
// ends the test with a failure if a run does not finish in time.
module l1_dcache_cfg_tb;
  import l1_pkg::*;

  localparam int NRUN = 3;
  logic done [NRUN];
  int   n_checks [NRUN], n_failures [NRUN];

  l1_dcache_run #(.NAME("3-way 24 KB PredictPha"), .WAYS(3)) u_3way (
    .done(done[0]), .n_checks(n_checks[0]), .n_failures(n_failures[0]));
  l1_dcache_run #(.NAME("4-way FallBackPha"), .SCHEME(FALLBACK_PHA)) u_fbpha (
    .done(done[1]), .n_checks(n_checks[1]), .n_failures(n_failures[1]));
  l1_dcache_run #(.NAME("4-way PredictPha adaptive"), .ADAPTIVE(1'b1)) u_adapt (
    .done(done[2]), .n_checks(n_checks[2]), .n_failures(n_failures[2]));

  function automatic bit all_done();
    for (int i = 0; i < NRUN; i++) if (!done[i]) return 1'b0;
    return 1'b1;
  endfunction

  function automatic void report(int extra_fail);
    int checks = 0, failures = extra_fail;
    for (int i = 0; i < NRUN; i++) begin
      checks   += n_checks[i];
      failures += n_failures[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endfunction

  initial begin
    #1;
    while (!all_done()) #1000;
    report(0);
    $finish;
  end

  initial begin
    // 3 million cycles of the runs' 10-unit clock
    #30_000_000;
    $display("FAIL: watchdog");
    report(1);
    $finish;
  end
endmodule
