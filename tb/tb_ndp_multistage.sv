// tb_ndp_multistage - the multi-stage filtering workload: one PE with five
// chained filter stages, the largest chain evaluated for the design, running
// blocks of growing size (4 KB to 24 KB) with random conjunctions of five
// predicates over the three fields. The environment ndp_pe_env does the work
// and the checks; this module reports the result.
module tb_ndp_multistage;
  ndp_pe_env #(.NS(5)) env ();

  initial begin
    wait (env.finished);
    $display("TB_RESULT checks=%0d failures=%0d", env.checks, env.failures);
    $finish;
  end
endmodule
