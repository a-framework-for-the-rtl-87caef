// tb_ndp_pe - end-to-end test of one PE with a two-stage filter chain (a
// range scan needs two predicates): partial, unaligned blocks crossing a
// 4 KB page, a full block with nop filters, a block where nothing passes, a
// block too short for one tuple, a length above the block size and an
// equality search. The environment ndp_pe_env does the work and the checks;
// this module reports the result.
module tb_ndp_pe;
  ndp_pe_env #(.NS(2)) env ();

  initial begin
    wait (env.finished);
    $display("TB_RESULT checks=%0d failures=%0d", env.checks, env.failures);
    $finish;
  end
endmodule
