// tb_output_tuple_buffer - checks the tuple-to-word packing.
//
// Random Point2D tuple streams, some ending in an empty end marker, are fed
// with random gaps while the store side stalls at random. Each kept tuple
// must appear as one 64-bit word {y, x} (x in the low half), in order; after
// the block end 'done' must rise, no further word may appear, and
// tuples_out must equal the number of kept tuples. A run without stalls
// checks the rate of one tuple per cycle.
module tb_output_tuple_buffer;
  import ndp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        start, in_valid, in_ready, out_valid, out_ready, done;
  oitem_t      in_item;
  word_t       out_data;
  logic [31:0] tuples_out;

  output_tuple_buffer dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(int n, bit end_empty, int in_pct, int out_pct, output int cycles);
    oitem_t src [$];
    word_t  exp [$];
    int got;
    for (int k = 0; k < n; k++) begin
      oitem_t it;
      it = '0;
      it.t.elem[0] = $urandom; it.t.elem[1] = $urandom;
      it.last = (k == n - 1);
      it.empty = it.last && end_empty;
      src.push_back(it);
      if (!it.empty) exp.push_back({it.t.elem[1], it.t.elem[0]});
    end
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    got = 0; cycles = 0;
    while (!done && cycles < 50 * n + 100) begin
      in_valid  = (src.size() != 0) && ($urandom_range(99) < in_pct);
      in_item   = (src.size() != 0) ? src[0] : '0;
      out_ready = ($urandom_range(99) < out_pct);
      @(posedge clk);
      cycles++;
      if (in_valid && in_ready) void'(src.pop_front());
      if (out_valid && out_ready) begin
        if (got < exp.size()) check(out_data == exp[got], $sformatf("word %0d: got %h expected %h", got, out_data, exp[got]));
        else check(0, "extra word");
        got++;
      end
      @(negedge clk);
    end
    in_valid = 0;
    out_ready = 1;
    repeat (3) begin
      @(posedge clk);
      check(!out_valid, "no word after done");
    end
    check(done && got == exp.size(), $sformatf("n %0d: done=%0d, %0d of %0d words", n, done, got, exp.size()));
    check(tuples_out == exp.size(), $sformatf("tuples_out %0d expected %0d", tuples_out, exp.size()));
  endtask

  initial begin
    int cyc;
    start = 0; in_valid = 0; out_ready = 0; in_item = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(1, 1, 80, 80, cyc);
    run(1, 0, 80, 80, cyc);
    for (int k = 0; k < 40; k++) run(1 + $urandom_range(80), $urandom_range(1), 20 + $urandom_range(80), 20 + $urandom_range(80), cyc);
    run(1000, 0, 100, 100, cyc);
    check(cyc <= 1000 + 4, $sformatf("1000 tuples took %0d cycles, expected one per cycle", cyc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
