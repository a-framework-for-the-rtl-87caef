// tb_filter_unit - tests one filter stage against a reference model.
//
// For several predicate settings a random tuple stream (with block ends at
// random positions and occasional empty items) is pushed through the stage
// while the consumer stalls at random. The output must be exactly the input
// items that match, in order, plus every 'last' item, marked 'empty' when its
// tuple failed. A final run without stalls checks the rate of one tuple per
// clock cycle.
module tb_filter_unit;
  import ndp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             clr, in_valid, in_ready, out_valid, out_ready, dropped;
  titem_t           in_item, out_item;
  logic [COL_W-1:0] col_sel;
  elem_t            cmp_val;
  logic [2:0]       op_sel;

  filter_unit dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit pred(logic [31:0] f, int op, logic [31:0] v);
    case (op)
      1: return f == v;
      2: return f != v;
      3: return f >  v;
      4: return f >= v;
      5: return f <  v;
      6: return f <= v;
      default: return 1;
    endcase
  endfunction

  titem_t src [$];
  titem_t exp [$];

  task automatic run(int col, int op, logic [31:0] v, int n, int in_pct, int out_pct,
                     output int cycles);
    int got;
    src.delete(); exp.delete();
    for (int k = 0; k < n; k++) begin
      titem_t it;
      it = '0;
      for (int i = 0; i < N_IN; i++) it.t.elem[i] = 32'($urandom_range(20));
      it.last  = (k == n - 1) || ($urandom_range(99) < 5);
      it.empty = it.last && ($urandom_range(99) < 20);
      src.push_back(it);
      if (it.empty) exp.push_back(it);
      else if (pred(it.t.elem[col], op, v)) exp.push_back(it);
      else if (it.last) begin
        it.empty = 1'b1;
        exp.push_back(it);
      end
    end
    @(negedge clk);
    col_sel = COL_W'(col); cmp_val = v; op_sel = 3'(op);
    clr = 1;
    @(negedge clk);
    clr = 0;
    got = 0; cycles = 0;
    while (got < exp.size() && cycles < 100 * n) begin
      in_valid  = (src.size() != 0) && ($urandom_range(99) < in_pct);
      in_item   = (src.size() != 0) ? src[0] : '0;
      out_ready = ($urandom_range(99) < out_pct);
      @(posedge clk);
      cycles++;
      if (in_valid && in_ready) void'(src.pop_front());
      if (out_valid && out_ready) begin
        check(out_item == exp[got], $sformatf("item %0d: got %h expected %h", got, out_item, exp[got]));
        got++;
      end
      @(negedge clk);
    end
    in_valid = 0;
    check(got == exp.size() && src.size() == 0, $sformatf("op %0d: all items seen (%0d of %0d)", op, got, exp.size()));
  endtask

  initial begin
    int cyc;
    clr = 0; in_valid = 0; out_ready = 0; in_item = '0; col_sel = '0; cmp_val = '0; op_sel = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int op = 0; op < 7; op++)
      for (int col = 0; col < N_IN; col++)
        run(col, op, 32'($urandom_range(20)), 300, 70, 60, cyc);
    // rate: nop filter, no stalls, one tuple per cycle
    run(0, OP_NOP, 0, 1000, 100, 100, cyc);
    check(cyc <= 1000 + 3, $sformatf("1000 tuples took %0d cycles, expected one per cycle", cyc));
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
