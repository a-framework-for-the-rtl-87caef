// tb_sync_fifo - random push/pop test of sync_fifo against a queue model.
// Checks data order, count, the full and empty flags, a read and a write in
// the same cycle on a full queue, and the synchronous clear.
module tb_sync_fifo;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int unsigned D = 4;
  logic        clr, in_valid, in_ready, out_valid, out_ready;
  logic [15:0] in_data, out_data;
  logic [2:0]  count;

  sync_fifo #(.T(logic [15:0]), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0, n_full_rw = 0;
  logic [15:0] model [$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    clr = 0; in_valid = 0; out_ready = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      clr       = (cyc == 2000);
      in_valid  = ($urandom_range(99) < 60);
      out_ready = ($urandom_range(99) < (cyc < 1000 ? 30 : 60));
      in_data   = 16'($urandom);
      #1;
      // compare with the model before the edge
      check(count == 3'(model.size()), $sformatf("count %0d expected %0d", count, model.size()));
      check(out_valid == (model.size() != 0), "out_valid");
      check(in_ready == (model.size() < D || out_ready), "in_ready");
      if (out_valid && model.size() != 0) check(out_data == model[0], "head data");
      if (model.size() == D && in_valid && out_ready) n_full_rw++;
      @(posedge clk);
      if (clr) model.delete();
      else begin
        automatic bit pop = out_valid && out_ready;
        if (pop) void'(model.pop_front());
        if (in_valid && in_ready) model.push_back(in_data);
      end
    end
    check(n_full_rw > 0, "read and write on a full queue happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
