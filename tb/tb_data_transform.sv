// tb_data_transform - checks the Point3D -> Point2D mapping
// (output.x = input.y, output.y = input.z) on a random stream with random
// consumer stalls; block-end flags must pass unchanged and in order.
module tb_data_transform;
  import ndp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic   clr, in_valid, in_ready, out_valid, out_ready;
  titem_t in_item;
  oitem_t out_item;

  data_transform dut (.*);

  int checks = 0, failures = 0;
  titem_t src [$];
  oitem_t exp [$];

  initial begin
    automatic int got = 0;
    clr = 0; in_valid = 0; out_ready = 0; in_item = '0;
    for (int k = 0; k < 2000; k++) begin
      titem_t it;
      oitem_t o;
      it = '0;
      it.t.elem[0] = $urandom; it.t.elem[1] = $urandom; it.t.elem[2] = $urandom;
      it.last = ($urandom_range(9) == 0);
      it.empty = it.last && $urandom_range(1);
      src.push_back(it);
      o = '0;
      o.last = it.last; o.empty = it.empty;
      o.t.elem[0] = it.t.elem[1];
      o.t.elem[1] = it.t.elem[2];
      exp.push_back(o);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    while (got < exp.size()) begin
      in_valid  = (src.size() != 0) && $urandom_range(3) != 0;
      in_item   = (src.size() != 0) ? src[0] : '0;
      out_ready = $urandom_range(3) != 0;
      @(posedge clk);
      if (in_valid && in_ready) void'(src.pop_front());
      if (out_valid && out_ready) begin
        checks++;
        if (out_item != exp[got]) begin
          failures++;
          $display("FAIL: item %0d got %h expected %h", got, out_item, exp[got]);
        end
        got++;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
