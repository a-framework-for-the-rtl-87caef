// tb_ctrl_regfile - checks the AXI4-Lite control register file.
//
// Covers: read-back of every writable register, byte strobes, the filter
// registers at FILTER_COL_0 = 52, FILTER_VAL_0 = 56, FILTER_OP_0 = 60 and
// CYCLE_COUNTER at 64 for one filter stage, read-only status registers that
// mirror their inputs, the one-cycle START pulse and its suppression while
// busy, the cycle counter (cleared by START, counting busy cycles), zero for
// unmapped addresses, and responses held until the master is ready.
module tb_ctrl_regfile;
  import ndp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [7:0]  s_awaddr, s_araddr;
  logic        s_awvalid, s_awready, s_wvalid, s_wready, s_bvalid, s_bready;
  logic        s_arvalid, s_arready, s_rvalid, s_rready;
  logic [31:0] s_wdata, s_rdata;
  logic [3:0]  s_wstrb;
  logic [1:0]  s_bresp, s_rresp;
  logic        start, busy;
  addr_t       load_addr, store_addr;
  logic [31:0] load_bytes, result_bytes, tuples_in, tuples_out;
  logic [COL_W-1:0] filt_col [1];
  elem_t       filt_val [1];
  logic [2:0]  filt_op  [1];

  ctrl_regfile dut (.*);

  int checks = 0, failures = 0, n_start = 0;
  always @(posedge clk) if (start) n_start++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(int unsigned a, logic [31:0] d, logic [3:0] be = 4'hF);
    @(negedge clk);
    s_awaddr = 8'(a); s_wdata = d; s_wstrb = be; s_awvalid = 1;
    s_wvalid = 0;
    @(negedge clk);
    check(!s_awready, "no write accepted before its data");
    s_wvalid = 1;
    do @(posedge clk); while (!s_awready);
    @(negedge clk);
    s_awvalid = 0; s_wvalid = 0;
    s_bready = 0;
    repeat (2) @(negedge clk);
    check(s_bvalid && s_bresp == 2'b00, "write response held");
    s_bready = 1;
    @(negedge clk);
  endtask

  task automatic rd(int unsigned a, output logic [31:0] d);
    @(negedge clk);
    s_araddr = 8'(a); s_arvalid = 1; s_rready = 0;
    do @(posedge clk); while (!s_arready);
    @(negedge clk);
    s_arvalid = 0;
    @(negedge clk);
    check(s_rvalid, "read data held");
    d = s_rdata;
    s_rready = 1;
    @(negedge clk);
  endtask

  initial begin
    logic [31:0] r;
    int unsigned c0;
    s_awvalid = 0; s_wvalid = 0; s_arvalid = 0; s_bready = 1; s_rready = 1;
    s_awaddr = 0; s_araddr = 0; s_wdata = 0; s_wstrb = 0;
    busy = 0; result_bytes = 32'h1234; tuples_in = 32'd77; tuples_out = 32'd55;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wr(REG_LOAD_ADDR, 32'h0001_0008);   rd(REG_LOAD_ADDR, r);  check(r == 32'h0001_0008 && load_addr == r, "LOAD_ADDR");
    wr(REG_LOAD_BYTES, 32'd32768);      rd(REG_LOAD_BYTES, r); check(r == 32768 && load_bytes == r, "LOAD_BYTES");
    wr(REG_STORE_ADDR, 32'h0002_0000);  rd(REG_STORE_ADDR, r); check(r == 32'h0002_0000 && store_addr == r, "STORE_ADDR");
    wr(REG_STORE_ADDR, 32'hAABB_CCDD, 4'b0101);
    rd(REG_STORE_ADDR, r); check(r == 32'h00BB_00DD, $sformatf("byte strobes: %h", r));
    wr(52, 32'd2);           rd(52, r); check(r == 2 && filt_col[0] == 2, "FILTER_COL_0 at 52");
    wr(56, 32'hDEAD_0042);   rd(56, r); check(r == 32'hDEAD_0042 && filt_val[0] == r, "FILTER_VAL_0 at 56");
    wr(60, 32'd5);           rd(60, r); check(r == 5 && filt_op[0] == 3'd5, "FILTER_OP_0 at 60");
    rd(REG_RESULT_BYTES, r); check(r == 32'h1234, "RESULT_BYTES mirrors input");
    rd(REG_TUPLES_IN, r);    check(r == 77, "TUPLES_IN mirrors input");
    rd(REG_TUPLES_OUT, r);   check(r == 55, "TUPLES_OUT mirrors input");
    wr(REG_TUPLES_OUT, 32'hFFFF); rd(REG_TUPLES_OUT, r); check(r == 55, "status register not writable");
    rd(36, r); check(r == 0, "unmapped address reads 0");
    rd(REG_BUSY, r); check(r == 0, "BUSY idle");
    // start while idle: one pulse; the PE then reports busy
    n_start = 0;
    wr(REG_START, 32'd1);
    check(n_start == 1, $sformatf("one START pulse, saw %0d", n_start));
    busy = 1;
    repeat (20) @(posedge clk);
    rd(64, c0);
    check(c0 >= 20 && c0 < 40, $sformatf("CYCLE_COUNTER at 64 counts busy cycles: %0d", c0));
    rd(REG_BUSY, r); check(r == 1, "BUSY set");
    wr(REG_START, 32'd1);
    check(n_start == 1, "START ignored while busy");
    busy = 0;
    rd(64, c0);
    repeat (10) @(posedge clk);
    rd(64, r); check(r == c0, "CYCLE_COUNTER holds while idle");
    wr(REG_START, 32'd0);
    check(n_start == 1, "writing 0 to START does not start");
    wr(REG_START, 32'd1);
    @(negedge clk);
    rd(64, r); check(r == 0, "CYCLE_COUNTER cleared by START");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
