// ndp_pe_env - test environment for one PE with NS filter stages.
//
// The PE is connected to a DRAM model that stalls its handshakes at random
// (writes more often than reads, so the result side backs up into the read
// side). Blocks of Point3D tuples {x, y, z} are written into the model, the PE
// is programmed over AXI4-Lite exactly as firmware would, and the result area
// is compared with a reference computed here: every tuple whose fields pass
// all NS predicates, reduced to {y, z}, stored densely from STORE_ADDR.
// RESULT_BYTES, TUPLES_IN, TUPLES_OUT, BUSY and CYCLE_COUNTER are checked, and
// the word after the result must be untouched. The mechanisms of the design
// are counted and must each occur: tuples dropped by a filter, read
// back-pressure, a burst cut at a 4 KB boundary and a block end carried by an
// empty item. The cases depend on NS (see run_cases). When the run is over,
// or the watchdog fires, 'finished' is set and the including testbench
// reports checks and failures.
module ndp_pe_env
  import ndp_pkg::*;
#(
  parameter int unsigned NS = 2
);
  localparam int unsigned CC_ADDR = REG_FILTER_BASE + REG_FILTER_STRIDE * NS;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [7:0]  s_awaddr, s_araddr;
  logic        s_awvalid, s_awready, s_wvalid, s_wready, s_bvalid, s_bready;
  logic        s_arvalid, s_arready, s_rvalid, s_rready;
  logic [31:0] s_wdata, s_rdata;
  logic [3:0]  s_wstrb;
  logic [1:0]  s_bresp, s_rresp;

  addr_t       m_araddr, m_awaddr;
  logic [7:0]  m_arlen, m_awlen;
  logic [2:0]  m_arsize, m_awsize;
  logic [1:0]  m_arburst, m_awburst, m_rresp, m_bresp;
  logic        m_arvalid, m_arready, m_rlast, m_rvalid, m_rready;
  logic        m_awvalid, m_awready, m_wlast, m_wvalid, m_wready, m_bvalid, m_bready;
  word_t       m_rdata, m_wdata;
  logic [7:0]  m_wstrb;
  logic        busy;
  logic [NS-1:0] filter_drop;

  ndp_pe #(.NUM_STAGES(NS), .STORE_DEPTH(16)) dut (.*);

  axi_mem_model #(.MEM_WORDS(32768), .STALL_PCT(30), .WSTALL_PCT(75)) u_mem (
    .clk, .rst_n,
    .araddr(m_araddr), .arlen(m_arlen), .arvalid(m_arvalid), .arready(m_arready),
    .rdata(m_rdata), .rresp(m_rresp), .rlast(m_rlast), .rvalid(m_rvalid), .rready(m_rready),
    .awaddr(m_awaddr), .awlen(m_awlen), .awvalid(m_awvalid), .awready(m_awready),
    .wdata(m_wdata), .wstrb(m_wstrb), .wlast(m_wlast), .wvalid(m_wvalid), .wready(m_wready),
    .bresp(m_bresp), .bvalid(m_bvalid), .bready(m_bready)
  );

  int checks = 0, failures = 0;
  bit finished = 1'b0;   // set when the run is over; the testbench then reports
  int n_drop = 0, n_rstall = 0, n_split4k = 0, n_marker = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic axil_write(int unsigned a, logic [31:0] d);
    @(negedge clk);
    s_awaddr = 8'(a); s_wdata = d; s_wstrb = 4'hF; s_awvalid = 1; s_wvalid = 1;
    do @(posedge clk); while (!s_awready);
    @(negedge clk);
    s_awvalid = 0; s_wvalid = 0;
    while (!s_bvalid) @(negedge clk);
    @(negedge clk);
  endtask

  task automatic axil_read(int unsigned a, output logic [31:0] d);
    @(negedge clk);
    s_araddr = 8'(a); s_arvalid = 1;
    do @(posedge clk); while (!s_arready);
    @(negedge clk);
    s_arvalid = 0;
    while (!s_rvalid) @(negedge clk);
    d = s_rdata;
    @(negedge clk);
  endtask

  // byte-level access to the model's memory (little-endian)
  function automatic logic [31:0] rd32(int unsigned byte_addr);
    logic [31:0] v;
    for (int b = 0; b < 4; b++)
      v[8*b +: 8] = u_mem.mem[(byte_addr + b) / 8][8*((byte_addr + b) % 8) +: 8];
    return v;
  endfunction

  function automatic bit pred(logic [31:0] f, logic [2:0] op, logic [31:0] v);
    case (op)
      1: return f == v;
      2: return f != v;
      3: return f >  v;
      4: return f >= v;
      5: return f <  v;
      6: return f <= v;
      default: return 1'b1;
    endcase
  endfunction

  // Program the PE, run one block and compare everything.
  task automatic run_block(string name, int unsigned la, int unsigned lb, int unsigned sa,
                           int unsigned col [NS], int unsigned val [NS], int unsigned op [NS]);
    logic [31:0] r, guard;
    int unsigned nw, nt, kept, exp_bytes;
    nw = ((lb > BLOCK_BYTES) ? BLOCK_BYTES : lb) / 8;
    nt = nw * 64 / 96;
    la = la & ~32'd7;
    // reference
    kept = 0;
    for (int t = 0; t < nt; t++) begin
      logic [31:0] f [3];
      bit pass = 1;
      for (int i = 0; i < 3; i++) f[i] = rd32(la + 12*t + 4*i);
      for (int s = 0; s < NS; s++) if (!pred(f[col[s]], 3'(op[s]), val[s])) pass = 0;
      if (pass) kept++;
    end
    exp_bytes = kept * 8;
    // expected result kept in a scratch copy to compare after the run
    begin
      logic [63:0] exp_w [$];
      for (int t = 0; t < nt; t++) begin
        logic [31:0] f [3];
        bit pass = 1;
        for (int i = 0; i < 3; i++) f[i] = rd32(la + 12*t + 4*i);
        for (int s = 0; s < NS; s++) if (!pred(f[col[s]], 3'(op[s]), val[s])) pass = 0;
        if (pass) exp_w.push_back({f[2], f[1]});
      end
      guard = 32'hA5A5_0000 ^ sa;
      u_mem.mem[(sa / 8 + kept) % 32768] = {guard, guard};
      axil_write(REG_LOAD_ADDR, la);
      axil_write(REG_LOAD_BYTES, lb);
      axil_write(REG_STORE_ADDR, sa);
      for (int s = 0; s < NS; s++) begin
        axil_write(REG_FILTER_BASE + REG_FILTER_STRIDE * s,     col[s]);
        axil_write(REG_FILTER_BASE + REG_FILTER_STRIDE * s + 4, val[s]);
        axil_write(REG_FILTER_BASE + REG_FILTER_STRIDE * s + 8, op[s]);
      end
      axil_read(REG_FILTER_BASE + REG_FILTER_STRIDE * (NS - 1) + 4, r);
      check(r == val[NS-1], {name, ": filter value read back"});
      axil_write(REG_START, 1);
      axil_read(REG_BUSY, r);
      check(r == 1, {name, ": BUSY after START"});
      do axil_read(REG_BUSY, r); while (r != 0);
      axil_read(REG_TUPLES_IN, r);
      check(r == nt, $sformatf("%s: TUPLES_IN %0d expected %0d", name, r, nt));
      axil_read(REG_TUPLES_OUT, r);
      check(r == kept, $sformatf("%s: TUPLES_OUT %0d expected %0d", name, r, kept));
      axil_read(REG_RESULT_BYTES, r);
      check(r == exp_bytes, $sformatf("%s: RESULT_BYTES %0d expected %0d", name, r, exp_bytes));
      axil_read(CC_ADDR, r);
      check(r > nw, $sformatf("%s: CYCLE_COUNTER %0d", name, r));
      for (int k = 0; k < kept; k++)
        check(u_mem.mem[(sa / 8 + k) % 32768] == exp_w[k],
              $sformatf("%s: result word %0d = %h expected %h", name, k,
                        u_mem.mem[(sa / 8 + k) % 32768], exp_w[k]));
      check(u_mem.mem[(sa / 8 + kept) % 32768] == {guard, guard}, {name, ": word after result untouched"});
      check(u_mem.w_errors == 0, {name, ": AXI write bursts well formed"});
      $display("%s: %0d tuples in, %0d kept", name, nt, kept);
    end
  endtask

  // mechanism counters
  always @(posedge clk) if (rst_n) begin
    if (|filter_drop) n_drop++;
    if (m_rvalid && !m_rready) n_rstall++;
    if (m_arvalid && m_arready && m_arlen != 8'd15 && 32'(m_araddr[11:0]) + (32'(m_arlen) + 1) * 8 == 32'h1000)
      n_split4k++;
    if (dut.st_valid[NS] && dut.st_ready[NS] && dut.st_item[NS].last && dut.st_item[NS].empty) n_marker++;
  end

  // the cases, supplied by the testbench that includes this environment
  task automatic run_cases();
    int unsigned c [NS], v [NS], o [NS];
    for (int s = 0; s < NS; s++) begin c[s] = 0; v[s] = 0; o[s] = OP_NOP; end
    if (NS == 2) begin
      // range scan: 100 <= y and z < 500, partial block at an odd address across a 4 KB page
      c[0] = 1; c[1] = 2; v[0] = 100; v[1] = 500; o[0] = OP_GE; o[1] = OP_LT;
      run_block("range", 32'h0F88, 1000, 32'h20000, c, v, o);
      // nop filters: every tuple of a full block passes
      c[0] = 0; c[1] = 0; v[0] = 0; v[1] = 0; o[0] = OP_NOP; o[1] = OP_NOP;
      run_block("full", 32'h8000, BLOCK_BYTES, 32'h30000, c, v, o);
      // nothing passes
      c[0] = 0; c[1] = 0; v[0] = 5000; v[1] = 0; o[0] = OP_GT; o[1] = OP_NOP;
      run_block("none", 32'h1000, 4096, 32'h28000, c, v, o);
      // shorter than one tuple
      c[0] = 0; c[1] = 0; v[0] = 0; v[1] = 0; o[0] = OP_NOP; o[1] = OP_NOP;
      run_block("short", 32'h1000, 8, 32'h28100, c, v, o);
      // length above one block is clipped to the block
      c[0] = 0; c[1] = 1; v[0] = 500; v[1] = 700; o[0] = OP_NE; o[1] = OP_LE;
      run_block("clip", 32'h0, 40000, 32'h38000, c, v, o);
      // equality on x, selective
      c[0] = 0; c[1] = 2; v[0] = u_mem.mem[32][31:0]; v[1] = 0; o[0] = OP_EQ; o[1] = OP_NOP;
      run_block("eq", 32'h100, 2400, 32'h29000, c, v, o);
    end else begin
      // NS stages: random conjunctions of predicates over all three fields
      for (int k = 0; k < 6; k++) begin
        for (int s = 0; s < NS; s++) begin
          c[s] = $urandom_range(2);
          o[s] = (s == 0) ? OP_GE : (s == 1) ? OP_LE : $urandom_range(6);
          v[s] = (s == 0) ? 150 : (s == 1) ? 850 : $urandom_range(1000);
          if (o[s] == OP_EQ) o[s] = OP_NE;
          if (k == 5) o[s] = OP_NOP;   // everything passes: the write side backs up
        end
        run_block($sformatf("%0d-stage #%0d", NS, k), 32'h1000 * k + 8 * k, 4096 * (k + 1), 32'h30000 + 32'h1000 * k,
                  c, v, o);
      end
    end
  endtask

  initial begin
    s_awvalid = 0; s_wvalid = 0; s_arvalid = 0; s_bready = 1; s_rready = 1;
    s_awaddr = 0; s_araddr = 0; s_wdata = 0; s_wstrb = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 32768; w++) begin
      // fields stay small so that range predicates select a useful share
      logic [31:0] a, b;
      a = $urandom_range(1000); b = $urandom_range(1000);
      u_mem.mem[w] = {b, a};
    end
    run_cases();
    check(n_drop > 0,    "mechanism: filter dropped tuples");
    check(n_rstall > 0,  "mechanism: read data back-pressure");
    check(n_split4k > 0, "mechanism: burst cut at a 4 KB boundary");
    check(n_marker > 0,  "mechanism: block end carried by an empty item");
    $display("drops=%0d rstalls=%0d split4k=%0d markers=%0d", n_drop, n_rstall, n_split4k, n_marker);
    finished = 1'b1;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    finished = 1'b1;
  end
endmodule
