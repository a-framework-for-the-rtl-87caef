// tb_ndp_accel_array - end-to-end test of the accelerator array at its
// default parameters (two PEs, one filter stage each, 32 KB blocks).
//
// Each PE has its own DRAM model. PE 0 runs a full 32 KB block against a
// memory that never stalls; its CYCLE_COUNTER must show the memory-bound
// rate of one 64-bit word per cycle (4096 words plus a small fixed
// overhead). PE 1 runs at the same time against a memory that stalls at
// random, first a partial block at an address crossing a 4 KB page, then a
// full block. Every result is compared word by word with a reference
// computed here from the stored Point3D tuples: kept tuples reduced to
// {y, z}. The mechanisms of the design are counted and must each occur:
// tuples dropped by a filter, read back-pressure, a burst cut at a 4 KB
// boundary, a block whose last tuple was filtered out (empty end marker),
// and both PEs busy at once.
module tb_ndp_accel_array;
  import ndp_pkg::*;

  localparam int unsigned NP = 2;
  localparam int unsigned CC_ADDR = REG_FILTER_BASE + REG_FILTER_STRIDE;
  localparam int unsigned MW = 16384;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [7:0]  s_awaddr [NP], s_araddr [NP];
  logic        s_awvalid [NP], s_awready [NP], s_wvalid [NP], s_wready [NP];
  logic        s_bvalid [NP], s_bready [NP], s_arvalid [NP], s_arready [NP];
  logic        s_rvalid [NP], s_rready [NP];
  logic [31:0] s_wdata [NP], s_rdata [NP];
  logic [3:0]  s_wstrb [NP];
  logic [1:0]  s_bresp [NP], s_rresp [NP];
  addr_t       m_araddr [NP], m_awaddr [NP];
  logic [7:0]  m_arlen [NP], m_awlen [NP];
  logic [2:0]  m_arsize [NP], m_awsize [NP];
  logic [1:0]  m_arburst [NP], m_awburst [NP], m_rresp [NP], m_bresp [NP];
  logic        m_arvalid [NP], m_arready [NP], m_rlast [NP], m_rvalid [NP], m_rready [NP];
  logic        m_awvalid [NP], m_awready [NP], m_wlast [NP], m_wvalid [NP], m_wready [NP];
  logic        m_bvalid [NP], m_bready [NP];
  word_t       m_rdata [NP], m_wdata [NP];
  logic [7:0]  m_wstrb [NP];
  logic [NP-1:0] busy;
  logic [0:0]  filter_drop [NP];

  ndp_accel_array dut (.*);

  for (genvar p = 0; p < NP; p++) begin : g_mem
    axi_mem_model #(.MEM_WORDS(MW), .STALL_PCT(p == 0 ? 0 : 35), .WSTALL_PCT(p == 0 ? 0 : 80)) u_mem (
      .clk, .rst_n,
      .araddr(m_araddr[p]), .arlen(m_arlen[p]), .arvalid(m_arvalid[p]), .arready(m_arready[p]),
      .rdata(m_rdata[p]), .rresp(m_rresp[p]), .rlast(m_rlast[p]), .rvalid(m_rvalid[p]),
      .rready(m_rready[p]),
      .awaddr(m_awaddr[p]), .awlen(m_awlen[p]), .awvalid(m_awvalid[p]), .awready(m_awready[p]),
      .wdata(m_wdata[p]), .wstrb(m_wstrb[p]), .wlast(m_wlast[p]), .wvalid(m_wvalid[p]),
      .wready(m_wready[p]),
      .bresp(m_bresp[p]), .bvalid(m_bvalid[p]), .bready(m_bready[p])
    );
  end

  int checks = 0, failures = 0;
  int n_drop = 0, n_rstall = 0, n_split4k = 0, n_marker = 0, n_both = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [63:0] mem_rd(int p, int unsigned w);
    return (p == 0) ? g_mem[0].u_mem.mem[w % MW] : g_mem[1].u_mem.mem[w % MW];
  endfunction

  task automatic mem_wr(int p, int unsigned w, logic [63:0] d);
    if (p == 0) g_mem[0].u_mem.mem[w % MW] = d;
    else        g_mem[1].u_mem.mem[w % MW] = d;
  endtask

  function automatic logic [31:0] rd32(int p, int unsigned a);
    logic [31:0] v;
    for (int b = 0; b < 4; b++) v[8*b +: 8] = mem_rd(p, (a + b) / 8) >> (8 * ((a + b) % 8));
    return v;
  endfunction

  task automatic axil_write(int p, int unsigned a, logic [31:0] d);
    @(negedge clk);
    s_awaddr[p] = 8'(a); s_wdata[p] = d; s_wstrb[p] = 4'hF; s_awvalid[p] = 1; s_wvalid[p] = 1;
    do @(posedge clk); while (!s_awready[p]);
    @(negedge clk);
    s_awvalid[p] = 0; s_wvalid[p] = 0;
    while (!s_bvalid[p]) @(negedge clk);
    @(negedge clk);
  endtask

  task automatic axil_read(int p, int unsigned a, output logic [31:0] d);
    @(negedge clk);
    s_araddr[p] = 8'(a); s_arvalid[p] = 1;
    do @(posedge clk); while (!s_arready[p]);
    @(negedge clk);
    s_arvalid[p] = 0;
    while (!s_rvalid[p]) @(negedge clk);
    d = s_rdata[p];
    @(negedge clk);
  endtask

  function automatic bit pred(logic [31:0] f, int unsigned op, logic [31:0] v);
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

  // one block on PE p; returns the cycle count the PE reported
  task automatic run_block(int p, string name, int unsigned la, int unsigned lb, int unsigned sa,
                           int unsigned col, int unsigned val, int unsigned op,
                           output int unsigned cycles);
    logic [31:0] r;
    logic [63:0] exp_w [$];
    int unsigned nw, nt;
    nw = ((lb > BLOCK_BYTES) ? BLOCK_BYTES : lb) / 8;
    nt = nw * 64 / 96;
    for (int t = 0; t < nt; t++) begin
      logic [31:0] f [3];
      for (int i = 0; i < 3; i++) f[i] = rd32(p, la + 12*t + 4*i);
      if (pred(f[col], op, val)) exp_w.push_back({f[2], f[1]});
    end
    mem_wr(p, sa / 8 + exp_w.size(), 64'hDEAD_BEEF_0BAD_F00D);
    axil_write(p, REG_LOAD_ADDR, la);
    axil_write(p, REG_LOAD_BYTES, lb);
    axil_write(p, REG_STORE_ADDR, sa);
    axil_write(p, REG_FILTER_BASE, col);
    axil_write(p, REG_FILTER_BASE + 4, val);
    axil_write(p, REG_FILTER_BASE + 8, op);
    axil_write(p, REG_START, 1);
    do axil_read(p, REG_BUSY, r); while (r != 0);
    axil_read(p, REG_TUPLES_IN, r);
    check(r == nt, $sformatf("PE%0d %s: TUPLES_IN %0d expected %0d", p, name, r, nt));
    axil_read(p, REG_TUPLES_OUT, r);
    check(r == exp_w.size(), $sformatf("PE%0d %s: TUPLES_OUT %0d expected %0d", p, name, r, exp_w.size()));
    axil_read(p, REG_RESULT_BYTES, r);
    check(r == 8 * exp_w.size(), $sformatf("PE%0d %s: RESULT_BYTES %0d", p, name, r));
    axil_read(p, CC_ADDR, r);
    cycles = r;
    for (int k = 0; k < exp_w.size(); k++)
      check(mem_rd(p, sa / 8 + k) == exp_w[k],
            $sformatf("PE%0d %s: word %0d = %h expected %h", p, name, k, mem_rd(p, sa / 8 + k), exp_w[k]));
    check(mem_rd(p, sa / 8 + exp_w.size()) == 64'hDEAD_BEEF_0BAD_F00D,
          $sformatf("PE%0d %s: word after result untouched", p, name));
    $display("PE%0d %s: %0d tuples in, %0d kept, %0d cycles", p, name, nt, exp_w.size(), cycles);
  endtask

  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < NP; p++) begin
      if (filter_drop[p][0]) n_drop++;
      if (m_rvalid[p] && !m_rready[p]) n_rstall++;
      if (m_arvalid[p] && m_arready[p] && m_arlen[p] != 8'd15 &&
          32'(m_araddr[p][11:0]) + (32'(m_arlen[p]) + 1) * 8 == 32'h1000) n_split4k++;
    end
    if (dut.g_pe[0].u_pe.st_valid[1] && dut.g_pe[0].u_pe.st_ready[1] &&
        dut.g_pe[0].u_pe.st_item[1].last && dut.g_pe[0].u_pe.st_item[1].empty) n_marker++;
    if (dut.g_pe[1].u_pe.st_valid[1] && dut.g_pe[1].u_pe.st_ready[1] &&
        dut.g_pe[1].u_pe.st_item[1].last && dut.g_pe[1].u_pe.st_item[1].empty) n_marker++;
    if (&busy) n_both++;
  end

  initial begin
    for (int p = 0; p < NP; p++) begin
      s_awvalid[p] = 0; s_wvalid[p] = 0; s_arvalid[p] = 0; s_bready[p] = 1; s_rready[p] = 1;
      s_awaddr[p] = 0; s_araddr[p] = 0; s_wdata[p] = 0; s_wstrb[p] = 0;
    end
    repeat (4) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < MW; w++) begin
      mem_wr(0, w, {32'($urandom_range(999)), 32'($urandom_range(999))});
      mem_wr(1, w, {32'($urandom_range(999)), 32'($urandom_range(999))});
    end
    // make the last tuple of PE 1's first block fail its predicate (y < 600)
    // the block holds 170 tuples; tuple 169 starts at byte 0x0F88 + 12*169
    mem_wr(1, (32'h0F88 + 12*169 + 4) / 8, mem_rd(1, (32'h0F88 + 12*169 + 4) / 8) | 64'h0000_0FFF_0000_0000);
    fork
      begin : pe0
        int unsigned c;
        run_block(0, "full block y<500", 32'h0, BLOCK_BYTES, 32'h10000, 1, 500, OP_LT, c);
        check(c >= 4096 && c <= 4096 + 64,
              $sformatf("PE0: %0d cycles for 4096 words, expected one word per cycle", c));
      end
      begin : pe1
        int unsigned c;
        run_block(1, "partial block y<600", 32'h0F88, 2048, 32'h18000, 1, 600, OP_LT, c);
        run_block(1, "full block z>=250", 32'h8000, BLOCK_BYTES, 32'h1A000, 2, 250, OP_GE, c);
      end
    join
    check(n_drop > 0,    "mechanism: filter dropped tuples");
    check(n_rstall > 0,  "mechanism: read data back-pressure");
    check(n_split4k > 0, "mechanism: burst cut at a 4 KB boundary");
    check(n_marker > 0,  "mechanism: block end carried by an empty item");
    check(n_both > 0,    "mechanism: both PEs busy at once");
    check(g_mem[0].u_mem.w_errors == 0 && g_mem[1].u_mem.w_errors == 0, "AXI write bursts well formed");
    $display("drops=%0d rstalls=%0d split4k=%0d markers=%0d both_busy=%0d",
             n_drop, n_rstall, n_split4k, n_marker, n_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
