// tb_store_unit - checks the DRAM writer against a stalling memory model.
//
// Random numbers of words (none, fewer than one burst, many bursts) are
// offered with random gaps, then the end of the stream is signalled. The
// memory from the aligned store address on must hold exactly these words,
// the word after them must be untouched, every burst must be at most 16
// beats, stay inside one 4 KB page and end with wlast on its last beat, and
// done must rise only after the last write response.
module tb_store_unit;
  import ndp_pkg::*;

  localparam int unsigned MW = 16384;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        start, in_valid, in_ready, eos, done;
  addr_t       cfg_addr;
  word_t       in_data;
  logic [31:0] words_written;
  addr_t       m_awaddr;
  logic [7:0]  m_awlen;
  logic [2:0]  m_awsize;
  logic [1:0]  m_awburst, m_bresp;
  logic        m_awvalid, m_awready, m_wlast, m_wvalid, m_wready, m_bvalid, m_bready;
  word_t       m_wdata;
  logic [7:0]  m_wstrb;

  store_unit dut (.*);

  logic [1:0]  d_rresp;
  logic        d_arready, d_rlast, d_rvalid;
  logic [63:0] d_rdata;
  axi_mem_model #(.MEM_WORDS(MW), .STALL_PCT(40)) u_mem (
    .clk, .rst_n,
    .araddr('0), .arlen('0), .arvalid(1'b0), .arready(d_arready),
    .rdata(d_rdata), .rresp(d_rresp), .rlast(d_rlast), .rvalid(d_rvalid), .rready(1'b1),
    .awaddr(m_awaddr), .awlen(m_awlen), .awvalid(m_awvalid), .awready(m_awready),
    .wdata(m_wdata), .wstrb(m_wstrb), .wlast(m_wlast), .wvalid(m_wvalid), .wready(m_wready),
    .bresp(m_bresp), .bvalid(m_bvalid), .bready(m_bready)
  );

  int checks = 0, failures = 0, bad_burst = 0, b_count = 0, aw_count = 0, early_done = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (m_awvalid && m_awready) begin
      aw_count++;
      if (m_awlen > 15 || (32'(m_awaddr[11:0]) + (32'(m_awlen) + 1) * 8 > 4096)) bad_burst++;
    end
    if (m_bvalid && m_bready) b_count++;
  end
  // sampled between edges, when all counters are settled
  always @(negedge clk) if (rst_n && done && b_count != aw_count) early_done++;

  task automatic run(int unsigned a, int unsigned n, int in_pct);
    word_t words [$];
    int unsigned sent, cyc, base;
    base = (a & ~32'd7) / 8;
    for (int k = 0; k < n; k++) words.push_back({$urandom, $urandom});
    u_mem.mem[(base + n) % MW] = 64'hFEED_FACE_CAFE_D00D;
    @(negedge clk);
    cfg_addr = a; start = 1;
    @(negedge clk);
    start = 0;
    aw_count = 0; b_count = 0;
    sent = 0; cyc = 0;
    while (!done && cyc < 40 * n + 200) begin
      in_valid = (sent < n) && ($urandom_range(99) < in_pct);
      in_data  = (sent < n) ? words[sent] : '0;
      @(posedge clk);
      cyc++;
      if (in_valid && in_ready) sent++;
      @(negedge clk);
      eos = (sent == n);
    end
    in_valid = 0;
    check(done, $sformatf("%0d words at %h: done", n, a));
    check(words_written == n, $sformatf("words_written %0d expected %0d", words_written, n));
    for (int k = 0; k < n; k++)
      check(u_mem.mem[(base + k) % MW] == words[k], $sformatf("word %0d of %0d", k, n));
    check(u_mem.mem[(base + n) % MW] == 64'hFEED_FACE_CAFE_D00D, "word after result untouched");
    eos = 0;
  endtask

  initial begin
    start = 0; in_valid = 0; eos = 0; cfg_addr = '0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(32'h400, 0, 80);
    run(32'h0F90, 40, 80);
    run(32'h2005, 3, 50);
    for (int k = 0; k < 15; k++) run(8 * $urandom_range(MW - 1), $urandom_range(700), 20 + $urandom_range(80));
    check(bad_burst == 0, "all bursts at most 16 beats inside one 4 KB page");
    check(early_done == 0, "done only after every write response");
    check(u_mem.w_errors == 0, "wlast on the last beat of every burst only");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
