// tb_load_unit - checks the DRAM reader against a stalling memory model.
//
// For random addresses and lengths (zero, partial, exactly and above one
// 32 KB block) the word stream must equal the memory from the 8-byte-aligned
// address on, n_words must be min(bytes, 32768) / 8, every burst must be at
// most 16 beats and stay inside one 4 KB page, and done must rise at the end.
// A run without stalls checks one word per cycle.
module tb_load_unit;
  import ndp_pkg::*;

  localparam int unsigned MW = 16384;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        start, done, out_valid, out_ready;
  addr_t       cfg_addr;
  logic [31:0] cfg_bytes, n_words;
  addr_t       m_araddr;
  logic [7:0]  m_arlen;
  logic [2:0]  m_arsize;
  logic [1:0]  m_arburst, m_rresp;
  logic        m_arvalid, m_arready, m_rlast, m_rvalid, m_rready;
  word_t       m_rdata, out_data;

  load_unit dut (.*);

  logic [1:0] dummy2;
  logic       dummy1, d_awready, d_wready, d_bvalid;
  axi_mem_model #(.MEM_WORDS(MW), .STALL_PCT(30)) u_mem (
    .clk, .rst_n,
    .araddr(m_araddr), .arlen(m_arlen), .arvalid(m_arvalid), .arready(m_arready),
    .rdata(m_rdata), .rresp(m_rresp), .rlast(m_rlast), .rvalid(m_rvalid), .rready(m_rready),
    .awaddr('0), .awlen('0), .awvalid(1'b0), .awready(d_awready),
    .wdata('0), .wstrb('0), .wlast(1'b0), .wvalid(1'b0), .wready(d_wready),
    .bresp(dummy2), .bvalid(d_bvalid), .bready(1'b1)
  );

  int checks = 0, failures = 0, bad_burst = 0, n_split = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n && m_arvalid && m_arready) begin
    if (m_arlen > 15 || (32'(m_araddr[11:0]) + (32'(m_arlen) + 1) * 8 > 4096)) bad_burst++;
    if (m_arlen != 15 && 32'(m_araddr[11:0]) + (32'(m_arlen) + 1) * 8 == 4096) n_split++;
  end

  task automatic run(int unsigned a, int unsigned nb, int out_pct, output int cycles);
    int unsigned nw, got;
    nw = ((nb > BLOCK_BYTES) ? BLOCK_BYTES : nb) / 8;
    @(negedge clk);
    cfg_addr = a; cfg_bytes = nb; start = 1;
    #1 check(n_words == nw, $sformatf("n_words %0d expected %0d", n_words, nw));
    @(negedge clk);
    start = 0;
    got = 0; cycles = 0;
    while (!(done && got == nw) && cycles < 20 * nw + 200) begin
      out_ready = ($urandom_range(99) < out_pct);
      @(posedge clk);
      cycles++;
      if (out_valid && out_ready) begin
        check(out_data == u_mem.mem[((a & ~32'd7) / 8 + got) % MW],
              $sformatf("word %0d of block at %h", got, a));
        got++;
      end
      @(negedge clk);
    end
    check(done && got == nw, $sformatf("block at %h, %0d bytes: %0d of %0d words", a, nb, got, nw));
  endtask

  initial begin
    int cyc;
    start = 0; out_ready = 0; cfg_addr = '0; cfg_bytes = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < MW; w++) u_mem.mem[w] = {$urandom, $urandom};
    run(32'h100, 0, 80, cyc);
    run(32'h0FC0, 800, 70, cyc);
    run(32'h2003, 100, 50, cyc);
    for (int k = 0; k < 20; k++) run($urandom_range(MW * 8 - 1), $urandom_range(3000), 20 + $urandom_range(80), cyc);
    run(32'h0, 50000, 90, cyc);
    check(bad_burst == 0, "all bursts at most 16 beats inside one 4 KB page");
    check(n_split > 0, "a burst was cut at a 4 KB boundary");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
