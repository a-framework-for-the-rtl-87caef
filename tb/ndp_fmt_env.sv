// ndp_fmt_env - test environment for one PE built for an arbitrary record
// format F with NS filter stages.
//
// The PE is connected to a DRAM model that stalls its handshakes at random.
// The model's memory is filled with random bytes, so every field of every
// record takes random values (for float fields this includes infinities and
// NaNs). Fields may be up to 64 bits (then a FILTER_VAL_HI register per stage
// is written too). For each case the PE is programmed over AXI4-Lite, a block is run
// and the result area is compared with a reference computed here from the
// format description alone: each record is read bit by bit from memory, its
// fields are padded (sign-extended where signed) and tested against all NS
// predicates with the ordering of the field's type (integers as integers,
// floats as real numbers with NaN unordered), and each passing record is
// rebuilt in the output layout, string postfix included where the output
// keeps it, and appended densely to the expected result. RESULT_BYTES,
// TUPLES_IN, TUPLES_OUT and the word after the result are checked.
// Thresholds are taken from field values of random records of the block, so
// predicates select a useful share. Filter drops and block ends carried by an
// empty item are counted and must both occur. 'finished' is set when the
// cases are done or the watchdog fires.
module ndp_fmt_env
  import ndp_pkg::*;
#(
  parameter fmt_t        F  = FMT_DEFAULT,
  parameter int unsigned NS = 1
);
  localparam int unsigned MEM_WORDS = 32768;
  localparam int unsigned MAX_REC   = 2048;    // largest output record, bits
  localparam int unsigned EW        = F.elem_w;
  localparam int unsigned STRIDE    = filter_stride(EW);
  localparam int unsigned OP_OFS    = filter_op_ofs(EW);

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

  ndp_pe #(.FMT(F), .NUM_STAGES(NS), .STORE_DEPTH(32)) dut (.*);

  axi_mem_model #(.MEM_WORDS(MEM_WORDS), .STALL_PCT(20), .WSTALL_PCT(50)) u_mem (
    .clk, .rst_n,
    .araddr(m_araddr), .arlen(m_arlen), .arvalid(m_arvalid), .arready(m_arready),
    .rdata(m_rdata), .rresp(m_rresp), .rlast(m_rlast), .rvalid(m_rvalid), .rready(m_rready),
    .awaddr(m_awaddr), .awlen(m_awlen), .awvalid(m_awvalid), .awready(m_awready),
    .wdata(m_wdata), .wstrb(m_wstrb), .wlast(m_wlast), .wvalid(m_wvalid), .wready(m_wready),
    .bresp(m_bresp), .bvalid(m_bvalid), .bready(m_bready)
  );

  int checks = 0, failures = 0;
  bit finished = 1'b0;
  int n_drop = 0, n_marker = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (%m)", what);
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

  // one bit of the model's memory, by bit address
  function automatic logic mem_bit(longint unsigned bit_addr);
    return u_mem.mem[15'((bit_addr / 64) % MEM_WORDS)][6'(bit_addr % 64)];
  endfunction

  // field i of the record starting at bit rec, padded to EW bits
  function automatic logic [63:0] field(longint unsigned rec, int i);
    logic [63:0] v = '0;
    for (int b = 0; b < EW; b++) begin
      if (b < int'(F.in_w[i]))
        v[b] = mem_bit(rec + 64'(F.in_ofs[i]) + 64'(b));
      else if (F.in_type[i] == FT_SINT)
        v[b] = mem_bit(rec + 64'(F.in_ofs[i]) + 64'(F.in_w[i]) - 1);
    end
    return v;
  endfunction

  function automatic real f32(logic [31:0] x);
    real m;
    int  e;
    e = int'(x[30:23]);
    if (e == 255) return x[31] ? -1.0e300 : 1.0e300;
    m = (e == 0) ? real'(x[22:0]) / 8388608.0 : 1.0 + real'(x[22:0]) / 8388608.0;
    if (e == 0) e = 1;
    m = m * (2.0 ** (e - 127));
    return x[31] ? -m : m;
  endfunction

  function automatic bit is_nan(logic [63:0] x);
    if (EW == 64) return x[62:52] == 11'h7FF && x[51:0] != 0;
    return x[30:23] == 8'hFF && x[22:0] != 0;
  endfunction

  // x and y are padded fields of EW bits
  function automatic bit pred(logic [63:0] x, ftype_e t, logic [2:0] o, logic [63:0] y);
    bit eq, lt;
    if (t == FT_FLOAT) begin
      real xs, ys;
      if (is_nan(x) || is_nan(y)) return (o == OP_NE) || (o == OP_NOP) || (o == 3'd7);
      xs = (EW == 64) ? $bitstoreal(x) : f32(x[31:0]);
      ys = (EW == 64) ? $bitstoreal(y) : f32(y[31:0]);
      eq = xs == ys;
      lt = xs < ys;
    end else if (t == FT_SINT) begin
      longint sx, sy;
      sx = (EW == 64) ? $signed(x) : longint'($signed(x[31:0]));
      sy = (EW == 64) ? $signed(y) : longint'($signed(y[31:0]));
      eq = sx == sy;
      lt = sx < sy;
    end else begin
      eq = x == y;
      lt = x < y;
    end
    case (o)
      OP_EQ: return eq;
      OP_NE: return !eq;
      OP_GT: return !lt && !eq;
      OP_GE: return !lt;
      OP_LT: return lt;
      OP_LE: return lt || eq;
      default: return 1;
    endcase
  endfunction

  task automatic run_block(string name, int unsigned la, int unsigned lb, int unsigned sa,
                           int unsigned col [NS], logic [63:0] val [NS], int unsigned op [NS]);
    logic [31:0] r;
    logic [63:0] guard;
    logic        exp_bits [$];
    logic [MAX_REC-1:0] out_rec;
    logic [63:0]        fv;
    int unsigned nw, nt, kept, exp_bytes, exp_words;
    nw = ((lb > BLOCK_BYTES) ? BLOCK_BYTES : lb) / 8;
    nt = nw * 64 / F.in_bits;
    // reference
    kept = 0;
    for (int t = 0; t < nt; t++) begin
      longint unsigned rec = longint'(la) * 8 + longint'(t) * F.in_bits;
      bit pass = 1;
      for (int s = 0; s < NS; s++)
        if (!pred(field(rec, col[s]), F.in_type[col[s]], 3'(op[s]), val[s])) pass = 0;
      if (pass) begin
        out_rec = '0;
        for (int j = 0; j < int'(F.n_out); j++) begin
          fv = field(rec, int'(F.out_src[j]));
          for (int b = 0; b < int'(F.out_w[j]); b++) out_rec[int'(F.out_ofs[j]) + b] = fv[b];
        end
        if (F.out_has_pf)
          for (int b = 0; b < int'(F.pf_w); b++)
            out_rec[int'(F.out_pf_ofs) + b] = mem_bit(rec + 64'(F.pf_ofs) + 64'(b));
        for (int b = 0; b < int'(F.out_bits); b++) exp_bits.push_back(out_rec[b]);
        kept++;
      end
    end
    exp_bytes = kept * F.out_bits / 8;
    exp_words = (exp_bits.size() + 63) / 64;
    while (exp_bits.size() % 64 != 0) exp_bits.push_back(1'b0);
    guard = {32'h5A5A_0000 ^ sa, 32'h0F0F_0000 ^ la};
    u_mem.mem[(sa / 8 + exp_words) % MEM_WORDS] = guard;
    // program and run
    axil_write(REG_LOAD_ADDR, la);
    axil_write(REG_LOAD_BYTES, lb);
    axil_write(REG_STORE_ADDR, sa);
    for (int s = 0; s < NS; s++) begin
      axil_write(REG_FILTER_BASE + STRIDE * s,     col[s]);
      axil_write(REG_FILTER_BASE + STRIDE * s + 4, val[s][31:0]);
      if (EW > 32) axil_write(REG_FILTER_BASE + STRIDE * s + 8, val[s][63:32]);
      axil_write(REG_FILTER_BASE + STRIDE * s + OP_OFS, op[s]);
    end
    if (EW > 32) begin
      axil_read(REG_FILTER_BASE + STRIDE * (NS - 1) + 8, r);
      check(r == val[NS-1][63:32], {name, ": FILTER_VAL_HI read back"});
    end
    axil_write(REG_START, 1);
    do axil_read(REG_BUSY, r); while (r != 0);
    axil_read(REG_TUPLES_IN, r);
    check(r == nt, $sformatf("%s: TUPLES_IN %0d expected %0d", name, r, nt));
    axil_read(REG_TUPLES_OUT, r);
    check(r == kept, $sformatf("%s: TUPLES_OUT %0d expected %0d", name, r, kept));
    axil_read(REG_RESULT_BYTES, r);
    check(r == exp_bytes, $sformatf("%s: RESULT_BYTES %0d expected %0d", name, r, exp_bytes));
    for (int k = 0; k < exp_words; k++) begin
      logic [63:0] w;
      for (int b = 0; b < 64; b++) w[b] = exp_bits[64*k + b];
      check(u_mem.mem[(sa / 8 + k) % MEM_WORDS] == w,
            $sformatf("%s: result word %0d = %h expected %h", name, k,
                      u_mem.mem[(sa / 8 + k) % MEM_WORDS], w));
    end
    check(u_mem.mem[(sa / 8 + exp_words) % MEM_WORDS] == guard, {name, ": word after result untouched"});
    check(u_mem.w_errors == 0, {name, ": AXI write bursts well formed"});
    $display("%s: %0d records of %0d bits in, %0d kept", name, nt, F.in_bits, kept);
  endtask

  always @(posedge clk) if (rst_n) begin
    if (|filter_drop) n_drop++;
    if (dut.st_valid[NS] && dut.st_ready[NS] && dut.st_item[NS].last && dut.st_item[NS].empty) n_marker++;
  end

  initial begin
    int unsigned c [NS], o [NS];
    logic [63:0] v [NS];
    s_awvalid = 0; s_wvalid = 0; s_arvalid = 0; s_bready = 1; s_rready = 1;
    s_awaddr = 0; s_araddr = 0; s_wdata = 0; s_wstrb = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < MEM_WORDS; w++) u_mem.mem[w] = {$urandom, $urandom};
    for (int k = 0; k < 6; k++) begin
      int unsigned la, lb, n;
      la = 32'h2000 * k + 8 * k;
      lb = (k == 0) ? BLOCK_BYTES : 4096 * k + 8 * k;
      n  = lb / 8 * 64 / F.in_bits;
      for (int s = 0; s < NS; s++) begin
        longint unsigned rec;
        c[s] = $urandom_range(F.n_in - 1);
        // stages 0 and 1 form a range, later ones are nop (cases 1, 2),
        // one random operator and inequalities (cases 3 to 5)
        o[s] = (k == 0) ? 0 : (s % 2 == 0) ? 4 : 6;
        if (s >= 2) o[s] = (k < 3) ? 0 : (s == 2) ? $urandom_range(1, 6) : 2;
        rec  = longint'(la) * 8 + longint'($urandom_range(n - 1)) * F.in_bits;
        v[s] = field(rec, c[s]);   // thresholds from the data keep a useful share
      end
      run_block($sformatf("%0d-stage #%0d", NS, k), la, lb, 32'h20000 + 32'h2000 * k, c, v, o);
    end
    // a block too short for one record
    for (int s = 0; s < NS; s++) o[s] = 0;
    run_block("short", 32'h1000, 8 * ((F.in_bits - 1) / 64), 32'h3F000, c, v, o);
    check(n_drop > 0,   "mechanism: filter dropped records");
    check(n_marker > 0, "mechanism: block end carried by an empty item");
    $display("drops=%0d markers=%0d", n_drop, n_marker);
    finished = 1'b1;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    finished = 1'b1;
  end
endmodule
