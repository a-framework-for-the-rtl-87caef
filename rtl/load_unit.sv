// load_unit - reads the input part of a data block from DRAM over AXI4.
//
// On start it takes a byte address and a byte count from the control
// registers. The count is limited to one block (BLOCK_BYTES = 32 KB) and cut
// down to whole 64-bit words; the address is aligned down to 8 bytes. The
// unit then issues INCR read bursts of up to MAX_BURST beats, none crossing a
// 4 KB boundary, each as soon as the previous address has been accepted, and
// passes every returned beat on as one word of the output stream. Loading only
// the bytes asked for, instead of always a whole block, is what the document
// adds over fixed block loaders.
//
// Interface: AXI4 read address and read data channels (64-bit data, no IDs:
// all bursts use ID 0 and return in order). The read data channel is the
// output stream: rready follows out_ready, so a stalled pipeline holds the
// data in the interconnect. n_words is the number of words the current start
// command will deliver (valid in the start cycle). done is high once every
// word has been passed on, until the next start.
// Timing: one word per cycle while the memory delivers. Burst size, alignment
// and the 4 KB rule are this design's choice.
module load_unit
  import ndp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  addr_t       cfg_addr,
  input  logic [31:0] cfg_bytes,
  output logic [31:0] n_words,
  output logic        done,
  // AXI4 read address channel
  output addr_t       m_araddr,
  output logic [7:0]  m_arlen,
  output logic [2:0]  m_arsize,
  output logic [1:0]  m_arburst,
  output logic        m_arvalid,
  input  logic        m_arready,
  // AXI4 read data channel
  input  word_t       m_rdata,
  input  logic [1:0]  m_rresp,
  input  logic        m_rlast,
  input  logic        m_rvalid,
  output logic        m_rready,
  // word stream
  output logic        out_valid,
  input  logic        out_ready,
  output word_t       out_data
);
  localparam int unsigned BEATS_4K = 4096 / BUS_BYTES;

  logic [31:0] req_left, recv_left;
  addr_t       next_addr;
  logic [31:0] clamped;
  logic [31:0] burst;
  logic [31:0] to_4k;

  assign clamped  = (cfg_bytes > BLOCK_BYTES) ? BLOCK_BYTES : cfg_bytes;
  assign n_words  = clamped / BUS_BYTES;

  assign to_4k = BEATS_4K - 32'(next_addr[11:$clog2(BUS_BYTES)]);
  always_comb begin
    burst = req_left;
    if (burst > MAX_BURST) burst = MAX_BURST;
    if (burst > to_4k)     burst = to_4k;
  end

  assign m_arsize  = 3'($clog2(BUS_BYTES));
  assign m_arburst = AXI_BURST_INCR;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      req_left  <= '0;
      recv_left <= '0;
      next_addr <= '0;
      m_arvalid <= 1'b0;
      m_araddr  <= '0;
      m_arlen   <= '0;
    end else if (start) begin
      req_left  <= n_words;
      recv_left <= n_words;
      next_addr <= cfg_addr & ~addr_t'(BUS_BYTES - 1);
      m_arvalid <= 1'b0;
    end else begin
      if (m_arvalid && m_arready) m_arvalid <= 1'b0;
      if ((!m_arvalid || m_arready) && req_left != '0) begin
        m_arvalid <= 1'b1;
        m_araddr  <= next_addr;
        m_arlen   <= 8'(burst - 1);
        next_addr <= next_addr + addr_t'(burst * BUS_BYTES);
        req_left  <= req_left - burst;
      end
      if (m_rvalid && m_rready) recv_left <= recv_left - 1'b1;
    end
  end

  assign m_rready  = out_ready && (recv_left != '0);
  assign out_valid = m_rvalid && (recv_left != '0);
  assign out_data  = m_rdata;
  assign done      = (recv_left == '0) && (req_left == '0) && !m_arvalid;

  // An unsolicited beat is a protocol error of the memory side.
  assert property (@(posedge clk) disable iff (!rst_n) m_rvalid |-> recv_left != '0);
  // The burst ends exactly where this unit expects it to.
  assert property (@(posedge clk) disable iff (!rst_n)
                   m_rvalid && m_rready && recv_left == 32'd1 |-> m_rlast);
  // AXI: the address must stay stable while it waits for acceptance.
  assert property (@(posedge clk) disable iff (!rst_n || start)
                   m_arvalid && !m_arready |=> m_arvalid && $stable(m_araddr) && $stable(m_arlen));

  logic unused;
  assign unused = ^m_rresp;
endmodule
