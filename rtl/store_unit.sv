// store_unit - writes the result stream back to DRAM over AXI4.
//
// Result words are collected in a word FIFO of STORE_DEPTH entries (256 x 64
// bits, the one block RAM of the PE). Whenever MAX_BURST words are waiting,
// or the stream has ended and any word is left, the unit sends one INCR write
// burst of up to MAX_BURST beats (never crossing a 4 KB boundary) to the next
// address after the previous burst, starting at the configured store address.
// Only as many words as the result holds are written, so a block that the
// filters and the transform have shrunk costs correspondingly fewer writes.
//
// Interface: start (pulse) latches cfg_addr, which is aligned down to 8
// bytes. in_* is the word stream from the output tuple buffer; eos is high
// once that stream has delivered its last word. AXI4 write address, write
// data and write response channels, all bytes enabled. done is high once
// every word has been written and every burst acknowledged, until the next
// start. words_written counts the words sent since start.
// Timing: one word per cycle inside a burst; one address phase per burst.
// FIFO depth, burst policy and the 4 KB rule are this design's choice.
module store_unit
  import ndp_pkg::*;
#(
  parameter int unsigned STORE_DEPTH = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  addr_t       cfg_addr,
  input  logic        in_valid,
  output logic        in_ready,
  input  word_t       in_data,
  input  logic        eos,
  output logic        done,
  output logic [31:0] words_written,
  // AXI4 write address channel
  output addr_t       m_awaddr,
  output logic [7:0]  m_awlen,
  output logic [2:0]  m_awsize,
  output logic [1:0]  m_awburst,
  output logic        m_awvalid,
  input  logic        m_awready,
  // AXI4 write data channel
  output word_t       m_wdata,
  output logic [BUS_BYTES-1:0] m_wstrb,
  output logic        m_wlast,
  output logic        m_wvalid,
  input  logic        m_wready,
  // AXI4 write response channel
  input  logic [1:0]  m_bresp,
  input  logic        m_bvalid,
  output logic        m_bready
);
  localparam int unsigned BEATS_4K = 4096 / BUS_BYTES;
  localparam int unsigned FCW      = $clog2(STORE_DEPTH + 1);

  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_ADDR, S_DATA} state_e;
  state_e state;

  logic             f_valid, f_ready;
  word_t            f_data;
  logic [FCW-1:0]   f_count;
  addr_t            next_addr;
  logic [8:0]       beats_left;
  logic [15:0]      b_pending;
  logic [31:0]      burst, to_4k;
  logic             w_fire, b_fire;

  sync_fifo #(.T(word_t), .DEPTH(STORE_DEPTH)) u_word_fifo (
    .clk, .rst_n, .clr(start),
    .in_valid, .in_ready, .in_data,
    .out_valid(f_valid), .out_ready(f_ready), .out_data(f_data), .count(f_count)
  );

  assign to_4k = BEATS_4K - 32'(next_addr[11:$clog2(BUS_BYTES)]);
  always_comb begin
    burst = 32'(f_count);
    if (burst > MAX_BURST) burst = MAX_BURST;
    if (burst > to_4k)     burst = to_4k;
  end

  assign m_awsize  = 3'($clog2(BUS_BYTES));
  assign m_awburst = AXI_BURST_INCR;
  assign m_awvalid = (state == S_ADDR);
  assign m_wvalid  = (state == S_DATA) && f_valid;
  assign m_wdata   = f_data;
  assign m_wstrb   = '1;
  assign m_wlast   = (beats_left == 9'd1);
  assign f_ready   = (state == S_DATA) && m_wready;
  assign m_bready  = 1'b1;
  assign w_fire    = m_wvalid && m_wready;
  assign b_fire    = m_bvalid && m_bready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      next_addr     <= '0;
      beats_left    <= '0;
      b_pending     <= '0;
      m_awaddr      <= '0;
      m_awlen       <= '0;
      words_written <= '0;
      done          <= 1'b0;
    end else if (start) begin
      state         <= S_WAIT;
      next_addr     <= cfg_addr & ~addr_t'(BUS_BYTES - 1);
      b_pending     <= '0;
      words_written <= '0;
      done          <= 1'b0;
    end else begin
      logic [15:0] bp;
      bp = b_pending;
      if (b_fire && bp != '0) bp = bp - 1'b1;
      unique case (state)
        S_IDLE: ;
        S_WAIT: begin
          if (f_count >= FCW'(MAX_BURST) || (eos && f_count != '0)) begin
            m_awaddr   <= next_addr;
            m_awlen    <= 8'(burst - 1);
            beats_left <= 9'(burst);
            next_addr  <= next_addr + addr_t'(burst * BUS_BYTES);
            state      <= S_ADDR;
          end else if (eos && f_count == '0 && bp == '0) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end
        S_ADDR: if (m_awready) state <= S_DATA;
        S_DATA: if (w_fire) begin
          beats_left    <= beats_left - 1'b1;
          words_written <= words_written + 1'b1;
          if (beats_left == 9'd1) begin
            bp    = bp + 1'b1;
            state <= S_WAIT;
          end
        end
        default: state <= S_IDLE;
      endcase
      b_pending <= bp;
    end
  end

  // AXI: write data may only be valid inside a burst announced before.
  assert property (@(posedge clk) disable iff (!rst_n) m_wvalid |-> state == S_DATA);
  // No response may arrive for a burst that was never written.
  assert property (@(posedge clk) disable iff (!rst_n || start) m_bvalid |-> b_pending != '0);

  logic unused;
  assign unused = ^m_bresp;
endmodule
