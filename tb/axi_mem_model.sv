// axi_mem_model - behavioural model of the DRAM behind the processing system,
// seen as an AXI4 slave with 64-bit data (testbench only, not synthesizable).
//
// Holds MEM_WORDS 64-bit words, word address = byte address / 8. Read and
// write address requests are queued and served in order; INCR bursts only.
// With STALL_PCT (read channels) or WSTALL_PCT (write channels) above 0,
// every ready/valid the model drives is withheld at random
// in that percentage of cycles, so the master sees back-pressure and gaps.
// Byte strobes are honoured. Testbenches access 'mem' hierarchically.
module axi_mem_model #(
  parameter int unsigned MEM_WORDS = 65536,
  parameter int unsigned STALL_PCT = 0,          // read side
  parameter int unsigned WSTALL_PCT = STALL_PCT   // write side
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] araddr,
  input  logic [7:0]  arlen,
  input  logic        arvalid,
  output logic        arready,
  output logic [63:0] rdata,
  output logic [1:0]  rresp,
  output logic        rlast,
  output logic        rvalid,
  input  logic        rready,
  input  logic [31:0] awaddr,
  input  logic [7:0]  awlen,
  input  logic        awvalid,
  output logic        awready,
  input  logic [63:0] wdata,
  input  logic [7:0]  wstrb,
  input  logic        wlast,
  input  logic        wvalid,
  output logic        wready,
  output logic [1:0]  bresp,
  output logic        bvalid,
  input  logic        bready
);
  logic [63:0] mem [MEM_WORDS];

  logic [31:0] rq_addr [$];
  logic [8:0]  rq_len  [$];
  logic [31:0] wq_addr [$];
  logic [8:0]  wq_len  [$];
  int unsigned r_beat, w_beat, b_pending;
  int unsigned w_errors;

  function automatic bit go(int unsigned pct);
    return ($urandom_range(99) >= pct);
  endfunction

  assign rresp = 2'b00;
  assign bresp = 2'b00;

  always @(posedge clk) begin
    if (!rst_n) begin
      arready <= 1'b0; awready <= 1'b0; wready <= 1'b0;
      rvalid  <= 1'b0; rlast <= 1'b0; rdata <= '0; bvalid <= 1'b0;
      r_beat = 0; w_beat = 0; b_pending = 0; w_errors = 0;
      rq_addr.delete(); rq_len.delete(); wq_addr.delete(); wq_len.delete();
    end else begin
      // read address
      if (arvalid && arready) begin
        rq_addr.push_back(araddr);
        rq_len.push_back(9'(arlen) + 9'd1);
      end
      arready <= go(STALL_PCT);
      // write address
      if (awvalid && awready) begin
        wq_addr.push_back(awaddr);
        wq_len.push_back(9'(awlen) + 9'd1);
      end
      awready <= go(WSTALL_PCT);
      // read data
      if (rvalid && rready) begin
        r_beat++;
        if (r_beat == 32'(rq_len[0])) begin
          void'(rq_addr.pop_front());
          void'(rq_len.pop_front());
          r_beat = 0;
        end
        rvalid <= 1'b0;
      end
      if ((!rvalid || rready) && rq_addr.size() != 0 && go(STALL_PCT)) begin
        rvalid <= 1'b1;
        rdata  <= mem[(rq_addr[0] / 8 + r_beat) % MEM_WORDS];
        rlast  <= (r_beat + 1 == 32'(rq_len[0]));
      end
      // write data
      if (wvalid && wready) begin
        if (wq_addr.size() == 0) w_errors++;
        else begin
          int unsigned a;
          a = (wq_addr[0] / 8 + w_beat) % MEM_WORDS;
          for (int b = 0; b < 8; b++) if (wstrb[b]) mem[a][8*b +: 8] <= wdata[8*b +: 8];
          w_beat++;
          if ((w_beat == 32'(wq_len[0])) != wlast) w_errors++;
          if (w_beat == 32'(wq_len[0])) begin
            void'(wq_addr.pop_front());
            void'(wq_len.pop_front());
            w_beat = 0;
            b_pending++;
          end
        end
      end
      wready <= go(WSTALL_PCT);
      // write response
      if (bvalid && bready) bvalid <= 1'b0;
      if ((!bvalid || bready) && b_pending != 0 && go(WSTALL_PCT)) begin
        bvalid <= 1'b1;
        b_pending--;
      end
    end
  end
endmodule
