// ctrl_regfile - control register file of the PE, an AXI4-Lite slave.
//
// The ARM core configures and starts the PE through these 32-bit registers
// and polls them for completion; the map is listed in ndp_pkg. Writing 1 to
// bit 0 of START while the PE is idle produces a one-cycle start pulse;
// writes to START while busy are ignored. CYCLE_COUNTER is cleared by start
// and counts the clock cycles the PE is busy, so software can time a block.
// Status registers (BUSY, RESULT_BYTES, TUPLES_IN, TUPLES_OUT,
// CYCLE_COUNTER) are read-only; writes to them and to unmapped addresses are
// acknowledged and ignored, reads of unmapped addresses return 0. Byte
// strobes are honoured for the writable registers.
//
// Interface: AXI4-Lite slave with 32-bit data and AXIL_ADDR_W address bits.
// A write is accepted when address and data are both valid and no response
// is pending; a read when no read data is pending. Every response is OKAY.
// Per filter stage i: filt_col[i] (COL_BITS wide), filt_val[i] (VAL_BITS
// wide, up to 64; above 32 bits a FILTER_VAL_HI register holds the upper
// word and the per-stage stride grows from 12 to 16 bytes), filt_op[i].
// Timing: a write takes effect at the clock edge that accepts it; read data
// follows one cycle after the address is accepted.
// The register names follow the document's generated software header; the
// handshake policy, the unmapped-address behaviour and the remaining
// addresses are this design's choice.
module ctrl_regfile
  import ndp_pkg::*;
#(
  parameter int unsigned NUM_STAGES  = 1,
  parameter int unsigned AXIL_ADDR_W = 8,
  parameter int unsigned COL_BITS    = COL_W,
  parameter int unsigned VAL_BITS    = ELEM_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // AXI4-Lite slave
  input  logic [AXIL_ADDR_W-1:0] s_awaddr,
  input  logic                   s_awvalid,
  output logic                   s_awready,
  input  logic [31:0]            s_wdata,
  input  logic [3:0]             s_wstrb,
  input  logic                   s_wvalid,
  output logic                   s_wready,
  output logic [1:0]             s_bresp,
  output logic                   s_bvalid,
  input  logic                   s_bready,
  input  logic [AXIL_ADDR_W-1:0] s_araddr,
  input  logic                   s_arvalid,
  output logic                   s_arready,
  output logic [31:0]            s_rdata,
  output logic [1:0]             s_rresp,
  output logic                   s_rvalid,
  input  logic                   s_rready,
  // to the PE
  output logic                   start,
  output addr_t                  load_addr,
  output logic [31:0]            load_bytes,
  output addr_t                  store_addr,
  output logic [COL_BITS-1:0]    filt_col [NUM_STAGES],
  output logic [VAL_BITS-1:0]    filt_val [NUM_STAGES],
  output logic [2:0]             filt_op  [NUM_STAGES],
  // from the PE
  input  logic                   busy,
  input  logic [31:0]            result_bytes,
  input  logic [31:0]            tuples_in,
  input  logic [31:0]            tuples_out
);
  localparam int unsigned STRIDE = filter_stride(VAL_BITS);
  localparam int unsigned OP_OFS = filter_op_ofs(VAL_BITS);
  localparam int unsigned REG_CC = REG_FILTER_BASE + STRIDE * NUM_STAGES;

  logic [31:0] cycle_counter;
  logic        wr_en;
  logic [AXIL_ADDR_W-1:0] wa;

  // upper word of a compare value (0 for values of up to 32 bits)
  function automatic logic [31:0] val_hi(logic [VAL_BITS-1:0] v);
    return 32'(64'(v) >> 32);
  endfunction

  function automatic logic [31:0] merge(logic [31:0] old, logic [31:0] d, logic [3:0] be);
    for (int b = 0; b < 4; b++) if (be[b]) old[8*b +: 8] = d[8*b +: 8];
    return old;
  endfunction

  assign s_awready = s_awvalid && s_wvalid && !s_bvalid;
  assign s_wready  = s_awready;
  assign wr_en     = s_awready;
  assign wa        = s_awaddr & ~AXIL_ADDR_W'(3);
  assign s_bresp   = AXI_RESP_OKAY;
  assign s_rresp   = AXI_RESP_OKAY;
  assign s_arready = !s_rvalid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      start      <= 1'b0;
      load_addr  <= '0;
      load_bytes <= '0;
      store_addr <= '0;
      s_bvalid   <= 1'b0;
      for (int i = 0; i < NUM_STAGES; i++) begin
        filt_col[i] <= '0;
        filt_val[i] <= '0;
        filt_op[i]  <= OP_NOP;
      end
    end else begin
      start <= 1'b0;
      if (s_bvalid && s_bready) s_bvalid <= 1'b0;
      if (wr_en) begin
        s_bvalid <= 1'b1;
        if (32'(wa) == REG_START && s_wstrb[0] && s_wdata[0] && !busy) start <= 1'b1;
        if (32'(wa) == REG_LOAD_ADDR)  load_addr  <= merge(load_addr,  s_wdata, s_wstrb);
        if (32'(wa) == REG_LOAD_BYTES) load_bytes <= merge(load_bytes, s_wdata, s_wstrb);
        if (32'(wa) == REG_STORE_ADDR) store_addr <= merge(store_addr, s_wdata, s_wstrb);
        for (int i = 0; i < NUM_STAGES; i++) begin
          if (32'(wa) == REG_FILTER_BASE + STRIDE * i)
            filt_col[i] <= COL_BITS'(merge(32'(filt_col[i]), s_wdata, s_wstrb));
          if (32'(wa) == REG_FILTER_BASE + STRIDE * i + 4)
            filt_val[i] <= VAL_BITS'({val_hi(filt_val[i]), merge(32'(filt_val[i]), s_wdata, s_wstrb)});
          if (VAL_BITS > 32 && 32'(wa) == REG_FILTER_BASE + STRIDE * i + 8)
            filt_val[i] <= VAL_BITS'({merge(val_hi(filt_val[i]), s_wdata, s_wstrb), 32'(filt_val[i])});
          if (32'(wa) == REG_FILTER_BASE + STRIDE * i + OP_OFS)
            filt_op[i]  <= 3'(merge(32'(filt_op[i]), s_wdata, s_wstrb));
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)      cycle_counter <= '0;
    else if (start)  cycle_counter <= '0;
    else if (busy)   cycle_counter <= cycle_counter + 1'b1;
  end

  // read side
  logic [31:0] rd;
  logic [AXIL_ADDR_W-1:0] ra;
  assign ra = s_araddr & ~AXIL_ADDR_W'(3);
  always_comb begin
    rd = '0;
    unique case (32'(ra))
      REG_BUSY:         rd = 32'(busy);
      REG_LOAD_ADDR:    rd = load_addr;
      REG_LOAD_BYTES:   rd = load_bytes;
      REG_STORE_ADDR:   rd = store_addr;
      REG_RESULT_BYTES: rd = result_bytes;
      REG_TUPLES_IN:    rd = tuples_in;
      REG_TUPLES_OUT:   rd = tuples_out;
      REG_CC:           rd = cycle_counter;
      default:          rd = '0;
    endcase
    for (int i = 0; i < NUM_STAGES; i++) begin
      if (32'(ra) == REG_FILTER_BASE + STRIDE * i)          rd = 32'(filt_col[i]);
      if (32'(ra) == REG_FILTER_BASE + STRIDE * i + 4)      rd = 32'(filt_val[i]);
      if (VAL_BITS > 32 && 32'(ra) == REG_FILTER_BASE + STRIDE * i + 8)
                                                            rd = val_hi(filt_val[i]);
      if (32'(ra) == REG_FILTER_BASE + STRIDE * i + OP_OFS) rd = 32'(filt_op[i]);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_rvalid <= 1'b0;
      s_rdata  <= '0;
    end else begin
      if (s_rvalid && s_rready) s_rvalid <= 1'b0;
      if (s_arvalid && s_arready) begin
        s_rvalid <= 1'b1;
        s_rdata  <= rd;
      end
    end
  end

  // AXI4-Lite: a response, once raised, stays until it is taken.
  assert property (@(posedge clk) disable iff (!rst_n) s_bvalid && !s_bready |=> s_bvalid);
  assert property (@(posedge clk) disable iff (!rst_n) s_rvalid && !s_rready |=> s_rvalid && $stable(s_rdata));
endmodule
