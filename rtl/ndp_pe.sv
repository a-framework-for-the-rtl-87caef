// ndp_pe - one near-data processing accelerator (processing element).
//
// The PE filters and reshapes the tuples of one key-value data block that the
// firmware has copied from Flash to DRAM. Four groups of units form a
// streaming pipeline, connected by valid/ready FIFOs so that any unit may
// stall the ones before it:
//
//   control:  ctrl_regfile (AXI4-Lite, mapped into the ARM's address space)
//   memory:   load_unit  -> DRAM read bursts
//   accessor: input_tuple_buffer (64-bit words -> padded tuple fields)
//   compute:  NUM_STAGES x filter_unit (one predicate each, a conjunction)
//             -> data_transform (input struct -> output struct)
//   accessor: output_tuple_buffer (output tuples -> 64-bit words)
//   memory:   store_unit -> DRAM write bursts (only the result's size)
//
// Software writes LOAD_ADDR, LOAD_BYTES, STORE_ADDR and the filter
// registers, then START; BUSY stays high until the last result word is
// acknowledged by the memory and the last word of the block has been read.
// RESULT_BYTES then tells how many bytes of output tuples were written at
// STORE_ADDR, TUPLES_IN/TUPLES_OUT how many tuples were read and kept,
// CYCLE_COUNTER how long it took.
// Load and store share one AXI4 master port: the load unit owns the read
// channels, the store unit the write channels.
//
// FMT selects the pair of record formats (default: the package format,
// Point3D -> Point2D); the stream item types of the pipeline are built from
// it here and handed to the units. Formats with 64-bit fields get a
// FILTER_VAL_HI register per stage (see ndp_pkg::filter_stride).
// Timing: the filters and the transform take one tuple per cycle; the rate
// is set by the 64-bit memory port (for 96-bit tuples, two tuples every three
// words). Composition and register interface follow the document; the
// block-end marking and busy/done handshake are this design's choice.
module ndp_pe
  import ndp_pkg::*;
#(
  parameter fmt_t        FMT         = FMT_DEFAULT,
  parameter int unsigned NUM_STAGES  = 1,
  parameter int unsigned STORE_DEPTH = 256,
  parameter int unsigned AXIL_ADDR_W = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // AXI4-Lite control slave
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
  // AXI4 master to DRAM
  output addr_t                  m_araddr,
  output logic [7:0]             m_arlen,
  output logic [2:0]             m_arsize,
  output logic [1:0]             m_arburst,
  output logic                   m_arvalid,
  input  logic                   m_arready,
  input  word_t                  m_rdata,
  input  logic [1:0]             m_rresp,
  input  logic                   m_rlast,
  input  logic                   m_rvalid,
  output logic                   m_rready,
  output addr_t                  m_awaddr,
  output logic [7:0]             m_awlen,
  output logic [2:0]             m_awsize,
  output logic [1:0]             m_awburst,
  output logic                   m_awvalid,
  input  logic                   m_awready,
  output word_t                  m_wdata,
  output logic [BUS_BYTES-1:0]   m_wstrb,
  output logic                   m_wlast,
  output logic                   m_wvalid,
  input  logic                   m_wready,
  input  logic [1:0]             m_bresp,
  input  logic                   m_bvalid,
  output logic                   m_bready,
  // status
  output logic                   busy,
  output logic [NUM_STAGES-1:0]  filter_drop   // per stage: a tuple was dropped
);
  localparam int unsigned EW = FMT.elem_w;
  localparam int unsigned CB = col_bits(FMT);
  localparam int unsigned PB = pf_bits(FMT);

  // stream items of this format
  typedef struct packed {
    logic [PB-1:0]                postfix;
    logic [FMT.n_in-1:0][EW-1:0]  elem;
  } in_tuple_t;
  typedef struct packed {
    logic [PB-1:0]                postfix;
    logic [FMT.n_out-1:0][EW-1:0] elem;
  } out_tuple_t;
  typedef struct packed {
    logic      last;
    logic      empty;
    in_tuple_t t;
  } in_item_t;
  typedef struct packed {
    logic       last;
    logic       empty;
    out_tuple_t t;
  } out_item_t;

  logic          start;
  addr_t         load_addr, store_addr;
  logic [31:0]   load_bytes, n_words;
  logic [CB-1:0] filt_col [NUM_STAGES];
  logic [EW-1:0] filt_val [NUM_STAGES];
  logic [2:0]    filt_op  [NUM_STAGES];
  logic [31:0]      tuples_in, tuples_out, result_bytes, words_written;
  logic             load_done, store_done, out_done;

  ctrl_regfile #(
    .NUM_STAGES(NUM_STAGES), .AXIL_ADDR_W(AXIL_ADDR_W), .COL_BITS(CB), .VAL_BITS(EW)
  ) u_regs (
    .clk, .rst_n,
    .s_awaddr, .s_awvalid, .s_awready, .s_wdata, .s_wstrb, .s_wvalid, .s_wready,
    .s_bresp, .s_bvalid, .s_bready, .s_araddr, .s_arvalid, .s_arready,
    .s_rdata, .s_rresp, .s_rvalid, .s_rready,
    .start, .load_addr, .load_bytes, .store_addr, .filt_col, .filt_val, .filt_op,
    .busy, .result_bytes, .tuples_in, .tuples_out
  );

  assign result_bytes = tuples_out * (FMT.out_bits / 8);

  always_ff @(posedge clk) begin
    if (!rst_n)          busy <= 1'b0;
    else if (start)      busy <= 1'b1;
    else if (store_done && load_done) busy <= 1'b0;
  end

  // ---------------------------------------------------------------- memory in
  logic  ld_valid, ld_ready;
  word_t ld_data;

  load_unit u_load (
    .clk, .rst_n, .start, .cfg_addr(load_addr), .cfg_bytes(load_bytes),
    .n_words, .done(load_done),
    .m_araddr, .m_arlen, .m_arsize, .m_arburst, .m_arvalid, .m_arready,
    .m_rdata, .m_rresp, .m_rlast, .m_rvalid, .m_rready,
    .out_valid(ld_valid), .out_ready(ld_ready), .out_data(ld_data)
  );

  // ---------------------------------------------------------------- accessor in
  logic   st_valid [NUM_STAGES+1];
  logic   st_ready [NUM_STAGES+1];
  in_item_t st_item [NUM_STAGES+1];

  input_tuple_buffer #(.FMT(FMT), .ITEM_T(in_item_t)) u_in_buf (
    .clk, .rst_n, .start, .n_words,
    .in_valid(ld_valid), .in_ready(ld_ready), .in_data(ld_data),
    .out_valid(st_valid[0]), .out_ready(st_ready[0]), .out_item(st_item[0]),
    .tuples_in
  );

  // ---------------------------------------------------------------- compute
  for (genvar s = 0; s < NUM_STAGES; s++) begin : g_filter
    filter_unit #(.FMT(FMT), .ITEM_T(in_item_t)) u_filter (
      .clk, .rst_n, .clr(start),
      .in_valid(st_valid[s]), .in_ready(st_ready[s]), .in_item(st_item[s]),
      .out_valid(st_valid[s+1]), .out_ready(st_ready[s+1]), .out_item(st_item[s+1]),
      .col_sel(filt_col[s]), .cmp_val(filt_val[s]), .op_sel(filt_op[s]),
      .dropped(filter_drop[s])
    );
  end

  logic   tr_valid, tr_ready;
  out_item_t tr_item;

  data_transform #(.FMT(FMT), .ITEM_T(in_item_t), .OITEM_T(out_item_t)) u_transform (
    .clk, .rst_n, .clr(start),
    .in_valid(st_valid[NUM_STAGES]), .in_ready(st_ready[NUM_STAGES]), .in_item(st_item[NUM_STAGES]),
    .out_valid(tr_valid), .out_ready(tr_ready), .out_item(tr_item)
  );

  // ---------------------------------------------------------------- accessor out
  logic  ob_valid, ob_ready;
  word_t ob_data;

  output_tuple_buffer #(.FMT(FMT), .OITEM_T(out_item_t)) u_out_buf (
    .clk, .rst_n, .start,
    .in_valid(tr_valid), .in_ready(tr_ready), .in_item(tr_item),
    .out_valid(ob_valid), .out_ready(ob_ready), .out_data(ob_data),
    .done(out_done), .tuples_out
  );

  // ---------------------------------------------------------------- memory out
  store_unit #(.STORE_DEPTH(STORE_DEPTH)) u_store (
    .clk, .rst_n, .start, .cfg_addr(store_addr),
    .in_valid(ob_valid), .in_ready(ob_ready), .in_data(ob_data),
    .eos(out_done), .done(store_done), .words_written,
    .m_awaddr, .m_awlen, .m_awsize, .m_awburst, .m_awvalid, .m_awready,
    .m_wdata, .m_wstrb, .m_wlast, .m_wvalid, .m_wready,
    .m_bresp, .m_bvalid, .m_bready
  );

  // The words after the last whole record of a block are read and dropped by
  // the input buffer; with large records they may still be arriving when the
  // result is complete, so BUSY waits for both units. BUSY never falls while
  // a read is outstanding:
  assert property (@(posedge clk) disable iff (!rst_n) $fell(busy) |-> load_done && !m_arvalid);

  logic unused;
  assign unused = ^words_written;
endmodule
