// ndp_accel_array - the NDP accelerators of the smart-storage SoC.
//
// In the storage device the processing elements sit in the programmable
// logic beside the NVMe core and the Flash controllers. Each PE has its own
// AXI4-Lite control port, reached by the ARM cores through the SoC's AXI
// interconnect, and its own AXI4 master port to the DRAM of the processing
// system, through which it reads blocks that the firmware has staged from
// Flash and writes results back. The firmware hands independent blocks to
// the PEs, so they run concurrently and share nothing but the interconnect.
//
// This module holds NUM_PE identical PEs (two, as in the system figure) and
// brings every PE's two ports out as arrays indexed by PE number; the
// interconnect, the ARM cores, DRAM, Flash controllers and NVMe core are
// platform parts that connect to these ports. busy[p] mirrors PE p's BUSY
// register for use as an interrupt or debug signal. All PEs are built for
// the same record format FMT.
//
// Timing: as ndp_pe, per PE.
module ndp_accel_array
  import ndp_pkg::*;
#(
  parameter int unsigned NUM_PE      = 2,
  parameter fmt_t        FMT         = FMT_DEFAULT,
  parameter int unsigned NUM_STAGES  = 1,
  parameter int unsigned STORE_DEPTH = 256,
  parameter int unsigned AXIL_ADDR_W = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // AXI4-Lite control slaves, one per PE
  input  logic [AXIL_ADDR_W-1:0] s_awaddr  [NUM_PE],
  input  logic                   s_awvalid [NUM_PE],
  output logic                   s_awready [NUM_PE],
  input  logic [31:0]            s_wdata   [NUM_PE],
  input  logic [3:0]             s_wstrb   [NUM_PE],
  input  logic                   s_wvalid  [NUM_PE],
  output logic                   s_wready  [NUM_PE],
  output logic [1:0]             s_bresp   [NUM_PE],
  output logic                   s_bvalid  [NUM_PE],
  input  logic                   s_bready  [NUM_PE],
  input  logic [AXIL_ADDR_W-1:0] s_araddr  [NUM_PE],
  input  logic                   s_arvalid [NUM_PE],
  output logic                   s_arready [NUM_PE],
  output logic [31:0]            s_rdata   [NUM_PE],
  output logic [1:0]             s_rresp   [NUM_PE],
  output logic                   s_rvalid  [NUM_PE],
  input  logic                   s_rready  [NUM_PE],
  // AXI4 masters to DRAM, one per PE
  output addr_t                  m_araddr  [NUM_PE],
  output logic [7:0]             m_arlen   [NUM_PE],
  output logic [2:0]             m_arsize  [NUM_PE],
  output logic [1:0]             m_arburst [NUM_PE],
  output logic                   m_arvalid [NUM_PE],
  input  logic                   m_arready [NUM_PE],
  input  word_t                  m_rdata   [NUM_PE],
  input  logic [1:0]             m_rresp   [NUM_PE],
  input  logic                   m_rlast   [NUM_PE],
  input  logic                   m_rvalid  [NUM_PE],
  output logic                   m_rready  [NUM_PE],
  output addr_t                  m_awaddr  [NUM_PE],
  output logic [7:0]             m_awlen   [NUM_PE],
  output logic [2:0]             m_awsize  [NUM_PE],
  output logic [1:0]             m_awburst [NUM_PE],
  output logic                   m_awvalid [NUM_PE],
  input  logic                   m_awready [NUM_PE],
  output word_t                  m_wdata   [NUM_PE],
  output logic [BUS_BYTES-1:0]   m_wstrb   [NUM_PE],
  output logic                   m_wlast   [NUM_PE],
  output logic                   m_wvalid  [NUM_PE],
  input  logic                   m_wready  [NUM_PE],
  input  logic [1:0]             m_bresp   [NUM_PE],
  input  logic                   m_bvalid  [NUM_PE],
  output logic                   m_bready  [NUM_PE],
  // status
  output logic [NUM_PE-1:0]      busy,
  output logic [NUM_STAGES-1:0]  filter_drop [NUM_PE]
);
  for (genvar p = 0; p < NUM_PE; p++) begin : g_pe
    ndp_pe #(
      .FMT(FMT), .NUM_STAGES(NUM_STAGES), .STORE_DEPTH(STORE_DEPTH), .AXIL_ADDR_W(AXIL_ADDR_W)
    ) u_pe (
      .clk, .rst_n,
      .s_awaddr(s_awaddr[p]), .s_awvalid(s_awvalid[p]), .s_awready(s_awready[p]),
      .s_wdata(s_wdata[p]), .s_wstrb(s_wstrb[p]), .s_wvalid(s_wvalid[p]), .s_wready(s_wready[p]),
      .s_bresp(s_bresp[p]), .s_bvalid(s_bvalid[p]), .s_bready(s_bready[p]),
      .s_araddr(s_araddr[p]), .s_arvalid(s_arvalid[p]), .s_arready(s_arready[p]),
      .s_rdata(s_rdata[p]), .s_rresp(s_rresp[p]), .s_rvalid(s_rvalid[p]), .s_rready(s_rready[p]),
      .m_araddr(m_araddr[p]), .m_arlen(m_arlen[p]), .m_arsize(m_arsize[p]),
      .m_arburst(m_arburst[p]), .m_arvalid(m_arvalid[p]), .m_arready(m_arready[p]),
      .m_rdata(m_rdata[p]), .m_rresp(m_rresp[p]), .m_rlast(m_rlast[p]),
      .m_rvalid(m_rvalid[p]), .m_rready(m_rready[p]),
      .m_awaddr(m_awaddr[p]), .m_awlen(m_awlen[p]), .m_awsize(m_awsize[p]),
      .m_awburst(m_awburst[p]), .m_awvalid(m_awvalid[p]), .m_awready(m_awready[p]),
      .m_wdata(m_wdata[p]), .m_wstrb(m_wstrb[p]), .m_wlast(m_wlast[p]),
      .m_wvalid(m_wvalid[p]), .m_wready(m_wready[p]),
      .m_bresp(m_bresp[p]), .m_bvalid(m_bvalid[p]), .m_bready(m_bready[p]),
      .busy(busy[p]), .filter_drop(filter_drop[p])
    );
  end
endmodule
