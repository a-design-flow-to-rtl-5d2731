// axi_enforcer: AXI Enforcer, placed between one hardware accelerator's AXI4
// manager port and the subordinate port of the interconnect.
//
// An accelerator drives the security-relevant attributes of its own requests
// and could therefore raise its TrustZone level (AxPROT), its memory priority
// (AxQOS) or its cache behaviour (AxCACHE). The enforcer replaces these three
// attributes, and AxUSER, on both address channels (AW and AR) by values fixed
// at design time. AxUSER is set to the identifier of the accelerator so that
// the AXI ID Mapper further down the bus can tell which accelerator a request
// came from: interconnects rewrite AXI IDs but leave AxUSER untouched. Every
// other signal of the five channels passes straight through, so the block is
// purely combinational and adds no latency.
//
// Parameters follow the enforcer's configuration set: address and data width
// and the four enforced values; the defaults are those of the first enforcer
// of the two-DMA reference design (AxPROT 000, AxUSER 0, AxQOS 0000,
// AxCACHE 0000, 32-bit address and data). ENFORCE_AxCACHE is this design's
// addition: the accelerators of the virtual-machine domains in the railway use
// case leave AxCACHE unenforced, which needs a way to pass it through.
// The accelerator's own AxUSER inputs are accepted and discarded.
module axi_enforcer #(
  parameter int unsigned AXI_ADDR_WIDTH  = 32,
  parameter int unsigned AXI_DATA_WIDTH  = 32,
  parameter int unsigned AXI_ID_WIDTH    = axi_iso_pkg::AXI_ID_WIDTH,
  parameter int unsigned AXI_USER_WIDTH  = axi_iso_pkg::AXI_USER_WIDTH,
  parameter logic [2:0]  AxPROT_VALUE    = 3'b000,
  parameter logic [AXI_USER_WIDTH-1:0] AxUSER_VALUE = '0,
  parameter logic [3:0]  AxQOS_VALUE     = 4'b0000,
  parameter logic [3:0]  AxCACHE_VALUE   = 4'b0000,
  parameter bit          ENFORCE_AxCACHE = 1'b1
) (
  // ---- subordinate side: from the accelerator ----
  input  logic [AXI_ID_WIDTH-1:0]     s_axi_awid,
  input  logic [AXI_ADDR_WIDTH-1:0]   s_axi_awaddr,
  input  logic [7:0]                  s_axi_awlen,
  input  logic [2:0]                  s_axi_awsize,
  input  logic [1:0]                  s_axi_awburst,
  input  logic                        s_axi_awlock,
  input  logic [3:0]                  s_axi_awcache,
  input  logic [2:0]                  s_axi_awprot,
  input  logic [3:0]                  s_axi_awqos,
  input  logic [AXI_USER_WIDTH-1:0]   s_axi_awuser,
  input  logic                        s_axi_awvalid,
  output logic                        s_axi_awready,
  input  logic [AXI_DATA_WIDTH-1:0]   s_axi_wdata,
  input  logic [AXI_DATA_WIDTH/8-1:0] s_axi_wstrb,
  input  logic                        s_axi_wlast,
  input  logic                        s_axi_wvalid,
  output logic                        s_axi_wready,
  output logic [AXI_ID_WIDTH-1:0]     s_axi_bid,
  output logic [1:0]                  s_axi_bresp,
  output logic                        s_axi_bvalid,
  input  logic                        s_axi_bready,
  input  logic [AXI_ID_WIDTH-1:0]     s_axi_arid,
  input  logic [AXI_ADDR_WIDTH-1:0]   s_axi_araddr,
  input  logic [7:0]                  s_axi_arlen,
  input  logic [2:0]                  s_axi_arsize,
  input  logic [1:0]                  s_axi_arburst,
  input  logic                        s_axi_arlock,
  input  logic [3:0]                  s_axi_arcache,
  input  logic [2:0]                  s_axi_arprot,
  input  logic [3:0]                  s_axi_arqos,
  input  logic [AXI_USER_WIDTH-1:0]   s_axi_aruser,
  input  logic                        s_axi_arvalid,
  output logic                        s_axi_arready,
  output logic [AXI_ID_WIDTH-1:0]     s_axi_rid,
  output logic [AXI_DATA_WIDTH-1:0]   s_axi_rdata,
  output logic [1:0]                  s_axi_rresp,
  output logic                        s_axi_rlast,
  output logic                        s_axi_rvalid,
  input  logic                        s_axi_rready,
  // ---- manager side: to the interconnect ----
  output logic [AXI_ID_WIDTH-1:0]     m_axi_awid,
  output logic [AXI_ADDR_WIDTH-1:0]   m_axi_awaddr,
  output logic [7:0]                  m_axi_awlen,
  output logic [2:0]                  m_axi_awsize,
  output logic [1:0]                  m_axi_awburst,
  output logic                        m_axi_awlock,
  output logic [3:0]                  m_axi_awcache,
  output logic [2:0]                  m_axi_awprot,
  output logic [3:0]                  m_axi_awqos,
  output logic [AXI_USER_WIDTH-1:0]   m_axi_awuser,
  output logic                        m_axi_awvalid,
  input  logic                        m_axi_awready,
  output logic [AXI_DATA_WIDTH-1:0]   m_axi_wdata,
  output logic [AXI_DATA_WIDTH/8-1:0] m_axi_wstrb,
  output logic                        m_axi_wlast,
  output logic                        m_axi_wvalid,
  input  logic                        m_axi_wready,
  input  logic [AXI_ID_WIDTH-1:0]     m_axi_bid,
  input  logic [1:0]                  m_axi_bresp,
  input  logic                        m_axi_bvalid,
  output logic                        m_axi_bready,
  output logic [AXI_ID_WIDTH-1:0]     m_axi_arid,
  output logic [AXI_ADDR_WIDTH-1:0]   m_axi_araddr,
  output logic [7:0]                  m_axi_arlen,
  output logic [2:0]                  m_axi_arsize,
  output logic [1:0]                  m_axi_arburst,
  output logic                        m_axi_arlock,
  output logic [3:0]                  m_axi_arcache,
  output logic [2:0]                  m_axi_arprot,
  output logic [3:0]                  m_axi_arqos,
  output logic [AXI_USER_WIDTH-1:0]   m_axi_aruser,
  output logic                        m_axi_arvalid,
  input  logic                        m_axi_arready,
  input  logic [AXI_ID_WIDTH-1:0]     m_axi_rid,
  input  logic [AXI_DATA_WIDTH-1:0]   m_axi_rdata,
  input  logic [1:0]                  m_axi_rresp,
  input  logic                        m_axi_rlast,
  input  logic                        m_axi_rvalid,
  output logic                        m_axi_rready
);

  // Write address: enforced attributes replaced, the rest forwarded.
  assign m_axi_awid    = s_axi_awid;
  assign m_axi_awaddr  = s_axi_awaddr;
  assign m_axi_awlen   = s_axi_awlen;
  assign m_axi_awsize  = s_axi_awsize;
  assign m_axi_awburst = s_axi_awburst;
  assign m_axi_awlock  = s_axi_awlock;
  assign m_axi_awcache = ENFORCE_AxCACHE ? AxCACHE_VALUE : s_axi_awcache;
  assign m_axi_awprot  = AxPROT_VALUE;
  assign m_axi_awqos   = AxQOS_VALUE;
  assign m_axi_awuser  = AxUSER_VALUE;
  assign m_axi_awvalid = s_axi_awvalid;
  assign s_axi_awready = m_axi_awready;

  // Write data and write response: unchanged.
  assign m_axi_wdata   = s_axi_wdata;
  assign m_axi_wstrb   = s_axi_wstrb;
  assign m_axi_wlast   = s_axi_wlast;
  assign m_axi_wvalid  = s_axi_wvalid;
  assign s_axi_wready  = m_axi_wready;
  assign s_axi_bid     = m_axi_bid;
  assign s_axi_bresp   = m_axi_bresp;
  assign s_axi_bvalid  = m_axi_bvalid;
  assign m_axi_bready  = s_axi_bready;

  // Read address: enforced attributes replaced, the rest forwarded.
  assign m_axi_arid    = s_axi_arid;
  assign m_axi_araddr  = s_axi_araddr;
  assign m_axi_arlen   = s_axi_arlen;
  assign m_axi_arsize  = s_axi_arsize;
  assign m_axi_arburst = s_axi_arburst;
  assign m_axi_arlock  = s_axi_arlock;
  assign m_axi_arcache = ENFORCE_AxCACHE ? AxCACHE_VALUE : s_axi_arcache;
  assign m_axi_arprot  = AxPROT_VALUE;
  assign m_axi_arqos   = AxQOS_VALUE;
  assign m_axi_aruser  = AxUSER_VALUE;
  assign m_axi_arvalid = s_axi_arvalid;
  assign s_axi_arready = m_axi_arready;

  // Read data: unchanged.
  assign s_axi_rid     = m_axi_rid;
  assign s_axi_rdata   = m_axi_rdata;
  assign s_axi_rresp   = m_axi_rresp;
  assign s_axi_rlast   = m_axi_rlast;
  assign s_axi_rvalid  = m_axi_rvalid;
  assign m_axi_rready  = s_axi_rready;

endmodule
