// pl_ps_port_isolation: the isolation chain in front of one PL-PS port that
// several hardware accelerators (HAs) share.
//
// Every accelerator's AXI4 manager port goes through its own AXI Enforcer,
// which fixes AxPROT, AxQOS and AxCACHE to the values chosen for that
// accelerator and writes the accelerator's identifier into AxUSER. The
// enforced ports (ic_s_axi_*) feed the subordinate ports of an interconnect,
// which is vendor IP and lies outside this module; its merged manager port
// comes back in as ic_m_axi_* and passes through the AXI ID Mapper, which
// rewrites the AXI ID into the ID pool of the accelerator named by AxUSER
// before the request leaves on ps_axi_* towards the PL-PS port. In the
// processing system, the port's fixed Stream ID bits joined with that AXI ID
// then give each accelerator Stream IDs of its own, so the IOMMU can apply a
// separate translation regime to each one.
//
// The defaults reproduce the two-DMA reference design: two accelerators with
// 32-bit data, enforced values AxPROT 000/010, AxUSER 0/1, AxQOS 0000/0100,
// AxCACHE 0000/0000, and one mapper with 32-bit address, 128-bit data, pool
// size 1, AxUSER map {0, 1} and all buffers 2 deep. Array parameters are
// indexed by accelerator, element 0 first. ENFORCE_AxCACHE (per accelerator)
// is this design's addition, for accelerators whose AxCACHE is left as they
// drive it. Timing: the enforcers are combinational; the mapper adds two
// cycles to the first item of a stream and one per following item.
// irq is the mapper's sticky configuration-error interrupt.
module pl_ps_port_isolation #(
  parameter int unsigned AXI_ADDR_WIDTH  = 32,
  parameter int unsigned HA_DATA_WIDTH   = 32,
  parameter int unsigned PORT_DATA_WIDTH = 128,
  parameter int unsigned AXI_ID_WIDTH    = axi_iso_pkg::AXI_ID_WIDTH,
  parameter int unsigned AXI_USER_WIDTH  = axi_iso_pkg::AXI_USER_WIDTH,
  parameter int unsigned N_HA            = 2,
  // enforced values, one per accelerator
  parameter logic [N_HA-1:0][2:0]                AxPROT_VALUES   = {3'b010, 3'b000},
  parameter logic [N_HA-1:0][AXI_USER_WIDTH-1:0] AxUSER_VALUES   = {10'd1, 10'd0},
  parameter logic [N_HA-1:0][3:0]                AxQOS_VALUES    = {4'b0100, 4'b0000},
  parameter logic [N_HA-1:0][3:0]                AxCACHE_VALUES  = {4'b0000, 4'b0000},
  parameter logic [N_HA-1:0]                     ENFORCE_AxCACHE = '1,
  // ID mapper
  parameter int unsigned POOL_SIZE            = 1,
  parameter axi_iso_pkg::user_map_t AXUSER_MAP = axi_iso_pkg::identity_user_map(),
  parameter int unsigned WRITE_REQ_BUF_SIZE   = 2,
  parameter int unsigned WRITE_BURST_BUF_SIZE = 2,
  parameter int unsigned WRITE_RSP_BUF_SIZE   = 2,
  parameter int unsigned READ_REQ_BUF_SIZE    = 2,
  parameter int unsigned READ_BURST_BUF_SIZE  = 2
) (
  input  logic clk,
  input  logic rst_n,
  output logic irq,
  // ---- accelerator side: one AXI4 manager per accelerator ----,
  input  logic [N_HA-1:0][AXI_ID_WIDTH-1:0]           ha_axi_awid,
  input  logic [N_HA-1:0][AXI_ADDR_WIDTH-1:0]         ha_axi_awaddr,
  input  logic [N_HA-1:0][8-1:0]                      ha_axi_awlen,
  input  logic [N_HA-1:0][3-1:0]                      ha_axi_awsize,
  input  logic [N_HA-1:0][2-1:0]                      ha_axi_awburst,
  input  logic [N_HA-1:0]                             ha_axi_awlock,
  input  logic [N_HA-1:0][4-1:0]                      ha_axi_awcache,
  input  logic [N_HA-1:0][3-1:0]                      ha_axi_awprot,
  input  logic [N_HA-1:0][4-1:0]                      ha_axi_awqos,
  input  logic [N_HA-1:0][AXI_USER_WIDTH-1:0]         ha_axi_awuser,
  input  logic [N_HA-1:0]                             ha_axi_awvalid,
  output logic [N_HA-1:0]                             ha_axi_awready,
  input  logic [N_HA-1:0][HA_DATA_WIDTH-1:0]          ha_axi_wdata,
  input  logic [N_HA-1:0][HA_DATA_WIDTH/8-1:0]        ha_axi_wstrb,
  input  logic [N_HA-1:0]                             ha_axi_wlast,
  input  logic [N_HA-1:0]                             ha_axi_wvalid,
  output logic [N_HA-1:0]                             ha_axi_wready,
  output logic [N_HA-1:0][AXI_ID_WIDTH-1:0]           ha_axi_bid,
  output logic [N_HA-1:0][2-1:0]                      ha_axi_bresp,
  output logic [N_HA-1:0]                             ha_axi_bvalid,
  input  logic [N_HA-1:0]                             ha_axi_bready,
  input  logic [N_HA-1:0][AXI_ID_WIDTH-1:0]           ha_axi_arid,
  input  logic [N_HA-1:0][AXI_ADDR_WIDTH-1:0]         ha_axi_araddr,
  input  logic [N_HA-1:0][8-1:0]                      ha_axi_arlen,
  input  logic [N_HA-1:0][3-1:0]                      ha_axi_arsize,
  input  logic [N_HA-1:0][2-1:0]                      ha_axi_arburst,
  input  logic [N_HA-1:0]                             ha_axi_arlock,
  input  logic [N_HA-1:0][4-1:0]                      ha_axi_arcache,
  input  logic [N_HA-1:0][3-1:0]                      ha_axi_arprot,
  input  logic [N_HA-1:0][4-1:0]                      ha_axi_arqos,
  input  logic [N_HA-1:0][AXI_USER_WIDTH-1:0]         ha_axi_aruser,
  input  logic [N_HA-1:0]                             ha_axi_arvalid,
  output logic [N_HA-1:0]                             ha_axi_arready,
  output logic [N_HA-1:0][AXI_ID_WIDTH-1:0]           ha_axi_rid,
  output logic [N_HA-1:0][HA_DATA_WIDTH-1:0]          ha_axi_rdata,
  output logic [N_HA-1:0][2-1:0]                      ha_axi_rresp,
  output logic [N_HA-1:0]                             ha_axi_rlast,
  output logic [N_HA-1:0]                             ha_axi_rvalid,
  input  logic [N_HA-1:0]                             ha_axi_rready,
  // ---- enforced requests, to the subordinate ports of the interconnect ----,
  output logic [N_HA-1:0][AXI_ID_WIDTH-1:0]           ic_s_axi_awid,
  output logic [N_HA-1:0][AXI_ADDR_WIDTH-1:0]         ic_s_axi_awaddr,
  output logic [N_HA-1:0][8-1:0]                      ic_s_axi_awlen,
  output logic [N_HA-1:0][3-1:0]                      ic_s_axi_awsize,
  output logic [N_HA-1:0][2-1:0]                      ic_s_axi_awburst,
  output logic [N_HA-1:0]                             ic_s_axi_awlock,
  output logic [N_HA-1:0][4-1:0]                      ic_s_axi_awcache,
  output logic [N_HA-1:0][3-1:0]                      ic_s_axi_awprot,
  output logic [N_HA-1:0][4-1:0]                      ic_s_axi_awqos,
  output logic [N_HA-1:0][AXI_USER_WIDTH-1:0]         ic_s_axi_awuser,
  output logic [N_HA-1:0]                             ic_s_axi_awvalid,
  input  logic [N_HA-1:0]                             ic_s_axi_awready,
  output logic [N_HA-1:0][HA_DATA_WIDTH-1:0]          ic_s_axi_wdata,
  output logic [N_HA-1:0][HA_DATA_WIDTH/8-1:0]        ic_s_axi_wstrb,
  output logic [N_HA-1:0]                             ic_s_axi_wlast,
  output logic [N_HA-1:0]                             ic_s_axi_wvalid,
  input  logic [N_HA-1:0]                             ic_s_axi_wready,
  input  logic [N_HA-1:0][AXI_ID_WIDTH-1:0]           ic_s_axi_bid,
  input  logic [N_HA-1:0][2-1:0]                      ic_s_axi_bresp,
  input  logic [N_HA-1:0]                             ic_s_axi_bvalid,
  output logic [N_HA-1:0]                             ic_s_axi_bready,
  output logic [N_HA-1:0][AXI_ID_WIDTH-1:0]           ic_s_axi_arid,
  output logic [N_HA-1:0][AXI_ADDR_WIDTH-1:0]         ic_s_axi_araddr,
  output logic [N_HA-1:0][8-1:0]                      ic_s_axi_arlen,
  output logic [N_HA-1:0][3-1:0]                      ic_s_axi_arsize,
  output logic [N_HA-1:0][2-1:0]                      ic_s_axi_arburst,
  output logic [N_HA-1:0]                             ic_s_axi_arlock,
  output logic [N_HA-1:0][4-1:0]                      ic_s_axi_arcache,
  output logic [N_HA-1:0][3-1:0]                      ic_s_axi_arprot,
  output logic [N_HA-1:0][4-1:0]                      ic_s_axi_arqos,
  output logic [N_HA-1:0][AXI_USER_WIDTH-1:0]         ic_s_axi_aruser,
  output logic [N_HA-1:0]                             ic_s_axi_arvalid,
  input  logic [N_HA-1:0]                             ic_s_axi_arready,
  input  logic [N_HA-1:0][AXI_ID_WIDTH-1:0]           ic_s_axi_rid,
  input  logic [N_HA-1:0][HA_DATA_WIDTH-1:0]          ic_s_axi_rdata,
  input  logic [N_HA-1:0][2-1:0]                      ic_s_axi_rresp,
  input  logic [N_HA-1:0]                             ic_s_axi_rlast,
  input  logic [N_HA-1:0]                             ic_s_axi_rvalid,
  output logic [N_HA-1:0]                             ic_s_axi_rready,
  // ---- merged traffic, from the manager port of the interconnect ----,
  input  logic [AXI_ID_WIDTH-1:0]           ic_m_axi_awid,
  input  logic [AXI_ADDR_WIDTH-1:0]         ic_m_axi_awaddr,
  input  logic [8-1:0]                      ic_m_axi_awlen,
  input  logic [3-1:0]                      ic_m_axi_awsize,
  input  logic [2-1:0]                      ic_m_axi_awburst,
  input  logic                              ic_m_axi_awlock,
  input  logic [4-1:0]                      ic_m_axi_awcache,
  input  logic [3-1:0]                      ic_m_axi_awprot,
  input  logic [4-1:0]                      ic_m_axi_awqos,
  input  logic [AXI_USER_WIDTH-1:0]         ic_m_axi_awuser,
  input  logic                              ic_m_axi_awvalid,
  output logic                              ic_m_axi_awready,
  input  logic [PORT_DATA_WIDTH-1:0]        ic_m_axi_wdata,
  input  logic [PORT_DATA_WIDTH/8-1:0]      ic_m_axi_wstrb,
  input  logic                              ic_m_axi_wlast,
  input  logic                              ic_m_axi_wvalid,
  output logic                              ic_m_axi_wready,
  output logic [AXI_ID_WIDTH-1:0]           ic_m_axi_bid,
  output logic [2-1:0]                      ic_m_axi_bresp,
  output logic                              ic_m_axi_bvalid,
  input  logic                              ic_m_axi_bready,
  input  logic [AXI_ID_WIDTH-1:0]           ic_m_axi_arid,
  input  logic [AXI_ADDR_WIDTH-1:0]         ic_m_axi_araddr,
  input  logic [8-1:0]                      ic_m_axi_arlen,
  input  logic [3-1:0]                      ic_m_axi_arsize,
  input  logic [2-1:0]                      ic_m_axi_arburst,
  input  logic                              ic_m_axi_arlock,
  input  logic [4-1:0]                      ic_m_axi_arcache,
  input  logic [3-1:0]                      ic_m_axi_arprot,
  input  logic [4-1:0]                      ic_m_axi_arqos,
  input  logic [AXI_USER_WIDTH-1:0]         ic_m_axi_aruser,
  input  logic                              ic_m_axi_arvalid,
  output logic                              ic_m_axi_arready,
  output logic [AXI_ID_WIDTH-1:0]           ic_m_axi_rid,
  output logic [PORT_DATA_WIDTH-1:0]        ic_m_axi_rdata,
  output logic [2-1:0]                      ic_m_axi_rresp,
  output logic                              ic_m_axi_rlast,
  output logic                              ic_m_axi_rvalid,
  input  logic                              ic_m_axi_rready,
  // ---- to the PL-PS port ----,
  output logic [AXI_ID_WIDTH-1:0]           ps_axi_awid,
  output logic [AXI_ADDR_WIDTH-1:0]         ps_axi_awaddr,
  output logic [8-1:0]                      ps_axi_awlen,
  output logic [3-1:0]                      ps_axi_awsize,
  output logic [2-1:0]                      ps_axi_awburst,
  output logic                              ps_axi_awlock,
  output logic [4-1:0]                      ps_axi_awcache,
  output logic [3-1:0]                      ps_axi_awprot,
  output logic [4-1:0]                      ps_axi_awqos,
  output logic [AXI_USER_WIDTH-1:0]         ps_axi_awuser,
  output logic                              ps_axi_awvalid,
  input  logic                              ps_axi_awready,
  output logic [PORT_DATA_WIDTH-1:0]        ps_axi_wdata,
  output logic [PORT_DATA_WIDTH/8-1:0]      ps_axi_wstrb,
  output logic                              ps_axi_wlast,
  output logic                              ps_axi_wvalid,
  input  logic                              ps_axi_wready,
  input  logic [AXI_ID_WIDTH-1:0]           ps_axi_bid,
  input  logic [2-1:0]                      ps_axi_bresp,
  input  logic                              ps_axi_bvalid,
  output logic                              ps_axi_bready,
  output logic [AXI_ID_WIDTH-1:0]           ps_axi_arid,
  output logic [AXI_ADDR_WIDTH-1:0]         ps_axi_araddr,
  output logic [8-1:0]                      ps_axi_arlen,
  output logic [3-1:0]                      ps_axi_arsize,
  output logic [2-1:0]                      ps_axi_arburst,
  output logic                              ps_axi_arlock,
  output logic [4-1:0]                      ps_axi_arcache,
  output logic [3-1:0]                      ps_axi_arprot,
  output logic [4-1:0]                      ps_axi_arqos,
  output logic [AXI_USER_WIDTH-1:0]         ps_axi_aruser,
  output logic                              ps_axi_arvalid,
  input  logic                              ps_axi_arready,
  input  logic [AXI_ID_WIDTH-1:0]           ps_axi_rid,
  input  logic [PORT_DATA_WIDTH-1:0]        ps_axi_rdata,
  input  logic [2-1:0]                      ps_axi_rresp,
  input  logic                              ps_axi_rlast,
  input  logic                              ps_axi_rvalid,
  output logic                              ps_axi_rready
);

  for (genvar i = 0; i < N_HA; i++) begin : g_enforcer
    axi_enforcer #(
      .AXI_ADDR_WIDTH (AXI_ADDR_WIDTH),
      .AXI_DATA_WIDTH (HA_DATA_WIDTH),
      .AXI_ID_WIDTH   (AXI_ID_WIDTH),
      .AXI_USER_WIDTH (AXI_USER_WIDTH),
      .AxPROT_VALUE   (AxPROT_VALUES[i]),
      .AxUSER_VALUE   (AxUSER_VALUES[i]),
      .AxQOS_VALUE    (AxQOS_VALUES[i]),
      .AxCACHE_VALUE  (AxCACHE_VALUES[i]),
      .ENFORCE_AxCACHE(ENFORCE_AxCACHE[i])
    ) u_enforcer (
      .s_axi_awid     (ha_axi_awid[i]),
      .s_axi_awaddr   (ha_axi_awaddr[i]),
      .s_axi_awlen    (ha_axi_awlen[i]),
      .s_axi_awsize   (ha_axi_awsize[i]),
      .s_axi_awburst  (ha_axi_awburst[i]),
      .s_axi_awlock   (ha_axi_awlock[i]),
      .s_axi_awcache  (ha_axi_awcache[i]),
      .s_axi_awprot   (ha_axi_awprot[i]),
      .s_axi_awqos    (ha_axi_awqos[i]),
      .s_axi_awuser   (ha_axi_awuser[i]),
      .s_axi_awvalid  (ha_axi_awvalid[i]),
      .s_axi_awready  (ha_axi_awready[i]),
      .s_axi_wdata    (ha_axi_wdata[i]),
      .s_axi_wstrb    (ha_axi_wstrb[i]),
      .s_axi_wlast    (ha_axi_wlast[i]),
      .s_axi_wvalid   (ha_axi_wvalid[i]),
      .s_axi_wready   (ha_axi_wready[i]),
      .s_axi_bid      (ha_axi_bid[i]),
      .s_axi_bresp    (ha_axi_bresp[i]),
      .s_axi_bvalid   (ha_axi_bvalid[i]),
      .s_axi_bready   (ha_axi_bready[i]),
      .s_axi_arid     (ha_axi_arid[i]),
      .s_axi_araddr   (ha_axi_araddr[i]),
      .s_axi_arlen    (ha_axi_arlen[i]),
      .s_axi_arsize   (ha_axi_arsize[i]),
      .s_axi_arburst  (ha_axi_arburst[i]),
      .s_axi_arlock   (ha_axi_arlock[i]),
      .s_axi_arcache  (ha_axi_arcache[i]),
      .s_axi_arprot   (ha_axi_arprot[i]),
      .s_axi_arqos    (ha_axi_arqos[i]),
      .s_axi_aruser   (ha_axi_aruser[i]),
      .s_axi_arvalid  (ha_axi_arvalid[i]),
      .s_axi_arready  (ha_axi_arready[i]),
      .s_axi_rid      (ha_axi_rid[i]),
      .s_axi_rdata    (ha_axi_rdata[i]),
      .s_axi_rresp    (ha_axi_rresp[i]),
      .s_axi_rlast    (ha_axi_rlast[i]),
      .s_axi_rvalid   (ha_axi_rvalid[i]),
      .s_axi_rready   (ha_axi_rready[i]),
      .m_axi_awid     (ic_s_axi_awid[i]),
      .m_axi_awaddr   (ic_s_axi_awaddr[i]),
      .m_axi_awlen    (ic_s_axi_awlen[i]),
      .m_axi_awsize   (ic_s_axi_awsize[i]),
      .m_axi_awburst  (ic_s_axi_awburst[i]),
      .m_axi_awlock   (ic_s_axi_awlock[i]),
      .m_axi_awcache  (ic_s_axi_awcache[i]),
      .m_axi_awprot   (ic_s_axi_awprot[i]),
      .m_axi_awqos    (ic_s_axi_awqos[i]),
      .m_axi_awuser   (ic_s_axi_awuser[i]),
      .m_axi_awvalid  (ic_s_axi_awvalid[i]),
      .m_axi_awready  (ic_s_axi_awready[i]),
      .m_axi_wdata    (ic_s_axi_wdata[i]),
      .m_axi_wstrb    (ic_s_axi_wstrb[i]),
      .m_axi_wlast    (ic_s_axi_wlast[i]),
      .m_axi_wvalid   (ic_s_axi_wvalid[i]),
      .m_axi_wready   (ic_s_axi_wready[i]),
      .m_axi_bid      (ic_s_axi_bid[i]),
      .m_axi_bresp    (ic_s_axi_bresp[i]),
      .m_axi_bvalid   (ic_s_axi_bvalid[i]),
      .m_axi_bready   (ic_s_axi_bready[i]),
      .m_axi_arid     (ic_s_axi_arid[i]),
      .m_axi_araddr   (ic_s_axi_araddr[i]),
      .m_axi_arlen    (ic_s_axi_arlen[i]),
      .m_axi_arsize   (ic_s_axi_arsize[i]),
      .m_axi_arburst  (ic_s_axi_arburst[i]),
      .m_axi_arlock   (ic_s_axi_arlock[i]),
      .m_axi_arcache  (ic_s_axi_arcache[i]),
      .m_axi_arprot   (ic_s_axi_arprot[i]),
      .m_axi_arqos    (ic_s_axi_arqos[i]),
      .m_axi_aruser   (ic_s_axi_aruser[i]),
      .m_axi_arvalid  (ic_s_axi_arvalid[i]),
      .m_axi_arready  (ic_s_axi_arready[i]),
      .m_axi_rid      (ic_s_axi_rid[i]),
      .m_axi_rdata    (ic_s_axi_rdata[i]),
      .m_axi_rresp    (ic_s_axi_rresp[i]),
      .m_axi_rlast    (ic_s_axi_rlast[i]),
      .m_axi_rvalid   (ic_s_axi_rvalid[i]),
      .m_axi_rready   (ic_s_axi_rready[i])
    );
  end

  axi_id_mapper #(
    .AXI_ADDR_WIDTH      (AXI_ADDR_WIDTH),
    .AXI_DATA_WIDTH      (PORT_DATA_WIDTH),
    .AXI_ID_WIDTH        (AXI_ID_WIDTH),
    .AXI_USER_WIDTH      (AXI_USER_WIDTH),
    .POOL_SIZE           (POOL_SIZE),
    .NUMBER_OF_MANAGERS  (N_HA),
    .AXUSER_MAP          (AXUSER_MAP),
    .WRITE_REQ_BUF_SIZE  (WRITE_REQ_BUF_SIZE),
    .WRITE_BURST_BUF_SIZE(WRITE_BURST_BUF_SIZE),
    .WRITE_RSP_BUF_SIZE  (WRITE_RSP_BUF_SIZE),
    .READ_REQ_BUF_SIZE   (READ_REQ_BUF_SIZE),
    .READ_BURST_BUF_SIZE (READ_BURST_BUF_SIZE)
  ) u_aim (
    .clk,
    .rst_n,
    .irq,
    .s_axi_awid     (ic_m_axi_awid),
    .s_axi_awaddr   (ic_m_axi_awaddr),
    .s_axi_awlen    (ic_m_axi_awlen),
    .s_axi_awsize   (ic_m_axi_awsize),
    .s_axi_awburst  (ic_m_axi_awburst),
    .s_axi_awlock   (ic_m_axi_awlock),
    .s_axi_awcache  (ic_m_axi_awcache),
    .s_axi_awprot   (ic_m_axi_awprot),
    .s_axi_awqos    (ic_m_axi_awqos),
    .s_axi_awuser   (ic_m_axi_awuser),
    .s_axi_awvalid  (ic_m_axi_awvalid),
    .s_axi_awready  (ic_m_axi_awready),
    .s_axi_wdata    (ic_m_axi_wdata),
    .s_axi_wstrb    (ic_m_axi_wstrb),
    .s_axi_wlast    (ic_m_axi_wlast),
    .s_axi_wvalid   (ic_m_axi_wvalid),
    .s_axi_wready   (ic_m_axi_wready),
    .s_axi_bid      (ic_m_axi_bid),
    .s_axi_bresp    (ic_m_axi_bresp),
    .s_axi_bvalid   (ic_m_axi_bvalid),
    .s_axi_bready   (ic_m_axi_bready),
    .s_axi_arid     (ic_m_axi_arid),
    .s_axi_araddr   (ic_m_axi_araddr),
    .s_axi_arlen    (ic_m_axi_arlen),
    .s_axi_arsize   (ic_m_axi_arsize),
    .s_axi_arburst  (ic_m_axi_arburst),
    .s_axi_arlock   (ic_m_axi_arlock),
    .s_axi_arcache  (ic_m_axi_arcache),
    .s_axi_arprot   (ic_m_axi_arprot),
    .s_axi_arqos    (ic_m_axi_arqos),
    .s_axi_aruser   (ic_m_axi_aruser),
    .s_axi_arvalid  (ic_m_axi_arvalid),
    .s_axi_arready  (ic_m_axi_arready),
    .s_axi_rid      (ic_m_axi_rid),
    .s_axi_rdata    (ic_m_axi_rdata),
    .s_axi_rresp    (ic_m_axi_rresp),
    .s_axi_rlast    (ic_m_axi_rlast),
    .s_axi_rvalid   (ic_m_axi_rvalid),
    .s_axi_rready   (ic_m_axi_rready),
    .m_axi_awid     (ps_axi_awid),
    .m_axi_awaddr   (ps_axi_awaddr),
    .m_axi_awlen    (ps_axi_awlen),
    .m_axi_awsize   (ps_axi_awsize),
    .m_axi_awburst  (ps_axi_awburst),
    .m_axi_awlock   (ps_axi_awlock),
    .m_axi_awcache  (ps_axi_awcache),
    .m_axi_awprot   (ps_axi_awprot),
    .m_axi_awqos    (ps_axi_awqos),
    .m_axi_awuser   (ps_axi_awuser),
    .m_axi_awvalid  (ps_axi_awvalid),
    .m_axi_awready  (ps_axi_awready),
    .m_axi_wdata    (ps_axi_wdata),
    .m_axi_wstrb    (ps_axi_wstrb),
    .m_axi_wlast    (ps_axi_wlast),
    .m_axi_wvalid   (ps_axi_wvalid),
    .m_axi_wready   (ps_axi_wready),
    .m_axi_bid      (ps_axi_bid),
    .m_axi_bresp    (ps_axi_bresp),
    .m_axi_bvalid   (ps_axi_bvalid),
    .m_axi_bready   (ps_axi_bready),
    .m_axi_arid     (ps_axi_arid),
    .m_axi_araddr   (ps_axi_araddr),
    .m_axi_arlen    (ps_axi_arlen),
    .m_axi_arsize   (ps_axi_arsize),
    .m_axi_arburst  (ps_axi_arburst),
    .m_axi_arlock   (ps_axi_arlock),
    .m_axi_arcache  (ps_axi_arcache),
    .m_axi_arprot   (ps_axi_arprot),
    .m_axi_arqos    (ps_axi_arqos),
    .m_axi_aruser   (ps_axi_aruser),
    .m_axi_arvalid  (ps_axi_arvalid),
    .m_axi_arready  (ps_axi_arready),
    .m_axi_rid      (ps_axi_rid),
    .m_axi_rdata    (ps_axi_rdata),
    .m_axi_rresp    (ps_axi_rresp),
    .m_axi_rlast    (ps_axi_rlast),
    .m_axi_rvalid   (ps_axi_rvalid),
    .m_axi_rready   (ps_axi_rready)
  );

endmodule
