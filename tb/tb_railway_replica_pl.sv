// tb_railway_replica_pl: end-to-end test of the railway replica's
// programmable logic at its default configuration: twelve accelerators on six
// shared ports.
//
// Each port gets a behavioural single-ordered interconnect, two traffic
// generators (accelerators that write bursts into their own window and read
// them back, driving random hostile attributes; each DMA engine starts with
// one full 256-beat burst) and a memory model of the
// PL-PS port that checks every request arrives with its accelerator's
// enforced AxPROT/AxQOS/AxCACHE, its AxUSER and a pool ID of its own. Port
// back-pressure comes in phases so the mappers' buffers fill up. Monitors on
// the interconnect side check that every response arrives there with its
// original ID (0). At the end the twelve Stream IDs are checked to be
// distinct, and one misconfigured read request on HP0 must raise irq[0] only.
// Every mechanism is counted, and the test fails if one never happened.
module tb_railway_replica_pl;
  localparam int AW = 40, IW = 6, UW = 10, PW = 128, RTW = 32, VMW = 128;
  localparam int NTX = 16;
  // expected enforced values, as in the replica's default configuration
  localparam logic [2:0][1:0][3:0] RT_QOS = {4'd13, 4'd13, 4'd14, 4'd15, 4'd15, 4'd15};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [5:0] irq;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // ---- rt group: signals named as the replica's ports ----
  logic [2:0][1:0][IW-1:0] rt_ha_axi_awid;
  logic [2:0][1:0][IW-1:0] rt_ic_s_axi_awid;
  logic [2:0][IW-1:0] rt_ic_m_axi_awid;
  logic [2:0][IW-1:0] rt_mm_awid;
  logic [2:0][IW-1:0] rt_ps_axi_awid;
  logic [2:0][1:0][AW-1:0] rt_ha_axi_awaddr;
  logic [2:0][1:0][AW-1:0] rt_ic_s_axi_awaddr;
  logic [2:0][AW-1:0] rt_ic_m_axi_awaddr;
  logic [2:0][AW-1:0] rt_mm_awaddr;
  logic [2:0][AW-1:0] rt_ps_axi_awaddr;
  logic [2:0][1:0][8-1:0] rt_ha_axi_awlen;
  logic [2:0][1:0][8-1:0] rt_ic_s_axi_awlen;
  logic [2:0][8-1:0] rt_ic_m_axi_awlen;
  logic [2:0][8-1:0] rt_mm_awlen;
  logic [2:0][8-1:0] rt_ps_axi_awlen;
  logic [2:0][1:0][3-1:0] rt_ha_axi_awsize;
  logic [2:0][1:0][3-1:0] rt_ic_s_axi_awsize;
  logic [2:0][3-1:0] rt_ic_m_axi_awsize;
  logic [2:0][3-1:0] rt_mm_awsize;
  logic [2:0][3-1:0] rt_ps_axi_awsize;
  logic [2:0][1:0][2-1:0] rt_ha_axi_awburst;
  logic [2:0][1:0][2-1:0] rt_ic_s_axi_awburst;
  logic [2:0][2-1:0] rt_ic_m_axi_awburst;
  logic [2:0][2-1:0] rt_mm_awburst;
  logic [2:0][2-1:0] rt_ps_axi_awburst;
  logic [2:0][1:0] rt_ha_axi_awlock;
  logic [2:0][1:0] rt_ic_s_axi_awlock;
  logic [2:0] rt_ic_m_axi_awlock;
  logic [2:0] rt_mm_awlock;
  logic [2:0] rt_ps_axi_awlock;
  logic [2:0][1:0][4-1:0] rt_ha_axi_awcache;
  logic [2:0][1:0][4-1:0] rt_ic_s_axi_awcache;
  logic [2:0][4-1:0] rt_ic_m_axi_awcache;
  logic [2:0][4-1:0] rt_mm_awcache;
  logic [2:0][4-1:0] rt_ps_axi_awcache;
  logic [2:0][1:0][3-1:0] rt_ha_axi_awprot;
  logic [2:0][1:0][3-1:0] rt_ic_s_axi_awprot;
  logic [2:0][3-1:0] rt_ic_m_axi_awprot;
  logic [2:0][3-1:0] rt_mm_awprot;
  logic [2:0][3-1:0] rt_ps_axi_awprot;
  logic [2:0][1:0][4-1:0] rt_ha_axi_awqos;
  logic [2:0][1:0][4-1:0] rt_ic_s_axi_awqos;
  logic [2:0][4-1:0] rt_ic_m_axi_awqos;
  logic [2:0][4-1:0] rt_mm_awqos;
  logic [2:0][4-1:0] rt_ps_axi_awqos;
  logic [2:0][1:0][UW-1:0] rt_ha_axi_awuser;
  logic [2:0][1:0][UW-1:0] rt_ic_s_axi_awuser;
  logic [2:0][UW-1:0] rt_ic_m_axi_awuser;
  logic [2:0][UW-1:0] rt_mm_awuser;
  logic [2:0][UW-1:0] rt_ps_axi_awuser;
  logic [2:0][1:0] rt_ha_axi_awvalid;
  logic [2:0][1:0] rt_ic_s_axi_awvalid;
  logic [2:0] rt_ic_m_axi_awvalid;
  logic [2:0] rt_mm_awvalid;
  logic [2:0] rt_ps_axi_awvalid;
  logic [2:0][1:0] rt_ha_axi_awready;
  logic [2:0][1:0] rt_ic_s_axi_awready;
  logic [2:0] rt_ic_m_axi_awready;
  logic [2:0] rt_mm_awready;
  logic [2:0] rt_ps_axi_awready;
  logic [2:0][1:0][RTW-1:0] rt_ha_axi_wdata;
  logic [2:0][1:0][RTW-1:0] rt_ic_s_axi_wdata;
  logic [2:0][PW-1:0] rt_ic_m_axi_wdata;
  logic [2:0][PW-1:0] rt_mm_wdata;
  logic [2:0][PW-1:0] rt_ps_axi_wdata;
  logic [2:0][1:0][RTW/8-1:0] rt_ha_axi_wstrb;
  logic [2:0][1:0][RTW/8-1:0] rt_ic_s_axi_wstrb;
  logic [2:0][PW/8-1:0] rt_ic_m_axi_wstrb;
  logic [2:0][PW/8-1:0] rt_mm_wstrb;
  logic [2:0][PW/8-1:0] rt_ps_axi_wstrb;
  logic [2:0][1:0] rt_ha_axi_wlast;
  logic [2:0][1:0] rt_ic_s_axi_wlast;
  logic [2:0] rt_ic_m_axi_wlast;
  logic [2:0] rt_mm_wlast;
  logic [2:0] rt_ps_axi_wlast;
  logic [2:0][1:0] rt_ha_axi_wvalid;
  logic [2:0][1:0] rt_ic_s_axi_wvalid;
  logic [2:0] rt_ic_m_axi_wvalid;
  logic [2:0] rt_mm_wvalid;
  logic [2:0] rt_ps_axi_wvalid;
  logic [2:0][1:0] rt_ha_axi_wready;
  logic [2:0][1:0] rt_ic_s_axi_wready;
  logic [2:0] rt_ic_m_axi_wready;
  logic [2:0] rt_mm_wready;
  logic [2:0] rt_ps_axi_wready;
  logic [2:0][1:0][IW-1:0] rt_ha_axi_bid;
  logic [2:0][1:0][IW-1:0] rt_ic_s_axi_bid;
  logic [2:0][IW-1:0] rt_ic_m_axi_bid;
  logic [2:0][IW-1:0] rt_mm_bid;
  logic [2:0][IW-1:0] rt_ps_axi_bid;
  logic [2:0][1:0][2-1:0] rt_ha_axi_bresp;
  logic [2:0][1:0][2-1:0] rt_ic_s_axi_bresp;
  logic [2:0][2-1:0] rt_ic_m_axi_bresp;
  logic [2:0][2-1:0] rt_mm_bresp;
  logic [2:0][2-1:0] rt_ps_axi_bresp;
  logic [2:0][1:0] rt_ha_axi_bvalid;
  logic [2:0][1:0] rt_ic_s_axi_bvalid;
  logic [2:0] rt_ic_m_axi_bvalid;
  logic [2:0] rt_mm_bvalid;
  logic [2:0] rt_ps_axi_bvalid;
  logic [2:0][1:0] rt_ha_axi_bready;
  logic [2:0][1:0] rt_ic_s_axi_bready;
  logic [2:0] rt_ic_m_axi_bready;
  logic [2:0] rt_mm_bready;
  logic [2:0] rt_ps_axi_bready;
  logic [2:0][1:0][IW-1:0] rt_ha_axi_arid;
  logic [2:0][1:0][IW-1:0] rt_ic_s_axi_arid;
  logic [2:0][IW-1:0] rt_ic_m_axi_arid;
  logic [2:0][IW-1:0] rt_mm_arid;
  logic [2:0][IW-1:0] rt_ps_axi_arid;
  logic [2:0][1:0][AW-1:0] rt_ha_axi_araddr;
  logic [2:0][1:0][AW-1:0] rt_ic_s_axi_araddr;
  logic [2:0][AW-1:0] rt_ic_m_axi_araddr;
  logic [2:0][AW-1:0] rt_mm_araddr;
  logic [2:0][AW-1:0] rt_ps_axi_araddr;
  logic [2:0][1:0][8-1:0] rt_ha_axi_arlen;
  logic [2:0][1:0][8-1:0] rt_ic_s_axi_arlen;
  logic [2:0][8-1:0] rt_ic_m_axi_arlen;
  logic [2:0][8-1:0] rt_mm_arlen;
  logic [2:0][8-1:0] rt_ps_axi_arlen;
  logic [2:0][1:0][3-1:0] rt_ha_axi_arsize;
  logic [2:0][1:0][3-1:0] rt_ic_s_axi_arsize;
  logic [2:0][3-1:0] rt_ic_m_axi_arsize;
  logic [2:0][3-1:0] rt_mm_arsize;
  logic [2:0][3-1:0] rt_ps_axi_arsize;
  logic [2:0][1:0][2-1:0] rt_ha_axi_arburst;
  logic [2:0][1:0][2-1:0] rt_ic_s_axi_arburst;
  logic [2:0][2-1:0] rt_ic_m_axi_arburst;
  logic [2:0][2-1:0] rt_mm_arburst;
  logic [2:0][2-1:0] rt_ps_axi_arburst;
  logic [2:0][1:0] rt_ha_axi_arlock;
  logic [2:0][1:0] rt_ic_s_axi_arlock;
  logic [2:0] rt_ic_m_axi_arlock;
  logic [2:0] rt_mm_arlock;
  logic [2:0] rt_ps_axi_arlock;
  logic [2:0][1:0][4-1:0] rt_ha_axi_arcache;
  logic [2:0][1:0][4-1:0] rt_ic_s_axi_arcache;
  logic [2:0][4-1:0] rt_ic_m_axi_arcache;
  logic [2:0][4-1:0] rt_mm_arcache;
  logic [2:0][4-1:0] rt_ps_axi_arcache;
  logic [2:0][1:0][3-1:0] rt_ha_axi_arprot;
  logic [2:0][1:0][3-1:0] rt_ic_s_axi_arprot;
  logic [2:0][3-1:0] rt_ic_m_axi_arprot;
  logic [2:0][3-1:0] rt_mm_arprot;
  logic [2:0][3-1:0] rt_ps_axi_arprot;
  logic [2:0][1:0][4-1:0] rt_ha_axi_arqos;
  logic [2:0][1:0][4-1:0] rt_ic_s_axi_arqos;
  logic [2:0][4-1:0] rt_ic_m_axi_arqos;
  logic [2:0][4-1:0] rt_mm_arqos;
  logic [2:0][4-1:0] rt_ps_axi_arqos;
  logic [2:0][1:0][UW-1:0] rt_ha_axi_aruser;
  logic [2:0][1:0][UW-1:0] rt_ic_s_axi_aruser;
  logic [2:0][UW-1:0] rt_ic_m_axi_aruser;
  logic [2:0][UW-1:0] rt_mm_aruser;
  logic [2:0][UW-1:0] rt_ps_axi_aruser;
  logic [2:0][1:0] rt_ha_axi_arvalid;
  logic [2:0][1:0] rt_ic_s_axi_arvalid;
  logic [2:0] rt_ic_m_axi_arvalid;
  logic [2:0] rt_mm_arvalid;
  logic [2:0] rt_ps_axi_arvalid;
  logic [2:0][1:0] rt_ha_axi_arready;
  logic [2:0][1:0] rt_ic_s_axi_arready;
  logic [2:0] rt_ic_m_axi_arready;
  logic [2:0] rt_mm_arready;
  logic [2:0] rt_ps_axi_arready;
  logic [2:0][1:0][IW-1:0] rt_ha_axi_rid;
  logic [2:0][1:0][IW-1:0] rt_ic_s_axi_rid;
  logic [2:0][IW-1:0] rt_ic_m_axi_rid;
  logic [2:0][IW-1:0] rt_mm_rid;
  logic [2:0][IW-1:0] rt_ps_axi_rid;
  logic [2:0][1:0][RTW-1:0] rt_ha_axi_rdata;
  logic [2:0][1:0][RTW-1:0] rt_ic_s_axi_rdata;
  logic [2:0][PW-1:0] rt_ic_m_axi_rdata;
  logic [2:0][PW-1:0] rt_mm_rdata;
  logic [2:0][PW-1:0] rt_ps_axi_rdata;
  logic [2:0][1:0][2-1:0] rt_ha_axi_rresp;
  logic [2:0][1:0][2-1:0] rt_ic_s_axi_rresp;
  logic [2:0][2-1:0] rt_ic_m_axi_rresp;
  logic [2:0][2-1:0] rt_mm_rresp;
  logic [2:0][2-1:0] rt_ps_axi_rresp;
  logic [2:0][1:0] rt_ha_axi_rlast;
  logic [2:0][1:0] rt_ic_s_axi_rlast;
  logic [2:0] rt_ic_m_axi_rlast;
  logic [2:0] rt_mm_rlast;
  logic [2:0] rt_ps_axi_rlast;
  logic [2:0][1:0] rt_ha_axi_rvalid;
  logic [2:0][1:0] rt_ic_s_axi_rvalid;
  logic [2:0] rt_ic_m_axi_rvalid;
  logic [2:0] rt_mm_rvalid;
  logic [2:0] rt_ps_axi_rvalid;
  logic [2:0][1:0] rt_ha_axi_rready;
  logic [2:0][1:0] rt_ic_s_axi_rready;
  logic [2:0] rt_ic_m_axi_rready;
  logic [2:0] rt_mm_rready;
  logic [2:0] rt_ps_axi_rready;
  // ---- vm group: signals named as the replica's ports ----
  logic [2:0][1:0][IW-1:0] vm_ha_axi_awid;
  logic [2:0][1:0][IW-1:0] vm_ic_s_axi_awid;
  logic [2:0][IW-1:0] vm_ic_m_axi_awid;
  logic [2:0][IW-1:0] vm_mm_awid;
  logic [2:0][IW-1:0] vm_ps_axi_awid;
  logic [2:0][1:0][AW-1:0] vm_ha_axi_awaddr;
  logic [2:0][1:0][AW-1:0] vm_ic_s_axi_awaddr;
  logic [2:0][AW-1:0] vm_ic_m_axi_awaddr;
  logic [2:0][AW-1:0] vm_mm_awaddr;
  logic [2:0][AW-1:0] vm_ps_axi_awaddr;
  logic [2:0][1:0][8-1:0] vm_ha_axi_awlen;
  logic [2:0][1:0][8-1:0] vm_ic_s_axi_awlen;
  logic [2:0][8-1:0] vm_ic_m_axi_awlen;
  logic [2:0][8-1:0] vm_mm_awlen;
  logic [2:0][8-1:0] vm_ps_axi_awlen;
  logic [2:0][1:0][3-1:0] vm_ha_axi_awsize;
  logic [2:0][1:0][3-1:0] vm_ic_s_axi_awsize;
  logic [2:0][3-1:0] vm_ic_m_axi_awsize;
  logic [2:0][3-1:0] vm_mm_awsize;
  logic [2:0][3-1:0] vm_ps_axi_awsize;
  logic [2:0][1:0][2-1:0] vm_ha_axi_awburst;
  logic [2:0][1:0][2-1:0] vm_ic_s_axi_awburst;
  logic [2:0][2-1:0] vm_ic_m_axi_awburst;
  logic [2:0][2-1:0] vm_mm_awburst;
  logic [2:0][2-1:0] vm_ps_axi_awburst;
  logic [2:0][1:0] vm_ha_axi_awlock;
  logic [2:0][1:0] vm_ic_s_axi_awlock;
  logic [2:0] vm_ic_m_axi_awlock;
  logic [2:0] vm_mm_awlock;
  logic [2:0] vm_ps_axi_awlock;
  logic [2:0][1:0][4-1:0] vm_ha_axi_awcache;
  logic [2:0][1:0][4-1:0] vm_ic_s_axi_awcache;
  logic [2:0][4-1:0] vm_ic_m_axi_awcache;
  logic [2:0][4-1:0] vm_mm_awcache;
  logic [2:0][4-1:0] vm_ps_axi_awcache;
  logic [2:0][1:0][3-1:0] vm_ha_axi_awprot;
  logic [2:0][1:0][3-1:0] vm_ic_s_axi_awprot;
  logic [2:0][3-1:0] vm_ic_m_axi_awprot;
  logic [2:0][3-1:0] vm_mm_awprot;
  logic [2:0][3-1:0] vm_ps_axi_awprot;
  logic [2:0][1:0][4-1:0] vm_ha_axi_awqos;
  logic [2:0][1:0][4-1:0] vm_ic_s_axi_awqos;
  logic [2:0][4-1:0] vm_ic_m_axi_awqos;
  logic [2:0][4-1:0] vm_mm_awqos;
  logic [2:0][4-1:0] vm_ps_axi_awqos;
  logic [2:0][1:0][UW-1:0] vm_ha_axi_awuser;
  logic [2:0][1:0][UW-1:0] vm_ic_s_axi_awuser;
  logic [2:0][UW-1:0] vm_ic_m_axi_awuser;
  logic [2:0][UW-1:0] vm_mm_awuser;
  logic [2:0][UW-1:0] vm_ps_axi_awuser;
  logic [2:0][1:0] vm_ha_axi_awvalid;
  logic [2:0][1:0] vm_ic_s_axi_awvalid;
  logic [2:0] vm_ic_m_axi_awvalid;
  logic [2:0] vm_mm_awvalid;
  logic [2:0] vm_ps_axi_awvalid;
  logic [2:0][1:0] vm_ha_axi_awready;
  logic [2:0][1:0] vm_ic_s_axi_awready;
  logic [2:0] vm_ic_m_axi_awready;
  logic [2:0] vm_mm_awready;
  logic [2:0] vm_ps_axi_awready;
  logic [2:0][1:0][VMW-1:0] vm_ha_axi_wdata;
  logic [2:0][1:0][VMW-1:0] vm_ic_s_axi_wdata;
  logic [2:0][PW-1:0] vm_ic_m_axi_wdata;
  logic [2:0][PW-1:0] vm_mm_wdata;
  logic [2:0][PW-1:0] vm_ps_axi_wdata;
  logic [2:0][1:0][VMW/8-1:0] vm_ha_axi_wstrb;
  logic [2:0][1:0][VMW/8-1:0] vm_ic_s_axi_wstrb;
  logic [2:0][PW/8-1:0] vm_ic_m_axi_wstrb;
  logic [2:0][PW/8-1:0] vm_mm_wstrb;
  logic [2:0][PW/8-1:0] vm_ps_axi_wstrb;
  logic [2:0][1:0] vm_ha_axi_wlast;
  logic [2:0][1:0] vm_ic_s_axi_wlast;
  logic [2:0] vm_ic_m_axi_wlast;
  logic [2:0] vm_mm_wlast;
  logic [2:0] vm_ps_axi_wlast;
  logic [2:0][1:0] vm_ha_axi_wvalid;
  logic [2:0][1:0] vm_ic_s_axi_wvalid;
  logic [2:0] vm_ic_m_axi_wvalid;
  logic [2:0] vm_mm_wvalid;
  logic [2:0] vm_ps_axi_wvalid;
  logic [2:0][1:0] vm_ha_axi_wready;
  logic [2:0][1:0] vm_ic_s_axi_wready;
  logic [2:0] vm_ic_m_axi_wready;
  logic [2:0] vm_mm_wready;
  logic [2:0] vm_ps_axi_wready;
  logic [2:0][1:0][IW-1:0] vm_ha_axi_bid;
  logic [2:0][1:0][IW-1:0] vm_ic_s_axi_bid;
  logic [2:0][IW-1:0] vm_ic_m_axi_bid;
  logic [2:0][IW-1:0] vm_mm_bid;
  logic [2:0][IW-1:0] vm_ps_axi_bid;
  logic [2:0][1:0][2-1:0] vm_ha_axi_bresp;
  logic [2:0][1:0][2-1:0] vm_ic_s_axi_bresp;
  logic [2:0][2-1:0] vm_ic_m_axi_bresp;
  logic [2:0][2-1:0] vm_mm_bresp;
  logic [2:0][2-1:0] vm_ps_axi_bresp;
  logic [2:0][1:0] vm_ha_axi_bvalid;
  logic [2:0][1:0] vm_ic_s_axi_bvalid;
  logic [2:0] vm_ic_m_axi_bvalid;
  logic [2:0] vm_mm_bvalid;
  logic [2:0] vm_ps_axi_bvalid;
  logic [2:0][1:0] vm_ha_axi_bready;
  logic [2:0][1:0] vm_ic_s_axi_bready;
  logic [2:0] vm_ic_m_axi_bready;
  logic [2:0] vm_mm_bready;
  logic [2:0] vm_ps_axi_bready;
  logic [2:0][1:0][IW-1:0] vm_ha_axi_arid;
  logic [2:0][1:0][IW-1:0] vm_ic_s_axi_arid;
  logic [2:0][IW-1:0] vm_ic_m_axi_arid;
  logic [2:0][IW-1:0] vm_mm_arid;
  logic [2:0][IW-1:0] vm_ps_axi_arid;
  logic [2:0][1:0][AW-1:0] vm_ha_axi_araddr;
  logic [2:0][1:0][AW-1:0] vm_ic_s_axi_araddr;
  logic [2:0][AW-1:0] vm_ic_m_axi_araddr;
  logic [2:0][AW-1:0] vm_mm_araddr;
  logic [2:0][AW-1:0] vm_ps_axi_araddr;
  logic [2:0][1:0][8-1:0] vm_ha_axi_arlen;
  logic [2:0][1:0][8-1:0] vm_ic_s_axi_arlen;
  logic [2:0][8-1:0] vm_ic_m_axi_arlen;
  logic [2:0][8-1:0] vm_mm_arlen;
  logic [2:0][8-1:0] vm_ps_axi_arlen;
  logic [2:0][1:0][3-1:0] vm_ha_axi_arsize;
  logic [2:0][1:0][3-1:0] vm_ic_s_axi_arsize;
  logic [2:0][3-1:0] vm_ic_m_axi_arsize;
  logic [2:0][3-1:0] vm_mm_arsize;
  logic [2:0][3-1:0] vm_ps_axi_arsize;
  logic [2:0][1:0][2-1:0] vm_ha_axi_arburst;
  logic [2:0][1:0][2-1:0] vm_ic_s_axi_arburst;
  logic [2:0][2-1:0] vm_ic_m_axi_arburst;
  logic [2:0][2-1:0] vm_mm_arburst;
  logic [2:0][2-1:0] vm_ps_axi_arburst;
  logic [2:0][1:0] vm_ha_axi_arlock;
  logic [2:0][1:0] vm_ic_s_axi_arlock;
  logic [2:0] vm_ic_m_axi_arlock;
  logic [2:0] vm_mm_arlock;
  logic [2:0] vm_ps_axi_arlock;
  logic [2:0][1:0][4-1:0] vm_ha_axi_arcache;
  logic [2:0][1:0][4-1:0] vm_ic_s_axi_arcache;
  logic [2:0][4-1:0] vm_ic_m_axi_arcache;
  logic [2:0][4-1:0] vm_mm_arcache;
  logic [2:0][4-1:0] vm_ps_axi_arcache;
  logic [2:0][1:0][3-1:0] vm_ha_axi_arprot;
  logic [2:0][1:0][3-1:0] vm_ic_s_axi_arprot;
  logic [2:0][3-1:0] vm_ic_m_axi_arprot;
  logic [2:0][3-1:0] vm_mm_arprot;
  logic [2:0][3-1:0] vm_ps_axi_arprot;
  logic [2:0][1:0][4-1:0] vm_ha_axi_arqos;
  logic [2:0][1:0][4-1:0] vm_ic_s_axi_arqos;
  logic [2:0][4-1:0] vm_ic_m_axi_arqos;
  logic [2:0][4-1:0] vm_mm_arqos;
  logic [2:0][4-1:0] vm_ps_axi_arqos;
  logic [2:0][1:0][UW-1:0] vm_ha_axi_aruser;
  logic [2:0][1:0][UW-1:0] vm_ic_s_axi_aruser;
  logic [2:0][UW-1:0] vm_ic_m_axi_aruser;
  logic [2:0][UW-1:0] vm_mm_aruser;
  logic [2:0][UW-1:0] vm_ps_axi_aruser;
  logic [2:0][1:0] vm_ha_axi_arvalid;
  logic [2:0][1:0] vm_ic_s_axi_arvalid;
  logic [2:0] vm_ic_m_axi_arvalid;
  logic [2:0] vm_mm_arvalid;
  logic [2:0] vm_ps_axi_arvalid;
  logic [2:0][1:0] vm_ha_axi_arready;
  logic [2:0][1:0] vm_ic_s_axi_arready;
  logic [2:0] vm_ic_m_axi_arready;
  logic [2:0] vm_mm_arready;
  logic [2:0] vm_ps_axi_arready;
  logic [2:0][1:0][IW-1:0] vm_ha_axi_rid;
  logic [2:0][1:0][IW-1:0] vm_ic_s_axi_rid;
  logic [2:0][IW-1:0] vm_ic_m_axi_rid;
  logic [2:0][IW-1:0] vm_mm_rid;
  logic [2:0][IW-1:0] vm_ps_axi_rid;
  logic [2:0][1:0][VMW-1:0] vm_ha_axi_rdata;
  logic [2:0][1:0][VMW-1:0] vm_ic_s_axi_rdata;
  logic [2:0][PW-1:0] vm_ic_m_axi_rdata;
  logic [2:0][PW-1:0] vm_mm_rdata;
  logic [2:0][PW-1:0] vm_ps_axi_rdata;
  logic [2:0][1:0][2-1:0] vm_ha_axi_rresp;
  logic [2:0][1:0][2-1:0] vm_ic_s_axi_rresp;
  logic [2:0][2-1:0] vm_ic_m_axi_rresp;
  logic [2:0][2-1:0] vm_mm_rresp;
  logic [2:0][2-1:0] vm_ps_axi_rresp;
  logic [2:0][1:0] vm_ha_axi_rlast;
  logic [2:0][1:0] vm_ic_s_axi_rlast;
  logic [2:0] vm_ic_m_axi_rlast;
  logic [2:0] vm_mm_rlast;
  logic [2:0] vm_ps_axi_rlast;
  logic [2:0][1:0] vm_ha_axi_rvalid;
  logic [2:0][1:0] vm_ic_s_axi_rvalid;
  logic [2:0] vm_ic_m_axi_rvalid;
  logic [2:0] vm_mm_rvalid;
  logic [2:0] vm_ps_axi_rvalid;
  logic [2:0][1:0] vm_ha_axi_rready;
  logic [2:0][1:0] vm_ic_s_axi_rready;
  logic [2:0] vm_ic_m_axi_rready;
  logic [2:0] vm_mm_rready;
  logic [2:0] vm_ps_axi_rready;

  railway_replica_pl dut (.*);

  // ---- misconfigured read injected between HP0's interconnect and mapper ----
  logic inj = 1'b0;

  assign rt_ic_m_axi_awid = rt_mm_awid;
  assign rt_ic_m_axi_awaddr = rt_mm_awaddr;
  assign rt_ic_m_axi_awlen = rt_mm_awlen;
  assign rt_ic_m_axi_awsize = rt_mm_awsize;
  assign rt_ic_m_axi_awburst = rt_mm_awburst;
  assign rt_ic_m_axi_awlock = rt_mm_awlock;
  assign rt_ic_m_axi_awcache = rt_mm_awcache;
  assign rt_ic_m_axi_awprot = rt_mm_awprot;
  assign rt_ic_m_axi_awqos = rt_mm_awqos;
  assign rt_ic_m_axi_awuser = rt_mm_awuser;
  assign rt_ic_m_axi_awvalid = rt_mm_awvalid;
  assign rt_mm_awready = rt_ic_m_axi_awready;
  assign rt_ic_m_axi_wdata = rt_mm_wdata;
  assign rt_ic_m_axi_wstrb = rt_mm_wstrb;
  assign rt_ic_m_axi_wlast = rt_mm_wlast;
  assign rt_ic_m_axi_wvalid = rt_mm_wvalid;
  assign rt_mm_wready = rt_ic_m_axi_wready;
  assign rt_mm_bid = rt_ic_m_axi_bid;
  assign rt_mm_bresp = rt_ic_m_axi_bresp;
  assign rt_mm_bvalid = rt_ic_m_axi_bvalid;
  assign rt_ic_m_axi_bready = rt_mm_bready;
  always_comb begin rt_ic_m_axi_arid = rt_mm_arid; if (inj) rt_ic_m_axi_arid[0] = '0; end
  assign rt_ic_m_axi_araddr = rt_mm_araddr;
  always_comb begin rt_ic_m_axi_arlen = rt_mm_arlen; if (inj) rt_ic_m_axi_arlen[0] = '0; end
  assign rt_ic_m_axi_arsize = rt_mm_arsize;
  assign rt_ic_m_axi_arburst = rt_mm_arburst;
  assign rt_ic_m_axi_arlock = rt_mm_arlock;
  assign rt_ic_m_axi_arcache = rt_mm_arcache;
  assign rt_ic_m_axi_arprot = rt_mm_arprot;
  assign rt_ic_m_axi_arqos = rt_mm_arqos;
  always_comb begin rt_ic_m_axi_aruser = rt_mm_aruser; if (inj) rt_ic_m_axi_aruser[0] = UW'(77); end
  always_comb begin rt_ic_m_axi_arvalid = rt_mm_arvalid; if (inj) rt_ic_m_axi_arvalid[0] = 1'b1; end
  always_comb begin rt_mm_arready = rt_ic_m_axi_arready; if (inj) rt_mm_arready[0] = 1'b0; end
  assign rt_mm_rid = rt_ic_m_axi_rid;
  assign rt_mm_rdata = rt_ic_m_axi_rdata;
  assign rt_mm_rresp = rt_ic_m_axi_rresp;
  assign rt_mm_rlast = rt_ic_m_axi_rlast;
  assign rt_mm_rvalid = rt_ic_m_axi_rvalid;
  assign rt_ic_m_axi_rready = rt_mm_rready;
  assign vm_ic_m_axi_awid = vm_mm_awid;
  assign vm_ic_m_axi_awaddr = vm_mm_awaddr;
  assign vm_ic_m_axi_awlen = vm_mm_awlen;
  assign vm_ic_m_axi_awsize = vm_mm_awsize;
  assign vm_ic_m_axi_awburst = vm_mm_awburst;
  assign vm_ic_m_axi_awlock = vm_mm_awlock;
  assign vm_ic_m_axi_awcache = vm_mm_awcache;
  assign vm_ic_m_axi_awprot = vm_mm_awprot;
  assign vm_ic_m_axi_awqos = vm_mm_awqos;
  assign vm_ic_m_axi_awuser = vm_mm_awuser;
  assign vm_ic_m_axi_awvalid = vm_mm_awvalid;
  assign vm_mm_awready = vm_ic_m_axi_awready;
  assign vm_ic_m_axi_wdata = vm_mm_wdata;
  assign vm_ic_m_axi_wstrb = vm_mm_wstrb;
  assign vm_ic_m_axi_wlast = vm_mm_wlast;
  assign vm_ic_m_axi_wvalid = vm_mm_wvalid;
  assign vm_mm_wready = vm_ic_m_axi_wready;
  assign vm_mm_bid = vm_ic_m_axi_bid;
  assign vm_mm_bresp = vm_ic_m_axi_bresp;
  assign vm_mm_bvalid = vm_ic_m_axi_bvalid;
  assign vm_ic_m_axi_bready = vm_mm_bready;
  assign vm_ic_m_axi_arid = vm_mm_arid;
  assign vm_ic_m_axi_araddr = vm_mm_araddr;
  assign vm_ic_m_axi_arlen = vm_mm_arlen;
  assign vm_ic_m_axi_arsize = vm_mm_arsize;
  assign vm_ic_m_axi_arburst = vm_mm_arburst;
  assign vm_ic_m_axi_arlock = vm_mm_arlock;
  assign vm_ic_m_axi_arcache = vm_mm_arcache;
  assign vm_ic_m_axi_arprot = vm_mm_arprot;
  assign vm_ic_m_axi_arqos = vm_mm_arqos;
  assign vm_ic_m_axi_aruser = vm_mm_aruser;
  assign vm_ic_m_axi_arvalid = vm_mm_arvalid;
  assign vm_mm_arready = vm_ic_m_axi_arready;
  assign vm_mm_rid = vm_ic_m_axi_rid;
  assign vm_mm_rdata = vm_ic_m_axi_rdata;
  assign vm_mm_rresp = vm_ic_m_axi_rresp;
  assign vm_mm_rlast = vm_ic_m_axi_rlast;
  assign vm_mm_rvalid = vm_ic_m_axi_rvalid;
  assign vm_ic_m_axi_rready = vm_mm_rready;

  // ---- per-port environment ----
  logic [1:0][2:0] hold = '0;
  int ha_checks   [1:0][2:0][1:0];
  int ha_failures [1:0][2:0][1:0];
  int ha_hostile  [1:0][2:0][1:0];
  logic [1:0][2:0][1:0] ha_done;
  int pm_checks   [1:0][2:0];
  int pm_failures [1:0][2:0];
  int pm_remap    [1:0][2:0];
  int pm_stall    [1:0][2:0];
  logic [1:0][2:0][1:0][IW-1:0] id_seen;
  int aim_stall   [1:0][2:0];
  int restored    [1:0][2:0];
  int resp_checks [1:0][2:0];
  int resp_bad    [1:0][2:0];

  for (genvar p = 0; p < 3; p++) begin : g_rt
    axi_interconnect_model #(.N(2), .ADDR_W(AW), .S_DATA_W(RTW), .M_DATA_W(PW), .ID_W(IW), .USER_W(UW)) u_ic (
      .clk(clk),
      .rst_n(rst_n),
      .s_awid(rt_ic_s_axi_awid[p]),
      .s_awaddr(rt_ic_s_axi_awaddr[p]),
      .s_awlen(rt_ic_s_axi_awlen[p]),
      .s_awsize(rt_ic_s_axi_awsize[p]),
      .s_awburst(rt_ic_s_axi_awburst[p]),
      .s_awlock(rt_ic_s_axi_awlock[p]),
      .s_awcache(rt_ic_s_axi_awcache[p]),
      .s_awprot(rt_ic_s_axi_awprot[p]),
      .s_awqos(rt_ic_s_axi_awqos[p]),
      .s_awuser(rt_ic_s_axi_awuser[p]),
      .s_awvalid(rt_ic_s_axi_awvalid[p]),
      .s_awready(rt_ic_s_axi_awready[p]),
      .s_wdata(rt_ic_s_axi_wdata[p]),
      .s_wstrb(rt_ic_s_axi_wstrb[p]),
      .s_wlast(rt_ic_s_axi_wlast[p]),
      .s_wvalid(rt_ic_s_axi_wvalid[p]),
      .s_wready(rt_ic_s_axi_wready[p]),
      .s_bid(rt_ic_s_axi_bid[p]),
      .s_bresp(rt_ic_s_axi_bresp[p]),
      .s_bvalid(rt_ic_s_axi_bvalid[p]),
      .s_bready(rt_ic_s_axi_bready[p]),
      .s_arid(rt_ic_s_axi_arid[p]),
      .s_araddr(rt_ic_s_axi_araddr[p]),
      .s_arlen(rt_ic_s_axi_arlen[p]),
      .s_arsize(rt_ic_s_axi_arsize[p]),
      .s_arburst(rt_ic_s_axi_arburst[p]),
      .s_arlock(rt_ic_s_axi_arlock[p]),
      .s_arcache(rt_ic_s_axi_arcache[p]),
      .s_arprot(rt_ic_s_axi_arprot[p]),
      .s_arqos(rt_ic_s_axi_arqos[p]),
      .s_aruser(rt_ic_s_axi_aruser[p]),
      .s_arvalid(rt_ic_s_axi_arvalid[p]),
      .s_arready(rt_ic_s_axi_arready[p]),
      .s_rid(rt_ic_s_axi_rid[p]),
      .s_rdata(rt_ic_s_axi_rdata[p]),
      .s_rresp(rt_ic_s_axi_rresp[p]),
      .s_rlast(rt_ic_s_axi_rlast[p]),
      .s_rvalid(rt_ic_s_axi_rvalid[p]),
      .s_rready(rt_ic_s_axi_rready[p]),
      .m_awid(rt_mm_awid[p]),
      .m_awaddr(rt_mm_awaddr[p]),
      .m_awlen(rt_mm_awlen[p]),
      .m_awsize(rt_mm_awsize[p]),
      .m_awburst(rt_mm_awburst[p]),
      .m_awlock(rt_mm_awlock[p]),
      .m_awcache(rt_mm_awcache[p]),
      .m_awprot(rt_mm_awprot[p]),
      .m_awqos(rt_mm_awqos[p]),
      .m_awuser(rt_mm_awuser[p]),
      .m_awvalid(rt_mm_awvalid[p]),
      .m_awready(rt_mm_awready[p]),
      .m_wdata(rt_mm_wdata[p]),
      .m_wstrb(rt_mm_wstrb[p]),
      .m_wlast(rt_mm_wlast[p]),
      .m_wvalid(rt_mm_wvalid[p]),
      .m_wready(rt_mm_wready[p]),
      .m_bid(rt_mm_bid[p]),
      .m_bresp(rt_mm_bresp[p]),
      .m_bvalid(rt_mm_bvalid[p]),
      .m_bready(rt_mm_bready[p]),
      .m_arid(rt_mm_arid[p]),
      .m_araddr(rt_mm_araddr[p]),
      .m_arlen(rt_mm_arlen[p]),
      .m_arsize(rt_mm_arsize[p]),
      .m_arburst(rt_mm_arburst[p]),
      .m_arlock(rt_mm_arlock[p]),
      .m_arcache(rt_mm_arcache[p]),
      .m_arprot(rt_mm_arprot[p]),
      .m_arqos(rt_mm_arqos[p]),
      .m_aruser(rt_mm_aruser[p]),
      .m_arvalid(rt_mm_arvalid[p]),
      .m_arready(rt_mm_arready[p]),
      .m_rid(rt_mm_rid[p]),
      .m_rdata(rt_mm_rdata[p]),
      .m_rresp(rt_mm_rresp[p]),
      .m_rlast(rt_mm_rlast[p]),
      .m_rvalid(rt_mm_rvalid[p]),
      .m_rready(rt_mm_rready[p]));
    for (genvar k = 0; k < 2; k++) begin : g_ha
      axi_ha_traffic_model #(.AW(AW), .DW(RTW), .IW(IW), .UW(UW), .NTX(NTX), .FIRST_LEN(255),
        .BASE(AW'((0 + p * 2 + k + 1)) << 28), .EXP_PROT(3'b000), .EXP_QOS(RT_QOS[p][k]), .EXP_USER(UW'(k))) u_ha (
        .clk(clk),
        .rst_n(rst_n),
        .m_awid(rt_ha_axi_awid[p][k]),
        .m_awaddr(rt_ha_axi_awaddr[p][k]),
        .m_awlen(rt_ha_axi_awlen[p][k]),
        .m_awsize(rt_ha_axi_awsize[p][k]),
        .m_awburst(rt_ha_axi_awburst[p][k]),
        .m_awlock(rt_ha_axi_awlock[p][k]),
        .m_awcache(rt_ha_axi_awcache[p][k]),
        .m_awprot(rt_ha_axi_awprot[p][k]),
        .m_awqos(rt_ha_axi_awqos[p][k]),
        .m_awuser(rt_ha_axi_awuser[p][k]),
        .m_awvalid(rt_ha_axi_awvalid[p][k]),
        .m_awready(rt_ha_axi_awready[p][k]),
        .m_wdata(rt_ha_axi_wdata[p][k]),
        .m_wstrb(rt_ha_axi_wstrb[p][k]),
        .m_wlast(rt_ha_axi_wlast[p][k]),
        .m_wvalid(rt_ha_axi_wvalid[p][k]),
        .m_wready(rt_ha_axi_wready[p][k]),
        .m_bid(rt_ha_axi_bid[p][k]),
        .m_bresp(rt_ha_axi_bresp[p][k]),
        .m_bvalid(rt_ha_axi_bvalid[p][k]),
        .m_bready(rt_ha_axi_bready[p][k]),
        .m_arid(rt_ha_axi_arid[p][k]),
        .m_araddr(rt_ha_axi_araddr[p][k]),
        .m_arlen(rt_ha_axi_arlen[p][k]),
        .m_arsize(rt_ha_axi_arsize[p][k]),
        .m_arburst(rt_ha_axi_arburst[p][k]),
        .m_arlock(rt_ha_axi_arlock[p][k]),
        .m_arcache(rt_ha_axi_arcache[p][k]),
        .m_arprot(rt_ha_axi_arprot[p][k]),
        .m_arqos(rt_ha_axi_arqos[p][k]),
        .m_aruser(rt_ha_axi_aruser[p][k]),
        .m_arvalid(rt_ha_axi_arvalid[p][k]),
        .m_arready(rt_ha_axi_arready[p][k]),
        .m_rid(rt_ha_axi_rid[p][k]),
        .m_rdata(rt_ha_axi_rdata[p][k]),
        .m_rresp(rt_ha_axi_rresp[p][k]),
        .m_rlast(rt_ha_axi_rlast[p][k]),
        .m_rvalid(rt_ha_axi_rvalid[p][k]),
        .m_rready(rt_ha_axi_rready[p][k]),
        .checks(ha_checks[0][p][k]),
        .failures(ha_failures[0][p][k]),
        .n_hostile(ha_hostile[0][p][k]),
        .done(ha_done[0][p][k]));
    end
    axi_port_memory_model #(.AW(AW), .DW(PW), .IW(IW), .UW(UW), .N(2),
      .PROT({3'b000, 3'b000}), .QOS({RT_QOS[p][1], RT_QOS[p][0]}), .CACHE('0), .ENC(2'b11),
      .BASE({AW'((0 + p * 2 + 2)) << 28, AW'((0 + p * 2 + 1)) << 28})) u_port (
      .clk(clk),
      .rst_n(rst_n),
      .hold(hold[0][p]),
      .s_awid(rt_ps_axi_awid[p]),
      .s_awaddr(rt_ps_axi_awaddr[p]),
      .s_awlen(rt_ps_axi_awlen[p]),
      .s_awsize(rt_ps_axi_awsize[p]),
      .s_awburst(rt_ps_axi_awburst[p]),
      .s_awlock(rt_ps_axi_awlock[p]),
      .s_awcache(rt_ps_axi_awcache[p]),
      .s_awprot(rt_ps_axi_awprot[p]),
      .s_awqos(rt_ps_axi_awqos[p]),
      .s_awuser(rt_ps_axi_awuser[p]),
      .s_awvalid(rt_ps_axi_awvalid[p]),
      .s_awready(rt_ps_axi_awready[p]),
      .s_wdata(rt_ps_axi_wdata[p]),
      .s_wstrb(rt_ps_axi_wstrb[p]),
      .s_wlast(rt_ps_axi_wlast[p]),
      .s_wvalid(rt_ps_axi_wvalid[p]),
      .s_wready(rt_ps_axi_wready[p]),
      .s_bid(rt_ps_axi_bid[p]),
      .s_bresp(rt_ps_axi_bresp[p]),
      .s_bvalid(rt_ps_axi_bvalid[p]),
      .s_bready(rt_ps_axi_bready[p]),
      .s_arid(rt_ps_axi_arid[p]),
      .s_araddr(rt_ps_axi_araddr[p]),
      .s_arlen(rt_ps_axi_arlen[p]),
      .s_arsize(rt_ps_axi_arsize[p]),
      .s_arburst(rt_ps_axi_arburst[p]),
      .s_arlock(rt_ps_axi_arlock[p]),
      .s_arcache(rt_ps_axi_arcache[p]),
      .s_arprot(rt_ps_axi_arprot[p]),
      .s_arqos(rt_ps_axi_arqos[p]),
      .s_aruser(rt_ps_axi_aruser[p]),
      .s_arvalid(rt_ps_axi_arvalid[p]),
      .s_arready(rt_ps_axi_arready[p]),
      .s_rid(rt_ps_axi_rid[p]),
      .s_rdata(rt_ps_axi_rdata[p]),
      .s_rresp(rt_ps_axi_rresp[p]),
      .s_rlast(rt_ps_axi_rlast[p]),
      .s_rvalid(rt_ps_axi_rvalid[p]),
      .s_rready(rt_ps_axi_rready[p]),
      .checks(pm_checks[0][p]),
      .failures(pm_failures[0][p]),
      .n_remap(pm_remap[0][p]),
      .n_stall(pm_stall[0][p]),
      .id_seen(id_seen[0][p]));
    // interconnect-side monitor: mapper stalls and restored response IDs
    initial begin
      aim_stall[0][p] = 0; restored[0][p] = 0; resp_checks[0][p] = 0; resp_bad[0][p] = 0;
    end
    always @(posedge clk) if (rst_n) begin
      if ((rt_mm_awvalid[p] && !rt_ic_m_axi_awready[p]) || (rt_mm_wvalid[p] && !rt_ic_m_axi_wready[p]) ||
          (rt_mm_arvalid[p] && !rt_ic_m_axi_arready[p]))
        aim_stall[0][p]++;
      if (rt_ic_m_axi_bvalid[p] && rt_mm_bready[p]) begin
        resp_checks[0][p]++;
        if (rt_ic_m_axi_bid[p] != '0) resp_bad[0][p]++;
      end
      if (rt_ic_m_axi_rvalid[p] && rt_mm_rready[p]) begin
        resp_checks[0][p]++;
        if (rt_ic_m_axi_rid[p] != '0) resp_bad[0][p]++;
      end
      if ((rt_ps_axi_bvalid[p] && rt_ps_axi_bready[p] && rt_ps_axi_bid[p] != '0) ||
          (rt_ps_axi_rvalid[p] && rt_ps_axi_rready[p] && rt_ps_axi_rid[p] != '0))
        restored[0][p]++;
    end
    // back-pressure phases at the port
    initial begin
      wait (rst_n);
      forever begin
        repeat ($urandom_range(150, 300)) @(posedge clk);
        hold[0][p] <= 1'b1;
        repeat ($urandom_range(30, 80)) @(posedge clk);
        hold[0][p] <= 1'b0;
      end
    end
  end

  for (genvar p = 0; p < 3; p++) begin : g_vm
    axi_interconnect_model #(.N(2), .ADDR_W(AW), .S_DATA_W(VMW), .M_DATA_W(PW), .ID_W(IW), .USER_W(UW)) u_ic (
      .clk(clk),
      .rst_n(rst_n),
      .s_awid(vm_ic_s_axi_awid[p]),
      .s_awaddr(vm_ic_s_axi_awaddr[p]),
      .s_awlen(vm_ic_s_axi_awlen[p]),
      .s_awsize(vm_ic_s_axi_awsize[p]),
      .s_awburst(vm_ic_s_axi_awburst[p]),
      .s_awlock(vm_ic_s_axi_awlock[p]),
      .s_awcache(vm_ic_s_axi_awcache[p]),
      .s_awprot(vm_ic_s_axi_awprot[p]),
      .s_awqos(vm_ic_s_axi_awqos[p]),
      .s_awuser(vm_ic_s_axi_awuser[p]),
      .s_awvalid(vm_ic_s_axi_awvalid[p]),
      .s_awready(vm_ic_s_axi_awready[p]),
      .s_wdata(vm_ic_s_axi_wdata[p]),
      .s_wstrb(vm_ic_s_axi_wstrb[p]),
      .s_wlast(vm_ic_s_axi_wlast[p]),
      .s_wvalid(vm_ic_s_axi_wvalid[p]),
      .s_wready(vm_ic_s_axi_wready[p]),
      .s_bid(vm_ic_s_axi_bid[p]),
      .s_bresp(vm_ic_s_axi_bresp[p]),
      .s_bvalid(vm_ic_s_axi_bvalid[p]),
      .s_bready(vm_ic_s_axi_bready[p]),
      .s_arid(vm_ic_s_axi_arid[p]),
      .s_araddr(vm_ic_s_axi_araddr[p]),
      .s_arlen(vm_ic_s_axi_arlen[p]),
      .s_arsize(vm_ic_s_axi_arsize[p]),
      .s_arburst(vm_ic_s_axi_arburst[p]),
      .s_arlock(vm_ic_s_axi_arlock[p]),
      .s_arcache(vm_ic_s_axi_arcache[p]),
      .s_arprot(vm_ic_s_axi_arprot[p]),
      .s_arqos(vm_ic_s_axi_arqos[p]),
      .s_aruser(vm_ic_s_axi_aruser[p]),
      .s_arvalid(vm_ic_s_axi_arvalid[p]),
      .s_arready(vm_ic_s_axi_arready[p]),
      .s_rid(vm_ic_s_axi_rid[p]),
      .s_rdata(vm_ic_s_axi_rdata[p]),
      .s_rresp(vm_ic_s_axi_rresp[p]),
      .s_rlast(vm_ic_s_axi_rlast[p]),
      .s_rvalid(vm_ic_s_axi_rvalid[p]),
      .s_rready(vm_ic_s_axi_rready[p]),
      .m_awid(vm_mm_awid[p]),
      .m_awaddr(vm_mm_awaddr[p]),
      .m_awlen(vm_mm_awlen[p]),
      .m_awsize(vm_mm_awsize[p]),
      .m_awburst(vm_mm_awburst[p]),
      .m_awlock(vm_mm_awlock[p]),
      .m_awcache(vm_mm_awcache[p]),
      .m_awprot(vm_mm_awprot[p]),
      .m_awqos(vm_mm_awqos[p]),
      .m_awuser(vm_mm_awuser[p]),
      .m_awvalid(vm_mm_awvalid[p]),
      .m_awready(vm_mm_awready[p]),
      .m_wdata(vm_mm_wdata[p]),
      .m_wstrb(vm_mm_wstrb[p]),
      .m_wlast(vm_mm_wlast[p]),
      .m_wvalid(vm_mm_wvalid[p]),
      .m_wready(vm_mm_wready[p]),
      .m_bid(vm_mm_bid[p]),
      .m_bresp(vm_mm_bresp[p]),
      .m_bvalid(vm_mm_bvalid[p]),
      .m_bready(vm_mm_bready[p]),
      .m_arid(vm_mm_arid[p]),
      .m_araddr(vm_mm_araddr[p]),
      .m_arlen(vm_mm_arlen[p]),
      .m_arsize(vm_mm_arsize[p]),
      .m_arburst(vm_mm_arburst[p]),
      .m_arlock(vm_mm_arlock[p]),
      .m_arcache(vm_mm_arcache[p]),
      .m_arprot(vm_mm_arprot[p]),
      .m_arqos(vm_mm_arqos[p]),
      .m_aruser(vm_mm_aruser[p]),
      .m_arvalid(vm_mm_arvalid[p]),
      .m_arready(vm_mm_arready[p]),
      .m_rid(vm_mm_rid[p]),
      .m_rdata(vm_mm_rdata[p]),
      .m_rresp(vm_mm_rresp[p]),
      .m_rlast(vm_mm_rlast[p]),
      .m_rvalid(vm_mm_rvalid[p]),
      .m_rready(vm_mm_rready[p]));
    for (genvar k = 0; k < 2; k++) begin : g_ha
      axi_ha_traffic_model #(.AW(AW), .DW(VMW), .IW(IW), .UW(UW), .NTX(NTX),
        .BASE(AW'((6 + p * 2 + k + 1)) << 28), .EXP_PROT(3'b010), .EXP_QOS(4'd0), .EXP_USER(UW'(k))) u_ha (
        .clk(clk),
        .rst_n(rst_n),
        .m_awid(vm_ha_axi_awid[p][k]),
        .m_awaddr(vm_ha_axi_awaddr[p][k]),
        .m_awlen(vm_ha_axi_awlen[p][k]),
        .m_awsize(vm_ha_axi_awsize[p][k]),
        .m_awburst(vm_ha_axi_awburst[p][k]),
        .m_awlock(vm_ha_axi_awlock[p][k]),
        .m_awcache(vm_ha_axi_awcache[p][k]),
        .m_awprot(vm_ha_axi_awprot[p][k]),
        .m_awqos(vm_ha_axi_awqos[p][k]),
        .m_awuser(vm_ha_axi_awuser[p][k]),
        .m_awvalid(vm_ha_axi_awvalid[p][k]),
        .m_awready(vm_ha_axi_awready[p][k]),
        .m_wdata(vm_ha_axi_wdata[p][k]),
        .m_wstrb(vm_ha_axi_wstrb[p][k]),
        .m_wlast(vm_ha_axi_wlast[p][k]),
        .m_wvalid(vm_ha_axi_wvalid[p][k]),
        .m_wready(vm_ha_axi_wready[p][k]),
        .m_bid(vm_ha_axi_bid[p][k]),
        .m_bresp(vm_ha_axi_bresp[p][k]),
        .m_bvalid(vm_ha_axi_bvalid[p][k]),
        .m_bready(vm_ha_axi_bready[p][k]),
        .m_arid(vm_ha_axi_arid[p][k]),
        .m_araddr(vm_ha_axi_araddr[p][k]),
        .m_arlen(vm_ha_axi_arlen[p][k]),
        .m_arsize(vm_ha_axi_arsize[p][k]),
        .m_arburst(vm_ha_axi_arburst[p][k]),
        .m_arlock(vm_ha_axi_arlock[p][k]),
        .m_arcache(vm_ha_axi_arcache[p][k]),
        .m_arprot(vm_ha_axi_arprot[p][k]),
        .m_arqos(vm_ha_axi_arqos[p][k]),
        .m_aruser(vm_ha_axi_aruser[p][k]),
        .m_arvalid(vm_ha_axi_arvalid[p][k]),
        .m_arready(vm_ha_axi_arready[p][k]),
        .m_rid(vm_ha_axi_rid[p][k]),
        .m_rdata(vm_ha_axi_rdata[p][k]),
        .m_rresp(vm_ha_axi_rresp[p][k]),
        .m_rlast(vm_ha_axi_rlast[p][k]),
        .m_rvalid(vm_ha_axi_rvalid[p][k]),
        .m_rready(vm_ha_axi_rready[p][k]),
        .checks(ha_checks[1][p][k]),
        .failures(ha_failures[1][p][k]),
        .n_hostile(ha_hostile[1][p][k]),
        .done(ha_done[1][p][k]));
    end
    axi_port_memory_model #(.AW(AW), .DW(PW), .IW(IW), .UW(UW), .N(2),
      .PROT({3'b010, 3'b010}), .QOS({4'd0, 4'd0}), .CACHE('0), .ENC(2'b00),
      .BASE({AW'((6 + p * 2 + 2)) << 28, AW'((6 + p * 2 + 1)) << 28})) u_port (
      .clk(clk),
      .rst_n(rst_n),
      .hold(hold[1][p]),
      .s_awid(vm_ps_axi_awid[p]),
      .s_awaddr(vm_ps_axi_awaddr[p]),
      .s_awlen(vm_ps_axi_awlen[p]),
      .s_awsize(vm_ps_axi_awsize[p]),
      .s_awburst(vm_ps_axi_awburst[p]),
      .s_awlock(vm_ps_axi_awlock[p]),
      .s_awcache(vm_ps_axi_awcache[p]),
      .s_awprot(vm_ps_axi_awprot[p]),
      .s_awqos(vm_ps_axi_awqos[p]),
      .s_awuser(vm_ps_axi_awuser[p]),
      .s_awvalid(vm_ps_axi_awvalid[p]),
      .s_awready(vm_ps_axi_awready[p]),
      .s_wdata(vm_ps_axi_wdata[p]),
      .s_wstrb(vm_ps_axi_wstrb[p]),
      .s_wlast(vm_ps_axi_wlast[p]),
      .s_wvalid(vm_ps_axi_wvalid[p]),
      .s_wready(vm_ps_axi_wready[p]),
      .s_bid(vm_ps_axi_bid[p]),
      .s_bresp(vm_ps_axi_bresp[p]),
      .s_bvalid(vm_ps_axi_bvalid[p]),
      .s_bready(vm_ps_axi_bready[p]),
      .s_arid(vm_ps_axi_arid[p]),
      .s_araddr(vm_ps_axi_araddr[p]),
      .s_arlen(vm_ps_axi_arlen[p]),
      .s_arsize(vm_ps_axi_arsize[p]),
      .s_arburst(vm_ps_axi_arburst[p]),
      .s_arlock(vm_ps_axi_arlock[p]),
      .s_arcache(vm_ps_axi_arcache[p]),
      .s_arprot(vm_ps_axi_arprot[p]),
      .s_arqos(vm_ps_axi_arqos[p]),
      .s_aruser(vm_ps_axi_aruser[p]),
      .s_arvalid(vm_ps_axi_arvalid[p]),
      .s_arready(vm_ps_axi_arready[p]),
      .s_rid(vm_ps_axi_rid[p]),
      .s_rdata(vm_ps_axi_rdata[p]),
      .s_rresp(vm_ps_axi_rresp[p]),
      .s_rlast(vm_ps_axi_rlast[p]),
      .s_rvalid(vm_ps_axi_rvalid[p]),
      .s_rready(vm_ps_axi_rready[p]),
      .checks(pm_checks[1][p]),
      .failures(pm_failures[1][p]),
      .n_remap(pm_remap[1][p]),
      .n_stall(pm_stall[1][p]),
      .id_seen(id_seen[1][p]));
    // interconnect-side monitor: mapper stalls and restored response IDs
    initial begin
      aim_stall[1][p] = 0; restored[1][p] = 0; resp_checks[1][p] = 0; resp_bad[1][p] = 0;
    end
    always @(posedge clk) if (rst_n) begin
      if ((vm_mm_awvalid[p] && !vm_ic_m_axi_awready[p]) || (vm_mm_wvalid[p] && !vm_ic_m_axi_wready[p]) ||
          (vm_mm_arvalid[p] && !vm_ic_m_axi_arready[p]))
        aim_stall[1][p]++;
      if (vm_ic_m_axi_bvalid[p] && vm_mm_bready[p]) begin
        resp_checks[1][p]++;
        if (vm_ic_m_axi_bid[p] != '0) resp_bad[1][p]++;
      end
      if (vm_ic_m_axi_rvalid[p] && vm_mm_rready[p]) begin
        resp_checks[1][p]++;
        if (vm_ic_m_axi_rid[p] != '0) resp_bad[1][p]++;
      end
      if ((vm_ps_axi_bvalid[p] && vm_ps_axi_bready[p] && vm_ps_axi_bid[p] != '0) ||
          (vm_ps_axi_rvalid[p] && vm_ps_axi_rready[p] && vm_ps_axi_rid[p] != '0))
        restored[1][p]++;
    end
    // back-pressure phases at the port
    initial begin
      wait (rst_n);
      forever begin
        repeat ($urandom_range(150, 300)) @(posedge clk);
        hold[1][p] <= 1'b1;
        repeat ($urandom_range(30, 80)) @(posedge clk);
        hold[1][p] <= 1'b0;
      end
    end
  end

  initial begin
    logic [14:0] sid [12];
    int hostile, remap, stall_aim, stall_port, restore, n;
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    check(irq == '0, "no interrupt after reset");
    wait (&ha_done);
    repeat (20) @(posedge clk);
    check(irq == '0, "no interrupt from correctly configured traffic");
    hostile = 0; remap = 0; stall_aim = 0; stall_port = 0; restore = 0; n = 0;
    for (int g = 0; g < 2; g++)
      for (int p = 0; p < 3; p++) begin
        check(pm_remap[g][p] > 0 && restored[g][p] > 0, $sformatf("remap/restore on port %0d.%0d", g, p));
        check(aim_stall[g][p] > 0 && pm_stall[g][p] > 0, $sformatf("stalls on port %0d.%0d", g, p));
        check(resp_bad[g][p] == 0 && resp_checks[g][p] > 0,
              $sformatf("responses restored to ID 0 on port %0d.%0d", g, p));
        remap += pm_remap[g][p]; stall_aim += aim_stall[g][p]; stall_port += pm_stall[g][p];
        restore += restored[g][p];
        checks += pm_checks[g][p] + resp_checks[g][p];
        failures += pm_failures[g][p] + resp_bad[g][p];
        for (int k = 0; k < 2; k++) begin
          check(ha_hostile[g][p][k] > 0, "accelerator drove attributes that were overridden");
          hostile += ha_hostile[g][p][k];
          checks += ha_checks[g][p][k];
          failures += ha_failures[g][p][k];
          // the port prefix stands for the TBU number and port manager ID
          sid[n] = axi_iso_pkg::stream_id(5'(g * 3 + p), 4'd0, id_seen[g][p][k]);
          n++;
        end
      end
    for (int i = 0; i < 12; i++)
      for (int j = i + 1; j < 12; j++)
        check(sid[i] != sid[j], $sformatf("Stream IDs of accelerators %0d and %0d differ", i, j));
    // misconfigured request: unmapped AxUSER on HP0
    @(posedge clk); #1 inj = 1'b1;
    do @(posedge clk); while (!rt_ic_m_axi_arready[0]);
    #1 inj = 1'b0;
    repeat (10) @(posedge clk);
    check(irq == 6'b000001, "unmapped AxUSER on HP0 raises irq[0] only");
    check(rt_ps_axi_arvalid[0] == 1'b0, "misconfigured request not forwarded");
    $display("mechanisms: override=%0d remap=%0d restore=%0d aim_stall=%0d port_stall=%0d irq=%b",
             hostile, remap, restore, stall_aim, stall_port, irq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3_000_000;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
