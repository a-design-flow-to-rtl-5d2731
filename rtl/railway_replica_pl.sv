// railway_replica_pl: isolation logic of the programmable logic of one replica
// of a 2-out-of-2 railway controller, with twelve accelerators on six shared
// PL-PS ports.
//
// Three hardware domains share the device. The real-time safety-critical
// domain (RTSC) owns six DMA engines that serve two SPI links to the other
// replica (vote send/receive), two CAN links (brake, traction) and two status
// UARTs; they are TrustZone-secure, have AxQOS 13..15 and AxCACHE 0, and
// occupy ports HP0, HP1 and HP2 in pairs (the "rt" group). Two virtual-machine
// domains each own one neural-network accelerator with three manager ports
// (DATA0, DATA1, instruction fetch); they are non-secure with AxQOS 0 and
// AxCACHE left to the accelerator, and the two accelerators' DATA0, DATA1 and
// IF ports share HP3, HPC0 and HPC1 respectively (the "vm" group). Element 0
// of each pair is the first accelerator of the pair in that list (SPI receive,
// CAN brake, UART 0, accelerator 0), element 1 the second.
//
// Each port is one pl_ps_port_isolation: an AXI Enforcer per accelerator,
// then (outside this module) the port's interconnect, then an AXI ID Mapper.
// Within a port the two accelerators carry AxUSER 0 and 1 and get ID pools
// 0 and 1, so all twelve accelerators end up with Stream IDs of their own.
// Buffer sizes: 2 everywhere, except the read-data buffers of the mappers on
// the DATA0 and DATA1 ports (24 and 48), the sizes at which these ports ran
// without any READY stall.
// Choices of this design: AxPROT is 000 for secure and 010 for non-secure
// accelerators (privileged and instruction bits 0); AxUSER 0/1 within a port;
// pool size 1 (single-ordered interconnects); 32-bit data for the DMA engines
// and 128-bit data for the neural-network ports and all PL-PS ports; 40-bit
// addresses. irq[p] is the configuration-error interrupt of port p, in the
// order HP0, HP1, HP2 (rt group, p = 0..2) and HP3, HPC0, HPC1 (p = 3..5).
// Port arrays are indexed [port within group][accelerator].
module railway_replica_pl #(
  parameter int unsigned AXI_ADDR_WIDTH   = 40,
  parameter int unsigned RT_HA_DATA_WIDTH = 32,
  parameter int unsigned VM_HA_DATA_WIDTH = 128,
  parameter int unsigned PORT_DATA_WIDTH  = 128,
  parameter int unsigned AXI_ID_WIDTH     = axi_iso_pkg::AXI_ID_WIDTH,
  parameter int unsigned AXI_USER_WIDTH   = axi_iso_pkg::AXI_USER_WIDTH,
  // RTSC group: HP0 {SPI_Recv_Vote, SPI_Send_Vote}, HP1 {CAN_Brake, CAN_Traction},
  // HP2 {UART_Status0, UART_Status1}
  // packed [port][accelerator]: HP0 {15, 15}, HP1 {15, 14}, HP2 {13, 13}
  parameter logic [2:0][1:0][3:0] RT_AxQOS = {4'd13, 4'd13, 4'd14, 4'd15, 4'd15, 4'd15},
  parameter logic [2:0]  RT_AxPROT        = 3'b000,
  parameter logic [3:0]  RT_AxCACHE       = 4'd0,
  // VM group: HP3 {DPU0.DATA_0, DPU1.DATA_0}, HPC0 {DPU0.DATA_1, DPU1.DATA_1},
  // HPC1 {DPU0.IF, DPU1.IF}
  parameter logic [2:0]  VM_AxPROT        = 3'b010,
  parameter logic [3:0]  VM_AxQOS         = 4'd0,
  // packed [port]: HP3 24, HPC0 48, HPC1 2
  parameter logic [2:0][31:0] VM_READ_BURST_BUF_SIZE = {32'd2, 32'd48, 32'd24},
  parameter int unsigned BUF_SIZE         = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic [5:0] irq,
  // ==== RT ports: accelerator side [port][accelerator] ====,
  input  logic [2:0][1:0][AXI_ID_WIDTH-1:0]         rt_ha_axi_awid,
  input  logic [2:0][1:0][AXI_ADDR_WIDTH-1:0]       rt_ha_axi_awaddr,
  input  logic [2:0][1:0][8-1:0]                    rt_ha_axi_awlen,
  input  logic [2:0][1:0][3-1:0]                    rt_ha_axi_awsize,
  input  logic [2:0][1:0][2-1:0]                    rt_ha_axi_awburst,
  input  logic [2:0][1:0]                           rt_ha_axi_awlock,
  input  logic [2:0][1:0][4-1:0]                    rt_ha_axi_awcache,
  input  logic [2:0][1:0][3-1:0]                    rt_ha_axi_awprot,
  input  logic [2:0][1:0][4-1:0]                    rt_ha_axi_awqos,
  input  logic [2:0][1:0][AXI_USER_WIDTH-1:0]       rt_ha_axi_awuser,
  input  logic [2:0][1:0]                           rt_ha_axi_awvalid,
  output logic [2:0][1:0]                           rt_ha_axi_awready,
  input  logic [2:0][1:0][RT_HA_DATA_WIDTH-1:0]     rt_ha_axi_wdata,
  input  logic [2:0][1:0][RT_HA_DATA_WIDTH/8-1:0]   rt_ha_axi_wstrb,
  input  logic [2:0][1:0]                           rt_ha_axi_wlast,
  input  logic [2:0][1:0]                           rt_ha_axi_wvalid,
  output logic [2:0][1:0]                           rt_ha_axi_wready,
  output logic [2:0][1:0][AXI_ID_WIDTH-1:0]         rt_ha_axi_bid,
  output logic [2:0][1:0][2-1:0]                    rt_ha_axi_bresp,
  output logic [2:0][1:0]                           rt_ha_axi_bvalid,
  input  logic [2:0][1:0]                           rt_ha_axi_bready,
  input  logic [2:0][1:0][AXI_ID_WIDTH-1:0]         rt_ha_axi_arid,
  input  logic [2:0][1:0][AXI_ADDR_WIDTH-1:0]       rt_ha_axi_araddr,
  input  logic [2:0][1:0][8-1:0]                    rt_ha_axi_arlen,
  input  logic [2:0][1:0][3-1:0]                    rt_ha_axi_arsize,
  input  logic [2:0][1:0][2-1:0]                    rt_ha_axi_arburst,
  input  logic [2:0][1:0]                           rt_ha_axi_arlock,
  input  logic [2:0][1:0][4-1:0]                    rt_ha_axi_arcache,
  input  logic [2:0][1:0][3-1:0]                    rt_ha_axi_arprot,
  input  logic [2:0][1:0][4-1:0]                    rt_ha_axi_arqos,
  input  logic [2:0][1:0][AXI_USER_WIDTH-1:0]       rt_ha_axi_aruser,
  input  logic [2:0][1:0]                           rt_ha_axi_arvalid,
  output logic [2:0][1:0]                           rt_ha_axi_arready,
  output logic [2:0][1:0][AXI_ID_WIDTH-1:0]         rt_ha_axi_rid,
  output logic [2:0][1:0][RT_HA_DATA_WIDTH-1:0]     rt_ha_axi_rdata,
  output logic [2:0][1:0][2-1:0]                    rt_ha_axi_rresp,
  output logic [2:0][1:0]                           rt_ha_axi_rlast,
  output logic [2:0][1:0]                           rt_ha_axi_rvalid,
  input  logic [2:0][1:0]                           rt_ha_axi_rready,
  // ==== RT ports: enforced side, to the interconnects ====,
  output logic [2:0][1:0][AXI_ID_WIDTH-1:0]         rt_ic_s_axi_awid,
  output logic [2:0][1:0][AXI_ADDR_WIDTH-1:0]       rt_ic_s_axi_awaddr,
  output logic [2:0][1:0][8-1:0]                    rt_ic_s_axi_awlen,
  output logic [2:0][1:0][3-1:0]                    rt_ic_s_axi_awsize,
  output logic [2:0][1:0][2-1:0]                    rt_ic_s_axi_awburst,
  output logic [2:0][1:0]                           rt_ic_s_axi_awlock,
  output logic [2:0][1:0][4-1:0]                    rt_ic_s_axi_awcache,
  output logic [2:0][1:0][3-1:0]                    rt_ic_s_axi_awprot,
  output logic [2:0][1:0][4-1:0]                    rt_ic_s_axi_awqos,
  output logic [2:0][1:0][AXI_USER_WIDTH-1:0]       rt_ic_s_axi_awuser,
  output logic [2:0][1:0]                           rt_ic_s_axi_awvalid,
  input  logic [2:0][1:0]                           rt_ic_s_axi_awready,
  output logic [2:0][1:0][RT_HA_DATA_WIDTH-1:0]     rt_ic_s_axi_wdata,
  output logic [2:0][1:0][RT_HA_DATA_WIDTH/8-1:0]   rt_ic_s_axi_wstrb,
  output logic [2:0][1:0]                           rt_ic_s_axi_wlast,
  output logic [2:0][1:0]                           rt_ic_s_axi_wvalid,
  input  logic [2:0][1:0]                           rt_ic_s_axi_wready,
  input  logic [2:0][1:0][AXI_ID_WIDTH-1:0]         rt_ic_s_axi_bid,
  input  logic [2:0][1:0][2-1:0]                    rt_ic_s_axi_bresp,
  input  logic [2:0][1:0]                           rt_ic_s_axi_bvalid,
  output logic [2:0][1:0]                           rt_ic_s_axi_bready,
  output logic [2:0][1:0][AXI_ID_WIDTH-1:0]         rt_ic_s_axi_arid,
  output logic [2:0][1:0][AXI_ADDR_WIDTH-1:0]       rt_ic_s_axi_araddr,
  output logic [2:0][1:0][8-1:0]                    rt_ic_s_axi_arlen,
  output logic [2:0][1:0][3-1:0]                    rt_ic_s_axi_arsize,
  output logic [2:0][1:0][2-1:0]                    rt_ic_s_axi_arburst,
  output logic [2:0][1:0]                           rt_ic_s_axi_arlock,
  output logic [2:0][1:0][4-1:0]                    rt_ic_s_axi_arcache,
  output logic [2:0][1:0][3-1:0]                    rt_ic_s_axi_arprot,
  output logic [2:0][1:0][4-1:0]                    rt_ic_s_axi_arqos,
  output logic [2:0][1:0][AXI_USER_WIDTH-1:0]       rt_ic_s_axi_aruser,
  output logic [2:0][1:0]                           rt_ic_s_axi_arvalid,
  input  logic [2:0][1:0]                           rt_ic_s_axi_arready,
  input  logic [2:0][1:0][AXI_ID_WIDTH-1:0]         rt_ic_s_axi_rid,
  input  logic [2:0][1:0][RT_HA_DATA_WIDTH-1:0]     rt_ic_s_axi_rdata,
  input  logic [2:0][1:0][2-1:0]                    rt_ic_s_axi_rresp,
  input  logic [2:0][1:0]                           rt_ic_s_axi_rlast,
  input  logic [2:0][1:0]                           rt_ic_s_axi_rvalid,
  output logic [2:0][1:0]                           rt_ic_s_axi_rready,
  // ==== RT ports: from the interconnects' manager ports ====,
  input  logic [2:0][AXI_ID_WIDTH-1:0]         rt_ic_m_axi_awid,
  input  logic [2:0][AXI_ADDR_WIDTH-1:0]       rt_ic_m_axi_awaddr,
  input  logic [2:0][8-1:0]                    rt_ic_m_axi_awlen,
  input  logic [2:0][3-1:0]                    rt_ic_m_axi_awsize,
  input  logic [2:0][2-1:0]                    rt_ic_m_axi_awburst,
  input  logic [2:0]                           rt_ic_m_axi_awlock,
  input  logic [2:0][4-1:0]                    rt_ic_m_axi_awcache,
  input  logic [2:0][3-1:0]                    rt_ic_m_axi_awprot,
  input  logic [2:0][4-1:0]                    rt_ic_m_axi_awqos,
  input  logic [2:0][AXI_USER_WIDTH-1:0]       rt_ic_m_axi_awuser,
  input  logic [2:0]                           rt_ic_m_axi_awvalid,
  output logic [2:0]                           rt_ic_m_axi_awready,
  input  logic [2:0][PORT_DATA_WIDTH-1:0]      rt_ic_m_axi_wdata,
  input  logic [2:0][PORT_DATA_WIDTH/8-1:0]    rt_ic_m_axi_wstrb,
  input  logic [2:0]                           rt_ic_m_axi_wlast,
  input  logic [2:0]                           rt_ic_m_axi_wvalid,
  output logic [2:0]                           rt_ic_m_axi_wready,
  output logic [2:0][AXI_ID_WIDTH-1:0]         rt_ic_m_axi_bid,
  output logic [2:0][2-1:0]                    rt_ic_m_axi_bresp,
  output logic [2:0]                           rt_ic_m_axi_bvalid,
  input  logic [2:0]                           rt_ic_m_axi_bready,
  input  logic [2:0][AXI_ID_WIDTH-1:0]         rt_ic_m_axi_arid,
  input  logic [2:0][AXI_ADDR_WIDTH-1:0]       rt_ic_m_axi_araddr,
  input  logic [2:0][8-1:0]                    rt_ic_m_axi_arlen,
  input  logic [2:0][3-1:0]                    rt_ic_m_axi_arsize,
  input  logic [2:0][2-1:0]                    rt_ic_m_axi_arburst,
  input  logic [2:0]                           rt_ic_m_axi_arlock,
  input  logic [2:0][4-1:0]                    rt_ic_m_axi_arcache,
  input  logic [2:0][3-1:0]                    rt_ic_m_axi_arprot,
  input  logic [2:0][4-1:0]                    rt_ic_m_axi_arqos,
  input  logic [2:0][AXI_USER_WIDTH-1:0]       rt_ic_m_axi_aruser,
  input  logic [2:0]                           rt_ic_m_axi_arvalid,
  output logic [2:0]                           rt_ic_m_axi_arready,
  output logic [2:0][AXI_ID_WIDTH-1:0]         rt_ic_m_axi_rid,
  output logic [2:0][PORT_DATA_WIDTH-1:0]      rt_ic_m_axi_rdata,
  output logic [2:0][2-1:0]                    rt_ic_m_axi_rresp,
  output logic [2:0]                           rt_ic_m_axi_rlast,
  output logic [2:0]                           rt_ic_m_axi_rvalid,
  input  logic [2:0]                           rt_ic_m_axi_rready,
  // ==== RT ports: to the PL-PS ports ====,
  output logic [2:0][AXI_ID_WIDTH-1:0]         rt_ps_axi_awid,
  output logic [2:0][AXI_ADDR_WIDTH-1:0]       rt_ps_axi_awaddr,
  output logic [2:0][8-1:0]                    rt_ps_axi_awlen,
  output logic [2:0][3-1:0]                    rt_ps_axi_awsize,
  output logic [2:0][2-1:0]                    rt_ps_axi_awburst,
  output logic [2:0]                           rt_ps_axi_awlock,
  output logic [2:0][4-1:0]                    rt_ps_axi_awcache,
  output logic [2:0][3-1:0]                    rt_ps_axi_awprot,
  output logic [2:0][4-1:0]                    rt_ps_axi_awqos,
  output logic [2:0][AXI_USER_WIDTH-1:0]       rt_ps_axi_awuser,
  output logic [2:0]                           rt_ps_axi_awvalid,
  input  logic [2:0]                           rt_ps_axi_awready,
  output logic [2:0][PORT_DATA_WIDTH-1:0]      rt_ps_axi_wdata,
  output logic [2:0][PORT_DATA_WIDTH/8-1:0]    rt_ps_axi_wstrb,
  output logic [2:0]                           rt_ps_axi_wlast,
  output logic [2:0]                           rt_ps_axi_wvalid,
  input  logic [2:0]                           rt_ps_axi_wready,
  input  logic [2:0][AXI_ID_WIDTH-1:0]         rt_ps_axi_bid,
  input  logic [2:0][2-1:0]                    rt_ps_axi_bresp,
  input  logic [2:0]                           rt_ps_axi_bvalid,
  output logic [2:0]                           rt_ps_axi_bready,
  output logic [2:0][AXI_ID_WIDTH-1:0]         rt_ps_axi_arid,
  output logic [2:0][AXI_ADDR_WIDTH-1:0]       rt_ps_axi_araddr,
  output logic [2:0][8-1:0]                    rt_ps_axi_arlen,
  output logic [2:0][3-1:0]                    rt_ps_axi_arsize,
  output logic [2:0][2-1:0]                    rt_ps_axi_arburst,
  output logic [2:0]                           rt_ps_axi_arlock,
  output logic [2:0][4-1:0]                    rt_ps_axi_arcache,
  output logic [2:0][3-1:0]                    rt_ps_axi_arprot,
  output logic [2:0][4-1:0]                    rt_ps_axi_arqos,
  output logic [2:0][AXI_USER_WIDTH-1:0]       rt_ps_axi_aruser,
  output logic [2:0]                           rt_ps_axi_arvalid,
  input  logic [2:0]                           rt_ps_axi_arready,
  input  logic [2:0][AXI_ID_WIDTH-1:0]         rt_ps_axi_rid,
  input  logic [2:0][PORT_DATA_WIDTH-1:0]      rt_ps_axi_rdata,
  input  logic [2:0][2-1:0]                    rt_ps_axi_rresp,
  input  logic [2:0]                           rt_ps_axi_rlast,
  input  logic [2:0]                           rt_ps_axi_rvalid,
  output logic [2:0]                           rt_ps_axi_rready,
  // ==== VM ports: accelerator side [port][accelerator] ====,
  input  logic [2:0][1:0][AXI_ID_WIDTH-1:0]         vm_ha_axi_awid,
  input  logic [2:0][1:0][AXI_ADDR_WIDTH-1:0]       vm_ha_axi_awaddr,
  input  logic [2:0][1:0][8-1:0]                    vm_ha_axi_awlen,
  input  logic [2:0][1:0][3-1:0]                    vm_ha_axi_awsize,
  input  logic [2:0][1:0][2-1:0]                    vm_ha_axi_awburst,
  input  logic [2:0][1:0]                           vm_ha_axi_awlock,
  input  logic [2:0][1:0][4-1:0]                    vm_ha_axi_awcache,
  input  logic [2:0][1:0][3-1:0]                    vm_ha_axi_awprot,
  input  logic [2:0][1:0][4-1:0]                    vm_ha_axi_awqos,
  input  logic [2:0][1:0][AXI_USER_WIDTH-1:0]       vm_ha_axi_awuser,
  input  logic [2:0][1:0]                           vm_ha_axi_awvalid,
  output logic [2:0][1:0]                           vm_ha_axi_awready,
  input  logic [2:0][1:0][VM_HA_DATA_WIDTH-1:0]     vm_ha_axi_wdata,
  input  logic [2:0][1:0][VM_HA_DATA_WIDTH/8-1:0]   vm_ha_axi_wstrb,
  input  logic [2:0][1:0]                           vm_ha_axi_wlast,
  input  logic [2:0][1:0]                           vm_ha_axi_wvalid,
  output logic [2:0][1:0]                           vm_ha_axi_wready,
  output logic [2:0][1:0][AXI_ID_WIDTH-1:0]         vm_ha_axi_bid,
  output logic [2:0][1:0][2-1:0]                    vm_ha_axi_bresp,
  output logic [2:0][1:0]                           vm_ha_axi_bvalid,
  input  logic [2:0][1:0]                           vm_ha_axi_bready,
  input  logic [2:0][1:0][AXI_ID_WIDTH-1:0]         vm_ha_axi_arid,
  input  logic [2:0][1:0][AXI_ADDR_WIDTH-1:0]       vm_ha_axi_araddr,
  input  logic [2:0][1:0][8-1:0]                    vm_ha_axi_arlen,
  input  logic [2:0][1:0][3-1:0]                    vm_ha_axi_arsize,
  input  logic [2:0][1:0][2-1:0]                    vm_ha_axi_arburst,
  input  logic [2:0][1:0]                           vm_ha_axi_arlock,
  input  logic [2:0][1:0][4-1:0]                    vm_ha_axi_arcache,
  input  logic [2:0][1:0][3-1:0]                    vm_ha_axi_arprot,
  input  logic [2:0][1:0][4-1:0]                    vm_ha_axi_arqos,
  input  logic [2:0][1:0][AXI_USER_WIDTH-1:0]       vm_ha_axi_aruser,
  input  logic [2:0][1:0]                           vm_ha_axi_arvalid,
  output logic [2:0][1:0]                           vm_ha_axi_arready,
  output logic [2:0][1:0][AXI_ID_WIDTH-1:0]         vm_ha_axi_rid,
  output logic [2:0][1:0][VM_HA_DATA_WIDTH-1:0]     vm_ha_axi_rdata,
  output logic [2:0][1:0][2-1:0]                    vm_ha_axi_rresp,
  output logic [2:0][1:0]                           vm_ha_axi_rlast,
  output logic [2:0][1:0]                           vm_ha_axi_rvalid,
  input  logic [2:0][1:0]                           vm_ha_axi_rready,
  // ==== VM ports: enforced side, to the interconnects ====,
  output logic [2:0][1:0][AXI_ID_WIDTH-1:0]         vm_ic_s_axi_awid,
  output logic [2:0][1:0][AXI_ADDR_WIDTH-1:0]       vm_ic_s_axi_awaddr,
  output logic [2:0][1:0][8-1:0]                    vm_ic_s_axi_awlen,
  output logic [2:0][1:0][3-1:0]                    vm_ic_s_axi_awsize,
  output logic [2:0][1:0][2-1:0]                    vm_ic_s_axi_awburst,
  output logic [2:0][1:0]                           vm_ic_s_axi_awlock,
  output logic [2:0][1:0][4-1:0]                    vm_ic_s_axi_awcache,
  output logic [2:0][1:0][3-1:0]                    vm_ic_s_axi_awprot,
  output logic [2:0][1:0][4-1:0]                    vm_ic_s_axi_awqos,
  output logic [2:0][1:0][AXI_USER_WIDTH-1:0]       vm_ic_s_axi_awuser,
  output logic [2:0][1:0]                           vm_ic_s_axi_awvalid,
  input  logic [2:0][1:0]                           vm_ic_s_axi_awready,
  output logic [2:0][1:0][VM_HA_DATA_WIDTH-1:0]     vm_ic_s_axi_wdata,
  output logic [2:0][1:0][VM_HA_DATA_WIDTH/8-1:0]   vm_ic_s_axi_wstrb,
  output logic [2:0][1:0]                           vm_ic_s_axi_wlast,
  output logic [2:0][1:0]                           vm_ic_s_axi_wvalid,
  input  logic [2:0][1:0]                           vm_ic_s_axi_wready,
  input  logic [2:0][1:0][AXI_ID_WIDTH-1:0]         vm_ic_s_axi_bid,
  input  logic [2:0][1:0][2-1:0]                    vm_ic_s_axi_bresp,
  input  logic [2:0][1:0]                           vm_ic_s_axi_bvalid,
  output logic [2:0][1:0]                           vm_ic_s_axi_bready,
  output logic [2:0][1:0][AXI_ID_WIDTH-1:0]         vm_ic_s_axi_arid,
  output logic [2:0][1:0][AXI_ADDR_WIDTH-1:0]       vm_ic_s_axi_araddr,
  output logic [2:0][1:0][8-1:0]                    vm_ic_s_axi_arlen,
  output logic [2:0][1:0][3-1:0]                    vm_ic_s_axi_arsize,
  output logic [2:0][1:0][2-1:0]                    vm_ic_s_axi_arburst,
  output logic [2:0][1:0]                           vm_ic_s_axi_arlock,
  output logic [2:0][1:0][4-1:0]                    vm_ic_s_axi_arcache,
  output logic [2:0][1:0][3-1:0]                    vm_ic_s_axi_arprot,
  output logic [2:0][1:0][4-1:0]                    vm_ic_s_axi_arqos,
  output logic [2:0][1:0][AXI_USER_WIDTH-1:0]       vm_ic_s_axi_aruser,
  output logic [2:0][1:0]                           vm_ic_s_axi_arvalid,
  input  logic [2:0][1:0]                           vm_ic_s_axi_arready,
  input  logic [2:0][1:0][AXI_ID_WIDTH-1:0]         vm_ic_s_axi_rid,
  input  logic [2:0][1:0][VM_HA_DATA_WIDTH-1:0]     vm_ic_s_axi_rdata,
  input  logic [2:0][1:0][2-1:0]                    vm_ic_s_axi_rresp,
  input  logic [2:0][1:0]                           vm_ic_s_axi_rlast,
  input  logic [2:0][1:0]                           vm_ic_s_axi_rvalid,
  output logic [2:0][1:0]                           vm_ic_s_axi_rready,
  // ==== VM ports: from the interconnects' manager ports ====,
  input  logic [2:0][AXI_ID_WIDTH-1:0]         vm_ic_m_axi_awid,
  input  logic [2:0][AXI_ADDR_WIDTH-1:0]       vm_ic_m_axi_awaddr,
  input  logic [2:0][8-1:0]                    vm_ic_m_axi_awlen,
  input  logic [2:0][3-1:0]                    vm_ic_m_axi_awsize,
  input  logic [2:0][2-1:0]                    vm_ic_m_axi_awburst,
  input  logic [2:0]                           vm_ic_m_axi_awlock,
  input  logic [2:0][4-1:0]                    vm_ic_m_axi_awcache,
  input  logic [2:0][3-1:0]                    vm_ic_m_axi_awprot,
  input  logic [2:0][4-1:0]                    vm_ic_m_axi_awqos,
  input  logic [2:0][AXI_USER_WIDTH-1:0]       vm_ic_m_axi_awuser,
  input  logic [2:0]                           vm_ic_m_axi_awvalid,
  output logic [2:0]                           vm_ic_m_axi_awready,
  input  logic [2:0][PORT_DATA_WIDTH-1:0]      vm_ic_m_axi_wdata,
  input  logic [2:0][PORT_DATA_WIDTH/8-1:0]    vm_ic_m_axi_wstrb,
  input  logic [2:0]                           vm_ic_m_axi_wlast,
  input  logic [2:0]                           vm_ic_m_axi_wvalid,
  output logic [2:0]                           vm_ic_m_axi_wready,
  output logic [2:0][AXI_ID_WIDTH-1:0]         vm_ic_m_axi_bid,
  output logic [2:0][2-1:0]                    vm_ic_m_axi_bresp,
  output logic [2:0]                           vm_ic_m_axi_bvalid,
  input  logic [2:0]                           vm_ic_m_axi_bready,
  input  logic [2:0][AXI_ID_WIDTH-1:0]         vm_ic_m_axi_arid,
  input  logic [2:0][AXI_ADDR_WIDTH-1:0]       vm_ic_m_axi_araddr,
  input  logic [2:0][8-1:0]                    vm_ic_m_axi_arlen,
  input  logic [2:0][3-1:0]                    vm_ic_m_axi_arsize,
  input  logic [2:0][2-1:0]                    vm_ic_m_axi_arburst,
  input  logic [2:0]                           vm_ic_m_axi_arlock,
  input  logic [2:0][4-1:0]                    vm_ic_m_axi_arcache,
  input  logic [2:0][3-1:0]                    vm_ic_m_axi_arprot,
  input  logic [2:0][4-1:0]                    vm_ic_m_axi_arqos,
  input  logic [2:0][AXI_USER_WIDTH-1:0]       vm_ic_m_axi_aruser,
  input  logic [2:0]                           vm_ic_m_axi_arvalid,
  output logic [2:0]                           vm_ic_m_axi_arready,
  output logic [2:0][AXI_ID_WIDTH-1:0]         vm_ic_m_axi_rid,
  output logic [2:0][PORT_DATA_WIDTH-1:0]      vm_ic_m_axi_rdata,
  output logic [2:0][2-1:0]                    vm_ic_m_axi_rresp,
  output logic [2:0]                           vm_ic_m_axi_rlast,
  output logic [2:0]                           vm_ic_m_axi_rvalid,
  input  logic [2:0]                           vm_ic_m_axi_rready,
  // ==== VM ports: to the PL-PS ports ====,
  output logic [2:0][AXI_ID_WIDTH-1:0]         vm_ps_axi_awid,
  output logic [2:0][AXI_ADDR_WIDTH-1:0]       vm_ps_axi_awaddr,
  output logic [2:0][8-1:0]                    vm_ps_axi_awlen,
  output logic [2:0][3-1:0]                    vm_ps_axi_awsize,
  output logic [2:0][2-1:0]                    vm_ps_axi_awburst,
  output logic [2:0]                           vm_ps_axi_awlock,
  output logic [2:0][4-1:0]                    vm_ps_axi_awcache,
  output logic [2:0][3-1:0]                    vm_ps_axi_awprot,
  output logic [2:0][4-1:0]                    vm_ps_axi_awqos,
  output logic [2:0][AXI_USER_WIDTH-1:0]       vm_ps_axi_awuser,
  output logic [2:0]                           vm_ps_axi_awvalid,
  input  logic [2:0]                           vm_ps_axi_awready,
  output logic [2:0][PORT_DATA_WIDTH-1:0]      vm_ps_axi_wdata,
  output logic [2:0][PORT_DATA_WIDTH/8-1:0]    vm_ps_axi_wstrb,
  output logic [2:0]                           vm_ps_axi_wlast,
  output logic [2:0]                           vm_ps_axi_wvalid,
  input  logic [2:0]                           vm_ps_axi_wready,
  input  logic [2:0][AXI_ID_WIDTH-1:0]         vm_ps_axi_bid,
  input  logic [2:0][2-1:0]                    vm_ps_axi_bresp,
  input  logic [2:0]                           vm_ps_axi_bvalid,
  output logic [2:0]                           vm_ps_axi_bready,
  output logic [2:0][AXI_ID_WIDTH-1:0]         vm_ps_axi_arid,
  output logic [2:0][AXI_ADDR_WIDTH-1:0]       vm_ps_axi_araddr,
  output logic [2:0][8-1:0]                    vm_ps_axi_arlen,
  output logic [2:0][3-1:0]                    vm_ps_axi_arsize,
  output logic [2:0][2-1:0]                    vm_ps_axi_arburst,
  output logic [2:0]                           vm_ps_axi_arlock,
  output logic [2:0][4-1:0]                    vm_ps_axi_arcache,
  output logic [2:0][3-1:0]                    vm_ps_axi_arprot,
  output logic [2:0][4-1:0]                    vm_ps_axi_arqos,
  output logic [2:0][AXI_USER_WIDTH-1:0]       vm_ps_axi_aruser,
  output logic [2:0]                           vm_ps_axi_arvalid,
  input  logic [2:0]                           vm_ps_axi_arready,
  input  logic [2:0][AXI_ID_WIDTH-1:0]         vm_ps_axi_rid,
  input  logic [2:0][PORT_DATA_WIDTH-1:0]      vm_ps_axi_rdata,
  input  logic [2:0][2-1:0]                    vm_ps_axi_rresp,
  input  logic [2:0]                           vm_ps_axi_rlast,
  input  logic [2:0]                           vm_ps_axi_rvalid,
  output logic [2:0]                           vm_ps_axi_rready
);

  for (genvar p = 0; p < 3; p++) begin : g_rt_port
    pl_ps_port_isolation #(
      .AXI_ADDR_WIDTH      (AXI_ADDR_WIDTH),
      .HA_DATA_WIDTH       (RT_HA_DATA_WIDTH),
      .PORT_DATA_WIDTH     (PORT_DATA_WIDTH),
      .AXI_ID_WIDTH        (AXI_ID_WIDTH),
      .AXI_USER_WIDTH      (AXI_USER_WIDTH),
      .N_HA                (2),
      .AxPROT_VALUES       ({RT_AxPROT, RT_AxPROT}),
      .AxUSER_VALUES       ({AXI_USER_WIDTH'(1), AXI_USER_WIDTH'(0)}),
      .AxQOS_VALUES        ({RT_AxQOS[p][1], RT_AxQOS[p][0]}),
      .AxCACHE_VALUES      ({RT_AxCACHE, RT_AxCACHE}),
      .ENFORCE_AxCACHE     (2'b11),
      .POOL_SIZE           (1),
      .WRITE_REQ_BUF_SIZE  (BUF_SIZE),
      .WRITE_BURST_BUF_SIZE(BUF_SIZE),
      .WRITE_RSP_BUF_SIZE  (BUF_SIZE),
      .READ_REQ_BUF_SIZE   (BUF_SIZE),
      .READ_BURST_BUF_SIZE (BUF_SIZE)
    ) u_port (
      .clk,
      .rst_n,
      .irq (irq[p]),
      .ha_axi_awid     (rt_ha_axi_awid[p]),
      .ha_axi_awaddr   (rt_ha_axi_awaddr[p]),
      .ha_axi_awlen    (rt_ha_axi_awlen[p]),
      .ha_axi_awsize   (rt_ha_axi_awsize[p]),
      .ha_axi_awburst  (rt_ha_axi_awburst[p]),
      .ha_axi_awlock   (rt_ha_axi_awlock[p]),
      .ha_axi_awcache  (rt_ha_axi_awcache[p]),
      .ha_axi_awprot   (rt_ha_axi_awprot[p]),
      .ha_axi_awqos    (rt_ha_axi_awqos[p]),
      .ha_axi_awuser   (rt_ha_axi_awuser[p]),
      .ha_axi_awvalid  (rt_ha_axi_awvalid[p]),
      .ha_axi_awready  (rt_ha_axi_awready[p]),
      .ha_axi_wdata    (rt_ha_axi_wdata[p]),
      .ha_axi_wstrb    (rt_ha_axi_wstrb[p]),
      .ha_axi_wlast    (rt_ha_axi_wlast[p]),
      .ha_axi_wvalid   (rt_ha_axi_wvalid[p]),
      .ha_axi_wready   (rt_ha_axi_wready[p]),
      .ha_axi_bid      (rt_ha_axi_bid[p]),
      .ha_axi_bresp    (rt_ha_axi_bresp[p]),
      .ha_axi_bvalid   (rt_ha_axi_bvalid[p]),
      .ha_axi_bready   (rt_ha_axi_bready[p]),
      .ha_axi_arid     (rt_ha_axi_arid[p]),
      .ha_axi_araddr   (rt_ha_axi_araddr[p]),
      .ha_axi_arlen    (rt_ha_axi_arlen[p]),
      .ha_axi_arsize   (rt_ha_axi_arsize[p]),
      .ha_axi_arburst  (rt_ha_axi_arburst[p]),
      .ha_axi_arlock   (rt_ha_axi_arlock[p]),
      .ha_axi_arcache  (rt_ha_axi_arcache[p]),
      .ha_axi_arprot   (rt_ha_axi_arprot[p]),
      .ha_axi_arqos    (rt_ha_axi_arqos[p]),
      .ha_axi_aruser   (rt_ha_axi_aruser[p]),
      .ha_axi_arvalid  (rt_ha_axi_arvalid[p]),
      .ha_axi_arready  (rt_ha_axi_arready[p]),
      .ha_axi_rid      (rt_ha_axi_rid[p]),
      .ha_axi_rdata    (rt_ha_axi_rdata[p]),
      .ha_axi_rresp    (rt_ha_axi_rresp[p]),
      .ha_axi_rlast    (rt_ha_axi_rlast[p]),
      .ha_axi_rvalid   (rt_ha_axi_rvalid[p]),
      .ha_axi_rready   (rt_ha_axi_rready[p]),
      .ic_s_axi_awid     (rt_ic_s_axi_awid[p]),
      .ic_s_axi_awaddr   (rt_ic_s_axi_awaddr[p]),
      .ic_s_axi_awlen    (rt_ic_s_axi_awlen[p]),
      .ic_s_axi_awsize   (rt_ic_s_axi_awsize[p]),
      .ic_s_axi_awburst  (rt_ic_s_axi_awburst[p]),
      .ic_s_axi_awlock   (rt_ic_s_axi_awlock[p]),
      .ic_s_axi_awcache  (rt_ic_s_axi_awcache[p]),
      .ic_s_axi_awprot   (rt_ic_s_axi_awprot[p]),
      .ic_s_axi_awqos    (rt_ic_s_axi_awqos[p]),
      .ic_s_axi_awuser   (rt_ic_s_axi_awuser[p]),
      .ic_s_axi_awvalid  (rt_ic_s_axi_awvalid[p]),
      .ic_s_axi_awready  (rt_ic_s_axi_awready[p]),
      .ic_s_axi_wdata    (rt_ic_s_axi_wdata[p]),
      .ic_s_axi_wstrb    (rt_ic_s_axi_wstrb[p]),
      .ic_s_axi_wlast    (rt_ic_s_axi_wlast[p]),
      .ic_s_axi_wvalid   (rt_ic_s_axi_wvalid[p]),
      .ic_s_axi_wready   (rt_ic_s_axi_wready[p]),
      .ic_s_axi_bid      (rt_ic_s_axi_bid[p]),
      .ic_s_axi_bresp    (rt_ic_s_axi_bresp[p]),
      .ic_s_axi_bvalid   (rt_ic_s_axi_bvalid[p]),
      .ic_s_axi_bready   (rt_ic_s_axi_bready[p]),
      .ic_s_axi_arid     (rt_ic_s_axi_arid[p]),
      .ic_s_axi_araddr   (rt_ic_s_axi_araddr[p]),
      .ic_s_axi_arlen    (rt_ic_s_axi_arlen[p]),
      .ic_s_axi_arsize   (rt_ic_s_axi_arsize[p]),
      .ic_s_axi_arburst  (rt_ic_s_axi_arburst[p]),
      .ic_s_axi_arlock   (rt_ic_s_axi_arlock[p]),
      .ic_s_axi_arcache  (rt_ic_s_axi_arcache[p]),
      .ic_s_axi_arprot   (rt_ic_s_axi_arprot[p]),
      .ic_s_axi_arqos    (rt_ic_s_axi_arqos[p]),
      .ic_s_axi_aruser   (rt_ic_s_axi_aruser[p]),
      .ic_s_axi_arvalid  (rt_ic_s_axi_arvalid[p]),
      .ic_s_axi_arready  (rt_ic_s_axi_arready[p]),
      .ic_s_axi_rid      (rt_ic_s_axi_rid[p]),
      .ic_s_axi_rdata    (rt_ic_s_axi_rdata[p]),
      .ic_s_axi_rresp    (rt_ic_s_axi_rresp[p]),
      .ic_s_axi_rlast    (rt_ic_s_axi_rlast[p]),
      .ic_s_axi_rvalid   (rt_ic_s_axi_rvalid[p]),
      .ic_s_axi_rready   (rt_ic_s_axi_rready[p]),
      .ic_m_axi_awid     (rt_ic_m_axi_awid[p]),
      .ic_m_axi_awaddr   (rt_ic_m_axi_awaddr[p]),
      .ic_m_axi_awlen    (rt_ic_m_axi_awlen[p]),
      .ic_m_axi_awsize   (rt_ic_m_axi_awsize[p]),
      .ic_m_axi_awburst  (rt_ic_m_axi_awburst[p]),
      .ic_m_axi_awlock   (rt_ic_m_axi_awlock[p]),
      .ic_m_axi_awcache  (rt_ic_m_axi_awcache[p]),
      .ic_m_axi_awprot   (rt_ic_m_axi_awprot[p]),
      .ic_m_axi_awqos    (rt_ic_m_axi_awqos[p]),
      .ic_m_axi_awuser   (rt_ic_m_axi_awuser[p]),
      .ic_m_axi_awvalid  (rt_ic_m_axi_awvalid[p]),
      .ic_m_axi_awready  (rt_ic_m_axi_awready[p]),
      .ic_m_axi_wdata    (rt_ic_m_axi_wdata[p]),
      .ic_m_axi_wstrb    (rt_ic_m_axi_wstrb[p]),
      .ic_m_axi_wlast    (rt_ic_m_axi_wlast[p]),
      .ic_m_axi_wvalid   (rt_ic_m_axi_wvalid[p]),
      .ic_m_axi_wready   (rt_ic_m_axi_wready[p]),
      .ic_m_axi_bid      (rt_ic_m_axi_bid[p]),
      .ic_m_axi_bresp    (rt_ic_m_axi_bresp[p]),
      .ic_m_axi_bvalid   (rt_ic_m_axi_bvalid[p]),
      .ic_m_axi_bready   (rt_ic_m_axi_bready[p]),
      .ic_m_axi_arid     (rt_ic_m_axi_arid[p]),
      .ic_m_axi_araddr   (rt_ic_m_axi_araddr[p]),
      .ic_m_axi_arlen    (rt_ic_m_axi_arlen[p]),
      .ic_m_axi_arsize   (rt_ic_m_axi_arsize[p]),
      .ic_m_axi_arburst  (rt_ic_m_axi_arburst[p]),
      .ic_m_axi_arlock   (rt_ic_m_axi_arlock[p]),
      .ic_m_axi_arcache  (rt_ic_m_axi_arcache[p]),
      .ic_m_axi_arprot   (rt_ic_m_axi_arprot[p]),
      .ic_m_axi_arqos    (rt_ic_m_axi_arqos[p]),
      .ic_m_axi_aruser   (rt_ic_m_axi_aruser[p]),
      .ic_m_axi_arvalid  (rt_ic_m_axi_arvalid[p]),
      .ic_m_axi_arready  (rt_ic_m_axi_arready[p]),
      .ic_m_axi_rid      (rt_ic_m_axi_rid[p]),
      .ic_m_axi_rdata    (rt_ic_m_axi_rdata[p]),
      .ic_m_axi_rresp    (rt_ic_m_axi_rresp[p]),
      .ic_m_axi_rlast    (rt_ic_m_axi_rlast[p]),
      .ic_m_axi_rvalid   (rt_ic_m_axi_rvalid[p]),
      .ic_m_axi_rready   (rt_ic_m_axi_rready[p]),
      .ps_axi_awid     (rt_ps_axi_awid[p]),
      .ps_axi_awaddr   (rt_ps_axi_awaddr[p]),
      .ps_axi_awlen    (rt_ps_axi_awlen[p]),
      .ps_axi_awsize   (rt_ps_axi_awsize[p]),
      .ps_axi_awburst  (rt_ps_axi_awburst[p]),
      .ps_axi_awlock   (rt_ps_axi_awlock[p]),
      .ps_axi_awcache  (rt_ps_axi_awcache[p]),
      .ps_axi_awprot   (rt_ps_axi_awprot[p]),
      .ps_axi_awqos    (rt_ps_axi_awqos[p]),
      .ps_axi_awuser   (rt_ps_axi_awuser[p]),
      .ps_axi_awvalid  (rt_ps_axi_awvalid[p]),
      .ps_axi_awready  (rt_ps_axi_awready[p]),
      .ps_axi_wdata    (rt_ps_axi_wdata[p]),
      .ps_axi_wstrb    (rt_ps_axi_wstrb[p]),
      .ps_axi_wlast    (rt_ps_axi_wlast[p]),
      .ps_axi_wvalid   (rt_ps_axi_wvalid[p]),
      .ps_axi_wready   (rt_ps_axi_wready[p]),
      .ps_axi_bid      (rt_ps_axi_bid[p]),
      .ps_axi_bresp    (rt_ps_axi_bresp[p]),
      .ps_axi_bvalid   (rt_ps_axi_bvalid[p]),
      .ps_axi_bready   (rt_ps_axi_bready[p]),
      .ps_axi_arid     (rt_ps_axi_arid[p]),
      .ps_axi_araddr   (rt_ps_axi_araddr[p]),
      .ps_axi_arlen    (rt_ps_axi_arlen[p]),
      .ps_axi_arsize   (rt_ps_axi_arsize[p]),
      .ps_axi_arburst  (rt_ps_axi_arburst[p]),
      .ps_axi_arlock   (rt_ps_axi_arlock[p]),
      .ps_axi_arcache  (rt_ps_axi_arcache[p]),
      .ps_axi_arprot   (rt_ps_axi_arprot[p]),
      .ps_axi_arqos    (rt_ps_axi_arqos[p]),
      .ps_axi_aruser   (rt_ps_axi_aruser[p]),
      .ps_axi_arvalid  (rt_ps_axi_arvalid[p]),
      .ps_axi_arready  (rt_ps_axi_arready[p]),
      .ps_axi_rid      (rt_ps_axi_rid[p]),
      .ps_axi_rdata    (rt_ps_axi_rdata[p]),
      .ps_axi_rresp    (rt_ps_axi_rresp[p]),
      .ps_axi_rlast    (rt_ps_axi_rlast[p]),
      .ps_axi_rvalid   (rt_ps_axi_rvalid[p]),
      .ps_axi_rready   (rt_ps_axi_rready[p])
    );
  end

  for (genvar p = 0; p < 3; p++) begin : g_vm_port
    pl_ps_port_isolation #(
      .AXI_ADDR_WIDTH      (AXI_ADDR_WIDTH),
      .HA_DATA_WIDTH       (VM_HA_DATA_WIDTH),
      .PORT_DATA_WIDTH     (PORT_DATA_WIDTH),
      .AXI_ID_WIDTH        (AXI_ID_WIDTH),
      .AXI_USER_WIDTH      (AXI_USER_WIDTH),
      .N_HA                (2),
      .AxPROT_VALUES       ({VM_AxPROT, VM_AxPROT}),
      .AxUSER_VALUES       ({AXI_USER_WIDTH'(1), AXI_USER_WIDTH'(0)}),
      .AxQOS_VALUES        ({VM_AxQOS, VM_AxQOS}),
      .AxCACHE_VALUES      ({4'd0, 4'd0}),
      .ENFORCE_AxCACHE     (2'b00),
      .POOL_SIZE           (1),
      .WRITE_REQ_BUF_SIZE  (BUF_SIZE),
      .WRITE_BURST_BUF_SIZE(BUF_SIZE),
      .WRITE_RSP_BUF_SIZE  (BUF_SIZE),
      .READ_REQ_BUF_SIZE   (BUF_SIZE),
      .READ_BURST_BUF_SIZE (int'(VM_READ_BURST_BUF_SIZE[p]))
    ) u_port (
      .clk,
      .rst_n,
      .irq (irq[3 + p]),
      .ha_axi_awid     (vm_ha_axi_awid[p]),
      .ha_axi_awaddr   (vm_ha_axi_awaddr[p]),
      .ha_axi_awlen    (vm_ha_axi_awlen[p]),
      .ha_axi_awsize   (vm_ha_axi_awsize[p]),
      .ha_axi_awburst  (vm_ha_axi_awburst[p]),
      .ha_axi_awlock   (vm_ha_axi_awlock[p]),
      .ha_axi_awcache  (vm_ha_axi_awcache[p]),
      .ha_axi_awprot   (vm_ha_axi_awprot[p]),
      .ha_axi_awqos    (vm_ha_axi_awqos[p]),
      .ha_axi_awuser   (vm_ha_axi_awuser[p]),
      .ha_axi_awvalid  (vm_ha_axi_awvalid[p]),
      .ha_axi_awready  (vm_ha_axi_awready[p]),
      .ha_axi_wdata    (vm_ha_axi_wdata[p]),
      .ha_axi_wstrb    (vm_ha_axi_wstrb[p]),
      .ha_axi_wlast    (vm_ha_axi_wlast[p]),
      .ha_axi_wvalid   (vm_ha_axi_wvalid[p]),
      .ha_axi_wready   (vm_ha_axi_wready[p]),
      .ha_axi_bid      (vm_ha_axi_bid[p]),
      .ha_axi_bresp    (vm_ha_axi_bresp[p]),
      .ha_axi_bvalid   (vm_ha_axi_bvalid[p]),
      .ha_axi_bready   (vm_ha_axi_bready[p]),
      .ha_axi_arid     (vm_ha_axi_arid[p]),
      .ha_axi_araddr   (vm_ha_axi_araddr[p]),
      .ha_axi_arlen    (vm_ha_axi_arlen[p]),
      .ha_axi_arsize   (vm_ha_axi_arsize[p]),
      .ha_axi_arburst  (vm_ha_axi_arburst[p]),
      .ha_axi_arlock   (vm_ha_axi_arlock[p]),
      .ha_axi_arcache  (vm_ha_axi_arcache[p]),
      .ha_axi_arprot   (vm_ha_axi_arprot[p]),
      .ha_axi_arqos    (vm_ha_axi_arqos[p]),
      .ha_axi_aruser   (vm_ha_axi_aruser[p]),
      .ha_axi_arvalid  (vm_ha_axi_arvalid[p]),
      .ha_axi_arready  (vm_ha_axi_arready[p]),
      .ha_axi_rid      (vm_ha_axi_rid[p]),
      .ha_axi_rdata    (vm_ha_axi_rdata[p]),
      .ha_axi_rresp    (vm_ha_axi_rresp[p]),
      .ha_axi_rlast    (vm_ha_axi_rlast[p]),
      .ha_axi_rvalid   (vm_ha_axi_rvalid[p]),
      .ha_axi_rready   (vm_ha_axi_rready[p]),
      .ic_s_axi_awid     (vm_ic_s_axi_awid[p]),
      .ic_s_axi_awaddr   (vm_ic_s_axi_awaddr[p]),
      .ic_s_axi_awlen    (vm_ic_s_axi_awlen[p]),
      .ic_s_axi_awsize   (vm_ic_s_axi_awsize[p]),
      .ic_s_axi_awburst  (vm_ic_s_axi_awburst[p]),
      .ic_s_axi_awlock   (vm_ic_s_axi_awlock[p]),
      .ic_s_axi_awcache  (vm_ic_s_axi_awcache[p]),
      .ic_s_axi_awprot   (vm_ic_s_axi_awprot[p]),
      .ic_s_axi_awqos    (vm_ic_s_axi_awqos[p]),
      .ic_s_axi_awuser   (vm_ic_s_axi_awuser[p]),
      .ic_s_axi_awvalid  (vm_ic_s_axi_awvalid[p]),
      .ic_s_axi_awready  (vm_ic_s_axi_awready[p]),
      .ic_s_axi_wdata    (vm_ic_s_axi_wdata[p]),
      .ic_s_axi_wstrb    (vm_ic_s_axi_wstrb[p]),
      .ic_s_axi_wlast    (vm_ic_s_axi_wlast[p]),
      .ic_s_axi_wvalid   (vm_ic_s_axi_wvalid[p]),
      .ic_s_axi_wready   (vm_ic_s_axi_wready[p]),
      .ic_s_axi_bid      (vm_ic_s_axi_bid[p]),
      .ic_s_axi_bresp    (vm_ic_s_axi_bresp[p]),
      .ic_s_axi_bvalid   (vm_ic_s_axi_bvalid[p]),
      .ic_s_axi_bready   (vm_ic_s_axi_bready[p]),
      .ic_s_axi_arid     (vm_ic_s_axi_arid[p]),
      .ic_s_axi_araddr   (vm_ic_s_axi_araddr[p]),
      .ic_s_axi_arlen    (vm_ic_s_axi_arlen[p]),
      .ic_s_axi_arsize   (vm_ic_s_axi_arsize[p]),
      .ic_s_axi_arburst  (vm_ic_s_axi_arburst[p]),
      .ic_s_axi_arlock   (vm_ic_s_axi_arlock[p]),
      .ic_s_axi_arcache  (vm_ic_s_axi_arcache[p]),
      .ic_s_axi_arprot   (vm_ic_s_axi_arprot[p]),
      .ic_s_axi_arqos    (vm_ic_s_axi_arqos[p]),
      .ic_s_axi_aruser   (vm_ic_s_axi_aruser[p]),
      .ic_s_axi_arvalid  (vm_ic_s_axi_arvalid[p]),
      .ic_s_axi_arready  (vm_ic_s_axi_arready[p]),
      .ic_s_axi_rid      (vm_ic_s_axi_rid[p]),
      .ic_s_axi_rdata    (vm_ic_s_axi_rdata[p]),
      .ic_s_axi_rresp    (vm_ic_s_axi_rresp[p]),
      .ic_s_axi_rlast    (vm_ic_s_axi_rlast[p]),
      .ic_s_axi_rvalid   (vm_ic_s_axi_rvalid[p]),
      .ic_s_axi_rready   (vm_ic_s_axi_rready[p]),
      .ic_m_axi_awid     (vm_ic_m_axi_awid[p]),
      .ic_m_axi_awaddr   (vm_ic_m_axi_awaddr[p]),
      .ic_m_axi_awlen    (vm_ic_m_axi_awlen[p]),
      .ic_m_axi_awsize   (vm_ic_m_axi_awsize[p]),
      .ic_m_axi_awburst  (vm_ic_m_axi_awburst[p]),
      .ic_m_axi_awlock   (vm_ic_m_axi_awlock[p]),
      .ic_m_axi_awcache  (vm_ic_m_axi_awcache[p]),
      .ic_m_axi_awprot   (vm_ic_m_axi_awprot[p]),
      .ic_m_axi_awqos    (vm_ic_m_axi_awqos[p]),
      .ic_m_axi_awuser   (vm_ic_m_axi_awuser[p]),
      .ic_m_axi_awvalid  (vm_ic_m_axi_awvalid[p]),
      .ic_m_axi_awready  (vm_ic_m_axi_awready[p]),
      .ic_m_axi_wdata    (vm_ic_m_axi_wdata[p]),
      .ic_m_axi_wstrb    (vm_ic_m_axi_wstrb[p]),
      .ic_m_axi_wlast    (vm_ic_m_axi_wlast[p]),
      .ic_m_axi_wvalid   (vm_ic_m_axi_wvalid[p]),
      .ic_m_axi_wready   (vm_ic_m_axi_wready[p]),
      .ic_m_axi_bid      (vm_ic_m_axi_bid[p]),
      .ic_m_axi_bresp    (vm_ic_m_axi_bresp[p]),
      .ic_m_axi_bvalid   (vm_ic_m_axi_bvalid[p]),
      .ic_m_axi_bready   (vm_ic_m_axi_bready[p]),
      .ic_m_axi_arid     (vm_ic_m_axi_arid[p]),
      .ic_m_axi_araddr   (vm_ic_m_axi_araddr[p]),
      .ic_m_axi_arlen    (vm_ic_m_axi_arlen[p]),
      .ic_m_axi_arsize   (vm_ic_m_axi_arsize[p]),
      .ic_m_axi_arburst  (vm_ic_m_axi_arburst[p]),
      .ic_m_axi_arlock   (vm_ic_m_axi_arlock[p]),
      .ic_m_axi_arcache  (vm_ic_m_axi_arcache[p]),
      .ic_m_axi_arprot   (vm_ic_m_axi_arprot[p]),
      .ic_m_axi_arqos    (vm_ic_m_axi_arqos[p]),
      .ic_m_axi_aruser   (vm_ic_m_axi_aruser[p]),
      .ic_m_axi_arvalid  (vm_ic_m_axi_arvalid[p]),
      .ic_m_axi_arready  (vm_ic_m_axi_arready[p]),
      .ic_m_axi_rid      (vm_ic_m_axi_rid[p]),
      .ic_m_axi_rdata    (vm_ic_m_axi_rdata[p]),
      .ic_m_axi_rresp    (vm_ic_m_axi_rresp[p]),
      .ic_m_axi_rlast    (vm_ic_m_axi_rlast[p]),
      .ic_m_axi_rvalid   (vm_ic_m_axi_rvalid[p]),
      .ic_m_axi_rready   (vm_ic_m_axi_rready[p]),
      .ps_axi_awid     (vm_ps_axi_awid[p]),
      .ps_axi_awaddr   (vm_ps_axi_awaddr[p]),
      .ps_axi_awlen    (vm_ps_axi_awlen[p]),
      .ps_axi_awsize   (vm_ps_axi_awsize[p]),
      .ps_axi_awburst  (vm_ps_axi_awburst[p]),
      .ps_axi_awlock   (vm_ps_axi_awlock[p]),
      .ps_axi_awcache  (vm_ps_axi_awcache[p]),
      .ps_axi_awprot   (vm_ps_axi_awprot[p]),
      .ps_axi_awqos    (vm_ps_axi_awqos[p]),
      .ps_axi_awuser   (vm_ps_axi_awuser[p]),
      .ps_axi_awvalid  (vm_ps_axi_awvalid[p]),
      .ps_axi_awready  (vm_ps_axi_awready[p]),
      .ps_axi_wdata    (vm_ps_axi_wdata[p]),
      .ps_axi_wstrb    (vm_ps_axi_wstrb[p]),
      .ps_axi_wlast    (vm_ps_axi_wlast[p]),
      .ps_axi_wvalid   (vm_ps_axi_wvalid[p]),
      .ps_axi_wready   (vm_ps_axi_wready[p]),
      .ps_axi_bid      (vm_ps_axi_bid[p]),
      .ps_axi_bresp    (vm_ps_axi_bresp[p]),
      .ps_axi_bvalid   (vm_ps_axi_bvalid[p]),
      .ps_axi_bready   (vm_ps_axi_bready[p]),
      .ps_axi_arid     (vm_ps_axi_arid[p]),
      .ps_axi_araddr   (vm_ps_axi_araddr[p]),
      .ps_axi_arlen    (vm_ps_axi_arlen[p]),
      .ps_axi_arsize   (vm_ps_axi_arsize[p]),
      .ps_axi_arburst  (vm_ps_axi_arburst[p]),
      .ps_axi_arlock   (vm_ps_axi_arlock[p]),
      .ps_axi_arcache  (vm_ps_axi_arcache[p]),
      .ps_axi_arprot   (vm_ps_axi_arprot[p]),
      .ps_axi_arqos    (vm_ps_axi_arqos[p]),
      .ps_axi_aruser   (vm_ps_axi_aruser[p]),
      .ps_axi_arvalid  (vm_ps_axi_arvalid[p]),
      .ps_axi_arready  (vm_ps_axi_arready[p]),
      .ps_axi_rid      (vm_ps_axi_rid[p]),
      .ps_axi_rdata    (vm_ps_axi_rdata[p]),
      .ps_axi_rresp    (vm_ps_axi_rresp[p]),
      .ps_axi_rlast    (vm_ps_axi_rlast[p]),
      .ps_axi_rvalid   (vm_ps_axi_rvalid[p]),
      .ps_axi_rready   (vm_ps_axi_rready[p])
    );
  end

endmodule
