// axi_ha_traffic_model: behavioural hardware accelerator for the testbenches.
//
// Issues NTX write bursts (1..8 beats of DW bits, or FIRST_LEN+1 beats for
// the first one when FIRST_LEN >= 0; random ID) into its own
// address window starting at BASE, waits for each write response, reads the
// burst back and checks data, ID and RLAST. On every request it drives random
// AxPROT/AxQOS/AxCACHE/AxUSER, as an accelerator trying to raise its
// privileges would; n_hostile counts requests where these differ from the
// values the enforcer in front of it should impose (EXP_PROT, EXP_QOS,
// EXP_USER). checks/failures accumulate its own checks; done rises at the end.
module axi_ha_traffic_model #(
  parameter int AW = 40,
  parameter int DW = 32,
  parameter int IW = 6,
  parameter int UW = 10,
  parameter int NTX = 20,
  parameter int FIRST_LEN = -1,
  parameter logic [AW-1:0] BASE = '0,
  parameter logic [2:0] EXP_PROT = 3'b000,
  parameter logic [3:0] EXP_QOS = 4'd0,
  parameter logic [UW-1:0] EXP_USER = '0
) (
  input  logic clk,
  input  logic rst_n,
  output logic [IW-1:0] m_awid, output logic [AW-1:0] m_awaddr, output logic [7:0] m_awlen,
  output logic [2:0] m_awsize, output logic [1:0] m_awburst, output logic m_awlock,
  output logic [3:0] m_awcache, output logic [2:0] m_awprot, output logic [3:0] m_awqos,
  output logic [UW-1:0] m_awuser, output logic m_awvalid, input logic m_awready,
  output logic [DW-1:0] m_wdata, output logic [DW/8-1:0] m_wstrb, output logic m_wlast,
  output logic m_wvalid, input logic m_wready,
  input  logic [IW-1:0] m_bid, input logic [1:0] m_bresp, input logic m_bvalid, output logic m_bready,
  output logic [IW-1:0] m_arid, output logic [AW-1:0] m_araddr, output logic [7:0] m_arlen,
  output logic [2:0] m_arsize, output logic [1:0] m_arburst, output logic m_arlock,
  output logic [3:0] m_arcache, output logic [2:0] m_arprot, output logic [3:0] m_arqos,
  output logic [UW-1:0] m_aruser, output logic m_arvalid, input logic m_arready,
  input  logic [IW-1:0] m_rid, input logic [DW-1:0] m_rdata, input logic [1:0] m_rresp,
  input  logic m_rlast, input logic m_rvalid, output logic m_rready,
  output int checks,
  output int failures,
  output int n_hostile,
  output logic done
);
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 5) $display("FAIL: %m: %s", what);
    end
  endtask

  initial begin
    logic [DW-1:0] wd [256];
    logic [IW-1:0] tid;
    logic [AW-1:0] addr;
    int len;
    checks = 0; failures = 0; n_hostile = 0; done = 1'b0;
    m_awvalid = 1'b0; m_wvalid = 1'b0; m_bready = 1'b0; m_arvalid = 1'b0; m_rready = 1'b0;
    m_awsize = 3'($clog2(DW / 8)); m_arsize = 3'($clog2(DW / 8));
    m_awburst = 2'b01; m_arburst = 2'b01; m_awlock = 1'b0; m_arlock = 1'b0;
    m_wstrb = '1; m_wlast = 1'b0; m_wdata = '0;
    m_awid = '0; m_awaddr = '0; m_awlen = '0; m_awcache = '0; m_awprot = '0; m_awqos = '0; m_awuser = '0;
    m_arid = '0; m_araddr = '0; m_arlen = '0; m_arcache = '0; m_arprot = '0; m_arqos = '0; m_aruser = '0;
    wait (rst_n);
    for (int t = 0; t < NTX; t++) begin
      len  = (t == 0 && FIRST_LEN >= 0) ? FIRST_LEN : int'($urandom_range(0, 7));
      tid  = IW'($urandom);
      addr = BASE + AW'(t * 256);
      @(posedge clk); #1;
      m_awid = tid; m_awaddr = addr; m_awlen = 8'(len);
      m_awprot = 3'($urandom); m_awqos = 4'($urandom); m_awcache = 4'($urandom); m_awuser = UW'($urandom);
      if (m_awprot != EXP_PROT || m_awqos != EXP_QOS || m_awuser != EXP_USER) n_hostile++;
      m_awvalid = 1'b1;
      do @(posedge clk); while (!m_awready);
      #1 m_awvalid = 1'b0;
      for (int b = 0; b <= len; b++) begin
        for (int w = 0; w < DW; w += 32) wd[b][w +: 32] = $urandom;
        m_wdata = wd[b]; m_wlast = (b == len); m_wvalid = 1'b1;
        do @(posedge clk); while (!m_wready);
        #1;
      end
      m_wvalid = 1'b0;
      m_bready = 1'b1;
      do @(posedge clk); while (!m_bvalid);
      check(m_bid == tid, "BID is the accelerator's own ID");
      check(m_bresp == 2'b00, "write OKAY");
      #1 m_bready = 1'b0;
      m_arid = tid; m_araddr = addr; m_arlen = 8'(len);
      m_arprot = 3'($urandom); m_arqos = 4'($urandom); m_arcache = 4'($urandom); m_aruser = UW'($urandom);
      m_arvalid = 1'b1;
      do @(posedge clk); while (!m_arready);
      #1 m_arvalid = 1'b0;
      m_rready = 1'b1;
      for (int b = 0; b <= len; b++) begin
        do @(posedge clk); while (!m_rvalid);
        check(m_rdata == wd[b], "read data equals written data");
        check(m_rid == tid, "RID is the accelerator's own ID");
        check(m_rlast == (b == len), "RLAST position");
      end
      #1 m_rready = 1'b0;
    end
    done = 1'b1;
  end
endmodule
