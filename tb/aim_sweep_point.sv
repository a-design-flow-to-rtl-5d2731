// aim_sweep_point: one configuration of the AXI ID Mapper, exercised on its own.
//
// Instantiates axi_id_mapper with NMGR managers, pools of POOL IDs, a
// write-request buffer of WREQ and a read-data buffer of RBURST entries
// (other buffers 2), AW-bit addresses and DW-bit data, and the identity pool
// map. It then
//  1. sends NREQ single-beat writes and reads with random AxUSER (< NMGR) and
//     random ID (< POOL), one at a time, and checks that the port sees
//     AxUSER * POOL + ID and AxUSER unchanged, that the data passes, and that
//     the response comes back with the original ID;
//  2. holds the port's AWREADY low and checks that exactly WREQ + 1 write
//     requests are accepted before AWREADY falls, and that all of them then
//     drain to the port;
//  3. holds the interconnect side's RREADY low and checks that exactly
//     RBURST + 1 read beats are taken from the port before its RREADY falls;
//  4. checks that irq stayed low.
// Results go out on checks/failures; done rises at the end.
module aim_sweep_point #(
  parameter int NMGR = 2,
  parameter int POOL = 1,
  parameter int WREQ = 2,
  parameter int RBURST = 2,
  parameter int AW = 40,
  parameter int DW = 128,
  parameter int NREQ = 40
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int IW = axi_iso_pkg::AXI_ID_WIDTH;
  localparam int UW = axi_iso_pkg::AXI_USER_WIDTH;
  logic irq;
  logic [IW-1:0] s_axi_awid;
  logic [AW-1:0] s_axi_awaddr;
  logic [7:0] s_axi_awlen;
  logic [2:0] s_axi_awsize;
  logic [1:0] s_axi_awburst;
  logic s_axi_awlock;
  logic [3:0] s_axi_awcache;
  logic [2:0] s_axi_awprot;
  logic [3:0] s_axi_awqos;
  logic [UW-1:0] s_axi_awuser;
  logic s_axi_awvalid;
  logic s_axi_awready;
  logic [DW-1:0] s_axi_wdata;
  logic [DW/8-1:0] s_axi_wstrb;
  logic s_axi_wlast;
  logic s_axi_wvalid;
  logic s_axi_wready;
  logic [IW-1:0] s_axi_bid;
  logic [1:0] s_axi_bresp;
  logic s_axi_bvalid;
  logic s_axi_bready;
  logic [IW-1:0] s_axi_arid;
  logic [AW-1:0] s_axi_araddr;
  logic [7:0] s_axi_arlen;
  logic [2:0] s_axi_arsize;
  logic [1:0] s_axi_arburst;
  logic s_axi_arlock;
  logic [3:0] s_axi_arcache;
  logic [2:0] s_axi_arprot;
  logic [3:0] s_axi_arqos;
  logic [UW-1:0] s_axi_aruser;
  logic s_axi_arvalid;
  logic s_axi_arready;
  logic [IW-1:0] s_axi_rid;
  logic [DW-1:0] s_axi_rdata;
  logic [1:0] s_axi_rresp;
  logic s_axi_rlast;
  logic s_axi_rvalid;
  logic s_axi_rready;
  logic [IW-1:0] m_axi_awid;
  logic [AW-1:0] m_axi_awaddr;
  logic [7:0] m_axi_awlen;
  logic [2:0] m_axi_awsize;
  logic [1:0] m_axi_awburst;
  logic m_axi_awlock;
  logic [3:0] m_axi_awcache;
  logic [2:0] m_axi_awprot;
  logic [3:0] m_axi_awqos;
  logic [UW-1:0] m_axi_awuser;
  logic m_axi_awvalid;
  logic m_axi_awready;
  logic [DW-1:0] m_axi_wdata;
  logic [DW/8-1:0] m_axi_wstrb;
  logic m_axi_wlast;
  logic m_axi_wvalid;
  logic m_axi_wready;
  logic [IW-1:0] m_axi_bid;
  logic [1:0] m_axi_bresp;
  logic m_axi_bvalid;
  logic m_axi_bready;
  logic [IW-1:0] m_axi_arid;
  logic [AW-1:0] m_axi_araddr;
  logic [7:0] m_axi_arlen;
  logic [2:0] m_axi_arsize;
  logic [1:0] m_axi_arburst;
  logic m_axi_arlock;
  logic [3:0] m_axi_arcache;
  logic [2:0] m_axi_arprot;
  logic [3:0] m_axi_arqos;
  logic [UW-1:0] m_axi_aruser;
  logic m_axi_arvalid;
  logic m_axi_arready;
  logic [IW-1:0] m_axi_rid;
  logic [DW-1:0] m_axi_rdata;
  logic [1:0] m_axi_rresp;
  logic m_axi_rlast;
  logic m_axi_rvalid;
  logic m_axi_rready;

  axi_id_mapper #(
    .AXI_ADDR_WIDTH(AW), .AXI_DATA_WIDTH(DW), .POOL_SIZE(POOL), .NUMBER_OF_MANAGERS(NMGR),
    .WRITE_REQ_BUF_SIZE(WREQ), .READ_BURST_BUF_SIZE(RBURST)
  ) u_aim (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 5) $display("FAIL: %m (NMGR=%0d POOL=%0d WREQ=%0d RBURST=%0d): %s",
                                 NMGR, POOL, WREQ, RBURST, what);
    end
  endtask

  initial begin
    int u, id, n, cyc;
    logic [DW-1:0] d;
    checks = 0; failures = 0; done = 1'b0;
    {s_axi_awid, s_axi_awaddr, s_axi_awlen, s_axi_awsize, s_axi_awburst, s_axi_awlock,
      s_axi_awcache, s_axi_awprot, s_axi_awqos, s_axi_awuser, s_axi_awvalid} = '0;
    {s_axi_wdata, s_axi_wstrb, s_axi_wlast, s_axi_wvalid, s_axi_bready} = '0;
    {s_axi_arid, s_axi_araddr, s_axi_arlen, s_axi_arsize, s_axi_arburst, s_axi_arlock,
      s_axi_arcache, s_axi_arprot, s_axi_arqos, s_axi_aruser, s_axi_arvalid, s_axi_rready} = '0;
    {m_axi_awready, m_axi_wready, m_axi_bid, m_axi_bresp, m_axi_bvalid} = '0;
    {m_axi_arready, m_axi_rid, m_axi_rdata, m_axi_rresp, m_axi_rlast, m_axi_rvalid} = '0;
    s_axi_wstrb = '1;
    wait (rst_n);
    @(posedge clk);
    // 1. mapping and restore
    for (int t = 0; t < NREQ; t++) begin
      u = $urandom_range(0, NMGR - 1);
      id = $urandom_range(0, POOL - 1);
      d = {DW/32{$urandom}};
      #1;
      s_axi_awid = IW'(id); s_axi_awuser = UW'(u); s_axi_awaddr = AW'($urandom); s_axi_awvalid = 1'b1;
      s_axi_wdata = d; s_axi_wlast = 1'b1; s_axi_wvalid = 1'b1;
      m_axi_awready = 1'b1; m_axi_wready = 1'b1;
      fork
        begin
          do @(posedge clk); while (!s_axi_awready);
          #1 s_axi_awvalid = 1'b0;
        end
        begin
          do @(posedge clk); while (!s_axi_wready);
          #1 s_axi_wvalid = 1'b0;
        end
        begin
          do @(posedge clk); while (!m_axi_awvalid);
          check(m_axi_awid == IW'(u * POOL + id), "AWID moved into the manager's pool");
          check(m_axi_awuser == UW'(u), "AWUSER forwarded");
        end
        begin
          do @(posedge clk); while (!m_axi_wvalid);
          check(m_axi_wdata == d, "write data passes");
        end
      join
      #1 m_axi_awready = 1'b0; m_axi_wready = 1'b0;
      m_axi_bid = IW'(u * POOL + id); m_axi_bvalid = 1'b1; s_axi_bready = 1'b1;
      do @(posedge clk); while (!m_axi_bready);
      #1 m_axi_bvalid = 1'b0;
      do @(posedge clk); while (!s_axi_bvalid);
      check(s_axi_bid == IW'(id), "BID restored");
      #1 s_axi_bready = 1'b0;
      s_axi_arid = IW'(id); s_axi_aruser = UW'(u); s_axi_arvalid = 1'b1; m_axi_arready = 1'b1;
      do @(posedge clk); while (!s_axi_arready);
      #1 s_axi_arvalid = 1'b0;
      while (!m_axi_arvalid) @(posedge clk);
      check(m_axi_arid == IW'(u * POOL + id), "ARID moved into the manager's pool");
      check(m_axi_aruser == UW'(u), "ARUSER forwarded");
      @(posedge clk);
      #1 m_axi_arready = 1'b0;
      m_axi_rid = IW'(u * POOL + id); m_axi_rdata = d; m_axi_rlast = 1'b1; m_axi_rvalid = 1'b1;
      s_axi_rready = 1'b1;
      do @(posedge clk); while (!m_axi_rready);
      #1 m_axi_rvalid = 1'b0;
      do @(posedge clk); while (!s_axi_rvalid);
      check(s_axi_rid == IW'(id) && s_axi_rdata == d && s_axi_rlast, "RID restored, data passes");
      #1 s_axi_rready = 1'b0;
    end
    // 2. write-request buffer capacity
    s_axi_awid = '0; s_axi_awuser = '0; s_axi_awvalid = 1'b1; m_axi_awready = 1'b0;
    n = 0;
    for (cyc = 0; cyc < 2 * WREQ + 20; cyc++) begin
      @(posedge clk);
      if (s_axi_awready) n++;
    end
    #1 s_axi_awvalid = 1'b0;
    check(n == WREQ + 1, $sformatf("write requests held under a stalled port: %0d", n));
    m_axi_awready = 1'b1;
    n = 0;
    for (cyc = 0; cyc < 2 * WREQ + 20; cyc++) begin
      @(posedge clk);
      if (m_axi_awvalid) n++;
    end
    check(n == WREQ + 1, "all held write requests drain to the port");
    #1 m_axi_awready = 1'b0;
    // 3. read-data buffer capacity
    m_axi_rid = '0; m_axi_rlast = 1'b1; m_axi_rvalid = 1'b1; s_axi_rready = 1'b0;
    n = 0;
    for (cyc = 0; cyc < 2 * RBURST + 20; cyc++) begin
      @(posedge clk);
      if (m_axi_rready) n++;
    end
    #1 m_axi_rvalid = 1'b0;
    check(n == RBURST + 1, $sformatf("read beats held under a stalled interconnect: %0d", n));
    check(!irq, "no configuration error raised");
    done = 1'b1;
  end
endmodule
