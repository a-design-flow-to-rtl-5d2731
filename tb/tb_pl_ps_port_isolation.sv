// tb_pl_ps_port_isolation: end-to-end testbench of the port-isolation chain at
// its default parameters (two accelerators, 32-bit accelerator data, 128-bit
// port data, pool size 1, buffers of 2).
//
// Two accelerator models issue write bursts to their own memory windows and
// read them back, driving random AxPROT/AxQOS/AxCACHE/AxUSER values of their
// own. Their ports pass through the enforcers of the design, a behavioural
// single-ordered interconnect (every request gets ID 0) and the ID mapper to a
// memory model of the PL-PS port, which accepts with random ready and stalls
// completely for stretches. Checked:
//   - at the port, every request carries the enforced attributes of the
//     accelerator it came from and the AXI ID of that accelerator's pool, so
//     the two accelerators have different Stream IDs;
//   - responses reach the right accelerator with its original ID, and read
//     data equal what was written;
//   - the first request through the idle mapper reaches the port 2 cycles
//     after the interconnect hands it over;
//   - a request with an AxUSER that no pool maps is not forwarded and raises irq.
// Each mechanism is counted and must have happened: attribute override, ID
// remap, ID restore, buffering stall at the mapper input, port back-pressure,
// configuration-error interrupt.
module tb_pl_ps_port_isolation;
  localparam int N = 2, AW = 32, HDW = 32, PDW = 128, IW = 6, UW = 10;
  localparam int NTX = 40;
  // enforced values of the two accelerators (the design's defaults)
  localparam logic [2:0] PROT  [N] = '{3'b000, 3'b010};
  localparam logic [UW-1:0] USER [N] = '{10'd0, 10'd1};
  localparam logic [3:0] QOS   [N] = '{4'b0000, 4'b0100};
  localparam logic [3:0] CACHE [N] = '{4'b0000, 4'b0000};
  // fixed Stream ID bits of the port used in the reports (placeholders)
  localparam logic [4:0] PORT_TBU = 5'd0;
  localparam logic [3:0] PORT_MID = 4'd0;

  logic clk = 1'b0, rst_n = 1'b0, irq;
  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s (cycle %0d)", what, cycle);
    end
  endtask

  // ---------------- accelerator-side signals ----------------
  logic [N-1:0][IW-1:0] ha_awid, ha_arid, ha_bid, ha_rid;
  logic [N-1:0][AW-1:0] ha_awaddr, ha_araddr;
  logic [N-1:0][7:0] ha_awlen, ha_arlen;
  logic [N-1:0][2:0] ha_awsize, ha_arsize, ha_awprot, ha_arprot;
  logic [N-1:0][1:0] ha_awburst, ha_arburst, ha_bresp, ha_rresp;
  logic [N-1:0] ha_awlock, ha_arlock, ha_awvalid, ha_awready, ha_arvalid, ha_arready;
  logic [N-1:0][3:0] ha_awcache, ha_arcache, ha_awqos, ha_arqos;
  logic [N-1:0][UW-1:0] ha_awuser, ha_aruser;
  logic [N-1:0][HDW-1:0] ha_wdata, ha_rdata;
  logic [N-1:0][HDW/8-1:0] ha_wstrb;
  logic [N-1:0] ha_wlast, ha_wvalid, ha_wready, ha_bvalid, ha_bready;
  logic [N-1:0] ha_rlast, ha_rvalid, ha_rready;

  // enforced side (to the interconnect)
  logic [N-1:0][IW-1:0] is_awid, is_arid, is_bid, is_rid;
  logic [N-1:0][AW-1:0] is_awaddr, is_araddr;
  logic [N-1:0][7:0] is_awlen, is_arlen;
  logic [N-1:0][2:0] is_awsize, is_arsize, is_awprot, is_arprot;
  logic [N-1:0][1:0] is_awburst, is_arburst, is_bresp, is_rresp;
  logic [N-1:0] is_awlock, is_arlock, is_awvalid, is_awready, is_arvalid, is_arready;
  logic [N-1:0][3:0] is_awcache, is_arcache, is_awqos, is_arqos;
  logic [N-1:0][UW-1:0] is_awuser, is_aruser;
  logic [N-1:0][HDW-1:0] is_wdata, is_rdata;
  logic [N-1:0][HDW/8-1:0] is_wstrb;
  logic [N-1:0] is_wlast, is_wvalid, is_wready, is_bvalid, is_bready;
  logic [N-1:0] is_rlast, is_rvalid, is_rready;

  // interconnect manager port (model side) and mapper input (after injection mux)
  logic [IW-1:0] mm_awid, mm_arid, im_awid, im_arid, im_bid, im_rid;
  logic [AW-1:0] mm_awaddr, mm_araddr, im_awaddr;
  logic [7:0] mm_awlen, mm_arlen, im_awlen;
  logic [2:0] mm_awsize, mm_arsize, mm_awprot, mm_arprot;
  logic [1:0] mm_awburst, mm_arburst, im_bresp, im_rresp;
  logic mm_awlock, mm_arlock, mm_awvalid, mm_awready, mm_arvalid, mm_arready;
  logic [3:0] mm_awcache, mm_arcache, mm_awqos, mm_arqos;
  logic [UW-1:0] mm_awuser, mm_aruser, im_awuser;
  logic im_awvalid, im_awready;
  logic [PDW-1:0] mm_wdata, im_rdata;
  logic [PDW/8-1:0] mm_wstrb;
  logic mm_wlast, mm_wvalid, im_wready, im_bvalid, mm_bready, im_rlast, im_rvalid, mm_rready;

  // PL-PS port side
  logic [IW-1:0] ps_awid, ps_arid, ps_bid, ps_rid;
  logic [AW-1:0] ps_awaddr, ps_araddr;
  logic [7:0] ps_awlen, ps_arlen;
  logic [2:0] ps_awsize, ps_arsize, ps_awprot, ps_arprot;
  logic [1:0] ps_awburst, ps_arburst, ps_bresp, ps_rresp;
  logic ps_awlock, ps_arlock, ps_awvalid, ps_awready, ps_arvalid, ps_arready;
  logic [3:0] ps_awcache, ps_arcache, ps_awqos, ps_arqos;
  logic [UW-1:0] ps_awuser, ps_aruser;
  logic [PDW-1:0] ps_wdata, ps_rdata;
  logic [PDW/8-1:0] ps_wstrb;
  logic ps_wlast, ps_wvalid, ps_wready, ps_bvalid, ps_bready, ps_rlast, ps_rvalid, ps_rready;

  // injection of a misconfigured request on the mapper input
  logic inj = 1'b0, inj_valid = 1'b0;
  assign im_awid    = inj ? '0 : mm_awid;
  assign im_awaddr  = inj ? 32'h0BAD_0000 : mm_awaddr;
  assign im_awlen   = inj ? 8'd0 : mm_awlen;
  assign im_awuser  = inj ? 10'd77 : mm_awuser;
  assign im_awvalid = inj ? inj_valid : mm_awvalid;
  assign mm_awready = inj ? 1'b0 : im_awready;

  pl_ps_port_isolation dut (
    .clk, .rst_n, .irq,
    .ha_axi_awid(ha_awid), .ha_axi_awaddr(ha_awaddr), .ha_axi_awlen(ha_awlen), .ha_axi_awsize(ha_awsize),
    .ha_axi_awburst(ha_awburst), .ha_axi_awlock(ha_awlock), .ha_axi_awcache(ha_awcache),
    .ha_axi_awprot(ha_awprot), .ha_axi_awqos(ha_awqos), .ha_axi_awuser(ha_awuser),
    .ha_axi_awvalid(ha_awvalid), .ha_axi_awready(ha_awready),
    .ha_axi_wdata(ha_wdata), .ha_axi_wstrb(ha_wstrb), .ha_axi_wlast(ha_wlast),
    .ha_axi_wvalid(ha_wvalid), .ha_axi_wready(ha_wready),
    .ha_axi_bid(ha_bid), .ha_axi_bresp(ha_bresp), .ha_axi_bvalid(ha_bvalid), .ha_axi_bready(ha_bready),
    .ha_axi_arid(ha_arid), .ha_axi_araddr(ha_araddr), .ha_axi_arlen(ha_arlen), .ha_axi_arsize(ha_arsize),
    .ha_axi_arburst(ha_arburst), .ha_axi_arlock(ha_arlock), .ha_axi_arcache(ha_arcache),
    .ha_axi_arprot(ha_arprot), .ha_axi_arqos(ha_arqos), .ha_axi_aruser(ha_aruser),
    .ha_axi_arvalid(ha_arvalid), .ha_axi_arready(ha_arready),
    .ha_axi_rid(ha_rid), .ha_axi_rdata(ha_rdata), .ha_axi_rresp(ha_rresp), .ha_axi_rlast(ha_rlast),
    .ha_axi_rvalid(ha_rvalid), .ha_axi_rready(ha_rready),
    .ic_s_axi_awid(is_awid), .ic_s_axi_awaddr(is_awaddr), .ic_s_axi_awlen(is_awlen), .ic_s_axi_awsize(is_awsize),
    .ic_s_axi_awburst(is_awburst), .ic_s_axi_awlock(is_awlock), .ic_s_axi_awcache(is_awcache),
    .ic_s_axi_awprot(is_awprot), .ic_s_axi_awqos(is_awqos), .ic_s_axi_awuser(is_awuser),
    .ic_s_axi_awvalid(is_awvalid), .ic_s_axi_awready(is_awready),
    .ic_s_axi_wdata(is_wdata), .ic_s_axi_wstrb(is_wstrb), .ic_s_axi_wlast(is_wlast),
    .ic_s_axi_wvalid(is_wvalid), .ic_s_axi_wready(is_wready),
    .ic_s_axi_bid(is_bid), .ic_s_axi_bresp(is_bresp), .ic_s_axi_bvalid(is_bvalid), .ic_s_axi_bready(is_bready),
    .ic_s_axi_arid(is_arid), .ic_s_axi_araddr(is_araddr), .ic_s_axi_arlen(is_arlen), .ic_s_axi_arsize(is_arsize),
    .ic_s_axi_arburst(is_arburst), .ic_s_axi_arlock(is_arlock), .ic_s_axi_arcache(is_arcache),
    .ic_s_axi_arprot(is_arprot), .ic_s_axi_arqos(is_arqos), .ic_s_axi_aruser(is_aruser),
    .ic_s_axi_arvalid(is_arvalid), .ic_s_axi_arready(is_arready),
    .ic_s_axi_rid(is_rid), .ic_s_axi_rdata(is_rdata), .ic_s_axi_rresp(is_rresp), .ic_s_axi_rlast(is_rlast),
    .ic_s_axi_rvalid(is_rvalid), .ic_s_axi_rready(is_rready),
    .ic_m_axi_awid(im_awid), .ic_m_axi_awaddr(im_awaddr), .ic_m_axi_awlen(im_awlen), .ic_m_axi_awsize(mm_awsize),
    .ic_m_axi_awburst(mm_awburst), .ic_m_axi_awlock(mm_awlock), .ic_m_axi_awcache(mm_awcache),
    .ic_m_axi_awprot(mm_awprot), .ic_m_axi_awqos(mm_awqos), .ic_m_axi_awuser(im_awuser),
    .ic_m_axi_awvalid(im_awvalid), .ic_m_axi_awready(im_awready),
    .ic_m_axi_wdata(mm_wdata), .ic_m_axi_wstrb(mm_wstrb), .ic_m_axi_wlast(mm_wlast),
    .ic_m_axi_wvalid(mm_wvalid), .ic_m_axi_wready(im_wready),
    .ic_m_axi_bid(im_bid), .ic_m_axi_bresp(im_bresp), .ic_m_axi_bvalid(im_bvalid), .ic_m_axi_bready(mm_bready),
    .ic_m_axi_arid(mm_arid), .ic_m_axi_araddr(mm_araddr), .ic_m_axi_arlen(mm_arlen), .ic_m_axi_arsize(mm_arsize),
    .ic_m_axi_arburst(mm_arburst), .ic_m_axi_arlock(mm_arlock), .ic_m_axi_arcache(mm_arcache),
    .ic_m_axi_arprot(mm_arprot), .ic_m_axi_arqos(mm_arqos), .ic_m_axi_aruser(mm_aruser),
    .ic_m_axi_arvalid(mm_arvalid), .ic_m_axi_arready(mm_arready),
    .ic_m_axi_rid(im_rid), .ic_m_axi_rdata(im_rdata), .ic_m_axi_rresp(im_rresp), .ic_m_axi_rlast(im_rlast),
    .ic_m_axi_rvalid(im_rvalid), .ic_m_axi_rready(mm_rready),
    .ps_axi_awid(ps_awid), .ps_axi_awaddr(ps_awaddr), .ps_axi_awlen(ps_awlen), .ps_axi_awsize(ps_awsize),
    .ps_axi_awburst(ps_awburst), .ps_axi_awlock(ps_awlock), .ps_axi_awcache(ps_awcache),
    .ps_axi_awprot(ps_awprot), .ps_axi_awqos(ps_awqos), .ps_axi_awuser(ps_awuser),
    .ps_axi_awvalid(ps_awvalid), .ps_axi_awready(ps_awready),
    .ps_axi_wdata(ps_wdata), .ps_axi_wstrb(ps_wstrb), .ps_axi_wlast(ps_wlast),
    .ps_axi_wvalid(ps_wvalid), .ps_axi_wready(ps_wready),
    .ps_axi_bid(ps_bid), .ps_axi_bresp(ps_bresp), .ps_axi_bvalid(ps_bvalid), .ps_axi_bready(ps_bready),
    .ps_axi_arid(ps_arid), .ps_axi_araddr(ps_araddr), .ps_axi_arlen(ps_arlen), .ps_axi_arsize(ps_arsize),
    .ps_axi_arburst(ps_arburst), .ps_axi_arlock(ps_arlock), .ps_axi_arcache(ps_arcache),
    .ps_axi_arprot(ps_arprot), .ps_axi_arqos(ps_arqos), .ps_axi_aruser(ps_aruser),
    .ps_axi_arvalid(ps_arvalid), .ps_axi_arready(ps_arready),
    .ps_axi_rid(ps_rid), .ps_axi_rdata(ps_rdata), .ps_axi_rresp(ps_rresp), .ps_axi_rlast(ps_rlast),
    .ps_axi_rvalid(ps_rvalid), .ps_axi_rready(ps_rready)
  );

  axi_interconnect_model #(.N(N), .ADDR_W(AW), .S_DATA_W(HDW), .M_DATA_W(PDW)) u_ic (
    .clk, .rst_n,
    .s_awid(is_awid), .s_awaddr(is_awaddr), .s_awlen(is_awlen), .s_awsize(is_awsize),
    .s_awburst(is_awburst), .s_awlock(is_awlock), .s_awcache(is_awcache), .s_awprot(is_awprot),
    .s_awqos(is_awqos), .s_awuser(is_awuser), .s_awvalid(is_awvalid), .s_awready(is_awready),
    .s_wdata(is_wdata), .s_wstrb(is_wstrb), .s_wlast(is_wlast), .s_wvalid(is_wvalid), .s_wready(is_wready),
    .s_bid(is_bid), .s_bresp(is_bresp), .s_bvalid(is_bvalid), .s_bready(is_bready),
    .s_arid(is_arid), .s_araddr(is_araddr), .s_arlen(is_arlen), .s_arsize(is_arsize),
    .s_arburst(is_arburst), .s_arlock(is_arlock), .s_arcache(is_arcache), .s_arprot(is_arprot),
    .s_arqos(is_arqos), .s_aruser(is_aruser), .s_arvalid(is_arvalid), .s_arready(is_arready),
    .s_rid(is_rid), .s_rdata(is_rdata), .s_rresp(is_rresp), .s_rlast(is_rlast),
    .s_rvalid(is_rvalid), .s_rready(is_rready),
    .m_awid(mm_awid), .m_awaddr(mm_awaddr), .m_awlen(mm_awlen), .m_awsize(mm_awsize),
    .m_awburst(mm_awburst), .m_awlock(mm_awlock), .m_awcache(mm_awcache), .m_awprot(mm_awprot),
    .m_awqos(mm_awqos), .m_awuser(mm_awuser), .m_awvalid(mm_awvalid), .m_awready(mm_awready),
    .m_wdata(mm_wdata), .m_wstrb(mm_wstrb), .m_wlast(mm_wlast), .m_wvalid(mm_wvalid), .m_wready(im_wready),
    .m_bid(im_bid), .m_bresp(im_bresp), .m_bvalid(im_bvalid), .m_bready(mm_bready),
    .m_arid(mm_arid), .m_araddr(mm_araddr), .m_arlen(mm_arlen), .m_arsize(mm_arsize),
    .m_arburst(mm_arburst), .m_arlock(mm_arlock), .m_arcache(mm_arcache), .m_arprot(mm_arprot),
    .m_arqos(mm_arqos), .m_aruser(mm_aruser), .m_arvalid(mm_arvalid), .m_arready(mm_arready),
    .m_rid(im_rid), .m_rdata(im_rdata), .m_rresp(im_rresp), .m_rlast(im_rlast),
    .m_rvalid(im_rvalid), .m_rready(mm_rready)
  );

  // ---------------- accelerator models ----------------
  int ha_done = 0;
  for (genvar k = 0; k < N; k++) begin : g_ha
    initial begin
      logic [HDW-1:0] wd [8];
      logic [IW-1:0]  tid;
      int             len;
      ha_awvalid[k] = 1'b0; ha_wvalid[k] = 1'b0; ha_bready[k] = 1'b0;
      ha_arvalid[k] = 1'b0; ha_rready[k] = 1'b0;
      ha_awsize[k] = 3'd2; ha_arsize[k] = 3'd2; ha_awburst[k] = 2'b01; ha_arburst[k] = 2'b01;
      ha_awlock[k] = 1'b0; ha_arlock[k] = 1'b0;
      wait (rst_n);
      for (int t = 0; t < NTX; t++) begin
        len = $urandom_range(0, 7);
        tid = IW'($urandom);
        // write burst with attributes of the accelerator's own choosing
        @(posedge clk); #1;
        ha_awid[k] = tid; ha_awaddr[k] = 32'h1000_0000 * (k + 1) + 32'(t * 64);
        ha_awlen[k] = 8'(len);
        ha_awprot[k] = 3'($urandom); ha_awqos[k] = 4'($urandom); ha_awcache[k] = 4'($urandom);
        ha_awuser[k] = UW'($urandom);
        ha_awvalid[k] = 1'b1;
        do @(posedge clk); while (!ha_awready[k]);
        #1 ha_awvalid[k] = 1'b0;
        for (int b = 0; b <= len; b++) begin
          wd[b] = $urandom;
          ha_wdata[k] = wd[b]; ha_wstrb[k] = '1; ha_wlast[k] = (b == len); ha_wvalid[k] = 1'b1;
          do @(posedge clk); while (!ha_wready[k]);
          #1;
        end
        ha_wvalid[k] = 1'b0;
        ha_bready[k] = 1'b1;
        do @(posedge clk); while (!ha_bvalid[k]);
        check(ha_bid[k] == tid, $sformatf("HA%0d: BID is the accelerator's own ID", k));
        check(ha_bresp[k] == 2'b00, $sformatf("HA%0d: write OKAY", k));
        #1 ha_bready[k] = 1'b0;
        // read back
        ha_arid[k] = tid; ha_araddr[k] = 32'h1000_0000 * (k + 1) + 32'(t * 64);
        ha_arlen[k] = 8'(len);
        ha_arprot[k] = 3'($urandom); ha_arqos[k] = 4'($urandom); ha_arcache[k] = 4'($urandom);
        ha_aruser[k] = UW'($urandom);
        ha_arvalid[k] = 1'b1;
        do @(posedge clk); while (!ha_arready[k]);
        #1 ha_arvalid[k] = 1'b0;
        ha_rready[k] = 1'b1;
        for (int b = 0; b <= len; b++) begin
          do @(posedge clk); while (!ha_rvalid[k]);
          check(ha_rdata[k] == wd[b], $sformatf("HA%0d: read data equals written data", k));
          check(ha_rid[k] == tid, $sformatf("HA%0d: RID is the accelerator's own ID", k));
          check(ha_rlast[k] == (b == len), $sformatf("HA%0d: RLAST position", k));
        end
        #1 ha_rready[k] = 1'b0;
      end
      ha_done++;
    end
  end

  // ---------------- PL-PS port memory model ----------------
  bit ps_hold = 1'b0;
  logic [PDW-1:0] mem [logic [AW-1:0]];
  logic [AW-1:0] aw_q[$], awaddr_cur;
  logic [IW-1:0] awid_q[$], b_id_q[$];
  logic [AW-1:0] ar_addr_q[$];
  logic [7:0]    ar_len_q[$];
  logic [IW-1:0] ar_id_q[$];
  logic [PDW:0] pw_q[$];
  int  wbeat = 0, r_left = 0, r_beat = 0;
  logic [AW-1:0] r_addr;
  logic [IW-1:0] r_id;
  logic [IW-1:0] sid_id_seen [N];
  int  n_override = 0, n_remap = 0, n_restore = 0, n_aim_stall = 0, n_ps_stall = 0, n_irq = 0;
  int  n_ps_aw = 0, first_im_aw = -1, first_ps_aw = -1;

  always @(posedge clk) begin
    if (!rst_n) begin
      ps_awready <= 1'b0; ps_wready <= 1'b0; ps_arready <= 1'b0;
      ps_bvalid <= 1'b0; ps_rvalid <= 1'b0;
    end else begin
      if (ps_awvalid && ps_awready) begin
        int u;
        u = int'(ps_awuser);
        check(u < N, "AW at port: AxUSER names an accelerator");
        if (u < N) begin
          check(ps_awid == IW'(u), "AW at port: AXI ID from the accelerator's pool");
          check(ps_awprot == PROT[u] && ps_awqos == QOS[u] && ps_awcache == CACHE[u],
                "AW at port: enforced attributes");
          sid_id_seen[u] = ps_awid;
        end
        check(ps_awaddr[31:28] == 4'(u + 1), "AW at port: address of the accelerator's window");
        if (ps_awid != '0) n_remap++;
        aw_q.push_back(ps_awaddr); awid_q.push_back(ps_awid);
        n_ps_aw++;
        if (first_ps_aw < 0) first_ps_aw = cycle;
      end
      // write data may reach the port ahead of its address: queue the beats
      if (ps_wvalid && ps_wready) pw_q.push_back({ps_wlast, ps_wdata});
      while (aw_q.size() != 0 && pw_q.size() != 0) begin
        logic [PDW:0] bt;
        bt = pw_q.pop_front();
        mem[aw_q[0] + AW'(wbeat)] = bt[PDW-1:0];
        wbeat++;
        if (bt[PDW]) begin
          void'(aw_q.pop_front());
          b_id_q.push_back(awid_q.pop_front());
          wbeat = 0;
        end
      end
      if (ps_arvalid && ps_arready) begin
        int u;
        u = int'(ps_aruser);
        check(u < N, "AR at port: AxUSER names an accelerator");
        if (u < N) begin
          check(ps_arid == IW'(u), "AR at port: AXI ID from the accelerator's pool");
          check(ps_arprot == PROT[u] && ps_arqos == QOS[u] && ps_arcache == CACHE[u],
                "AR at port: enforced attributes");
        end
        if (ps_arid != '0) n_remap++;
        ar_addr_q.push_back(ps_araddr); ar_len_q.push_back(ps_arlen); ar_id_q.push_back(ps_arid);
      end
      if ((ps_awvalid && !ps_awready) || (ps_wvalid && !ps_wready) || (ps_arvalid && !ps_arready))
        n_ps_stall++;
      ps_awready <= !ps_hold && $urandom_range(0, 2) != 0;
      ps_wready  <= !ps_hold && $urandom_range(0, 2) != 0;
      ps_arready <= !ps_hold && $urandom_range(0, 2) != 0;
      if (!ps_bvalid || ps_bready) begin
        if (b_id_q.size() != 0 && $urandom_range(0, 1) != 0) begin
          ps_bvalid <= 1'b1; ps_bid <= b_id_q.pop_front(); ps_bresp <= 2'b00;
        end else ps_bvalid <= 1'b0;
      end
      if (!ps_rvalid || ps_rready) begin
        if (r_left == 0 && ar_addr_q.size() != 0) begin
          r_addr = ar_addr_q.pop_front(); r_left = int'(ar_len_q.pop_front()) + 1;
          r_id = ar_id_q.pop_front(); r_beat = 0;
        end
        if (r_left != 0 && $urandom_range(0, 3) != 0) begin
          ps_rvalid <= 1'b1; ps_rid <= r_id; ps_rresp <= 2'b00; ps_rlast <= (r_left == 1);
          ps_rdata <= mem.exists(r_addr + AW'(r_beat)) ? mem[r_addr + AW'(r_beat)] : '0;
          r_left--; r_beat++;
        end else ps_rvalid <= 1'b0;
      end
    end
  end

  // ---------------- mechanism monitors ----------------
  logic irq_q;
  always @(posedge clk) begin
    irq_q <= irq;
    if (rst_n) begin
      for (int k = 0; k < N; k++) begin
        if (ha_awvalid[k] && ha_awready[k]) begin
          check(is_awprot[k] == PROT[k] && is_awqos[k] == QOS[k] && is_awcache[k] == CACHE[k] &&
                is_awuser[k] == USER[k], "enforcer output attributes (AW)");
          if (ha_awprot[k] != PROT[k] || ha_awqos[k] != QOS[k] || ha_awuser[k] != USER[k]) n_override++;
        end
        if (ha_arvalid[k] && ha_arready[k])
          check(is_arprot[k] == PROT[k] && is_arqos[k] == QOS[k] && is_arcache[k] == CACHE[k] &&
                is_aruser[k] == USER[k], "enforcer output attributes (AR)");
      end
      if (im_bvalid && mm_bready) begin
        check(im_bid == '0, "BID restored to the interconnect's ID");
        if (ps_bid != '0 || 1'b1) n_restore += (ps_bid != im_bid) ? 1 : 0;
      end
      if (im_rvalid && mm_rready) begin
        check(im_rid == '0, "RID restored to the interconnect's ID");
      end
      if (ps_rvalid && ps_rready && ps_rid != '0) n_restore++;
      if ((im_awvalid && !im_awready) || (mm_wvalid && !im_wready) || (mm_arvalid && !mm_arready))
        n_aim_stall++;
      if (irq && !irq_q) n_irq++;
      if (first_im_aw < 0 && im_awvalid && im_awready) first_im_aw = cycle;
    end
  end

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    repeat (4) @(posedge clk);
    #1 rst_n = 1'b1;
    // let traffic run, with periods where the port stalls completely
    repeat (200) @(posedge clk);
    for (int i = 0; i < 6; i++) begin
      #1 ps_hold = 1'b1;
      repeat (40) @(posedge clk);
      #1 ps_hold = 1'b0;
      repeat (150) @(posedge clk);
    end
    n = 0;
    while (ha_done < N && n < 200000) begin @(posedge clk); n++; end
    check(ha_done == N, "both accelerators finished");
    check(first_ps_aw - first_im_aw == 2,
          $sformatf("first request: %0d cycles from interconnect to port, expected 2", first_ps_aw - first_im_aw));
    check(sid_id_seen[0] != sid_id_seen[1], "accelerators have distinct Stream IDs");
    $display("Stream IDs: HA0 0x%04h HA1 0x%04h",
             axi_iso_pkg::stream_id(PORT_TBU, PORT_MID, sid_id_seen[0]),
             axi_iso_pkg::stream_id(PORT_TBU, PORT_MID, sid_id_seen[1]));
    // a request whose AxUSER is mapped by no pool
    check(!irq, "no interrupt during legal traffic");
    repeat (20) @(posedge clk);
    n = n_ps_aw;
    #1 inj = 1'b1; inj_valid = 1'b1;
    do @(posedge clk); while (!im_awready);
    #1 inj_valid = 1'b0;
    repeat (10) @(posedge clk);
    #1 inj = 1'b0;
    check(irq, "unmapped AxUSER raises irq");
    check(n_ps_aw == n, "unmapped request not forwarded");
    // mechanisms
    $display("override %0d remap %0d restore %0d aim_stall %0d port_stall %0d irq %0d",
             n_override, n_remap, n_restore, n_aim_stall, n_ps_stall, n_irq);
    check(n_override > 0, "attribute override happened");
    check(n_remap > 0, "ID remap happened");
    check(n_restore > 0, "ID restore happened");
    check(n_aim_stall > 0, "mapper buffer-full stall happened");
    check(n_ps_stall > 0, "port back-pressure happened");
    check(n_irq == 1, "configuration-error interrupt happened once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
