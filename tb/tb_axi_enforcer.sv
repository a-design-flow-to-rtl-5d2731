// tb_axi_enforcer: self-checking testbench of the AXI Enforcer.
//
// Two instances are driven with the same random traffic: u_dma1 enforces the
// attributes of the second accelerator of the two-DMA reference design
// (AxPROT 010, AxUSER 1, AxQOS 0100, AxCACHE 0000); u_vm enforces the values
// of a virtual-machine accelerator of the railway case study (non-secure
// AxPROT, AxQOS 0) and leaves AxCACHE as the accelerator drives it. Every
// enforced field must carry its fixed value, every other field must pass
// unchanged in its direction, and the block adds no latency.
module tb_axi_enforcer;
  localparam int AW = 32, DW = 32, IW = 6, UW = 10;

  // one random vector drives both instances
  typedef struct packed {
    logic [IW-1:0] awid; logic [AW-1:0] awaddr; logic [7:0] awlen; logic [2:0] awsize;
    logic [1:0] awburst; logic awlock; logic [3:0] awcache; logic [2:0] awprot;
    logic [3:0] awqos; logic [UW-1:0] awuser; logic awvalid;
    logic [DW-1:0] wdata; logic [DW/8-1:0] wstrb; logic wlast; logic wvalid;
    logic bready;
    logic [IW-1:0] arid; logic [AW-1:0] araddr; logic [7:0] arlen; logic [2:0] arsize;
    logic [1:0] arburst; logic arlock; logic [3:0] arcache; logic [2:0] arprot;
    logic [3:0] arqos; logic [UW-1:0] aruser; logic arvalid;
    logic rready;
    // from the interconnect side
    logic awready, wready;
    logic [IW-1:0] bid; logic [1:0] bresp; logic bvalid;
    logic arready;
    logic [IW-1:0] rid; logic [DW-1:0] rdata; logic [1:0] rresp; logic rlast; logic rvalid;
  } stim_t;

  typedef struct packed {
    // manager side
    logic [IW-1:0] awid; logic [AW-1:0] awaddr; logic [7:0] awlen; logic [2:0] awsize;
    logic [1:0] awburst; logic awlock; logic [3:0] awcache; logic [2:0] awprot;
    logic [3:0] awqos; logic [UW-1:0] awuser; logic awvalid;
    logic [DW-1:0] wdata; logic [DW/8-1:0] wstrb; logic wlast; logic wvalid;
    logic bready;
    logic [IW-1:0] arid; logic [AW-1:0] araddr; logic [7:0] arlen; logic [2:0] arsize;
    logic [1:0] arburst; logic arlock; logic [3:0] arcache; logic [2:0] arprot;
    logic [3:0] arqos; logic [UW-1:0] aruser; logic arvalid;
    logic rready;
    // subordinate side outputs
    logic awready, wready;
    logic [IW-1:0] bid; logic [1:0] bresp; logic bvalid;
    logic arready;
    logic [IW-1:0] rid; logic [DW-1:0] rdata; logic [1:0] rresp; logic rlast; logic rvalid;
  } resp_t;

  stim_t s;
  resp_t o_dma1, o_vm;
  int checks = 0, failures = 0;

  `define ENF_INST(NAME, OUT, PROT, USER, QOS, CACHE, ENC) \
  axi_enforcer #(.AXI_ADDR_WIDTH(AW), .AXI_DATA_WIDTH(DW), .AxPROT_VALUE(PROT), \
                 .AxUSER_VALUE(USER), .AxQOS_VALUE(QOS), .AxCACHE_VALUE(CACHE), \
                 .ENFORCE_AxCACHE(ENC)) NAME ( \
    .s_axi_awid(s.awid), .s_axi_awaddr(s.awaddr), .s_axi_awlen(s.awlen), .s_axi_awsize(s.awsize), \
    .s_axi_awburst(s.awburst), .s_axi_awlock(s.awlock), .s_axi_awcache(s.awcache), \
    .s_axi_awprot(s.awprot), .s_axi_awqos(s.awqos), .s_axi_awuser(s.awuser), \
    .s_axi_awvalid(s.awvalid), .s_axi_awready(OUT.awready), \
    .s_axi_wdata(s.wdata), .s_axi_wstrb(s.wstrb), .s_axi_wlast(s.wlast), .s_axi_wvalid(s.wvalid), \
    .s_axi_wready(OUT.wready), .s_axi_bid(OUT.bid), .s_axi_bresp(OUT.bresp), \
    .s_axi_bvalid(OUT.bvalid), .s_axi_bready(s.bready), \
    .s_axi_arid(s.arid), .s_axi_araddr(s.araddr), .s_axi_arlen(s.arlen), .s_axi_arsize(s.arsize), \
    .s_axi_arburst(s.arburst), .s_axi_arlock(s.arlock), .s_axi_arcache(s.arcache), \
    .s_axi_arprot(s.arprot), .s_axi_arqos(s.arqos), .s_axi_aruser(s.aruser), \
    .s_axi_arvalid(s.arvalid), .s_axi_arready(OUT.arready), \
    .s_axi_rid(OUT.rid), .s_axi_rdata(OUT.rdata), .s_axi_rresp(OUT.rresp), .s_axi_rlast(OUT.rlast), \
    .s_axi_rvalid(OUT.rvalid), .s_axi_rready(s.rready), \
    .m_axi_awid(OUT.awid), .m_axi_awaddr(OUT.awaddr), .m_axi_awlen(OUT.awlen), .m_axi_awsize(OUT.awsize), \
    .m_axi_awburst(OUT.awburst), .m_axi_awlock(OUT.awlock), .m_axi_awcache(OUT.awcache), \
    .m_axi_awprot(OUT.awprot), .m_axi_awqos(OUT.awqos), .m_axi_awuser(OUT.awuser), \
    .m_axi_awvalid(OUT.awvalid), .m_axi_awready(s.awready), \
    .m_axi_wdata(OUT.wdata), .m_axi_wstrb(OUT.wstrb), .m_axi_wlast(OUT.wlast), .m_axi_wvalid(OUT.wvalid), \
    .m_axi_wready(s.wready), .m_axi_bid(s.bid), .m_axi_bresp(s.bresp), .m_axi_bvalid(s.bvalid), \
    .m_axi_bready(OUT.bready), \
    .m_axi_arid(OUT.arid), .m_axi_araddr(OUT.araddr), .m_axi_arlen(OUT.arlen), .m_axi_arsize(OUT.arsize), \
    .m_axi_arburst(OUT.arburst), .m_axi_arlock(OUT.arlock), .m_axi_arcache(OUT.arcache), \
    .m_axi_arprot(OUT.arprot), .m_axi_arqos(OUT.arqos), .m_axi_aruser(OUT.aruser), \
    .m_axi_arvalid(OUT.arvalid), .m_axi_arready(s.arready), \
    .m_axi_rid(s.rid), .m_axi_rdata(s.rdata), .m_axi_rresp(s.rresp), .m_axi_rlast(s.rlast), \
    .m_axi_rvalid(s.rvalid), .m_axi_rready(OUT.rready));

  `ENF_INST(u_dma1, o_dma1, 3'b010, 10'd1, 4'b0100, 4'b0000, 1'b1)
  `ENF_INST(u_vm,  o_vm,  3'b010, 10'd7, 4'b0000, 4'b0000, 1'b0)

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Expected output of an instance, built field by field from the stimulus.
  function automatic resp_t expect_of(stim_t x, logic [2:0] prot, logic [UW-1:0] user,
                                      logic [3:0] qos, logic [3:0] cache, bit enc);
    resp_t e;
    e.awid = x.awid; e.awaddr = x.awaddr; e.awlen = x.awlen; e.awsize = x.awsize;
    e.awburst = x.awburst; e.awlock = x.awlock; e.awvalid = x.awvalid;
    e.awcache = enc ? cache : x.awcache; e.awprot = prot; e.awqos = qos; e.awuser = user;
    e.wdata = x.wdata; e.wstrb = x.wstrb; e.wlast = x.wlast; e.wvalid = x.wvalid;
    e.bready = x.bready;
    e.arid = x.arid; e.araddr = x.araddr; e.arlen = x.arlen; e.arsize = x.arsize;
    e.arburst = x.arburst; e.arlock = x.arlock; e.arvalid = x.arvalid;
    e.arcache = enc ? cache : x.arcache; e.arprot = prot; e.arqos = qos; e.aruser = user;
    e.rready = x.rready;
    e.awready = x.awready; e.wready = x.wready;
    e.bid = x.bid; e.bresp = x.bresp; e.bvalid = x.bvalid;
    e.arready = x.arready;
    e.rid = x.rid; e.rdata = x.rdata; e.rresp = x.rresp; e.rlast = x.rlast; e.rvalid = x.rvalid;
    return e;
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [$bits(stim_t)-1:0] r;
    resp_t e;
    for (int n = 0; n < 500; n++) begin
      for (int b = 0; b < $bits(stim_t); b += 32) r[b +: 32] = $urandom;
      s = stim_t'(r);
      #1;  // combinational: outputs follow within the same time step
      e = expect_of(s, 3'b010, 10'd1, 4'b0100, 4'b0000, 1'b1);
      check(o_dma1 == e, "DMA instance: output differs from expected");
      check(o_dma1.awprot == 3'b010 && o_dma1.arprot == 3'b010, "AxPROT enforced");
      check(o_dma1.awuser == 10'd1 && o_dma1.aruser == 10'd1, "AxUSER enforced");
      check(o_dma1.awqos == 4'b0100 && o_dma1.arqos == 4'b0100, "AxQOS enforced");
      check(o_dma1.awcache == 4'b0000 && o_dma1.arcache == 4'b0000, "AxCACHE enforced");
      e = expect_of(s, 3'b010, 10'd7, 4'b0000, 4'b0000, 1'b0);
      check(o_vm == e, "VM instance: output differs from expected");
      check(o_vm.awcache == s.awcache && o_vm.arcache == s.arcache, "AxCACHE passed through");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
