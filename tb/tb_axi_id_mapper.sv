// tb_axi_id_mapper: self-checking testbench of the AXI ID Mapper.
//
// The mapper is configured with three pools of four IDs, selected by AxUSER
// 5, 9 and 2. A driver on the interconnect side issues random write and read
// bursts with random AxUSER (mapped and unmapped) and random IDs (mostly
// inside the pool size, some outside); a model of the PL-PS port on the other
// side accepts with random ready, answers every write with B and every read
// with an R burst. The testbench checks independently of the mapper that:
//   - each forwarded request carries pool_index*4 + original ID and all other
//     fields unchanged, in order;
//   - W beats of forwarded bursts arrive intact and in order, and beats of
//     discarded bursts never appear;
//   - B and R responses come back with the original ID and unchanged payload;
//   - unmapped AxUSER or out-of-pool IDs are never forwarded and set irq;
//   - latency: two cycles for a request through an empty buffer, then one
//     request per cycle;
//   - with the port stalled, the write request path accepts exactly
//     WRITE_REQ_BUF_SIZE+1 requests before dropping AWREADY.
module tb_axi_id_mapper;
  localparam int AW = 32, DW = 128, IW = 6, UW = 10;
  localparam int POOL = 4, NMGR = 3;
  localparam int BUF = 2;
  localparam logic [UW-1:0] MAP0 = 10'd5, MAP1 = 10'd9, MAP2 = 10'd2;

  function automatic axi_iso_pkg::user_map_t tb_map();
    axi_iso_pkg::user_map_t m = '1;
    m[0] = MAP0; m[1] = MAP1; m[2] = MAP2;
    return m;
  endfunction

  typedef struct packed {
    logic [IW-1:0] id; logic [AW-1:0] addr; logic [7:0] len; logic [2:0] size;
    logic [1:0] burst; logic lock; logic [3:0] cache; logic [2:0] prot;
    logic [3:0] qos; logic [UW-1:0] user;
  } ax_t;
  typedef struct packed { logic [DW-1:0] data; logic [DW/8-1:0] strb; logic last; } w_t;
  typedef struct packed { logic [IW-1:0] id; logic [1:0] resp; } b_t;
  typedef struct packed { logic [IW-1:0] id; logic [DW-1:0] data; logic [1:0] resp; logic last; } r_t;

  logic clk = 1'b0, rst_n = 1'b0, irq;
  // subordinate side
  ax_t s_aw, s_ar;
  logic s_awvalid, s_awready, s_arvalid, s_arready;
  w_t s_w; logic s_wvalid, s_wready;
  logic [IW-1:0] s_bid; logic [1:0] s_bresp; logic s_bvalid, s_bready;
  logic [IW-1:0] s_rid; logic [DW-1:0] s_rdata; logic [1:0] s_rresp; logic s_rlast, s_rvalid, s_rready;
  // manager side
  ax_t m_aw, m_ar;
  logic m_awvalid, m_awready, m_arvalid, m_arready;
  logic [DW-1:0] m_wdata; logic [DW/8-1:0] m_wstrb; logic m_wlast, m_wvalid, m_wready;
  logic [IW-1:0] m_bid; logic [1:0] m_bresp; logic m_bvalid, m_bready;
  logic [IW-1:0] m_rid; logic [DW-1:0] m_rdata; logic [1:0] m_rresp; logic m_rlast, m_rvalid, m_rready;

  axi_id_mapper #(
    .AXI_ADDR_WIDTH(AW), .AXI_DATA_WIDTH(DW), .POOL_SIZE(POOL), .NUMBER_OF_MANAGERS(NMGR),
    .AXUSER_MAP(tb_map())
  ) dut (
    .clk, .rst_n, .irq,
    .s_axi_awid(s_aw.id), .s_axi_awaddr(s_aw.addr), .s_axi_awlen(s_aw.len), .s_axi_awsize(s_aw.size),
    .s_axi_awburst(s_aw.burst), .s_axi_awlock(s_aw.lock), .s_axi_awcache(s_aw.cache),
    .s_axi_awprot(s_aw.prot), .s_axi_awqos(s_aw.qos), .s_axi_awuser(s_aw.user),
    .s_axi_awvalid(s_awvalid), .s_axi_awready(s_awready),
    .s_axi_wdata(s_w.data), .s_axi_wstrb(s_w.strb), .s_axi_wlast(s_w.last),
    .s_axi_wvalid(s_wvalid), .s_axi_wready(s_wready),
    .s_axi_bid(s_bid), .s_axi_bresp(s_bresp), .s_axi_bvalid(s_bvalid), .s_axi_bready(s_bready),
    .s_axi_arid(s_ar.id), .s_axi_araddr(s_ar.addr), .s_axi_arlen(s_ar.len), .s_axi_arsize(s_ar.size),
    .s_axi_arburst(s_ar.burst), .s_axi_arlock(s_ar.lock), .s_axi_arcache(s_ar.cache),
    .s_axi_arprot(s_ar.prot), .s_axi_arqos(s_ar.qos), .s_axi_aruser(s_ar.user),
    .s_axi_arvalid(s_arvalid), .s_axi_arready(s_arready),
    .s_axi_rid(s_rid), .s_axi_rdata(s_rdata), .s_axi_rresp(s_rresp), .s_axi_rlast(s_rlast),
    .s_axi_rvalid(s_rvalid), .s_axi_rready(s_rready),
    .m_axi_awid(m_aw.id), .m_axi_awaddr(m_aw.addr), .m_axi_awlen(m_aw.len), .m_axi_awsize(m_aw.size),
    .m_axi_awburst(m_aw.burst), .m_axi_awlock(m_aw.lock), .m_axi_awcache(m_aw.cache),
    .m_axi_awprot(m_aw.prot), .m_axi_awqos(m_aw.qos), .m_axi_awuser(m_aw.user),
    .m_axi_awvalid(m_awvalid), .m_axi_awready(m_awready),
    .m_axi_wdata(m_wdata), .m_axi_wstrb(m_wstrb), .m_axi_wlast(m_wlast),
    .m_axi_wvalid(m_wvalid), .m_axi_wready(m_wready),
    .m_axi_bid(m_bid), .m_axi_bresp(m_bresp), .m_axi_bvalid(m_bvalid), .m_axi_bready(m_bready),
    .m_axi_arid(m_ar.id), .m_axi_araddr(m_ar.addr), .m_axi_arlen(m_ar.len), .m_axi_arsize(m_ar.size),
    .m_axi_arburst(m_ar.burst), .m_axi_arlock(m_ar.lock), .m_axi_arcache(m_ar.cache),
    .m_axi_arprot(m_ar.prot), .m_axi_arqos(m_ar.qos), .m_axi_aruser(m_ar.user),
    .m_axi_arvalid(m_arvalid), .m_axi_arready(m_arready),
    .m_axi_rid(m_rid), .m_axi_rdata(m_rdata), .m_axi_rresp(m_rresp), .m_axi_rlast(m_rlast),
    .m_axi_rvalid(m_rvalid), .m_axi_rready(m_rready)
  );

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

  // ---------------- reference mapping ----------------
  function automatic bit ref_map(logic [UW-1:0] user, logic [IW-1:0] id, output logic [IW-1:0] mid);
    int p;
    p = (user == MAP0) ? 0 : (user == MAP1) ? 1 : (user == MAP2) ? 2 : -1;
    mid = IW'(p * POOL + int'(id));
    return (p >= 0) && (int'(id) < POOL);
  endfunction

  function automatic ax_t rand_ax(bit allow_bad);
    ax_t a;
    int  u = $urandom_range(0, 9);
    a.user  = (u < 3) ? MAP0 : (u < 6) ? MAP1 : (u < 9 || !allow_bad) ? MAP2 : UW'($urandom_range(10, 1023));
    a.id    = (allow_bad && $urandom_range(0, 19) == 0) ? IW'($urandom_range(POOL, 63))
                                                       : IW'($urandom_range(0, POOL - 1));
    a.addr  = $urandom;
    a.len   = 8'($urandom_range(0, 7));
    a.size  = 3'($urandom); a.burst = 2'($urandom); a.lock = 1'($urandom);
    a.cache = 4'($urandom); a.prot = 3'($urandom); a.qos = 4'($urandom);
    return a;
  endfunction

  // ---------------- interconnect-side driver ----------------
  ax_t aw_drv_q[$], ar_drv_q[$];
  w_t  w_drv_q[$];
  ax_t exp_aw_q[$], exp_ar_q[$];
  w_t  exp_w_q[$];
  int  n_dropped = 0, n_mapped_wr = 0, n_mapped_rd = 0, exp_r_beats = 0;
  bit  drv_gaps = 1'b1;

  task automatic queue_write(ax_t a);
    logic [IW-1:0] mid;
    bit ok = ref_map(a.user, a.id, mid);
    aw_drv_q.push_back(a);
    if (ok) begin
      ax_t e = a; e.id = mid;
      exp_aw_q.push_back(e);
      n_mapped_wr++;
    end else n_dropped++;
    for (int b = 0; b <= int'(a.len); b++) begin
      w_t w;
      w.data = {$urandom, $urandom, $urandom, $urandom};
      w.strb = 16'($urandom);
      w.last = (b == int'(a.len));
      w_drv_q.push_back(w);
      if (ok) exp_w_q.push_back(w);
    end
  endtask

  task automatic queue_read(ax_t a);
    logic [IW-1:0] mid;
    bit ok = ref_map(a.user, a.id, mid);
    ar_drv_q.push_back(a);
    if (ok) begin
      ax_t e = a; e.id = mid;
      exp_ar_q.push_back(e);
      n_mapped_rd++;
      exp_r_beats += int'(a.len) + 1;
    end else n_dropped++;
  endtask

  always @(posedge clk) begin
    if (!rst_n) begin
      s_awvalid <= 1'b0; s_wvalid <= 1'b0; s_arvalid <= 1'b0;
    end else begin
      if (!s_awvalid || s_awready) begin
        if (aw_drv_q.size() != 0 && (!drv_gaps || $urandom_range(0, 3) != 0)) begin
          s_aw <= aw_drv_q.pop_front(); s_awvalid <= 1'b1;
        end else s_awvalid <= 1'b0;
      end
      if (!s_wvalid || s_wready) begin
        if (w_drv_q.size() != 0 && (!drv_gaps || $urandom_range(0, 3) != 0)) begin
          s_w <= w_drv_q.pop_front(); s_wvalid <= 1'b1;
        end else s_wvalid <= 1'b0;
      end
      if (!s_arvalid || s_arready) begin
        if (ar_drv_q.size() != 0 && (!drv_gaps || $urandom_range(0, 3) != 0)) begin
          s_ar <= ar_drv_q.pop_front(); s_arvalid <= 1'b1;
        end else s_arvalid <= 1'b0;
      end
    end
  end

  // ---------------- PL-PS port model ----------------
  bit ps_hold = 1'b0;     // stall every request channel of the port
  bit ps_fast = 1'b0;     // always ready
  logic [IW-1:0] ps_aw_ids[$];
  ax_t ps_ar_q[$];
  int  wlast_cnt = 0, r_left = 0;
  logic [IW-1:0] r_cur_id;
  b_t exp_b_q[$];
  r_t exp_r_q[$];
  int n_aw_out = 0, n_ar_out = 0, n_wbeats_out = 0;
  int aw_out_cycle[$];

  always @(posedge clk) begin
    if (!rst_n) begin
      m_awready <= 1'b0; m_wready <= 1'b0; m_arready <= 1'b0;
      m_bvalid <= 1'b0; m_rvalid <= 1'b0;
    end else begin
      // request side
      if (m_awvalid && m_awready) begin
        check(exp_aw_q.size() != 0, "unexpected AW at port");
        if (exp_aw_q.size() != 0) check(m_aw == exp_aw_q.pop_front(), "AW at port: ID mapping/fields");
        ps_aw_ids.push_back(m_aw.id);
        n_aw_out++;
        aw_out_cycle.push_back(cycle);
      end
      if (m_wvalid && m_wready) begin
        check(exp_w_q.size() != 0, "unexpected W beat at port");
        if (exp_w_q.size() != 0) check({m_wdata, m_wstrb, m_wlast} == exp_w_q.pop_front(), "W beat at port");
        if (m_wlast) wlast_cnt++;
        n_wbeats_out++;
      end
      if (m_arvalid && m_arready) begin
        check(exp_ar_q.size() != 0, "unexpected AR at port");
        if (exp_ar_q.size() != 0) check(m_ar == exp_ar_q.pop_front(), "AR at port: ID mapping/fields");
        ps_ar_q.push_back(m_ar);
        n_ar_out++;
      end
      m_awready <= !ps_hold && (ps_fast || $urandom_range(0, 2) != 0);
      m_wready  <= !ps_hold && (ps_fast || $urandom_range(0, 2) != 0);
      m_arready <= !ps_hold && (ps_fast || $urandom_range(0, 2) != 0);
      // write responses: one per completed AW + W burst, in order
      if (!m_bvalid || m_bready) begin
        if (ps_aw_ids.size() != 0 && wlast_cnt > 0 && (ps_fast || $urandom_range(0, 1) != 0)) begin
          logic [IW-1:0] id;
          logic [1:0]    rs;
          id = ps_aw_ids.pop_front();
          rs = 2'($urandom);
          wlast_cnt--;
          m_bvalid <= 1'b1; m_bid <= id; m_bresp <= rs;
          exp_b_q.push_back('{id: IW'(int'(id) % POOL), resp: rs});
        end else m_bvalid <= 1'b0;
      end
      // read data bursts, in order
      if (!m_rvalid || m_rready) begin
        if (r_left == 0 && ps_ar_q.size() != 0) begin
          ax_t a;
          a = ps_ar_q.pop_front();
          r_left = int'(a.len) + 1; r_cur_id = a.id;
        end
        if (r_left != 0 && (ps_fast || $urandom_range(0, 3) != 0)) begin
          logic [DW-1:0] d;
          logic [1:0]    rs;
          d  = {$urandom, $urandom, $urandom, $urandom};
          rs = 2'($urandom);
          m_rvalid <= 1'b1; m_rid <= r_cur_id; m_rdata <= d; m_rresp <= rs; m_rlast <= (r_left == 1);
          exp_r_q.push_back('{id: IW'(int'(r_cur_id) % POOL), data: d, resp: rs, last: (r_left == 1)});
          r_left--;
        end else m_rvalid <= 1'b0;
      end
    end
  end

  // ---------------- interconnect-side response monitor ----------------
  int n_b = 0, n_r = 0;
  int aw_stall = 0, w_stall = 0, ar_stall = 0, b_stall = 0, r_stall = 0;
  bit s_ready_rand = 1'b1;
  always @(posedge clk) begin
    if (!rst_n) begin
      s_bready <= 1'b0; s_rready <= 1'b0;
    end else begin
      if (s_bvalid && s_bready) begin
        check(exp_b_q.size() != 0, "unexpected B");
        if (exp_b_q.size() != 0) check({s_bid, s_bresp} == exp_b_q.pop_front(), "B: original ID restored");
        n_b++;
      end
      if (s_rvalid && s_rready) begin
        check(exp_r_q.size() != 0, "unexpected R");
        if (exp_r_q.size() != 0)
          check({s_rid, s_rdata, s_rresp, s_rlast} == exp_r_q.pop_front(), "R: original ID restored");
        n_r++;
      end
      if (s_awvalid && !s_awready) aw_stall++;
      if (s_wvalid && !s_wready) w_stall++;
      if (s_arvalid && !s_arready) ar_stall++;
      if (m_bvalid && !m_bready) b_stall++;
      if (m_rvalid && !m_rready) r_stall++;
      s_bready <= !s_ready_rand || $urandom_range(0, 2) != 0;
      s_rready <= !s_ready_rand || $urandom_range(0, 2) != 0;
    end
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ax_t a;
    int  n, t0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    check(!irq, "irq low after reset");

    // ---- latency: one request, then a back-to-back stream, port always ready ----
    ps_fast = 1'b1; drv_gaps = 1'b0;
    repeat (2) @(posedge clk);
    a = rand_ax(0); a.len = 0;
    queue_write(a);
    @(posedge clk);           // driver raises AWVALID
    while (!(s_awvalid && s_awready)) @(posedge clk);
    t0 = cycle;
    while (aw_out_cycle.size() == 0) @(posedge clk);
    check(aw_out_cycle[0] - t0 == 2, $sformatf("first request latency %0d, expected 2", aw_out_cycle[0] - t0));
    repeat (10) @(posedge clk);
    aw_out_cycle.delete();
    for (int i = 0; i < 6; i++) begin a = rand_ax(0); a.len = 0; queue_write(a); end
    repeat (20) @(posedge clk);
    check(aw_out_cycle.size() == 6, "six streamed requests forwarded");
    for (int i = 1; i < aw_out_cycle.size(); i++)
      check(aw_out_cycle[i] == aw_out_cycle[i-1] + 1, "one request per cycle after the first");

    // ---- buffer full: port stalls, AWREADY must drop after BUF+1 requests ----
    ps_hold = 1'b1;
    repeat (3) @(posedge clk);
    n = n_aw_out;
    for (int i = 0; i < 6; i++) begin a = rand_ax(0); queue_write(a); end
    repeat (20) @(posedge clk);
    check(aw_drv_q.size() == 6 - (BUF + 1) - 1 || aw_drv_q.size() == 6 - (BUF + 1),
          $sformatf("requests taken while stalled: %0d", 6 - int'(aw_drv_q.size())));
    check(s_awvalid && !s_awready, "AWREADY low while the buffer is full");
    check(n_aw_out == n, "nothing forwarded while the port stalls");
    ps_hold = 1'b0;
    ps_fast = 1'b0; drv_gaps = 1'b1;

    // ---- random traffic with mapped and unmapped requests ----
    for (int i = 0; i < 300; i++) begin
      queue_write(rand_ax(1));
      queue_read(rand_ax(1));
    end
    // wait for everything to drain
    n = 0;
    while ((aw_drv_q.size() != 0 || w_drv_q.size() != 0 || ar_drv_q.size() != 0 ||
            exp_aw_q.size() != 0 || exp_w_q.size() != 0 || exp_ar_q.size() != 0 ||
            exp_b_q.size() != 0 || exp_r_q.size() != 0 || r_left != 0 ||
            ps_ar_q.size() != 0 || ps_aw_ids.size() != 0) && n < 100000) begin
      @(posedge clk); n++;
    end
    repeat (20) @(posedge clk);
    check(exp_aw_q.size() == 0 && exp_w_q.size() == 0 && exp_ar_q.size() == 0, "all forwarded");
    check(exp_b_q.size() == 0 && exp_r_q.size() == 0, "all responses returned");
    check(n_b == n_mapped_wr, $sformatf("B count %0d, expected %0d", n_b, n_mapped_wr));
    check(n_r == exp_r_beats, $sformatf("R beats %0d, expected %0d", n_r, exp_r_beats));
    check(n_dropped > 0 && irq, "unmapped requests raised irq");
    check(aw_stall > 0 && w_stall > 0 && ar_stall > 0 && b_stall > 0 && r_stall > 0,
          "every channel saw back-pressure");
    $display("writes %0d reads %0d dropped %0d, stalls aw %0d w %0d ar %0d b %0d r %0d",
             n_mapped_wr, n_mapped_rd, n_dropped, aw_stall, w_stall, ar_stall, b_stall, r_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
