// axi_id_mapper: AXI ID Mapper (AIM), placed between the manager port of the
// interconnect that merges several accelerators and one PL-PS port.
//
// The processing system builds each transaction's Stream ID from the port and
// the AXI ID, and the interconnect hands out AXI IDs without regard to which
// accelerator issued a request. The AIM makes the AXI ID, and thus the Stream
// ID, identify the accelerator again. It owns NUMBER_OF_MANAGERS pools of
// POOL_SIZE consecutive IDs: pool i holds i*POOL_SIZE .. (i+1)*POOL_SIZE-1 and
// is selected by requests whose AxUSER equals AXUSER_MAP[i] (set upstream by an
// AXI Enforcer). How it works:
//   - AW/AR: the first pool whose AXUSER_MAP entry equals AxUSER is selected
//     and the outgoing ID is pool_base + incoming ID. The incoming ID must be
//     below POOL_SIZE (POOL_SIZE is sized to the number of ID threads the
//     interconnect generates).
//   - B/R: the incoming ID belongs to exactly one pool; the ID handed back to
//     the interconnect is the offset inside that pool (ID mod POOL_SIZE), i.e.
//     the original value.
//   - Each of the five channels has its own FIFO (aim_buffer) of
//     *_BUF_SIZE entries; the AIM keeps accepting while the far side is not
//     ready and drops its xREADY only when the buffer is full. Latency is two
//     cycles for the first item through an empty buffer and one cycle for each
//     back-to-back item after it.
//   - Configuration error: a request whose AxUSER matches no pool, or whose ID
//     is not below POOL_SIZE, sets the sticky irq output (cleared by reset).
//     The request is accepted but not forwarded, so it can reach no Stream ID;
//     for a write, the W beats of that burst are discarded as well. No
//     response is produced for a discarded request.
// Parameters follow the AIM configuration set (address/data width, pool size,
// number of managers, AxUSER map, five buffer sizes); defaults are those of
// the two-DMA reference design: 32-bit address, 128-bit data, two managers,
// pool size 1, AxUSER map {0, 1}, every buffer 2. The error-handling policy
// (discard, sticky irq), the response-ID rule (mod POOL_SIZE) and the W-beat
// bookkeeping are this design's own choices.
// Interface: AXI4 subordinate (s_axi_*, from the interconnect) and AXI4
// manager (m_axi_*, to the PL-PS port), without REGION and without W/B/R user
// signals; AxUSER is forwarded unchanged. Synchronous active-low reset.
module axi_id_mapper #(
  parameter int unsigned AXI_ADDR_WIDTH       = 32,
  parameter int unsigned AXI_DATA_WIDTH       = 128,
  parameter int unsigned AXI_ID_WIDTH         = axi_iso_pkg::AXI_ID_WIDTH,
  parameter int unsigned AXI_USER_WIDTH       = axi_iso_pkg::AXI_USER_WIDTH,
  parameter int unsigned POOL_SIZE            = 1,
  parameter int unsigned NUMBER_OF_MANAGERS   = 2,
  parameter axi_iso_pkg::user_map_t AXUSER_MAP = axi_iso_pkg::identity_user_map(),
  parameter int unsigned WRITE_REQ_BUF_SIZE   = 2,
  parameter int unsigned WRITE_BURST_BUF_SIZE = 2,
  parameter int unsigned WRITE_RSP_BUF_SIZE   = 2,
  parameter int unsigned READ_REQ_BUF_SIZE    = 2,
  parameter int unsigned READ_BURST_BUF_SIZE  = 2
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // configuration-error interrupt (sticky until reset)
  output logic                        irq,
  // ---- subordinate side: from the interconnect ----
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
  // ---- manager side: to the PL-PS port ----
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

  // ------------------------------------------------------------------
  // Elaboration checks: all pools must fit in the AXI ID space.
  // ------------------------------------------------------------------
  if (POOL_SIZE < 1 || NUMBER_OF_MANAGERS < 1 ||
      NUMBER_OF_MANAGERS > axi_iso_pkg::MAX_MANAGERS) begin : g_bad_range
    $error("axi_id_mapper: POOL_SIZE and NUMBER_OF_MANAGERS must be in 1..64");
  end
  if (NUMBER_OF_MANAGERS * POOL_SIZE > (1 << AXI_ID_WIDTH)) begin : g_bad_pools
    $error("axi_id_mapper: NUMBER_OF_MANAGERS * POOL_SIZE exceeds the AXI ID space");
  end

  // ------------------------------------------------------------------
  // Channel payload types
  // ------------------------------------------------------------------
  typedef struct packed {
    logic [AXI_ID_WIDTH-1:0]   id;
    logic [AXI_ADDR_WIDTH-1:0] addr;
    logic [7:0]                len;
    logic [2:0]                size;
    logic [1:0]                burst;
    logic                      lock;
    logic [3:0]                cache;
    logic [2:0]                prot;
    logic [3:0]                qos;
    logic [AXI_USER_WIDTH-1:0] user;
  } ax_t;

  typedef struct packed {
    logic [AXI_DATA_WIDTH-1:0]   data;
    logic [AXI_DATA_WIDTH/8-1:0] strb;
    logic                        last;
  } w_t;

  typedef struct packed {
    logic [AXI_ID_WIDTH-1:0] id;
    logic [1:0]              resp;
  } b_t;

  typedef struct packed {
    logic [AXI_ID_WIDTH-1:0]   id;
    logic [AXI_DATA_WIDTH-1:0] data;
    logic [1:0]                resp;
    logic                      last;
  } r_t;

  typedef struct packed {
    logic                    ok;
    logic [AXI_ID_WIDTH-1:0] id;
  } map_t;

  // ------------------------------------------------------------------
  // ID mapping
  // ------------------------------------------------------------------
  // Request: pool selected by AxUSER; new ID = pool base + incoming ID.
  function automatic map_t map_request(logic [AXI_USER_WIDTH-1:0] user,
                                       logic [AXI_ID_WIDTH-1:0]   id);
    map_t r;
    r.ok = 1'b0;
    r.id = '0;
    for (int i = NUMBER_OF_MANAGERS - 1; i >= 0; i--) begin
      if (AXUSER_MAP[i] == user) begin
        r.ok = 1'b1;
        r.id = AXI_ID_WIDTH'(i * POOL_SIZE);
      end
    end
    if (32'(id) >= POOL_SIZE) r.ok = 1'b0;
    r.id = r.id + id;
    return r;
  endfunction

  // Response: back to the offset inside the pool.
  function automatic logic [AXI_ID_WIDTH-1:0] restore_id(logic [AXI_ID_WIDTH-1:0] id);
    return AXI_ID_WIDTH'(32'(id) % POOL_SIZE);
  endfunction

  // ------------------------------------------------------------------
  // Write address channel (+ drop flags for the W channel)
  // ------------------------------------------------------------------
  map_t aw_map;
  ax_t  aw_in, aw_out;
  logic aw_buf_ready, aw_buf_valid;
  logic wflag_in_ready, wflag_out_valid, wflag_out_ready, wflag_drop;
  logic aw_accept;

  assign aw_map = map_request(s_axi_awuser, s_axi_awid);

  always_comb begin
    aw_in       = '{id: aw_map.id, addr: s_axi_awaddr, len: s_axi_awlen,
                    size: s_axi_awsize, burst: s_axi_awburst, lock: s_axi_awlock,
                    cache: s_axi_awcache, prot: s_axi_awprot, qos: s_axi_awqos,
                    user: s_axi_awuser};
  end

  // A request is taken when its drop flag can be queued and, if it is to be
  // forwarded, when the request buffer has room.
  assign s_axi_awready = wflag_in_ready && (aw_buf_ready || !aw_map.ok);
  assign aw_accept     = s_axi_awvalid && s_axi_awready;

  aim_buffer #(.T(ax_t), .DEPTH(WRITE_REQ_BUF_SIZE)) u_aw_buf (
    .clk, .rst_n,
    .in_valid (s_axi_awvalid && wflag_in_ready && aw_map.ok),
    .in_ready (aw_buf_ready),
    .in_data  (aw_in),
    .out_valid(aw_buf_valid),
    .out_ready(m_axi_awready),
    .out_data (aw_out)
  );

  // One flag per accepted AW, in order: 1 = discard the matching W burst.
  aim_buffer #(.T(logic), .DEPTH(WRITE_REQ_BUF_SIZE)) u_wflag_buf (
    .clk, .rst_n,
    .in_valid (s_axi_awvalid && (aw_buf_ready || !aw_map.ok)),
    .in_ready (wflag_in_ready),
    .in_data  (!aw_map.ok),
    .out_valid(wflag_out_valid),
    .out_ready(wflag_out_ready),
    .out_data (wflag_drop)
  );

  assign m_axi_awvalid = aw_buf_valid;
  assign m_axi_awid    = aw_out.id;
  assign m_axi_awaddr  = aw_out.addr;
  assign m_axi_awlen   = aw_out.len;
  assign m_axi_awsize  = aw_out.size;
  assign m_axi_awburst = aw_out.burst;
  assign m_axi_awlock  = aw_out.lock;
  assign m_axi_awcache = aw_out.cache;
  assign m_axi_awprot  = aw_out.prot;
  assign m_axi_awqos   = aw_out.qos;
  assign m_axi_awuser  = aw_out.user;

  // ------------------------------------------------------------------
  // Write data channel
  // ------------------------------------------------------------------
  w_t   w_out;
  logic w_buf_valid, w_buf_ready;

  aim_buffer #(.T(w_t), .DEPTH(WRITE_BURST_BUF_SIZE)) u_w_buf (
    .clk, .rst_n,
    .in_valid (s_axi_wvalid),
    .in_ready (s_axi_wready),
    .in_data  ('{data: s_axi_wdata, strb: s_axi_wstrb, last: s_axi_wlast}),
    .out_valid(w_buf_valid),
    .out_ready(w_buf_ready),
    .out_data (w_out)
  );

  // A beat leaves only once the AW it belongs to is known; beats of a
  // discarded burst are consumed without being forwarded.
  assign m_axi_wvalid    = w_buf_valid && wflag_out_valid && !wflag_drop;
  assign w_buf_ready     = wflag_out_valid && (wflag_drop || m_axi_wready);
  assign wflag_out_ready = w_buf_valid && w_buf_ready && w_out.last;
  assign m_axi_wdata     = w_out.data;
  assign m_axi_wstrb     = w_out.strb;
  assign m_axi_wlast     = w_out.last;

  // ------------------------------------------------------------------
  // Write response channel: ID restored
  // ------------------------------------------------------------------
  b_t b_out;

  aim_buffer #(.T(b_t), .DEPTH(WRITE_RSP_BUF_SIZE)) u_b_buf (
    .clk, .rst_n,
    .in_valid (m_axi_bvalid),
    .in_ready (m_axi_bready),
    .in_data  ('{id: restore_id(m_axi_bid), resp: m_axi_bresp}),
    .out_valid(s_axi_bvalid),
    .out_ready(s_axi_bready),
    .out_data (b_out)
  );

  assign s_axi_bid   = b_out.id;
  assign s_axi_bresp = b_out.resp;

  // ------------------------------------------------------------------
  // Read address channel
  // ------------------------------------------------------------------
  map_t ar_map;
  ax_t  ar_in, ar_out;
  logic ar_buf_ready, ar_accept;

  assign ar_map = map_request(s_axi_aruser, s_axi_arid);

  always_comb begin
    ar_in       = '{id: ar_map.id, addr: s_axi_araddr, len: s_axi_arlen,
                    size: s_axi_arsize, burst: s_axi_arburst, lock: s_axi_arlock,
                    cache: s_axi_arcache, prot: s_axi_arprot, qos: s_axi_arqos,
                    user: s_axi_aruser};
  end

  assign s_axi_arready = ar_buf_ready || !ar_map.ok;
  assign ar_accept     = s_axi_arvalid && s_axi_arready;

  aim_buffer #(.T(ax_t), .DEPTH(READ_REQ_BUF_SIZE)) u_ar_buf (
    .clk, .rst_n,
    .in_valid (s_axi_arvalid && ar_map.ok),
    .in_ready (ar_buf_ready),
    .in_data  (ar_in),
    .out_valid(m_axi_arvalid),
    .out_ready(m_axi_arready),
    .out_data (ar_out)
  );

  assign m_axi_arid    = ar_out.id;
  assign m_axi_araddr  = ar_out.addr;
  assign m_axi_arlen   = ar_out.len;
  assign m_axi_arsize  = ar_out.size;
  assign m_axi_arburst = ar_out.burst;
  assign m_axi_arlock  = ar_out.lock;
  assign m_axi_arcache = ar_out.cache;
  assign m_axi_arprot  = ar_out.prot;
  assign m_axi_arqos   = ar_out.qos;
  assign m_axi_aruser  = ar_out.user;

  // ------------------------------------------------------------------
  // Read data channel: ID restored
  // ------------------------------------------------------------------
  r_t r_out;

  aim_buffer #(.T(r_t), .DEPTH(READ_BURST_BUF_SIZE)) u_r_buf (
    .clk, .rst_n,
    .in_valid (m_axi_rvalid),
    .in_ready (m_axi_rready),
    .in_data  ('{id: restore_id(m_axi_rid), data: m_axi_rdata, resp: m_axi_rresp,
                 last: m_axi_rlast}),
    .out_valid(s_axi_rvalid),
    .out_ready(s_axi_rready),
    .out_data (r_out)
  );

  assign s_axi_rid   = r_out.id;
  assign s_axi_rdata = r_out.data;
  assign s_axi_rresp = r_out.resp;
  assign s_axi_rlast = r_out.last;

  // ------------------------------------------------------------------
  // Configuration-error interrupt
  // ------------------------------------------------------------------
  always_ff @(posedge clk) begin
    if (!rst_n)
      irq <= 1'b0;
    else if ((aw_accept && !aw_map.ok) || (ar_accept && !ar_map.ok))
      irq <= 1'b1;
  end

  // Every ID leaving towards the port lies inside the pool space.
  always_ff @(posedge clk) begin
    if (rst_n && m_axi_awvalid)
      assert (32'(m_axi_awid) < NUMBER_OF_MANAGERS * POOL_SIZE)
        else $error("axi_id_mapper: AWID outside the pools");
    if (rst_n && m_axi_arvalid)
      assert (32'(m_axi_arid) < NUMBER_OF_MANAGERS * POOL_SIZE)
        else $error("axi_id_mapper: ARID outside the pools");
  end

endmodule
