// axi_interconnect_model: behavioural stand-in for the vendor AXI interconnect
// that merges N accelerator ports into one manager port, in its
// single-ordered mode: every request leaves with AXI ID 0, and responses are
// returned to the accelerators in the order their requests were issued.
//
// Not synthesizable design content; it exists so that the isolation chain can
// be simulated end to end. AxUSER and all other request fields pass unchanged,
// as a real interconnect does. The subordinate ports are S_DATA_WIDTH wide and
// the manager port M_DATA_WIDTH wide; data are not width-converted but placed
// in the low lanes (write) and taken from the low lanes (read), which is
// enough for traffic generators that write and read back the same locations.
// Requests are arbitrated round robin, one at a time, through a holding
// register. Route tables are circular buffers of 64 entries.
module axi_interconnect_model #(
  parameter int N = 2,
  parameter int ADDR_W = 32,
  parameter int S_DATA_W = 32,
  parameter int M_DATA_W = 128,
  parameter int ID_W = 6,
  parameter int USER_W = 10
) (
  input  logic clk,
  input  logic rst_n,
  // subordinate ports (from the enforcers)
  input  logic [N-1:0][ID_W-1:0]       s_awid,
  input  logic [N-1:0][ADDR_W-1:0]     s_awaddr,
  input  logic [N-1:0][7:0]            s_awlen,
  input  logic [N-1:0][2:0]            s_awsize,
  input  logic [N-1:0][1:0]            s_awburst,
  input  logic [N-1:0]                 s_awlock,
  input  logic [N-1:0][3:0]            s_awcache,
  input  logic [N-1:0][2:0]            s_awprot,
  input  logic [N-1:0][3:0]            s_awqos,
  input  logic [N-1:0][USER_W-1:0]     s_awuser,
  input  logic [N-1:0]                 s_awvalid,
  output logic [N-1:0]                 s_awready,
  input  logic [N-1:0][S_DATA_W-1:0]   s_wdata,
  input  logic [N-1:0][S_DATA_W/8-1:0] s_wstrb,
  input  logic [N-1:0]                 s_wlast,
  input  logic [N-1:0]                 s_wvalid,
  output logic [N-1:0]                 s_wready,
  output logic [N-1:0][ID_W-1:0]       s_bid,
  output logic [N-1:0][1:0]            s_bresp,
  output logic [N-1:0]                 s_bvalid,
  input  logic [N-1:0]                 s_bready,
  input  logic [N-1:0][ID_W-1:0]       s_arid,
  input  logic [N-1:0][ADDR_W-1:0]     s_araddr,
  input  logic [N-1:0][7:0]            s_arlen,
  input  logic [N-1:0][2:0]            s_arsize,
  input  logic [N-1:0][1:0]            s_arburst,
  input  logic [N-1:0]                 s_arlock,
  input  logic [N-1:0][3:0]            s_arcache,
  input  logic [N-1:0][2:0]            s_arprot,
  input  logic [N-1:0][3:0]            s_arqos,
  input  logic [N-1:0][USER_W-1:0]     s_aruser,
  input  logic [N-1:0]                 s_arvalid,
  output logic [N-1:0]                 s_arready,
  output logic [N-1:0][ID_W-1:0]       s_rid,
  output logic [N-1:0][S_DATA_W-1:0]   s_rdata,
  output logic [N-1:0][1:0]            s_rresp,
  output logic [N-1:0]                 s_rlast,
  output logic [N-1:0]                 s_rvalid,
  input  logic [N-1:0]                 s_rready,
  // manager port (to the ID mapper)
  output logic [ID_W-1:0]       m_awid,
  output logic [ADDR_W-1:0]     m_awaddr,
  output logic [7:0]            m_awlen,
  output logic [2:0]            m_awsize,
  output logic [1:0]            m_awburst,
  output logic                  m_awlock,
  output logic [3:0]            m_awcache,
  output logic [2:0]            m_awprot,
  output logic [3:0]            m_awqos,
  output logic [USER_W-1:0]     m_awuser,
  output logic                  m_awvalid,
  input  logic                  m_awready,
  output logic [M_DATA_W-1:0]   m_wdata,
  output logic [M_DATA_W/8-1:0] m_wstrb,
  output logic                  m_wlast,
  output logic                  m_wvalid,
  input  logic                  m_wready,
  input  logic [ID_W-1:0]       m_bid,
  input  logic [1:0]            m_bresp,
  input  logic                  m_bvalid,
  output logic                  m_bready,
  output logic [ID_W-1:0]       m_arid,
  output logic [ADDR_W-1:0]     m_araddr,
  output logic [7:0]            m_arlen,
  output logic [2:0]            m_arsize,
  output logic [1:0]            m_arburst,
  output logic                  m_arlock,
  output logic [3:0]            m_arcache,
  output logic [2:0]            m_arprot,
  output logic [3:0]            m_arqos,
  output logic [USER_W-1:0]     m_aruser,
  output logic                  m_arvalid,
  input  logic                  m_arready,
  input  logic [ID_W-1:0]       m_rid,
  input  logic [M_DATA_W-1:0]   m_rdata,
  input  logic [1:0]            m_rresp,
  input  logic                  m_rlast,
  input  logic                  m_rvalid,
  output logic                  m_rready
);
  localparam int RT = 64;
  typedef logic [$clog2(N > 1 ? N : 2)-1:0] src_t;

  // route tables: source and original ID of each issued request, in order
  src_t          w_src [RT], b_src [RT], r_src [RT];
  logic [ID_W-1:0] b_oid [RT], r_oid [RT];
  int w_wp, w_rp, b_wp, b_rp, r_wp, r_rp;

  // ---------------- request arbitration ----------------
  logic aw_busy, ar_busy;
  src_t aw_rr, ar_rr, aw_sel, ar_sel;
  logic aw_any, ar_any;

  always_comb begin
    aw_any = 1'b0; aw_sel = '0;
    for (int k = 0; k < N; k++) begin
      int j;
      j = (int'(aw_rr) + k) % N;
      if (!aw_any && s_awvalid[j]) begin aw_any = 1'b1; aw_sel = src_t'(j); end
    end
    ar_any = 1'b0; ar_sel = '0;
    for (int k = 0; k < N; k++) begin
      int j;
      j = (int'(ar_rr) + k) % N;
      if (!ar_any && s_arvalid[j]) begin ar_any = 1'b1; ar_sel = src_t'(j); end
    end
    s_awready = '0; s_arready = '0;
    if (!aw_busy && aw_any) s_awready[aw_sel] = 1'b1;
    if (!ar_busy && ar_any) s_arready[ar_sel] = 1'b1;
  end

  assign m_awvalid = aw_busy;
  assign m_arvalid = ar_busy;
  assign m_awid = '0;   // single-ordered mode
  assign m_arid = '0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      aw_busy <= 1'b0; ar_busy <= 1'b0; aw_rr <= '0; ar_rr <= '0;
      w_wp <= 0; b_wp <= 0; r_wp <= 0;
    end else begin
      if (m_awvalid && m_awready) aw_busy <= 1'b0;
      if (!aw_busy && aw_any) begin
        aw_busy  <= 1'b1;
        aw_rr    <= src_t'((int'(aw_sel) + 1) % N);
        m_awaddr <= s_awaddr[aw_sel]; m_awlen <= s_awlen[aw_sel]; m_awsize <= s_awsize[aw_sel];
        m_awburst <= s_awburst[aw_sel]; m_awlock <= s_awlock[aw_sel]; m_awcache <= s_awcache[aw_sel];
        m_awprot <= s_awprot[aw_sel]; m_awqos <= s_awqos[aw_sel]; m_awuser <= s_awuser[aw_sel];
        w_src[w_wp % RT] <= aw_sel; w_wp <= w_wp + 1;
        b_src[b_wp % RT] <= aw_sel; b_oid[b_wp % RT] <= s_awid[aw_sel]; b_wp <= b_wp + 1;
      end
      if (m_arvalid && m_arready) ar_busy <= 1'b0;
      if (!ar_busy && ar_any) begin
        ar_busy  <= 1'b1;
        ar_rr    <= src_t'((int'(ar_sel) + 1) % N);
        m_araddr <= s_araddr[ar_sel]; m_arlen <= s_arlen[ar_sel]; m_arsize <= s_arsize[ar_sel];
        m_arburst <= s_arburst[ar_sel]; m_arlock <= s_arlock[ar_sel]; m_arcache <= s_arcache[ar_sel];
        m_arprot <= s_arprot[ar_sel]; m_arqos <= s_arqos[ar_sel]; m_aruser <= s_aruser[ar_sel];
        r_src[r_wp % RT] <= ar_sel; r_oid[r_wp % RT] <= s_arid[ar_sel]; r_wp <= r_wp + 1;
      end
    end
  end

  // ---------------- write data, write response, read data routing ----------------
  logic w_have, b_have, r_have;
  src_t w_cur, b_cur, r_cur;
  assign w_have = (w_rp != w_wp);
  assign b_have = (b_rp != b_wp);
  assign r_have = (r_rp != r_wp);
  assign w_cur  = w_src[w_rp % RT];
  assign b_cur  = b_src[b_rp % RT];
  assign r_cur  = r_src[r_rp % RT];

  always_comb begin
    m_wvalid = w_have && s_wvalid[w_cur];
    m_wdata  = M_DATA_W'(s_wdata[w_cur]);
    m_wstrb  = (M_DATA_W/8)'(s_wstrb[w_cur]);
    m_wlast  = s_wlast[w_cur];
    s_wready = '0;
    if (w_have) s_wready[w_cur] = m_wready;

    s_bvalid = '0; s_bid = '0; s_bresp = '0;
    m_bready = b_have && s_bready[b_cur];
    if (b_have) begin
      s_bvalid[b_cur] = m_bvalid;
      s_bid[b_cur]    = b_oid[b_rp % RT];
      s_bresp[b_cur]  = m_bresp;
    end

    s_rvalid = '0; s_rid = '0; s_rdata = '0; s_rresp = '0; s_rlast = '0;
    m_rready = r_have && s_rready[r_cur];
    if (r_have) begin
      s_rvalid[r_cur] = m_rvalid;
      s_rid[r_cur]    = r_oid[r_rp % RT];
      s_rdata[r_cur]  = m_rdata[S_DATA_W-1:0];
      s_rresp[r_cur]  = m_rresp;
      s_rlast[r_cur]  = m_rlast;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      w_rp <= 0; b_rp <= 0; r_rp <= 0;
    end else begin
      if (m_wvalid && m_wready && m_wlast) w_rp <= w_rp + 1;
      if (m_bvalid && m_bready) b_rp <= b_rp + 1;
      if (m_rvalid && m_rready && m_rlast) r_rp <= r_rp + 1;
    end
  end

endmodule
