// axi_port_memory_model: behavioural PL-PS port with memory behind it, for the
// testbenches.
//
// Accepts AW/W/AR with random READY (all held low while hold is high), stores
// write beats (which may arrive before their address) and answers writes with
// OKAY and reads with the stored data, in order. On every request it checks
// that AxUSER names one of the N accelerators of the port, that the AXI ID is
// that accelerator's pool ID (pool size 1: ID = AxUSER), that AxPROT and AxQOS
// (and AxCACHE where ENC is set) are the accelerator's enforced values, and
// that the address lies in the accelerator's window (bits AW-1:28 of BASE).
// id_seen[u] holds the last AXI ID seen from accelerator u; n_remap counts
// requests with a non-zero ID, n_stall cycles of back-pressure.
module axi_port_memory_model #(
  parameter int AW = 40,
  parameter int DW = 128,
  parameter int IW = 6,
  parameter int UW = 10,
  parameter int N = 2,
  parameter logic [N-1:0][2:0] PROT = '0,
  parameter logic [N-1:0][3:0] QOS = '0,
  parameter logic [N-1:0][3:0] CACHE = '0,
  parameter logic [N-1:0] ENC = '1,
  parameter logic [N-1:0][AW-1:0] BASE = '0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic hold,
  input  logic [IW-1:0] s_awid, input logic [AW-1:0] s_awaddr, input logic [7:0] s_awlen,
  input  logic [2:0] s_awsize, input logic [1:0] s_awburst, input logic s_awlock,
  input  logic [3:0] s_awcache, input logic [2:0] s_awprot, input logic [3:0] s_awqos,
  input  logic [UW-1:0] s_awuser, input logic s_awvalid, output logic s_awready,
  input  logic [DW-1:0] s_wdata, input logic [DW/8-1:0] s_wstrb, input logic s_wlast,
  input  logic s_wvalid, output logic s_wready,
  output logic [IW-1:0] s_bid, output logic [1:0] s_bresp, output logic s_bvalid, input logic s_bready,
  input  logic [IW-1:0] s_arid, input logic [AW-1:0] s_araddr, input logic [7:0] s_arlen,
  input  logic [2:0] s_arsize, input logic [1:0] s_arburst, input logic s_arlock,
  input  logic [3:0] s_arcache, input logic [2:0] s_arprot, input logic [3:0] s_arqos,
  input  logic [UW-1:0] s_aruser, input logic s_arvalid, output logic s_arready,
  output logic [IW-1:0] s_rid, output logic [DW-1:0] s_rdata, output logic [1:0] s_rresp,
  output logic s_rlast, output logic s_rvalid, input logic s_rready,
  output int checks,
  output int failures,
  output int n_remap,
  output int n_stall,
  output logic [N-1:0][IW-1:0] id_seen
);
  logic [DW-1:0] mem [logic [AW-1:0]];
  logic [AW-1:0] aw_q[$], ar_addr_q[$];
  logic [IW-1:0] awid_q[$], b_id_q[$], ar_id_q[$];
  logic [7:0]    ar_len_q[$];
  logic [DW:0]   pw_q[$];
  int wbeat, r_left, r_beat;
  logic [AW-1:0] r_addr;
  logic [IW-1:0] r_id;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 5) $display("FAIL: %m: %s", what);
    end
  endtask

  task automatic check_req(logic [UW-1:0] user, logic [IW-1:0] id, logic [2:0] prot,
                           logic [3:0] qos, logic [3:0] cache, logic [AW-1:0] addr);
    int u;
    u = int'(user);
    check(u < N, "request AxUSER names an accelerator of the port");
    if (u < N) begin
      check(id == IW'(u), "request AXI ID from the accelerator's pool");
      check(prot == PROT[u] && qos == QOS[u], "enforced AxPROT/AxQOS");
      if (ENC[u]) check(cache == CACHE[u], "enforced AxCACHE");
      check(addr[AW-1:28] == BASE[u][AW-1:28], "address in the accelerator's window");
      id_seen[u] = id;
    end
    if (id != '0) n_remap++;
  endtask

  initial begin
    checks = 0; failures = 0; n_remap = 0; n_stall = 0; id_seen = '0;
    wbeat = 0; r_left = 0; r_beat = 0;
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      s_awready <= 1'b0; s_wready <= 1'b0; s_arready <= 1'b0;
      s_bvalid <= 1'b0; s_rvalid <= 1'b0;
      s_bid <= '0; s_bresp <= '0; s_rid <= '0; s_rdata <= '0; s_rresp <= '0; s_rlast <= 1'b0;
    end else begin
      if (s_awvalid && s_awready) begin
        check_req(s_awuser, s_awid, s_awprot, s_awqos, s_awcache, s_awaddr);
        aw_q.push_back(s_awaddr); awid_q.push_back(s_awid);
      end
      if (s_wvalid && s_wready) pw_q.push_back({s_wlast, s_wdata});
      while (aw_q.size() != 0 && pw_q.size() != 0) begin
        logic [DW:0] bt;
        bt = pw_q.pop_front();
        mem[aw_q[0] + AW'(wbeat)] = bt[DW-1:0];
        wbeat++;
        if (bt[DW]) begin
          void'(aw_q.pop_front());
          b_id_q.push_back(awid_q.pop_front());
          wbeat = 0;
        end
      end
      if (s_arvalid && s_arready) begin
        check_req(s_aruser, s_arid, s_arprot, s_arqos, s_arcache, s_araddr);
        ar_addr_q.push_back(s_araddr); ar_len_q.push_back(s_arlen); ar_id_q.push_back(s_arid);
      end
      if ((s_awvalid && !s_awready) || (s_wvalid && !s_wready) || (s_arvalid && !s_arready))
        n_stall++;
      s_awready <= !hold && $urandom_range(0, 2) != 0;
      s_wready  <= !hold && $urandom_range(0, 2) != 0;
      s_arready <= !hold && $urandom_range(0, 2) != 0;
      if (!s_bvalid || s_bready) begin
        if (b_id_q.size() != 0 && $urandom_range(0, 1) != 0) begin
          s_bvalid <= 1'b1; s_bid <= b_id_q.pop_front(); s_bresp <= 2'b00;
        end else s_bvalid <= 1'b0;
      end
      if (!s_rvalid || s_rready) begin
        if (r_left == 0 && ar_addr_q.size() != 0) begin
          r_addr = ar_addr_q.pop_front(); r_left = int'(ar_len_q.pop_front()) + 1;
          r_id = ar_id_q.pop_front(); r_beat = 0;
        end
        if (r_left != 0 && $urandom_range(0, 3) != 0) begin
          s_rvalid <= 1'b1; s_rid <= r_id; s_rresp <= 2'b00; s_rlast <= (r_left == 1);
          s_rdata <= mem.exists(r_addr + AW'(r_beat)) ? mem[r_addr + AW'(r_beat)] : '0;
          r_left--; r_beat++;
        end else s_rvalid <= 1'b0;
      end
    end
  end
endmodule
