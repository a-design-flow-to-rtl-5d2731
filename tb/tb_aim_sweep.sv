// tb_aim_sweep: the AXI ID Mapper in every configuration the evaluation of the
// design sweeps, one aim_sweep_point each, all with 40-bit addresses and
// 128-bit data:
//  - read-data buffer of 2, 3, 4, 8, 24 and 48 entries (the sizes tried on the
//    neural-network accelerators' data ports);
//  - write-request buffer of 2, 4, 8, 16, 32 and 64 entries;
//  - 2, 4, 8 and 16 managers with pools of 1, 2, 3 and 4 IDs (2, 8, 24 and 64
//    of the 64 IDs).
// Each point checks ID mapping and restore and the exact capacity of the two
// buffers; the testbench sums their results.
module tb_aim_sweep;
  localparam int N = 16;
  //                               read-data sweep      write-request sweep   managers / pool
  localparam logic [N-1:0][7:0] NMGR   = {8'd16, 8'd8, 8'd4, 8'd2, {12{8'd2}}};
  localparam logic [N-1:0][7:0] POOL   = {8'd4,  8'd3, 8'd2, 8'd1, {12{8'd1}}};
  localparam logic [N-1:0][7:0] WREQ   = {{4{8'd2}}, 8'd64, 8'd32, 8'd16, 8'd8, 8'd4, 8'd2, {6{8'd2}}};
  localparam logic [N-1:0][7:0] RBURST = {{10{8'd2}}, 8'd48, 8'd24, 8'd8, 8'd4, 8'd3, 8'd2};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int pt_checks [N];
  int pt_failures [N];
  logic [N-1:0] pt_done;

  for (genvar i = 0; i < N; i++) begin : g_point
    aim_sweep_point #(
      .NMGR(int'(NMGR[i])), .POOL(int'(POOL[i])), .WREQ(int'(WREQ[i])), .RBURST(int'(RBURST[i])),
      .AW(40), .DW(128)
    ) u_point (
      .clk(clk), .rst_n(rst_n),
      .checks(pt_checks[i]), .failures(pt_failures[i]), .done(pt_done[i])
    );
  end

  int checks = 0;
  int failures = 0;

  initial begin
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;
    wait (&pt_done);
    for (int i = 0; i < N; i++) begin
      checks += pt_checks[i];
      failures += pt_failures[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
