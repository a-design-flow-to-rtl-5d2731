// tb_aim_buffer: self-checking testbench of the mapper's channel buffer.
//
// Checks, at the default depth of 2:
//   - latency: an item accepted into an empty buffer is offered two cycles
//     later, and a back-to-back stream leaves one item per cycle;
//   - capacity: with the consumer stalled, exactly DEPTH+1 items are accepted
//     before in_ready drops;
//   - ordering and integrity under random valid/ready patterns, against a
//     reference queue.
module tb_aim_buffer;
  localparam int unsigned DEPTH = 2;
  typedef logic [7:0] data_t;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  in_valid = 1'b0, in_ready;
  data_t in_data = '0;
  logic  out_valid, out_ready = 1'b0;
  data_t out_data;

  int checks = 0, failures = 0;
  int cycle = 0;

  aim_buffer #(.T(data_t)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", what, cycle);
    end
  endtask

  // reference model of the ordering
  data_t ref_q[$];
  int    popped = 0;
  int    pop_cycle[$];
  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) pop_cycle.push_back(cycle);
    if (in_valid && in_ready) ref_q.push_back(in_data);
    if (out_valid && out_ready) begin
      if (ref_q.size() == 0) check(0, "output with nothing accepted");
      else check(out_data == ref_q.pop_front(), "output order/data");
      popped++;
    end
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, n;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;

    // --- latency of one item through an empty buffer ---
    check(in_ready && !out_valid, "empty after reset");
    in_valid = 1'b1; in_data = 8'hA5; out_ready = 1'b1;
    @(posedge clk); t0 = cycle; #1;
    in_valid = 1'b0;
    while (!out_valid) begin @(posedge clk); #1; end
    check(cycle - t0 == 2, $sformatf("first-item latency %0d, expected 2", cycle - t0));
    check(out_data == 8'hA5, "first item data");
    @(posedge clk); #1;

    // --- back-to-back stream: one item per cycle at the output ---
    pop_cycle.delete();
    t0 = cycle;
    for (int i = 0; i < 8; i++) begin
      in_valid = 1'b1; in_data = data_t'(8'h10 + i);
      @(posedge clk); #1;
    end
    in_valid = 1'b0;
    repeat (4) begin @(posedge clk); #1; end
    // the items come out in 8 consecutive cycles, the first two cycles in
    check(pop_cycle.size() == 8, $sformatf("%0d of 8 stream items out", pop_cycle.size()));
    if (pop_cycle.size() == 8) begin
      check(pop_cycle[0] - t0 == 2, "stream first-item latency 2");
      for (int i = 1; i < 8; i++)
        check(pop_cycle[i] == pop_cycle[i-1] + 1, "one stream item per cycle");
    end

    // --- capacity: consumer stalled ---
    out_ready = 1'b0;
    n = 0;
    for (int i = 0; i < 10; i++) begin
      in_valid = 1'b1; in_data = data_t'(8'h40 + i);
      if (in_ready) n++;
      @(posedge clk); #1;
    end
    in_valid = 1'b0;
    check(n == DEPTH + 1, $sformatf("accepted %0d while stalled, expected %0d", n, DEPTH + 1));
    check(!in_ready, "in_ready low when full");
    check(out_valid && out_data == 8'h40, "head held while stalled");
    out_ready = 1'b1;
    repeat (6) begin @(posedge clk); #1; end
    check(!out_valid && in_ready, "drained");

    // --- random traffic ---
    for (int i = 0; i < 2000; i++) begin
      in_valid  = ($urandom_range(0, 3) != 0);
      in_data   = data_t'($urandom);
      out_ready = ($urandom_range(0, 2) != 0);
      @(posedge clk); #1;
    end
    in_valid = 1'b0; out_ready = 1'b1;
    repeat (8) begin @(posedge clk); #1; end
    check(ref_q.size() == 0, "everything accepted came out");
    check(popped > 1000, "enough random traffic passed");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
