// aim_buffer: one channel buffer of the AXI ID Mapper.
//
// Holds pending AXI channel payloads (requests, write/read data beats or
// write responses) in FIFO order, so that the sender can keep handing over
// transactions while the receiver is not ready. It is built from a capture
// register followed by a DEPTH-entry FIFO:
//   - in_ready is low only when the capture register is occupied and the FIFO
//     is full, i.e. the buffer stalls the sender only once it is full;
//   - a payload accepted on clock edge k is offered on the output from edge
//     k+2 on (two cycles through an empty buffer), and back-to-back payloads
//     follow one per cycle.
// The whole buffer therefore holds up to DEPTH+1 payloads. DEPTH is the
// *_BUF_SIZE parameter of the AIM (2..64, default 2). The two-register
// structure and the exact capacity are this design's choices; the first-item
// latency of two cycles and one cycle per subsequent item match the latency
// reported for the mapper. Payload type T is any packed type.
// Handshakes are standard valid/ready: a transfer happens on a clock edge
// where valid and ready are both high. Synchronous active-low reset.
module aim_buffer #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 2
) (
  input  logic clk,
  input  logic rst_n,
  // producer side
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  // consumer side
  output logic out_valid,
  input  logic out_ready,
  output T     out_data
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CNT_W = $clog2(DEPTH + 1);

  // capture register
  logic stg_valid;
  T     stg_data;

  // FIFO storage
  T                 mem [DEPTH];
  logic [PTR_W-1:0] wr_ptr, rd_ptr;
  logic [CNT_W-1:0] count;

  logic push, pop;

  assign push      = stg_valid && (count < CNT_W'(DEPTH));
  assign out_valid = (count != '0);
  assign out_data  = mem[rd_ptr];
  assign pop       = out_valid && out_ready;
  assign in_ready  = !stg_valid || push;

  function automatic logic [PTR_W-1:0] next_ptr(logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      stg_valid <= 1'b0;
      wr_ptr    <= '0;
      rd_ptr    <= '0;
      count     <= '0;
    end else begin
      if (in_ready) stg_valid <= in_valid;
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      case ({push, pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  // Payload registers are not reset: they are only read when marked valid.
  always_ff @(posedge clk) begin
    if (in_ready && in_valid) stg_data <= in_data;
    if (push) mem[wr_ptr] <= stg_data;
  end

  initial begin
    if (DEPTH < 1) $error("aim_buffer: DEPTH must be at least 1");
  end

  // An offered output payload stays put until it is taken.
  logic stalled_q;
  T     stalled_data_q;
  always_ff @(posedge clk) begin
    stalled_q      <= rst_n && out_valid && !out_ready;
    stalled_data_q <= out_data;
    if (rst_n && stalled_q)
      assert (out_valid && out_data == stalled_data_q)
        else $error("aim_buffer: output payload changed while stalled");
  end

endmodule
