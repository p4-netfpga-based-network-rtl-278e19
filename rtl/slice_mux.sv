// slice_mux - strict-priority multiplexer of the slicing core.
//
// Queue NUM_Q-1 has the highest priority and queue 0 the lowest. Whenever
// no packet is in progress, the multiplexer picks the highest-numbered
// queue that holds a packet; a lower queue is served only while every
// higher one is empty. The chosen packet is then sent to its end before
// priorities are looked at again (non-preemptive; this choice is the
// design's own, since interrupting a packet on a shared stream is not
// possible without re-assembly).
//
// The queue heads and the output form valid/ready handshakes; the path from
// q_valid to out_valid and from out_ready to q_ready is combinational, so a
// packet can start in the same clock its queue becomes the winner.
module slice_mux
  import slicing_pkg::*;
#(
  parameter int unsigned NUM_Q = NUM_QUEUES
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NUM_Q-1:0] q_valid,
  input  axis_beat_t       q_beat [NUM_Q],
  output logic [NUM_Q-1:0] q_ready,
  output logic             out_valid,
  output axis_beat_t       out_beat,
  input  logic             out_ready
);

  localparam int unsigned QW = (NUM_Q > 1) ? $clog2(NUM_Q) : 1;

  logic          locked;
  logic [QW-1:0] cur, pick, sel;
  logic          any_valid;

  always_comb begin
    pick      = '0;
    any_valid = 1'b0;
    for (int i = 0; i < NUM_Q; i++) begin
      if (q_valid[i]) begin
        pick      = QW'(i);
        any_valid = 1'b1;
      end
    end
  end

  assign sel       = locked ? cur : pick;
  assign out_valid = locked ? q_valid[sel] : any_valid;
  assign out_beat  = q_beat[sel];

  always_comb begin
    q_ready = '0;
    q_ready[sel] = out_valid && out_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked <= 1'b0;
      cur    <= '0;
    end else if (out_valid && out_ready) begin
      locked <= !out_beat.tlast;
      cur    <= sel;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) locked |-> q_valid[cur])
    else $error("slice_mux: queue ran dry inside a packet");

endmodule
