// slice_demux - steers each packet to its priority queue.
//
// The queue ID sits in bits 5:1 of the metadata drop field. It is read from
// the first beat of a packet and held until the beat with tlast, so every
// beat of a packet lands in the same queue. Output is registered: `out_wr`
// is a one-hot write strobe (one bit per queue) and `out_beat` the beat,
// both one clock after the input. The demultiplexer always accepts input;
// queues that are full drop packets rather than stall it.
//
// A demultiplexer in front of the queues is part of the slicing scheme; how
// it reads and holds the queue ID, and its register stage, are this
// design's own.
module slice_demux
  import slicing_pkg::*;
#(
  parameter int unsigned NUM_Q = NUM_QUEUES
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  axis_beat_t       in_beat,
  output logic [NUM_Q-1:0] out_wr,
  output axis_beat_t       out_beat
);

  localparam int unsigned QW = (NUM_Q > 1) ? $clog2(NUM_Q) : 1;

  logic          in_pkt;
  logic [QW-1:0] cur_q, sel_q;

  always_comb begin
    logic [7:0] f;
    f     = in_beat.tuser.drop;
    sel_q = in_pkt ? cur_q : f[QW:1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_pkt   <= 1'b0;
      cur_q    <= '0;
      out_wr   <= '0;
      out_beat <= '0;
    end else begin
      out_wr <= '0;
      if (in_valid) begin
        if (32'(sel_q) < NUM_Q) out_wr[sel_q] <= 1'b1;
        out_beat <= in_beat;
        cur_q    <= sel_q;
        in_pkt   <= !in_beat.tlast;
      end
    end
  end

endmodule
