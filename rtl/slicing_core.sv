// slicing_core - the network slicing core: 32 isolated priority queues.
//
// Packets arrive already tagged with a queue ID (bits 5:1 of the metadata
// drop field). The demultiplexer writes each packet into its queue, every
// queue buffers and, when full, tail-drops only its own traffic, and the
// strict-priority multiplexer drains the queues, highest number first.
// Slices mapped to different queues therefore cannot take buffer space from
// each other, and a slice's latency depends only on the traffic of equal or
// higher priority.
//
// Interface: the input is always accepted (in_valid/in_beat, no ready);
// the output is a valid/ready stream. q_drop has one drop pulse per queue,
// q_occupancy the committed beats of each queue. Latency from an idle core:
// the demultiplexer register, then the packet waits in its queue until its
// last beat is stored, then leaves in the same clock it wins arbitration.
//
// The 32 queues, their numbering and strict priority follow the slicing
// scheme; the queue size and whole-packet tail drop are this design's own.
module slicing_core
  import slicing_pkg::*;
#(
  parameter int unsigned NUM_Q       = NUM_QUEUES,
  parameter int unsigned QUEUE_DEPTH = 64,
  localparam int unsigned QAW        = $clog2(QUEUE_DEPTH)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  axis_beat_t               in_beat,
  output logic                     out_valid,
  output axis_beat_t               out_beat,
  input  logic                     out_ready,
  output logic [NUM_Q-1:0]         q_drop,
  output logic [NUM_Q-1:0][QAW:0]  q_occupancy
);

  logic [NUM_Q-1:0] wr;
  axis_beat_t       wr_beat;
  logic [NUM_Q-1:0] q_valid, q_ready;
  axis_beat_t       q_beat [NUM_Q];

  slice_demux #(.NUM_Q(NUM_Q)) u_demux (
    .clk, .rst_n,
    .in_valid,
    .in_beat,
    .out_wr  (wr),
    .out_beat(wr_beat)
  );

  for (genvar q = 0; q < NUM_Q; q++) begin : g_queue
    pkt_queue #(.DEPTH(QUEUE_DEPTH)) u_queue (
      .clk, .rst_n,
      .wr        (wr[q]),
      .wr_beat   (wr_beat),
      .rd_valid  (q_valid[q]),
      .rd_beat   (q_beat[q]),
      .rd_ready  (q_ready[q]),
      .drop_pulse(q_drop[q]),
      .occupancy (q_occupancy[q])
    );
  end

  slice_mux #(.NUM_Q(NUM_Q)) u_mux (
    .clk, .rst_n,
    .q_valid,
    .q_beat,
    .q_ready,
    .out_valid,
    .out_beat,
    .out_ready
  );

endmodule
