// pkt_queue - one priority queue of the slicing core.
//
// A packet FIFO of DEPTH beats that never back-pressures its writer: this
// is what keeps the slices isolated, since a congested queue cannot stall
// the demultiplexer and with it the other 31 queues. Instead, a packet
// that does not fit is discarded whole (tail drop). Beats are written at a
// tentative write pointer; the committed pointer moves only when the last
// beat of a packet is stored. If the queue fills up part-way through a
// packet, the tentative pointer rolls back to the committed one and the
// rest of the packet is ignored. The reader therefore only ever sees whole
// packets, and a packet that has started can always be read to its end
// without waiting.
//
// The queue size and the whole-packet drop policy are this design's
// choices. Interface: `wr` with `wr_beat` writes a beat; `rd_valid`,
// `rd_beat`, `rd_ready` form a valid/ready read port with the head beat
// shown combinationally. `drop_pulse` is high for one clock after a packet
// is discarded; `occupancy` counts committed beats.
module pkt_queue
  import slicing_pkg::*;
#(
  parameter int unsigned DEPTH = 64,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wr,
  input  axis_beat_t wr_beat,
  output logic       rd_valid,
  output axis_beat_t rd_beat,
  input  logic       rd_ready,
  output logic       drop_pulse,
  output logic [AW:0] occupancy
);

  axis_beat_t  mem [DEPTH];
  logic [AW:0] wr_ptr, commit_ptr, rd_ptr;
  logic        dropping;
  logic        full_tent;

  assign full_tent = ((wr_ptr - rd_ptr) == (AW+1)'(DEPTH));
  assign rd_valid  = (commit_ptr != rd_ptr);
  assign rd_beat   = mem[rd_ptr[AW-1:0]];
  assign occupancy = commit_ptr - rd_ptr;

  logic do_store;
  assign do_store = wr && !dropping && !full_tent;

  always_ff @(posedge clk) begin
    if (do_store) mem[wr_ptr[AW-1:0]] <= wr_beat;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr     <= '0;
      commit_ptr <= '0;
      rd_ptr     <= '0;
      dropping   <= 1'b0;
      drop_pulse <= 1'b0;
    end else begin
      drop_pulse <= 1'b0;
      if (wr) begin
        if (dropping) begin
          if (wr_beat.tlast) dropping <= 1'b0;
        end else if (full_tent) begin
          wr_ptr     <= commit_ptr;
          dropping   <= !wr_beat.tlast;
          drop_pulse <= 1'b1;
        end else begin
          wr_ptr <= wr_ptr + 1'b1;
          if (wr_beat.tlast) commit_ptr <= wr_ptr + 1'b1;
        end
      end
      if (rd_valid && rd_ready) rd_ptr <= rd_ptr + 1'b1;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) (wr_ptr - rd_ptr) <= (AW+1)'(DEPTH))
    else $error("pkt_queue: overflow");

endmodule
