// deparser - rejoins each packet with its slice decision.
//
// Packets enter here at the same time as the parser sees them, so they wait
// in a packet FIFO while the parser and the match/action stage work out the
// decision. Decisions arrive one per packet, in packet order, and wait in a
// small decision FIFO. When both a packet and its decision are present, the
// packet is re-emitted beat by beat with the decision written into the
// metadata drop field of every beat; a packet whose decision has the drop
// bit set is read out and discarded instead. Headers are not rewritten.
//
// Flow control: in_ready is low when the packet FIFO is full or when the
// decision FIFO could not take the decisions still in flight (the parser and
// match stage hold up to IN_FLIGHT of them). out_valid/out_ready is a
// standard valid/ready handshake.
//
// What the deparser does (rebuild the packet, carry the decision to the
// slicing core, honour the drop field) follows the slicing scheme; the
// FIFO-based structure and depths are this design's own.
module deparser
  import slicing_pkg::*;
#(
  parameter int unsigned PKT_DEPTH  = 64,
  parameter int unsigned META_DEPTH = 16,
  parameter int unsigned IN_FLIGHT  = 3
) (
  input  logic       clk,
  input  logic       rst_n,
  // packets, as seen by the parser
  input  logic       in_valid,
  input  axis_beat_t in_beat,
  output logic       in_ready,
  // decisions from the match/action stage
  input  logic       dec_valid,
  input  logic [7:0] dec_drop_field,
  // rebuilt packets
  output logic       out_valid,
  output axis_beat_t out_beat,
  input  logic       out_ready,
  // one-cycle pulse when a packet is discarded by its decision
  output logic       drop_pulse
);

  localparam int unsigned PAW = $clog2(PKT_DEPTH);
  localparam int unsigned MAW = $clog2(META_DEPTH);

  axis_beat_t  pkt_head;
  logic        pkt_full, pkt_empty, pkt_pop;
  logic [PAW:0] pkt_count;
  logic [7:0]  meta_head;
  logic        meta_full, meta_empty, meta_pop;
  logic [MAW:0] meta_count;
  logic        meta_room;

  assign meta_room = (32'(meta_count) + IN_FLIGHT + 1) <= META_DEPTH;
  assign in_ready  = !pkt_full && meta_room;

  sync_fifo #(.WIDTH($bits(axis_beat_t)), .DEPTH(PKT_DEPTH)) u_pkt_fifo (
    .clk, .rst_n,
    .push (in_valid && in_ready),
    .din  (in_beat),
    .pop  (pkt_pop),
    .dout (pkt_head),
    .full (pkt_full),
    .empty(pkt_empty),
    .count(pkt_count)
  );

  sync_fifo #(.WIDTH(8), .DEPTH(META_DEPTH)) u_meta_fifo (
    .clk, .rst_n,
    .push (dec_valid),
    .din  (dec_drop_field),
    .pop  (meta_pop),
    .dout (meta_head),
    .full (meta_full),
    .empty(meta_empty),
    .count(meta_count)
  );

  logic ready_pair, discard;
  assign ready_pair = !pkt_empty && !meta_empty;
  assign discard    = drop_field_drop(meta_head);

  always_comb begin
    out_beat            = pkt_head;
    out_beat.tuser.drop = meta_head;
    out_valid           = ready_pair && !discard;
    pkt_pop             = ready_pair && (discard || out_ready);
    meta_pop            = pkt_pop && pkt_head.tlast;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) drop_pulse <= 1'b0;
    else        drop_pulse <= meta_pop && discard;
  end

  assert property (@(posedge clk) disable iff (!rst_n) dec_valid |-> !meta_full)
    else $error("deparser: decision FIFO overflow");
  assert property (@(posedge clk) disable iff (!rst_n) out_valid && !out_ready |=> out_valid && $stable(out_beat))
    else $error("deparser: output changed while stalled");

endmodule
