// slicing_pkg - types and constants shared by the 5G network slicing pipeline.
//
// The pipeline carries packets as AXI4-Stream beats. A beat is 256 data bits
// with one tkeep bit per byte and a 128-bit tuser that holds the per-packet
// metadata record (sume_metadata_t). Byte 0 of a packet travels in tdata[7:0].
// Bus widths and the metadata layout follow the NetFPGA-SUME platform the
// design plugs into; they are not fixed by the slicing scheme itself.
//
// The slice decision travels in the 8-bit `drop` field of the metadata:
// bit 0 asks for the packet to be discarded, bits 5:1 name one of the 32
// priority queues (31 = highest priority). The split of that byte into a
// queue field and a drop flag is the design's own; its bit positions are a
// choice of this implementation.
//
// A slice is identified by a 6-tuple taken from the user traffic carried
// inside the GTP-U tunnel: inner source/destination IPv4 address, inner
// source/destination port, inner DSCP and the GTP tunnel endpoint ID.
package slicing_pkg;

  localparam int unsigned DATA_W     = 256;
  localparam int unsigned KEEP_W     = DATA_W / 8;
  localparam int unsigned USER_W     = 128;
  localparam int unsigned NUM_QUEUES = 32;
  localparam int unsigned QID_W      = $clog2(NUM_QUEUES);

  // GTP-U user-plane port and G-PDU message type (3GPP TS 29.281).
  localparam logic [15:0] GTPU_PORT   = 16'd2152;
  localparam logic [7:0]  GTP_MSG_GPDU = 8'hFF;
  localparam logic [15:0] ETH_IPV4    = 16'h0800;
  localparam logic [7:0]  IP_PROTO_TCP = 8'd6;
  localparam logic [7:0]  IP_PROTO_UDP = 8'd17;

  typedef logic [QID_W-1:0] qid_t;

  // Per-packet metadata carried in tuser (NetFPGA-SUME layout, MSB first).
  typedef struct packed {
    logic [15:0] dma_q_size;
    logic [15:0] nf3_q_size;
    logic [15:0] nf2_q_size;
    logic [15:0] nf1_q_size;
    logic [15:0] nf0_q_size;
    logic [7:0]  send_dig_to_cpu;
    logic [7:0]  drop;            // slice decision: {2'b0, queue[4:0], drop}
    logic [7:0]  dst_port;
    logic [7:0]  src_port;
    logic [15:0] pkt_len;
  } sume_metadata_t;

  // One AXI4-Stream beat (valid/ready travel beside it).
  typedef struct packed {
    logic [DATA_W-1:0] tdata;
    logic [KEEP_W-1:0] tkeep;
    sume_metadata_t    tuser;
    logic              tlast;
  } axis_beat_t;

  // The 6-tuple that defines a network slice.
  typedef struct packed {
    logic [31:0] src_ip;
    logic [31:0] dst_ip;
    logic [15:0] src_port;
    logic [15:0] dst_port;
    logic [5:0]  dscp;
    logic [31:0] teid;
  } slice_key_t;

  localparam int unsigned KEY_W = $bits(slice_key_t);

  // Action of a TCAM rule.
  typedef struct packed {
    qid_t qid;
    logic drop;
  } slice_action_t;

  function automatic logic [7:0] encode_drop_field(slice_action_t a);
    logic [7:0] f;
    f = '0;
    f[QID_W:1] = a.qid;
    f[0]       = a.drop;
    return f;
  endfunction

  function automatic qid_t drop_field_qid(logic [7:0] f);
    return f[QID_W:1];
  endfunction

  function automatic logic drop_field_drop(logic [7:0] f);
    return f[0];
  endfunction

endpackage
