// p4_slicing_top - 5G network slicing pipeline for the edge-to-core link.
//
// Traffic between the 5G edge and the core is GTP-U: each user's IP packet
// travels inside an outer IP/UDP/GTP tunnel. This pipeline classifies that
// traffic into up to 32 slices and gives each slice its own queue with a
// fixed priority, so slices are isolated in bandwidth, loss and latency.
//
//   s_axis --+--> deparser (packet FIFO) ----> slicing_core --> m_axis
//            |        ^ decision per packet       (demux, 32 queues,
//            +--> gtp_parser --> match_action      strict-priority mux)
//                  (6-tuple)     (TCAM: queue, drop)
//
// The parser sees every beat accepted on s_axis and extracts the 6-tuple
// (inner IPs, inner ports, DSCP, TEID). The TCAM turns it into a queue
// number and a drop flag, carried in the drop byte of the tuser metadata.
// The deparser holds the packet until that decision is known, stamps it
// into tuser and hands the packet on, or discards it if the drop flag is
// set. The slicing core queues it and serves queue 31 first, queue 0 last.
//
// Ports are AXI4-Stream (256-bit data, 128-bit tuser metadata) plus a rule
// write port for control software: cfg_we writes TCAM entry cfg_addr with
// a value, a mask (1 = compare) and an action; cfg_valid = 0 deletes it.
// m_axis_tuser carries the decision in its drop byte ({2'b0, queue, drop}).
// match_* report each TCAM lookup, pipe_drop each packet discarded by a
// rule, q_drop each packet lost to a full queue. The input takes one beat
// per clock; a packet can leave only after its last beat is in its queue,
// so latency grows with packet length (store and forward).
//
// The stage order, the 6-tuple, the 32 strict-priority queues and the use
// of the metadata drop byte follow the slicing scheme; widths, depths, the
// rule port and the exact bit layout are this design's own.
module p4_slicing_top
  import slicing_pkg::*;
#(
  parameter int unsigned NUM_Q          = NUM_QUEUES,
  parameter int unsigned TCAM_ENTRIES   = 32,
  parameter int unsigned QUEUE_DEPTH    = 64,
  parameter int unsigned HDR_BEATS      = 4,
  parameter int unsigned PKT_FIFO_DEPTH = 64,
  parameter int unsigned META_DEPTH     = 16,
  localparam int unsigned QAW           = $clog2(QUEUE_DEPTH),
  localparam int unsigned TAW           = (TCAM_ENTRIES > 1) ? $clog2(TCAM_ENTRIES) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // packet input
  input  logic [DATA_W-1:0]       s_axis_tdata,
  input  logic [KEEP_W-1:0]       s_axis_tkeep,
  input  sume_metadata_t          s_axis_tuser,
  input  logic                    s_axis_tlast,
  input  logic                    s_axis_tvalid,
  output logic                    s_axis_tready,
  // packet output
  output logic [DATA_W-1:0]       m_axis_tdata,
  output logic [KEEP_W-1:0]       m_axis_tkeep,
  output sume_metadata_t          m_axis_tuser,
  output logic                    m_axis_tlast,
  output logic                    m_axis_tvalid,
  input  logic                    m_axis_tready,
  // TCAM rule write port
  input  logic                    cfg_we,
  input  logic [TAW-1:0]          cfg_addr,
  input  logic                    cfg_valid,
  input  slice_key_t              cfg_value,
  input  slice_key_t              cfg_mask,
  input  slice_action_t           cfg_action,
  // status
  output logic                    match_valid,  // a lookup finished
  output logic                    match_hit,    // ... and a rule matched
  output logic [TAW-1:0]          match_rule,   // ... this one
  output logic                    pipe_drop,
  output logic [NUM_Q-1:0]        q_drop,
  output logic [NUM_Q-1:0][QAW:0] q_occupancy
);

  axis_beat_t in_beat, dp_beat, core_beat;
  logic       in_fire, dp_valid;

  assign in_beat = '{tdata: s_axis_tdata, tkeep: s_axis_tkeep, tuser: s_axis_tuser, tlast: s_axis_tlast};
  assign in_fire = s_axis_tvalid && s_axis_tready;

  logic       key_valid, is_5g;
  slice_key_t key;

  gtp_parser #(.HDR_BEATS(HDR_BEATS)) u_parser (
    .clk, .rst_n,
    .beat     (in_beat),
    .fire     (in_fire),
    .key_valid(key_valid),
    .key      (key),
    .is_5g    (is_5g)
  );

  logic           dec_valid, dec_hit;
  logic [7:0]     dec_drop_field;
  logic [TAW-1:0] dec_rule;

  match_action #(.ENTRIES(TCAM_ENTRIES)) u_match (
    .clk, .rst_n,
    .key_valid,
    .key,
    .is_5g,
    .cfg_we,
    .cfg_addr,
    .cfg_valid,
    .cfg_value,
    .cfg_mask,
    .cfg_action,
    .dec_valid,
    .dec_drop_field,
    .dec_hit,
    .dec_rule
  );

  // The slicing core never back-pressures, so the deparser output always
  // moves on.
  deparser #(.PKT_DEPTH(PKT_FIFO_DEPTH), .META_DEPTH(META_DEPTH), .IN_FLIGHT(3)) u_deparser (
    .clk, .rst_n,
    .in_valid      (s_axis_tvalid),
    .in_beat       (in_beat),
    .in_ready      (s_axis_tready),
    .dec_valid,
    .dec_drop_field,
    .out_valid     (dp_valid),
    .out_beat      (dp_beat),
    .out_ready     (1'b1),
    .drop_pulse    (pipe_drop)
  );

  assign match_valid = dec_valid;
  assign match_hit   = dec_hit;
  assign match_rule  = dec_rule;

  logic core_valid;

  slicing_core #(.NUM_Q(NUM_Q), .QUEUE_DEPTH(QUEUE_DEPTH)) u_core (
    .clk, .rst_n,
    .in_valid   (dp_valid),
    .in_beat    (dp_beat),
    .out_valid  (core_valid),
    .out_beat   (core_beat),
    .out_ready  (m_axis_tready),
    .q_drop,
    .q_occupancy
  );

  assign m_axis_tvalid = core_valid;
  assign m_axis_tdata  = core_beat.tdata;
  assign m_axis_tkeep  = core_beat.tkeep;
  assign m_axis_tuser  = core_beat.tuser;
  assign m_axis_tlast  = core_beat.tlast;

endmodule
