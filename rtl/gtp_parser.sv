// gtp_parser - extracts the network-slice 6-tuple from 5G GTP-U traffic.
//
// The parser watches the packet stream (it never back-pressures) and copies
// the first HDR_BEATS beats of every packet into a header buffer. Once the
// buffer is complete, or the packet ended earlier, it walks the header stack
// the slicing scheme is built on:
//   Ethernet -> outer IPv4 -> outer UDP (dst port 2152) -> GTP-U (G-PDU)
//   -> inner IPv4 -> inner TCP or UDP
// and reads the six fields that name a slice: inner source and destination
// address, inner source and destination port, inner DSCP and the GTP tunnel
// endpoint ID (TEID).
//
// Beyond the header stack and the 6-tuple, the field-walking details are this
// design's own choices: IPv4 header length (IHL) is honoured on both IPv4 layers;
// when any of the GTP E/S/PN flags is set, the 4-byte optional field is
// skipped and up to two GTP extension headers (such as the 5G PDU session
// container) are followed. VLAN tags and IPv6 are not recognised. A packet
// that does not have this structure, or whose headers do not fit in the
// buffer, is reported with is_5g = 0 and a zero key.
//
// Interface: `beat` is the stream beat and `fire` marks a beat accepted by
// the consumer of the stream. Exactly one key_valid pulse is produced per
// packet, two clocks after the beat that completes header capture (the last
// header beat or tlast, whichever comes first). Keys come out in packet order.
module gtp_parser
  import slicing_pkg::*;
#(
  parameter int unsigned HDR_BEATS = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  axis_beat_t beat,
  input  logic       fire,
  output logic       key_valid,
  output slice_key_t key,
  output logic       is_5g
);

  localparam int unsigned HDR_BYTES = HDR_BEATS * KEEP_W;
  localparam int unsigned BIDX_W    = $clog2(HDR_BEATS + 1);
  localparam int unsigned OFF_W     = 16;

  logic [HDR_BEATS-1:0][DATA_W-1:0] hdr_q;
  logic [OFF_W-1:0]                 hdr_len_q;   // valid header bytes captured
  logic [BIDX_W-1:0]                beat_idx_q;  // beat number inside the packet (saturating)
  logic                             captured_q;  // header of this packet already handed on
  logic                             pending_q;   // header buffer complete, extract next cycle

  function automatic logic [OFF_W-1:0] keep_bytes(logic [KEEP_W-1:0] k);
    logic [OFF_W-1:0] n;
    n = '0;
    for (int i = 0; i < KEEP_W; i++) n += OFF_W'(k[i]);
    return n;
  endfunction

  // ---------------------------------------------------------------- capture
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hdr_q      <= '0;
      hdr_len_q  <= '0;
      beat_idx_q <= '0;
      captured_q <= 1'b0;
      pending_q  <= 1'b0;
    end else begin
      pending_q <= 1'b0;
      if (fire) begin
        if (!captured_q && beat_idx_q < BIDX_W'(HDR_BEATS)) begin
          hdr_q[beat_idx_q[$clog2(HDR_BEATS > 1 ? HDR_BEATS : 2)-1:0]] <= beat.tdata;
          hdr_len_q <= OFF_W'(beat_idx_q) * OFF_W'(KEEP_W) + keep_bytes(beat.tkeep);
          if (beat_idx_q == BIDX_W'(HDR_BEATS - 1) || beat.tlast) begin
            pending_q  <= 1'b1;
            captured_q <= 1'b1;
          end
        end
        if (beat.tlast) begin
          beat_idx_q <= '0;
          captured_q <= 1'b0;
        end else if (beat_idx_q < BIDX_W'(HDR_BEATS)) begin
          beat_idx_q <= beat_idx_q + 1'b1;
        end
      end
    end
  end

  // ---------------------------------------------------------------- extract
  logic [HDR_BYTES*8-1:0] hdr_flat;
  assign hdr_flat = hdr_q;

  function automatic logic [7:0] byte_at(logic [HDR_BYTES*8-1:0] h, logic [OFF_W-1:0] idx);
    if (idx < OFF_W'(HDR_BYTES)) return h[idx*8 +: 8];
    return 8'h00;
  endfunction

  function automatic logic [15:0] half_at(logic [HDR_BYTES*8-1:0] h, logic [OFF_W-1:0] idx);
    return {byte_at(h, idx), byte_at(h, idx + 1'b1)};
  endfunction

  function automatic logic [31:0] word_at(logic [HDR_BYTES*8-1:0] h, logic [OFF_W-1:0] idx);
    return {half_at(h, idx), half_at(h, idx + OFF_W'(2))};
  endfunction

  slice_key_t       x_key;
  logic             x_ok;

  always_comb begin
    logic [OFF_W-1:0] ip_o, udp_o, gtp_o, in_o, l4_o, need, ext_len;
    logic [7:0]       gflags, next_ext, in_proto;
    logic [3:0]       ihl_o, ihl_i;
    logic             has_l4;
    logic [7:0]       b_ipo, b_ini, b_tos;

    x_ok    = 1'b1;
    x_key   = '0;
    ip_o    = OFF_W'(14);
    b_ipo   = byte_at(hdr_flat, ip_o);
    ihl_o   = b_ipo[3:0];
    udp_o   = ip_o + OFF_W'({ihl_o, 2'b00});
    gtp_o   = udp_o + OFF_W'(8);
    gflags  = byte_at(hdr_flat, gtp_o);
    next_ext = 8'h00;
    ext_len = '0;

    if (half_at(hdr_flat, 12) != ETH_IPV4)                  x_ok = 1'b0;
    if (b_ipo[7:4] != 4'd4 || ihl_o < 4'd5)                  x_ok = 1'b0;
    if (byte_at(hdr_flat, ip_o + 9) != IP_PROTO_UDP)         x_ok = 1'b0;
    if (half_at(hdr_flat, udp_o + 2) != GTPU_PORT)           x_ok = 1'b0;
    if (gflags[7:5] != 3'd1 || !gflags[4])                   x_ok = 1'b0;
    if (byte_at(hdr_flat, gtp_o + 1) != GTP_MSG_GPDU)        x_ok = 1'b0;

    // GTP-U: 8 mandatory bytes, 4 optional ones if E, S or PN is set,
    // then a chain of extension headers when E is set.
    in_o = gtp_o + OFF_W'(8);
    if (|gflags[2:0]) begin
      in_o = gtp_o + OFF_W'(12);
      if (gflags[2]) next_ext = byte_at(hdr_flat, gtp_o + 11);
    end
    for (int n = 0; n < 2; n++) begin
      if (next_ext != 8'h00) begin
        ext_len = OFF_W'({byte_at(hdr_flat, in_o), 2'b00});
        if (ext_len == '0) begin
          x_ok     = 1'b0;
          next_ext = 8'h00;
        end else begin
          next_ext = byte_at(hdr_flat, in_o + ext_len - 1'b1);
          in_o     = in_o + ext_len;
        end
      end
    end
    if (next_ext != 8'h00) x_ok = 1'b0;

    // Inner IPv4 header of the 5G user.
    b_ini    = byte_at(hdr_flat, in_o);
    ihl_i    = b_ini[3:0];
    in_proto = byte_at(hdr_flat, in_o + 9);
    if (b_ini[7:4] != 4'd4 || ihl_i < 4'd5) x_ok = 1'b0;
    l4_o   = in_o + OFF_W'({ihl_i, 2'b00});
    has_l4 = (in_proto == IP_PROTO_TCP) || (in_proto == IP_PROTO_UDP);
    need   = has_l4 ? l4_o + OFF_W'(4) : in_o + OFF_W'(20);
    if (need > hdr_len_q) x_ok = 1'b0;

    b_tos        = byte_at(hdr_flat, in_o + 1);
    x_key.dscp   = b_tos[7:2];
    x_key.src_ip = word_at(hdr_flat, in_o + 12);
    x_key.dst_ip = word_at(hdr_flat, in_o + 16);
    x_key.teid   = word_at(hdr_flat, gtp_o + 4);
    if (has_l4) begin
      x_key.src_port = half_at(hdr_flat, l4_o);
      x_key.dst_port = half_at(hdr_flat, l4_o + 2);
    end
    if (!x_ok) x_key = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key_valid <= 1'b0;
      key       <= '0;
      is_5g     <= 1'b0;
    end else begin
      key_valid <= pending_q;
      if (pending_q) begin
        key   <= x_key;
        is_5g <= x_ok;
      end
    end
  end

endmodule
