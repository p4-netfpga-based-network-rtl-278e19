// tb_pkt_pkg - packet builder shared by the testbenches.
//
// Builds Ethernet/IPv4/UDP/GTP-U/IPv4/TCP-or-UDP packets byte by byte from
// a description (pkt_spec_t), so every testbench knows the 6-tuple it put
// into a packet independently of the parser. The payload starts with a
// 32-bit packet ID followed by bytes derived from it, which lets a checker
// rebuild and compare a packet from its ID alone. beat_of() cuts a packet
// into 32-byte AXI4-Stream beats (byte 0 in tdata[7:0]).
package tb_pkt_pkg;
  import slicing_pkg::*;

  typedef byte unsigned bytes_t[$];

  typedef struct {
    bit [31:0] src_ip, dst_ip;
    bit [15:0] sport, dport;
    bit [5:0]  dscp;
    bit [31:0] teid;
    bit [7:0]  proto;       // inner protocol: 6, 17 or other
    int        outer_ihl;   // 5..15
    int        inner_ihl;
    bit        opt_seq;     // GTP S flag (adds the 4 optional bytes)
    bit        ext_pdu;     // GTP E flag with one PDU session container
    bit        not_gtp;     // outer UDP port other than 2152
    bit        not_ip;      // Ethertype ARP
    int        payload;     // payload bytes after the inner L4 header (>= 4)
    int unsigned id;
  } pkt_spec_t;

  function automatic pkt_spec_t default_spec(int unsigned id);
    pkt_spec_t s;
    s.src_ip = 32'h0A2D_0001 + id; s.dst_ip = 32'hC0A8_0164;
    s.sport = 16'd40000 + 16'(id); s.dport = 16'd5201;
    s.dscp = 6'(id); s.teid = 32'h1000_0000 + id; s.proto = 8'd17;
    s.outer_ihl = 5; s.inner_ihl = 5; s.opt_seq = 0; s.ext_pdu = 0;
    s.not_gtp = 0; s.not_ip = 0; s.payload = 64; s.id = id;
    return s;
  endfunction

  function automatic void put16(ref bytes_t b, input bit [15:0] v);
    b.push_back(v[15:8]); b.push_back(v[7:0]);
  endfunction

  function automatic void put32(ref bytes_t b, input bit [31:0] v);
    put16(b, v[31:16]); put16(b, v[15:0]);
  endfunction

  function automatic bytes_t build(pkt_spec_t s);
    bytes_t b;
    int l4len;
    l4len = (s.proto == 6) ? 20 : (s.proto == 17) ? 8 : 0;
    // Ethernet
    put32(b, 32'h0200_0000); put16(b, 16'h0001);
    put32(b, 32'h0200_0000); put16(b, 16'h0002);
    put16(b, s.not_ip ? 16'h0806 : 16'h0800);
    // outer IPv4
    b.push_back(8'(8'h40 | s.outer_ihl)); b.push_back(8'h00);
    put16(b, 16'd0); put16(b, 16'h1234); put16(b, 16'h4000);
    b.push_back(8'd64); b.push_back(8'd17); put16(b, 16'h0000);
    put32(b, 32'h0A00_0001); put32(b, 32'h0A00_0002);
    for (int i = 5; i < s.outer_ihl; i++) put32(b, 32'h0101_0101);
    // outer UDP
    put16(b, 16'd2152); put16(b, s.not_gtp ? 16'd4789 : 16'd2152);
    put16(b, 16'd0); put16(b, 16'd0);
    // GTP-U
    b.push_back(8'(8'h30 | (s.ext_pdu ? 8'h04 : 8'h00) | (s.opt_seq ? 8'h02 : 8'h00)));
    b.push_back(8'hFF); put16(b, 16'd0); put32(b, s.teid);
    if (s.ext_pdu || s.opt_seq) begin
      put16(b, 16'h0007); b.push_back(8'h00); b.push_back(s.ext_pdu ? 8'h85 : 8'h00);
      if (s.ext_pdu) begin
        b.push_back(8'h01); b.push_back(8'h10); b.push_back(8'h09); b.push_back(8'h00);
      end
    end
    // inner IPv4
    b.push_back(8'(8'h40 | s.inner_ihl)); b.push_back({s.dscp, 2'b01});
    put16(b, 16'd0); put16(b, 16'h5678); put16(b, 16'h0000);
    b.push_back(8'd63); b.push_back(s.proto); put16(b, 16'h0000);
    put32(b, s.src_ip); put32(b, s.dst_ip);
    for (int i = 5; i < s.inner_ihl; i++) put32(b, 32'h0202_0202);
    // inner L4
    if (l4len > 0) begin
      put16(b, s.sport); put16(b, s.dport);
      for (int i = 4; i < l4len; i++) b.push_back(8'h00);
    end
    // payload: ID then a pattern
    put32(b, s.id);
    for (int i = 4; i < s.payload; i++) b.push_back(8'((s.id * 7 + i) & 8'hFF));
    return b;
  endfunction

  // The 6-tuple the parser should report for a spec, zero for non-5G.
  function automatic slice_key_t expected_key(pkt_spec_t s);
    slice_key_t k;
    k = '0;
    if (s.not_gtp || s.not_ip) return k;
    k.src_ip = s.src_ip; k.dst_ip = s.dst_ip; k.dscp = s.dscp; k.teid = s.teid;
    if (s.proto == 6 || s.proto == 17) begin
      k.src_port = s.sport; k.dst_port = s.dport;
    end
    return k;
  endfunction

  function automatic int num_beats(bytes_t b);
    return (b.size() + KEEP_W - 1) / KEEP_W;
  endfunction

  function automatic axis_beat_t beat_of(bytes_t b, int k, sume_metadata_t user);
    axis_beat_t x;
    x = '0;
    for (int j = 0; j < KEEP_W; j++) begin
      if (k * KEEP_W + j < b.size()) begin
        x.tdata[j*8 +: 8] = b[k*KEEP_W + j];
        x.tkeep[j] = 1'b1;
      end
    end
    x.tuser = user;
    x.tlast = (k == num_beats(b) - 1);
    return x;
  endfunction

endpackage
