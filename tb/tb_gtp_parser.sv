// tb_gtp_parser - self-checking test of the GTP-U 6-tuple parser.
//
// Sends a mix of packets built by tb_pkt_pkg: plain GTP-U over TCP and UDP,
// GTP with the sequence field, with a PDU session container extension
// header, with IPv4 options on either layer, an inner ICMP packet (no
// ports), non-GTP UDP, a non-IP frame, and a truncated one-beat packet.
// Each reported key and is_5g flag is compared with the fields the packet
// was built from, and each report must come exactly two clocks after the
// beat that completes header capture. Gaps between beats are random; stimulus changes on the falling clock edge.
module tb_gtp_parser;
  import slicing_pkg::*;
  import tb_pkt_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axis_beat_t beat;
  logic       fire;
  logic       key_valid, is_5g;
  slice_key_t key;

  gtp_parser #(.HDR_BEATS(4)) dut (.clk, .rst_n, .beat, .fire, .key_valid, .key, .is_5g);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  slice_key_t exp_key[$];
  logic       exp_5g[$];
  longint     exp_cyc[$];

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) begin
    if (rst_n && key_valid) begin
      if (exp_key.size() == 0) chk(0, "unexpected key");
      else begin
        slice_key_t k; logic f; longint c;
        k = exp_key.pop_front(); f = exp_5g.pop_front(); c = exp_cyc.pop_front();
        chk(key == k, $sformatf("key %h exp %h", key, k));
        chk(is_5g == f, $sformatf("is_5g %0d exp %0d", is_5g, f));
        // beats are driven at the falling edge of cycle c and taken at the
        // next rising edge; the key must follow two clocks later
        chk(cyc == c + 2, $sformatf("latency: key at %0d, header done at %0d", cyc, c));
      end
    end
  end

  task automatic send(bytes_t b, slice_key_t k, logic f);
    int n;
    n = num_beats(b);
    for (int i = 0; i < n; i++) begin
      while ($urandom_range(3) == 0) begin
        fire = 0; @(negedge clk);
      end
      beat = beat_of(b, i, '0);
      fire = 1;
      if (i == 3 || i == n - 1) begin
        if (i == 3 || n <= 4) begin
          exp_key.push_back(k); exp_5g.push_back(f); exp_cyc.push_back(cyc);
        end
      end
      @(negedge clk);
    end
    fire = 0;
  endtask

  task automatic send_spec(pkt_spec_t s);
    send(build(s), expected_key(s), !(s.not_gtp || s.not_ip));
  endtask

  initial begin
    pkt_spec_t s;
    bytes_t    b;
    fire = 0; beat = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    s = default_spec(1);                                 send_spec(s);
    s = default_spec(2); s.proto = 6;                    send_spec(s);
    s = default_spec(3); s.opt_seq = 1;                  send_spec(s);
    s = default_spec(4); s.ext_pdu = 1; s.proto = 6;     send_spec(s);
    s = default_spec(5); s.outer_ihl = 7; s.inner_ihl = 6; send_spec(s);
    s = default_spec(6); s.proto = 1;                    send_spec(s);
    s = default_spec(7); s.not_gtp = 1;                  send_spec(s);
    s = default_spec(8); s.not_ip = 1;                   send_spec(s);
    s = default_spec(9); s.payload = 4;                  send_spec(s);   // 3-beat packet
    // one-beat packet cut inside the GTP header: not parsable
    s = default_spec(10); b = build(s); b = b[0:31];
    send(b, '0, 1'b0);
    // back-to-back random packets
    for (int i = 0; i < 200; i++) begin
      s = default_spec(100 + i);
      s.src_ip = $urandom; s.dst_ip = $urandom; s.teid = $urandom;
      s.sport = 16'($urandom); s.dport = 16'($urandom); s.dscp = 6'($urandom);
      s.proto = ($urandom_range(1) == 0) ? 8'd6 : 8'd17;
      s.ext_pdu = 1'($urandom); s.opt_seq = 1'($urandom);
      s.outer_ihl = 5 + $urandom_range(2); s.inner_ihl = 5 + $urandom_range(2);
      s.payload = 4 + $urandom_range(300);
      s.not_gtp = ($urandom_range(9) == 0);
      send_spec(s);
    end
    repeat (5) @(posedge clk);
    chk(exp_key.size() == 0, "keys missing at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
