// tb_slice_isolation - isolation of slices under congestion, full size.
//
// The pipeline runs with all parameters at their defaults. The output
// accepts a beat only every second clock, so it drains half as fast as the
// input can fill. Three UEs (user equipments) share the link:
//   UE 0  -> queue 0  (lowest priority)  floods with 8-beat packets,
//   UE 16 -> queue 16                    sends a 4-beat packet now and then,
//   UE 31 -> queue 31 (highest priority) sends a 3-beat packet now and then.
// The offered load is well above what the output can carry. Isolation means:
// UE 31 and UE 16 lose no packet, only queue 0 overflows, and UE 31's delay
// from its last input beat to its first output beat stays small (bounded by
// one packet already leaving plus its own queue), far below UE 0's delay.
module tb_slice_isolation;
  import slicing_pkg::*;
  import tb_pkt_pkg::*;

  localparam int NQ = 32;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [DATA_W-1:0] s_axis_tdata = '0, m_axis_tdata;
  logic [KEEP_W-1:0] s_axis_tkeep = '0, m_axis_tkeep;
  sume_metadata_t    s_axis_tuser = '0, m_axis_tuser;
  logic s_axis_tlast = 0, s_axis_tvalid = 0, s_axis_tready;
  logic m_axis_tlast, m_axis_tvalid, m_axis_tready = 0;
  logic cfg_we = 0, cfg_valid = 0;
  logic [4:0] cfg_addr = '0;
  slice_key_t cfg_value = '0, cfg_mask = '0;
  slice_action_t cfg_action = '0;
  logic match_valid, match_hit, pipe_drop;
  logic [4:0] match_rule;
  logic [NQ-1:0] q_drop;
  logic [NQ-1:0][6:0] q_occupancy;

  p4_slicing_top dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int drops [NQ];
  always @(posedge clk) if (rst_n) for (int q = 0; q < NQ; q++) if (q_drop[q]) drops[q]++;

  // output at half rate
  always @(negedge clk) if (rst_n) m_axis_tready = ~m_axis_tready;

  bytes_t sent_bytes [int];
  longint sent_at [int];
  int     sent_n [NQ], recv_n [NQ];
  longint lat_max [NQ], lat_sum [NQ];

  function automatic pkt_spec_t spec_for(int ue, int id, int payload);
    pkt_spec_t s;
    s = default_spec(id);
    s.src_ip = 32'h0A2D_0000 + ue; s.teid = 32'h0051_0000 + ue;
    s.dscp = 6'(ue); s.ext_pdu = 1; s.payload = payload;
    return s;
  endfunction

  task automatic write_rule(int ue);
    slice_key_t k, m;
    k = '0; m = '0;
    k.teid = 32'h0051_0000 + ue; m.teid = '1;
    cfg_we = 1; cfg_addr = 5'(ue); cfg_valid = 1; cfg_value = k; cfg_mask = m;
    cfg_action.qid = 5'(ue); cfg_action.drop = 0;
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic send(int ue, int id, int payload);
    bytes_t b;
    int n;
    b = build(spec_for(ue, id, payload));
    sent_bytes[id] = b; sent_n[ue]++;
    n = num_beats(b);
    for (int k = 0; k < n; k++) begin
      axis_beat_t x;
      x = beat_of(b, k, '0);
      s_axis_tvalid = 1; s_axis_tdata = x.tdata; s_axis_tkeep = x.tkeep;
      s_axis_tuser = x.tuser; s_axis_tlast = x.tlast;
      while (!s_axis_tready) @(negedge clk);
      if (k == n - 1) sent_at[id] = cyc;
      @(negedge clk);
    end
    s_axis_tvalid = 0;
  endtask

  bytes_t cur;
  longint first_at;
  always @(posedge clk) begin
    if (rst_n && m_axis_tvalid && m_axis_tready) begin
      if (cur.size() == 0) first_at = cyc;
      for (int j = 0; j < KEEP_W; j++) if (m_axis_tkeep[j]) cur.push_back(m_axis_tdata[j*8 +: 8]);
      if (m_axis_tlast) begin
        int id, q;
        id = -1;
        foreach (sent_bytes[i]) if (id < 0 && sent_bytes[i] == cur) id = i;
        q = int'(m_axis_tuser.drop[5:1]);
        chk(id >= 0, "output packet matches a sent packet");
        if (id >= 0) begin
          longint lat;
          lat = first_at - sent_at[id];
          recv_n[q]++; lat_sum[q] += lat;
          if (lat > lat_max[q]) lat_max[q] = lat;
          sent_bytes.delete(id);
        end
        cur.delete();
      end
    end
  end

  initial begin
    int id;
    for (int q = 0; q < NQ; q++) begin
      drops[q] = 0; sent_n[q] = 0; recv_n[q] = 0; lat_max[q] = 0; lat_sum[q] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    write_rule(0); write_rule(16); write_rule(31);
    id = 0;
    for (int i = 0; i < 300; i++) begin
      send(0, id, 200); id++;                       // 8 beats
      if (i % 5 == 2) begin send(16, id, 60); id++; end
      if (i % 4 == 1) begin send(31, id, 30); id++; end
    end
    repeat (3000) @(negedge clk);
    chk(drops[0] > 0, "the flooding slice overflows its queue");
    chk(drops[16] == 0 && drops[31] == 0, "no loss on the other slices");
    chk(recv_n[31] == sent_n[31], $sformatf("UE 31: %0d of %0d delivered", recv_n[31], sent_n[31]));
    chk(recv_n[16] == sent_n[16], $sformatf("UE 16: %0d of %0d delivered", recv_n[16], sent_n[16]));
    chk(recv_n[0] + drops[0] == sent_n[0], "UE 0: delivered + dropped = sent");
    // one 8-beat packet already leaving at half rate (16 clocks), plus a
    // UE-31 packet ahead in its own queue, plus the pipeline
    chk(lat_max[31] <= 40, $sformatf("UE 31 worst delay %0d clocks", lat_max[31]));
    chk(recv_n[0] > 0 && lat_max[31] * 4 < lat_sum[0] / recv_n[0],
        "UE 31 delay far below UE 0's average");
    $display("UE0 sent=%0d recv=%0d drop=%0d avg_delay=%0d | UE16 sent=%0d recv=%0d max_delay=%0d | UE31 sent=%0d recv=%0d max_delay=%0d",
             sent_n[0], recv_n[0], drops[0], recv_n[0] > 0 ? lat_sum[0] / recv_n[0] : 0,
             sent_n[16], recv_n[16], lat_max[16], sent_n[31], recv_n[31], lat_max[31]);
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
