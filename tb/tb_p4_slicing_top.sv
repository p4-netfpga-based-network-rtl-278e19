// tb_p4_slicing_top - end-to-end test of the slicing pipeline at full size.
//
// Every parameter of the pipeline is left at its default (32 queues, 32
// TCAM rules, 64-beat queues). Traffic is GTP-U from 32 user equipments
// (UEs), one TCAM rule per UE sending it to its own queue (UE u -> queue u).
//   1. Mapping: one packet per UE with the output open. Each packet must
//      come out unchanged, with its queue ID in the tuser drop byte, and
//      every lookup must hit the UE's rule.
//   2. Congestion: the output is held while every UE sends more than its
//      queue can hold. Queues overflow and drop whole packets; when the
//      output is released, packets must leave in strict priority order
//      (queue 31 first) and in order within each queue, and
//      sent = received + dropped.
//   3. Control: non-GTP traffic misses the TCAM and goes to queue 0; a
//      deleted rule sends its UE to queue 0; a rule with the drop action
//      discards the UE's packets inside the pipeline.
// Each mechanism (rule hit, miss, rule drop, tail drop, a higher queue
// served ahead of a lower one that was waiting, rule deletion) is counted
// and must occur at least once.
module tb_p4_slicing_top;
  import slicing_pkg::*;
  import tb_pkt_pkg::*;

  localparam int NQ = 32;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [DATA_W-1:0] s_axis_tdata = '0, m_axis_tdata;
  logic [KEEP_W-1:0] s_axis_tkeep = '0, m_axis_tkeep;
  sume_metadata_t    s_axis_tuser = '0, m_axis_tuser;
  logic s_axis_tlast = 0, s_axis_tvalid = 0, s_axis_tready;
  logic m_axis_tlast, m_axis_tvalid, m_axis_tready = 1;
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

  // mechanism counters
  int n_hit = 0, n_miss = 0, n_rule_drop = 0, n_tail_drop = 0, n_overtake = 0, n_delete = 0;
  always @(posedge clk) if (rst_n) begin
    if (match_valid && match_hit)  n_hit++;
    if (match_valid && !match_hit) n_miss++;
    if (pipe_drop) n_rule_drop++;
    for (int q = 0; q < NQ; q++) if (q_drop[q]) n_tail_drop++;
  end

  // packets sent, by ID
  bytes_t sent_bytes [int];
  int     exp_qid [int];
  int     n_sent = 0;

  pkt_spec_t ue_spec [NQ];

  function automatic pkt_spec_t spec_for(int ue, int id, int payload);
    pkt_spec_t s;
    s = default_spec(id);
    s.src_ip = 32'h0A2D_0000 + ue; s.teid = 32'h0051_0000 + ue;
    s.sport = 16'(2000 + ue); s.dscp = 6'(ue); s.proto = (ue % 2) ? 8'd6 : 8'd17;
    s.ext_pdu = 1; s.payload = payload;
    return s;
  endfunction

  task automatic write_rule(int idx, bit v, int ue, int qid, bit drop);
    slice_key_t k, m;
    k = '0; m = '0;
    k.src_ip = 32'h0A2D_0000 + ue; m.src_ip = '1;
    k.teid = 32'h0051_0000 + ue;   m.teid = '1;
    cfg_we = 1; cfg_addr = 5'(idx); cfg_valid = v; cfg_value = k; cfg_mask = m;
    cfg_action.qid = 5'(qid); cfg_action.drop = drop;
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic send(bytes_t b, int id, int q);
    int n;
    sent_bytes[id] = b; exp_qid[id] = q; n_sent++;
    n = num_beats(b);
    for (int k = 0; k < n; k++) begin
      axis_beat_t x;
      x = beat_of(b, k, '0);
      s_axis_tvalid = 1; s_axis_tdata = x.tdata; s_axis_tkeep = x.tkeep;
      s_axis_tuser = x.tuser; s_axis_tlast = x.tlast;
      s_axis_tuser.pkt_len = 16'(b.size());
      while (!s_axis_tready) @(negedge clk);
      @(negedge clk);
    end
    s_axis_tvalid = 0;
  endtask

  // output collector: rebuild packets, check bytes and queue
  bytes_t cur;
  int     cur_q = -1;
  int     got_id[$], got_q[$];
  always @(posedge clk) begin
    if (rst_n && m_axis_tvalid && m_axis_tready) begin
      for (int j = 0; j < KEEP_W; j++) if (m_axis_tkeep[j]) cur.push_back(m_axis_tdata[j*8 +: 8]);
      if (cur_q < 0) cur_q = int'(m_axis_tuser.drop[5:1]);
      chk(int'(m_axis_tuser.drop[5:1]) == cur_q && !m_axis_tuser.drop[0], "decision on every beat");
      if (m_axis_tlast) begin
        int id;
        // identify the packet by comparing it with every packet in flight
        id = -1;
        foreach (sent_bytes[i]) if (id < 0 && sent_bytes[i] == cur) id = i;
        if (id < 0) chk(0, "output packet matches a sent packet");
        else begin
          chk(1, "output packet matches a sent packet");
          chk(cur_q == exp_qid[id], $sformatf("packet %0d in queue %0d, expected %0d", id, cur_q, exp_qid[id]));
          got_id.push_back(id); got_q.push_back(cur_q);
          sent_bytes.delete(id);
        end
        cur.delete(); cur_q = -1;
      end
    end
  end

  initial begin
    int id, base_tail;
    bytes_t b;
    pkt_spec_t s;
    int last_id [NQ];
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // 32 rules: UE u -> queue u
    for (int u = 0; u < NQ; u++) write_rule(u, 1, u, u, 0);

    // ---- 1. mapping
    id = 0;
    for (int u = 0; u < NQ; u++) begin
      s = spec_for(u, id, 40 + 3 * u);
      send(build(s), id, u); id++;
    end
    repeat (100) @(negedge clk);
    chk(got_id.size() == NQ, $sformatf("phase 1: %0d of %0d packets out", got_id.size(), NQ));
    chk(n_hit == NQ, "phase 1: every lookup hit its rule");
    got_id.delete(); got_q.delete();

    // ---- 2. congestion with the output held
    m_axis_tready = 0;
    base_tail = n_tail_drop;
    for (int r = 0; r < 8; r++)
      for (int u = 0; u < NQ; u++) begin
        s = spec_for(u, id, 200 + 10 * r);
        send(build(s), id, u); id++;
      end
    repeat (20) @(negedge clk);
    chk(n_tail_drop > base_tail, "phase 2: queues overflowed");
    m_axis_tready = 1;
    repeat (3000) @(negedge clk);
    chk(got_id.size() + (n_tail_drop - base_tail) == 8 * NQ,
        $sformatf("phase 2: received %0d + dropped %0d = sent %0d", got_id.size(), n_tail_drop - base_tail, 8 * NQ));
    for (int q = 0; q < NQ; q++) last_id[q] = -1;
    foreach (got_id[i]) begin
      if (i > 0) begin
        chk(got_q[i] <= got_q[i-1], "phase 2: strict priority order");
        if (got_q[i] < got_q[i-1]) n_overtake++;
      end
      chk(got_id[i] > last_id[got_q[i]], "phase 2: order within a queue");
      last_id[got_q[i]] = got_id[i];
    end
    // packets lost to overflow are gone for good
    sent_bytes.delete();
    got_id.delete(); got_q.delete();

    // ---- 3. control: miss, delete, drop rule
    s = spec_for(3, id, 60); s.not_gtp = 1;            // not GTP: default queue 0
    send(build(s), id, 0); id++;
    write_rule(5, 0, 5, 5, 0); n_delete++;             // delete UE 5's rule
    s = spec_for(5, id, 60);
    send(build(s), id, 0); id++;
    write_rule(7, 1, 7, 7, 1);                         // UE 7 is now dropped
    s = spec_for(7, id, 60);
    b = build(s);
    sent_bytes[id] = b; exp_qid[id] = -1;
    send(b, id, -1); id++;
    s = spec_for(30, id, 60);                          // still mapped
    send(build(s), id, 30); id++;
    repeat (100) @(negedge clk);
    chk(got_id.size() == 3, $sformatf("phase 3: %0d of 3 packets out", got_id.size()));
    chk(n_rule_drop == 1, "phase 3: one packet dropped by its rule");
    chk(sent_bytes.size() == 1 && sent_bytes.exists(id - 2), "phase 3: the dropped packet never left");

    chk(n_hit > 0, "mechanism: TCAM hit");
    chk(n_miss >= 2, "mechanism: TCAM miss to default queue");
    chk(n_rule_drop > 0, "mechanism: drop action");
    chk(n_tail_drop > 0, "mechanism: queue overflow");
    chk(n_overtake > 0, "mechanism: strict priority");
    chk(n_delete > 0, "mechanism: rule deletion");
    $display("hits=%0d misses=%0d rule_drops=%0d tail_drops=%0d priority_steps=%0d deletes=%0d",
             n_hit, n_miss, n_rule_drop, n_tail_drop, n_overtake, n_delete);
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
