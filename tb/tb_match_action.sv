// tb_match_action - self-checking test of the TCAM match/action stage.
//
// Loads rules (exact, wildcarded, overlapping, with drop), deletes some,
// and looks up random and targeted keys. The expected decision comes from
// a software model of the table kept in the testbench: the first valid
// rule, by index, whose masked value equals the masked key; otherwise the
// default action (queue 0, no drop). Non-5G keys must never match. Every
// decision must appear exactly one clock after its lookup.
module tb_match_action;
  import slicing_pkg::*;

  localparam int N = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic key_valid = 0, is_5g = 0;
  slice_key_t key = '0;
  logic cfg_we = 0, cfg_valid = 0;
  logic [4:0] cfg_addr = '0;
  slice_key_t cfg_value = '0, cfg_mask = '0;
  slice_action_t cfg_action = '0;
  logic dec_valid, dec_hit;
  logic [7:0] dec_drop_field;
  logic [4:0] dec_rule;

  match_action #(.ENTRIES(N)) dut (.*);

  int checks = 0, failures = 0;
  bit m_valid[N];
  slice_key_t m_val[N], m_mask[N];
  slice_action_t m_act[N];

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic write_rule(int idx, bit v, slice_key_t val, slice_key_t msk, slice_action_t a);
    cfg_we = 1; cfg_addr = 5'(idx); cfg_valid = v; cfg_value = val; cfg_mask = msk; cfg_action = a;
    @(negedge clk);
    cfg_we = 0;
    m_valid[idx] = v; m_val[idx] = val; m_mask[idx] = msk; m_act[idx] = a;
  endtask

  int hits = 0, misses = 0, drops = 0;

  task automatic lookup(slice_key_t k, bit g);
    logic [7:0] exp_f; bit exp_hit; int exp_idx;
    exp_f = 8'h00; exp_hit = 0; exp_idx = 0;
    for (int e = N - 1; e >= 0; e--)
      if (g && m_valid[e] && ((k & m_mask[e]) == (m_val[e] & m_mask[e]))) begin
        exp_hit = 1; exp_idx = e; exp_f = {2'b00, m_act[e].qid, m_act[e].drop};
      end
    key_valid = 1; key = k; is_5g = g;
    @(negedge clk);
    key_valid = 0;
    chk(dec_valid == 1, "dec_valid one clock after lookup");
    chk(dec_drop_field == exp_f, $sformatf("drop field %h exp %h", dec_drop_field, exp_f));
    chk(dec_hit == exp_hit, "hit flag");
    if (exp_hit) begin
      chk(dec_rule == 5'(exp_idx), "rule index");
      hits++;
      if (exp_f[0]) drops++;
    end else misses++;
    @(negedge clk);
    chk(dec_valid == 0, "single decision per lookup");
  endtask

  initial begin
    slice_key_t k, msk;
    slice_action_t a;
    for (int e = 0; e < N; e++) m_valid[e] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // one exact rule per UE, queue = 31 - index
    for (int e = 0; e < 24; e++) begin
      k = '0; k.src_ip = 32'h0A2D_0000 + e; k.dst_ip = 32'hC0A8_0164; k.teid = 32'h100 + e;
      k.src_port = 16'(1000 + e); k.dst_port = 16'd5201; k.dscp = 6'(e);
      a.qid = 5'(31 - e); a.drop = (e == 7);
      write_rule(e, 1, k, '1, a);
    end
    // wildcard rules: any DSCP 46 (EF) to queue 30, any TEID 0xABCD to queue 3
    msk = '0; msk.dscp = '1; k = '0; k.dscp = 6'd46; a.qid = 5'd30; a.drop = 0;
    write_rule(24, 1, k, msk, a);
    msk = '0; msk.teid = '1; k = '0; k.teid = 32'hABCD; a.qid = 5'd3; a.drop = 0;
    write_rule(25, 1, k, msk, a);
    // overlapping rule: any packet of UE 0's source address to queue 1;
    // UE 0's exact rule (index 0) must win over it
    msk = '0; msk.src_ip = '1; k = '0; k.src_ip = 32'h0A2D_0000; a.qid = 5'd1; a.drop = 0;
    write_rule(26, 1, k, msk, a);
    // exact lookups
    for (int e = 0; e < 24; e++) begin
      k = '0; k.src_ip = 32'h0A2D_0000 + e; k.dst_ip = 32'hC0A8_0164; k.teid = 32'h100 + e;
      k.src_port = 16'(1000 + e); k.dst_port = 16'd5201; k.dscp = 6'(e);
      lookup(k, 1);
      lookup(k, 0);                       // same key, not 5G: default
    end
    // a key that only the overlapping rule 26 can match
    k = '0; k.src_ip = 32'h0A2D_0000; lookup(k, 1);
    // a key that only the wildcard rules can match
    k = '0; k.src_ip = 32'h0A2D_0005; k.dscp = 6'd46; lookup(k, 1);
    k = '0; k.teid = 32'hABCD; k.src_ip = 32'h1; lookup(k, 1);
    // delete rules and look again
    write_rule(3, 0, '0, '0, '0);
    write_rule(24, 0, '0, '0, '0);
    k = '0; k.src_ip = 32'h0A2D_0003; k.dst_ip = 32'hC0A8_0164; k.teid = 32'h103;
    k.src_port = 16'd1003; k.dst_port = 16'd5201; k.dscp = 6'd3;
    lookup(k, 1);
    k = '0; k.dscp = 6'd46; lookup(k, 1);
    // random keys, some near the rules
    for (int i = 0; i < 300; i++) begin
      k = {$urandom, $urandom, $urandom, $urandom, $urandom};
      if (i % 3 == 0) k.dscp = 6'd46;
      if (i % 5 == 0) k.teid = 32'hABCD;
      lookup(k, 1'($urandom_range(3) != 0));
    end
    chk(hits > 0 && misses > 0 && drops > 0, "hit, miss and drop actions all exercised");
    $display("hits=%0d misses=%0d drops=%0d", hits, misses, drops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
