// tb_slicing_core - self-checking test of the 32-queue slicing core.
//
// Phase 1 holds the output, sends packets for many queues and overfills
// one of them. A model with the queue size predicts which packets are
// kept; when the output is released, packets must leave in strict
// priority order (queue 31 first), first-in first-out within a queue, and
// the dropped ones must be exactly those the model predicts, each with its
// drop pulse on its own queue only. Phase 2 runs random traffic with
// random output stalls and checks that every packet leaves whole, in order
// within its queue, and that sent = received + dropped.
module tb_slicing_core;
  import slicing_pkg::*;

  localparam int N = 32, D = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, out_valid, out_ready = 0;
  axis_beat_t in_beat = '0, out_beat;
  logic [N-1:0] q_drop;
  logic [N-1:0][4:0] q_occupancy;

  slicing_core #(.NUM_Q(N), .QUEUE_DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int drops_per_q [N];
  always @(posedge clk) if (rst_n) for (int q = 0; q < N; q++) if (q_drop[q]) drops_per_q[q]++;

  function automatic axis_beat_t mk(int p, int q, int k, int n);
    axis_beat_t b;
    b = '0;
    b.tdata[15:0] = 16'(p); b.tdata[23:16] = 8'(k); b.tdata[31:24] = 8'(q);
    b.tkeep = '1;
    b.tuser.drop = {2'b00, 5'(q), 1'b0};
    b.tlast = (k == n - 1);
    return b;
  endfunction

  task automatic send(int p, int q, int n);
    for (int k = 0; k < n; k++) begin
      in_valid = 1; in_beat = mk(p, q, k, n);
      @(negedge clk);
    end
    in_valid = 0;
  endtask

  // packets expected on the output, per queue, as {id, length}
  int exp_id [N][$];
  int exp_len [N][$];
  int used [N];

  // output collector
  int out_pkts[$], out_q[$];
  int cur_k = 0, cur_p = -1, cur_q = -1;
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      int bp, bk, bq;
      bp = int'(out_beat.tdata[15:0]); bk = int'(out_beat.tdata[23:16]); bq = int'(out_beat.tdata[31:24]);
      if (cur_k == 0) begin cur_p = bp; cur_q = bq; end
      chk(bp == cur_p && bk == cur_k && bq == cur_q, "whole packet, beats in order");
      chk(out_beat.tuser.drop[5:1] == 5'(bq), "queue ID kept in metadata");
      cur_k++;
      if (out_beat.tlast) begin
        out_pkts.push_back(cur_p); out_q.push_back(cur_q); cur_k = 0;
      end
    end
  end

  initial begin
    int p, sent2, dropped2;
    int last_id [N];
    for (int q = 0; q < N; q++) begin used[q] = 0; drops_per_q[q] = 0; last_id[q] = -1; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // phase 1: output held; queue 9 is overfilled
    p = 0;
    for (int r = 0; r < 3; r++) begin
      for (int q = 0; q < N; q += 3) begin
        int n;
        n = 1 + (p % 4);
        send(p, q, n);
        if (used[q] + n <= D) begin
          used[q] += n; exp_id[q].push_back(p); exp_len[q].push_back(n);
        end
        p++;
      end
    end
    for (int i = 0; i < 6; i++) begin
      send(p, 9, 5);
      if (used[9] + 5 <= D) begin
        used[9] += 5; exp_id[9].push_back(p); exp_len[9].push_back(5);
      end
      p++;
    end
    repeat (3) @(negedge clk);
    for (int q = 0; q < N; q++)
      chk(q_occupancy[q] == 5'(used[q]), $sformatf("occupancy of queue %0d", q));
    chk(drops_per_q[9] > 0, "queue 9 overflowed");
    for (int q = 0; q < N; q++) if (q != 9) chk(drops_per_q[q] == 0, "no drops on other queues");
    // release the output: strict priority order
    out_ready = 1;
    repeat (200) @(negedge clk);
    for (int q = N - 1; q >= 0; q--) begin
      while (exp_id[q].size() > 0) begin
        int e;
        e = exp_id[q].pop_front();
        if (out_pkts.size() == 0) chk(0, "missing output packet");
        else begin
          chk(out_pkts.pop_front() == e, $sformatf("packet %0d in priority order", e));
          void'(out_q.pop_front());
        end
      end
    end
    chk(out_pkts.size() == 0, "no extra packets");
    // phase 2: random load with output stalls
    for (int q = 0; q < N; q++) drops_per_q[q] = 0;
    out_pkts.delete(); out_q.delete();
    sent2 = 0;
    fork
      for (int i = 0; i < 600; i++) begin
        send(p, $urandom_range(N - 1), 1 + $urandom_range(5));
        p++; sent2++;
      end
      forever begin
        @(negedge clk);
        out_ready = ($urandom_range(2) == 0);
      end
    join_any
    out_ready = 1;
    repeat (2000) @(negedge clk);
    dropped2 = 0;
    for (int q = 0; q < N; q++) dropped2 += drops_per_q[q];
    chk(out_pkts.size() + dropped2 == sent2, $sformatf("received %0d + dropped %0d = sent %0d", out_pkts.size(), dropped2, sent2));
    chk(dropped2 > 0, "congestion caused drops");
    foreach (out_pkts[i]) begin
      chk(out_pkts[i] > last_id[out_q[i]], "order kept within a queue");
      last_id[out_q[i]] = out_pkts[i];
    end
    $display("phase2 received=%0d dropped=%0d", out_pkts.size(), dropped2);
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
