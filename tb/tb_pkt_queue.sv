// tb_pkt_queue - self-checking test of one priority queue with tail drop.
//
// Phase 1 writes packets with the reader stopped: packets must be kept
// while they fit and discarded whole once they do not, with one drop pulse
// each, and nothing may become readable before a packet's last beat.
// Phase 2 drains the queue and compares every beat. Phase 3 writes and
// reads at random at the same time; the packets read must be whole input
// packets, in order, and read + dropped must equal written.
module tb_pkt_queue;
  import slicing_pkg::*;

  localparam int D = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic wr = 0, rd_valid, rd_ready = 0, drop_pulse;
  axis_beat_t wr_beat = '0, rd_beat;
  logic [4:0] occupancy;

  pkt_queue #(.DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic axis_beat_t mk(int p, int k, int n);
    axis_beat_t b;
    b = '0;
    b.tdata[31:0] = {p[15:0], 16'(k)};
    b.tkeep = '1;
    b.tlast = (k == n - 1);
    return b;
  endfunction

  axis_beat_t exp_q[$];
  bit in_phase1 = 1;
  int pulses = 0;
  always @(posedge clk) if (rst_n && drop_pulse) pulses++;

  task automatic write_pkt(int p, int n, bit expect_keep);
    for (int k = 0; k < n; k++) begin
      wr = 1; wr_beat = mk(p, k, n);
      @(negedge clk);
      if (k < n - 1 && in_phase1) chk(occupancy == 5'(exp_q.size()), "nothing visible before tlast");
    end
    wr = 0;
    if (expect_keep) for (int k = 0; k < n; k++) exp_q.push_back(mk(p, k, n));
  endtask

  initial begin
    int used, drops_exp, p, wrote, nread;
    axis_beat_t got[$];
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // phase 1: fill with the reader stopped
    used = 0; drops_exp = 0; p = 0;
    for (int i = 0; i < 12; i++) begin
      int n;
      n = 1 + (i * 5) % 7;
      write_pkt(p, n, used + n <= D);
      if (used + n <= D) used += n; else drops_exp++;
      p++;
      @(negedge clk);
      chk(occupancy == 5'(used), $sformatf("occupancy %0d exp %0d", occupancy, used));
    end
    chk(pulses == drops_exp && drops_exp > 0, $sformatf("drop pulses %0d exp %0d", pulses, drops_exp));
    in_phase1 = 0;
    // phase 2: drain
    rd_ready = 1;
    while (exp_q.size() > 0) begin
      chk(rd_valid, "data available");
      chk(rd_beat == exp_q.pop_front(), "drained beat");
      @(negedge clk);
    end
    chk(!rd_valid && occupancy == 0, "empty after drain");
    rd_ready = 0;
    // phase 3: concurrent random traffic; reader checks packet integrity
    pulses = 0; wrote = 0; nread = 0;
    fork
      begin
        for (int i = 0; i < 300; i++) begin
          int n;
          n = 1 + $urandom_range(6);
          write_pkt(1000 + i, n, 0);
          wrote++;
          if ($urandom_range(2) == 0) @(negedge clk);
        end
        repeat (200) @(negedge clk);
      end
      begin
        int cur_p, cur_k, last_p;
        @(negedge clk);
        last_p = 999; cur_k = 0; cur_p = -1;
        forever begin
          @(posedge clk);
          if (rd_valid && rd_ready) begin
            int bp, bk;
            bp = int'(rd_beat.tdata[31:16]); bk = int'(rd_beat.tdata[15:0]);
            if (cur_k == 0) begin
              chk(bp > last_p, "packets in order");
              cur_p = bp;
            end
            chk(bp == cur_p && bk == cur_k, "whole packet, beats in order");
            cur_k++;
            if (rd_beat.tlast) begin
              nread++; last_p = cur_p; cur_k = 0;
            end
          end
          @(negedge clk);
          rd_ready = ($urandom_range(3) == 0);
        end
      end
    join_any
    chk(nread + pulses == wrote, $sformatf("read %0d + dropped %0d = written %0d", nread, pulses, wrote));
    chk(pulses > 0 && nread > 0, "both drops and reads in phase 3");
    $display("phase3 read=%0d dropped=%0d", nread, pulses);
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
