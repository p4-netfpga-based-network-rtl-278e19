// tb_slice_mux - self-checking test of the strict-priority multiplexer.
//
// Each of the 32 queue heads is modelled in the testbench as a list of
// whole packets. Packets are added to random queues while the output is
// read with random stalls. Whenever a packet starts on the output, it must
// come from the highest-numbered queue that held a packet at that moment,
// and be that queue's oldest packet; its beats must follow without another
// queue cutting in.
module tb_slice_mux;
  import slicing_pkg::*;

  localparam int N = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [N-1:0] q_valid, q_ready;
  axis_beat_t   q_beat [N];
  logic out_valid, out_ready = 0;
  axis_beat_t out_beat;

  slice_mux #(.NUM_Q(N)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  axis_beat_t fifo [N][$];   // beats of whole packets per queue

  always_comb begin
    for (int q = 0; q < N; q++) begin
      q_valid[q] = (fifo[q].size() > 0);
      q_beat[q]  = (fifo[q].size() > 0) ? fifo[q][0] : '0;
    end
  end

  int pkt_id = 0, sent = 0, recv = 0, overtakes = 0;
  bit in_pkt = 0;
  int cur_q = 0;

  task automatic add_pkt(int q);
    int n;
    n = 1 + $urandom_range(3);
    for (int k = 0; k < n; k++) begin
      axis_beat_t b;
      b = '0;
      b.tdata[15:0] = 16'(pkt_id); b.tdata[23:16] = 8'(k); b.tdata[31:24] = 8'(q);
      b.tlast = (k == n - 1);
      fifo[q].push_back(b);
    end
    pkt_id++; sent++;
  endtask

  // checker and queue pop, on the rising edge (values before the edge)
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      int hi;
      hi = -1;
      for (int q = 0; q < N; q++) if (fifo[q].size() > 0) hi = q;
      if (!in_pkt) begin
        chk(int'(out_beat.tdata[31:24]) == hi, $sformatf("packet from queue %0d, highest busy %0d", out_beat.tdata[31:24], hi));
        cur_q = hi;
        for (int q = 0; q < hi; q++) if (fifo[q].size() > 0) overtakes++;
      end else begin
        chk(int'(out_beat.tdata[31:24]) == cur_q, "packet not interrupted");
      end
      chk(q_ready == (N'(1) << cur_q), "pop strobe of the served queue only");
      if (fifo[cur_q].size() > 0) begin
        chk(out_beat == fifo[cur_q][0], "head beat forwarded");
        void'(fifo[cur_q].pop_front());
      end
      in_pkt = !out_beat.tlast;
      if (out_beat.tlast) recv++;
    end else if (rst_n) begin
      chk(q_ready == '0, "no pop without transfer");
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      out_ready = ($urandom_range(3) != 0);
      if ($urandom_range(1) == 0) add_pkt($urandom_range(N - 1));
    end
    out_ready = 1;
    repeat (2000) @(negedge clk);
    chk(recv == sent, $sformatf("received %0d of %0d packets", recv, sent));
    chk(overtakes > 0, "lower queues were made to wait");
    $display("packets=%0d waits=%0d", recv, overtakes);
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
