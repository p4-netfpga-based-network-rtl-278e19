// tb_deparser - self-checking test of the deparser (packet/decision join).
//
// Random-length packets are pushed in while decisions for them are pushed
// a few clocks later, in order, as the parser and match stage would. About
// one packet in four is marked drop. The output must be exactly the
// non-dropped packets, beat for beat, with the decision written into the
// drop byte of tuser on every beat, while out_ready is toggled at random.
// The test also checks that in_ready falls when the FIFOs fill, and counts
// drop pulses.
module tb_deparser;
  import slicing_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_ready, dec_valid = 0, out_valid, out_ready = 0, drop_pulse;
  axis_beat_t in_beat = '0, out_beat;
  logic [7:0] dec_drop_field = '0;

  deparser #(.PKT_DEPTH(16), .META_DEPTH(8), .IN_FLIGHT(3)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // expected output beats and decisions still to be sent
  axis_beat_t exp_q[$];
  logic [7:0] dec_q[$];
  int n_pkts = 200, dropped = 0, pulses = 0, stalls = 0;

  function automatic axis_beat_t mk_beat(int p, int k, int n);
    axis_beat_t b;
    b = '0;
    b.tdata = {8{p[15:0], 16'(k)}};
    b.tkeep = '1;
    b.tuser.pkt_len = 16'(n * 32);
    b.tuser.src_port = 8'(p);
    b.tlast = (k == n - 1);
    return b;
  endfunction

  // producer of packets
  initial begin : prod
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int p = 0; p < n_pkts; p++) begin
      int n; logic [7:0] f;
      n = 1 + $urandom_range(5);
      f = {2'b00, 5'($urandom), 1'($urandom_range(3) == 0)};
      for (int k = 0; k < n; k++) begin
        axis_beat_t b;
        b = mk_beat(p, k, n);
        in_valid = 1; in_beat = b;
        while (!in_ready) begin
          stalls++;
          @(negedge clk);
        end
        @(negedge clk);
        if (!f[0]) begin
          b.tuser.drop = f;
          exp_q.push_back(b);
        end
      end
      in_valid = 0;
      dec_q.push_back(f);
      if (f[0]) dropped++;
      if ($urandom_range(1) == 0) @(negedge clk);
    end
  end

  // decisions trail their packets by two clocks
  initial begin : dec
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      dec_valid = 0;
      if (dec_q.size() > 0) begin
        repeat (2) @(negedge clk);
        dec_valid = 1; dec_drop_field = dec_q.pop_front();
      end
    end
  end

  int got = 0;
  always @(posedge clk) begin
    if (rst_n && drop_pulse) pulses++;
    if (rst_n && out_valid && out_ready) begin
      got++;
      if (exp_q.size() == 0) chk(0, "unexpected output beat");
      else chk(out_beat == exp_q.pop_front(), "output beat");
    end
  end

  always @(negedge clk) out_ready = ($urandom_range(9) < 3);

  initial begin
    wait (rst_n);
    wait (dropped > 0 && got > 50);
    repeat (1) @(negedge clk);
    while (exp_q.size() > 0 || dec_q.size() > 0 || in_valid) @(negedge clk);
    repeat (20) @(negedge clk);
    chk(exp_q.size() == 0, "all expected beats seen");
    chk(pulses == dropped, $sformatf("drop pulses %0d exp %0d", pulses, dropped));
    chk(stalls > 0, "input back-pressure exercised");
    $display("beats=%0d dropped=%0d stalls=%0d", got, dropped, stalls);
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
