// tb_slice_demux - self-checking test of the queue demultiplexer.
//
// Sends packets whose first beat names a queue in the metadata drop byte;
// later beats carry a different (wrong) queue number on purpose. Every beat
// must come out one clock later with exactly one write strobe, the one of
// the queue named by the packet's first beat, and with the beat unchanged.
module tb_slice_demux;
  import slicing_pkg::*;

  localparam int N = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0;
  axis_beat_t in_beat = '0, out_beat;
  logic [N-1:0] out_wr;

  slice_demux #(.NUM_Q(N)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    bit [N-1:0] seen;
    seen = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int p = 0; p < 200; p++) begin
      int n, q;
      n = 1 + $urandom_range(4);
      q = (p < N) ? p : $urandom_range(N - 1);
      for (int k = 0; k < n; k++) begin
        axis_beat_t b;
        b = '0;
        b.tdata = {8{32'($urandom)}};
        b.tkeep = '1;
        b.tuser.drop = (k == 0) ? {2'b00, 5'(q), 1'b0} : {2'b00, 5'(q + 1 + k), 1'b0};
        b.tlast = (k == n - 1);
        in_valid = 1; in_beat = b;
        @(negedge clk);
        chk(out_wr == (N'(1) << q), $sformatf("strobe %h for queue %0d", out_wr, q));
        chk(out_beat == b, "beat passed unchanged");
        seen[q] = 1;
        if ($urandom_range(3) == 0) begin
          in_valid = 0;
          @(negedge clk);
          chk(out_wr == '0, "no strobe without input");
        end
      end
    end
    chk(&seen, "every queue addressed");
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
