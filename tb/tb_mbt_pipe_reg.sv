// Testbench of mbt_pipe_reg: random traffic with random back-pressure.
// A queue of the packets accepted at the input is the reference; every
// packet leaving must be the oldest one in it. Also checks the one-cycle
// latency and one-packet-per-cycle throughput when the output is always
// ready, and that a held output packet does not change.
module tb_mbt_pipe_reg;
  import mbt_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready;
  packet_t in_pkt, out_pkt;
  int checks = 0, failures = 0;

  mbt_pipe_reg dut (.*);

  packet_t q [$];
  int unsigned n_out = 0;
  bit in_taken = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // reference: record inputs, compare outputs
  always @(posedge clk) if (rst_n) begin
    in_taken = in_valid && in_ready;
    if (out_valid && out_ready) begin
      check(q.size() > 0 && out_pkt == q[0], "output order/content");
      if (q.size() > 0) void'(q.pop_front());
      n_out++;
    end
    if (in_valid && in_ready) q.push_back(in_pkt);
  end

  initial begin
    in_valid = 0; out_ready = 0; in_pkt = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!out_valid && in_ready, "empty after reset");
    // random phase
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      if (!in_valid || in_taken) begin
        in_valid = ($urandom % 3) != 0;
        in_pkt   = {$urandom, $urandom, $urandom};
      end
      out_ready = ($urandom % 2) != 0;
    end
    // drain
    @(negedge clk); in_valid = 0; out_ready = 1;
    repeat (3) @(negedge clk);
    check(q.size() == 0, "all packets delivered");
    // throughput / latency: 20 back-to-back packets, output always ready
    begin
      int unsigned start_out;
      start_out = n_out;
      for (int k = 0; k < 20; k++) begin
        in_valid = 1; in_pkt = '0; in_pkt.addr = 32'(k);
        @(negedge clk);
        check(out_valid && out_pkt.addr == 32'(k), "one-cycle latency");
      end
      in_valid = 0;
      @(negedge clk);
      check(n_out - start_out == 20, "one packet per cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
