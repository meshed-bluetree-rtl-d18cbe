// Testbench of mbt_mux (ALPHA = 1). Random requests on both client
// directions and random responses from the memory side, with random
// back-pressure everywhere. Reference queues per direction check that every
// request reaches memory in order with CPU_ID shifted left and the direction
// bit appended, and every response reaches the direction named by CPU_ID bit 0
// with CPU_ID shifted right. Directed parts check the one-cycle stage latency
// and the round-robin alternation under permanent contention.
module tb_mbt_mux;
  import mbt_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic    c_rq_valid [2], c_rq_ready [2], c_rs_valid [2], c_rs_ready [2];
  packet_t c_rq_pkt [2], c_rs_pkt [2];
  logic    m_rq_valid, m_rq_ready, m_rs_valid, m_rs_ready;
  packet_t m_rq_pkt, m_rs_pkt;
  int checks = 0, failures = 0;

  mbt_mux #(.ALPHA(1)) dut (.*);

  packet_t rq_q [2][$];
  packet_t rs_q [2][$];
  int n_rq = 0, n_rs = 0;
  bit rand_mode = 1;
  bit stop_new = 0;
  bit rq_taken [2] = '{0, 0};
  bit rs_taken = 0;
  int rq_rate = 2;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // scoreboards
  always @(posedge clk) if (rst_n) begin
    for (int d = 0; d < 2; d++) rq_taken[d] = c_rq_valid[d] && c_rq_ready[d];
    rs_taken = m_rs_valid && m_rs_ready;
    if (m_rq_valid && m_rq_ready) begin
      automatic int d = int'(m_rq_pkt.cpu_id[0]);
      automatic packet_t e;
      check(rq_q[d].size() > 0, "request expected");
      if (rq_q[d].size() > 0) begin
        e = rq_q[d].pop_front();
        e.cpu_id = {e.cpu_id[ID_W-2:0], 1'(d)};
        check(m_rq_pkt == e, "request content and CPU_ID encoding");
      end
      n_rq++;
    end
    for (int d = 0; d < 2; d++) begin
      if (c_rq_valid[d] && c_rq_ready[d]) rq_q[d].push_back(c_rq_pkt[d]);
      if (c_rs_valid[d] && c_rs_ready[d]) begin
        check(rs_q[d].size() > 0 && c_rs_pkt[d] == rs_q[d][0], "response routing and CPU_ID decoding");
        if (rs_q[d].size() > 0) void'(rs_q[d].pop_front());
        n_rs++;
      end
    end
    if (m_rs_valid && m_rs_ready) begin
      automatic packet_t e = m_rs_pkt;
      e.cpu_id = {1'b0, m_rs_pkt.cpu_id[ID_W-1:1]};
      rs_q[m_rs_pkt.cpu_id[0]].push_back(e);
    end
  end

  // stimulus (changes only at negedge, packets held while not accepted)
  always @(negedge clk) if (rst_n && rand_mode) begin
    for (int d = 0; d < 2; d++) begin
      if (!c_rq_valid[d] || rq_taken[d]) begin
        c_rq_valid[d] = !stop_new && ($urandom % rq_rate) == 0;
        c_rq_pkt[d]   = {$urandom, $urandom, $urandom};
      end
      c_rs_ready[d] = stop_new || ($urandom % 3) != 0;
    end
    if (!m_rs_valid || rs_taken) begin
      m_rs_valid = !stop_new && ($urandom % 2) == 0;
      m_rs_pkt   = {$urandom, $urandom, $urandom};
    end
    m_rq_ready = stop_new || ($urandom % 3) != 0;
  end

  initial begin
    int dirs [6];
    for (int d = 0; d < 2; d++) begin
      c_rq_valid[d] = 0; c_rs_ready[d] = 0; c_rq_pkt[d] = '0;
    end
    m_rq_ready = 0; m_rs_valid = 0; m_rs_pkt = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3000) @(posedge clk);
    // drain: no new packets, everything ready
    stop_new = 1;
    repeat (10) @(negedge clk);
    rand_mode = 0;
    c_rq_valid = '{0, 0}; m_rs_valid = 0; m_rq_ready = 1; c_rs_ready = '{1, 1};
    repeat (5) @(negedge clk);
    check(rq_q[0].size() == 0 && rq_q[1].size() == 0 && rs_q[0].size() == 0 && rs_q[1].size() == 0,
          "everything delivered");
    check(n_rq > 500 && n_rs > 500, "enough traffic");
    // latency of one stage: request offered at this negedge, at memory after one edge
    c_rq_valid[1] = 1; c_rq_pkt[1] = '0; c_rq_pkt[1].addr = 32'h55;
    @(negedge clk); c_rq_valid[1] = 0;
    check(m_rq_valid && m_rq_pkt.addr == 32'h55 && m_rq_pkt.cpu_id == 8'h01, "request stage latency 1");
    m_rs_valid = 1; m_rs_pkt = '0; m_rs_pkt.cpu_id = 8'h06; m_rs_pkt.addr = 32'h66;
    @(negedge clk); m_rs_valid = 0;
    check(c_rs_valid[0] && !c_rs_valid[1] && c_rs_pkt[0].cpu_id == 8'h03, "response stage latency 1");
    @(negedge clk);
    // contention: both directions always valid, memory always ready
    c_rq_valid = '{1, 1};
    for (int k = 0; k < 6; k++) begin
      @(negedge clk);
      dirs[k] = int'(m_rq_pkt.cpu_id[0]);
    end
    // the direction not served last is taken at the next edge
    c_rq_valid[dirs[5]] = 0;
    @(negedge clk);
    c_rq_valid = '{0, 0};
    check(dirs[0] != dirs[1] && dirs[1] != dirs[2] && dirs[2] != dirs[3] &&
          dirs[3] != dirs[4] && dirs[4] != dirs[5], "round robin under contention");
    repeat (3) @(negedge clk);
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
