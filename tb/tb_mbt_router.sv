// Testbench of mbt_router (SEL_BIT = 1, static response priority), plus a
// round-robin instance for a directed check. Random requests and responses
// with random back-pressure: every request must leave on the direction named
// by MEM_ID bit 1, unchanged and in order; every response must reach the
// client unchanged, each direction's responses in order. Directed parts
// check the one-cycle stage latency, static priority of direction 0 and the
// alternation of the round-robin variant.
module tb_mbt_router;
  import mbt_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic    c_rq_valid, c_rq_ready, c_rs_valid, c_rs_ready;
  packet_t c_rq_pkt, c_rs_pkt;
  logic    b_rq_valid [2], b_rq_ready [2], b_rs_valid [2], b_rs_ready [2];
  packet_t b_rq_pkt [2], b_rs_pkt [2];
  int checks = 0, failures = 0;

  mbt_router #(.SEL_BIT(1), .RS_ARB(RS_ARB_STATIC)) dut (.*);

  // round-robin instance: driven only by the directed part, requests idle
  logic    rr_c_rq_ready, rr_c_rs_valid;
  packet_t rr_c_rs_pkt;
  logic    rr_b_rq_valid [2], rr_b_rs_ready [2];
  logic    rr_b_rs_valid [2] = '{0, 0};
  packet_t rr_b_rs_pkt [2] = '{'0, '0};
  packet_t rr_b_rq_pkt [2];
  mbt_router #(.SEL_BIT(0), .RS_ARB(RS_ARB_RR)) dut_rr (
    .clk, .rst_n,
    .c_rq_valid (1'b0), .c_rq_ready (rr_c_rq_ready), .c_rq_pkt ('0),
    .c_rs_valid (rr_c_rs_valid), .c_rs_ready (1'b1), .c_rs_pkt (rr_c_rs_pkt),
    .b_rq_valid (rr_b_rq_valid), .b_rq_ready ('{1'b1, 1'b1}), .b_rq_pkt (rr_b_rq_pkt),
    .b_rs_valid (rr_b_rs_valid), .b_rs_ready (rr_b_rs_ready), .b_rs_pkt (rr_b_rs_pkt)
  );

  packet_t rq_q [2][$];
  packet_t rs_q [2][$];
  int n_rq = 0, n_rs = 0;
  bit rand_mode = 1, stop_new = 0;
  bit rq_taken = 0;
  bit rs_taken [2] = '{0, 0};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk) if (rst_n) begin
    rq_taken = c_rq_valid && c_rq_ready;
    if (rq_taken) rq_q[c_rq_pkt.mem_id[1]].push_back(c_rq_pkt);
    for (int d = 0; d < 2; d++) begin
      rs_taken[d] = b_rs_valid[d] && b_rs_ready[d];
      if (b_rq_valid[d] && b_rq_ready[d]) begin
        check(rq_q[d].size() > 0 && b_rq_pkt[d] == rq_q[d][0], "request routing by MEM_ID");
        if (rq_q[d].size() > 0) void'(rq_q[d].pop_front());
        n_rq++;
      end
    end
    if (c_rs_valid && c_rs_ready) begin
      if (rs_q[0].size() > 0 && c_rs_pkt == rs_q[0][0]) void'(rs_q[0].pop_front());
      else if (rs_q[1].size() > 0 && c_rs_pkt == rs_q[1][0]) void'(rs_q[1].pop_front());
      else check(0, "response not expected");
      checks++;
      n_rs++;
    end
    for (int d = 0; d < 2; d++) if (rs_taken[d]) rs_q[d].push_back(b_rs_pkt[d]);
  end

  always @(negedge clk) if (rst_n && rand_mode) begin
    if (!c_rq_valid || rq_taken) begin
      c_rq_valid = !stop_new && ($urandom % 2) == 0;
      c_rq_pkt   = {$urandom, $urandom, $urandom};
    end
    c_rs_ready = stop_new || ($urandom % 3) != 0;
    for (int d = 0; d < 2; d++) begin
      if (!b_rs_valid[d] || rs_taken[d]) begin
        b_rs_valid[d] = !stop_new && ($urandom % 3) == 0;
        b_rs_pkt[d]   = {$urandom, $urandom, $urandom};
      end
      b_rq_ready[d] = stop_new || ($urandom % 3) != 0;
    end
  end

  initial begin
    c_rq_valid = 0; c_rq_pkt = '0; c_rs_ready = 0;
    b_rs_valid = '{0, 0}; b_rq_ready = '{0, 0}; b_rs_pkt = '{'0, '0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3000) @(posedge clk);
    stop_new = 1;
    repeat (10) @(negedge clk);
    rand_mode = 0;
    check(rq_q[0].size() == 0 && rq_q[1].size() == 0 && rs_q[0].size() == 0 && rs_q[1].size() == 0,
          "everything delivered");
    check(n_rq > 500 && n_rs > 500, "enough traffic");
    // stage latency: request with MEM_ID bit 1 set leaves on direction 1
    c_rq_valid = 1; c_rq_pkt = '0; c_rq_pkt.mem_id = 8'h02; c_rq_pkt.addr = 32'h77;
    @(negedge clk); c_rq_valid = 0;
    check(b_rq_valid[1] && !b_rq_valid[0] && b_rq_pkt[1].addr == 32'h77, "request stage latency 1");
    // static priority: both responses arrive together, direction 0 first
    b_rs_valid = '{1, 1};
    b_rs_pkt[0] = '0; b_rs_pkt[0].addr = 32'hA0;
    b_rs_pkt[1] = '0; b_rs_pkt[1].addr = 32'hA1;
    rr_b_rs_valid = '{1, 1};
    rr_b_rs_pkt = b_rs_pkt;
    @(negedge clk);
    check(c_rs_valid && c_rs_pkt.addr == 32'hA0, "static priority: direction 0 first");
    check(rr_c_rs_valid && rr_c_rs_pkt.addr == 32'hA0, "round robin: first grant");
    // keep direction 0 busy with a new response; direction 1 still waits
    b_rs_pkt[0].addr = 32'hB0;
    rr_b_rs_pkt[0].addr = 32'hB0;
    @(negedge clk);
    check(c_rs_valid && c_rs_pkt.addr == 32'hB0, "static priority: direction 1 blocked");
    check(rr_c_rs_valid && rr_c_rs_pkt.addr == 32'hA1, "round robin: direction 1 served next");
    b_rs_valid[0] = 0;
    rr_b_rs_valid[1] = 0;
    @(negedge clk);
    check(c_rs_valid && c_rs_pkt.addr == 32'hA1, "static priority: direction 1 when 0 idle");
    check(rr_c_rs_valid && rr_c_rs_pkt.addr == 32'hB0, "round robin: back to direction 0");
    rr_b_rs_valid[0] = 0;
    b_rs_valid[1] = 0;
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
