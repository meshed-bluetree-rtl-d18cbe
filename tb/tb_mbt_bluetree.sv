// Testbench of mbt_bluetree: 8 clients, ALPHA = 1, one mbt_memory (t_D = 4)
// at the root. Checks, per client: the uncontended latency 2*N_beta + t_D,
// that the memory sees the route in CPU_ID (client index bit-reversed) and
// that the client gets back the CPU_ID it sent; under random traffic from all
// clients, that every response returns to its own client, in order, with
// the right data; and that with all clients issuing at once every access
// stays within the request-path blocking bound of the timing analysis
// (blocking factor recursion, starting from 0 blocked requests).
module tb_mbt_bluetree;
  import mbt_pkg::*;

  localparam int N = 8;
  localparam int NB = 3;
  localparam int TD = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic    c_rq_valid [N], c_rq_ready [N], c_rs_valid [N], c_rs_ready [N];
  packet_t c_rq_pkt [N], c_rs_pkt [N];
  logic    m_rq_valid, m_rq_ready, m_rs_valid, m_rs_ready;
  packet_t m_rq_pkt, m_rs_pkt;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc++;

  mbt_bluetree #(.N_CLIENTS(N), .ALPHA(1)) dut (.*);
  mbt_memory #(.LATENCY(TD), .WORDS(256)) u_mem (
    .clk, .rst_n, .rq_valid(m_rq_valid), .rq_ready(m_rq_ready), .rq_pkt(m_rq_pkt),
    .rs_valid(m_rs_valid), .rs_ready(m_rs_ready), .rs_pkt(m_rs_pkt));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [2:0] bitrev3(input int i);
    return {i[0], i[1], i[2]};
  endfunction

  // worst-case request-path blocking count of client i (alpha = 1)
  function automatic int wc_blocking(input int i);
    int nb = 0;
    for (int k = 0; k < NB; k++) begin
      int na = i[k] ? (nb + 1) : (nb + 1);   // ceil((n+1)/1) = (n+1)*1
      nb = nb + na + 1;
    end
    return nb;
  endfunction

  // memory-side monitor: route bits in CPU_ID
  int exp_src = -1;
  always @(posedge clk) if (rst_n && m_rq_valid && m_rq_ready && exp_src >= 0) begin
    check(m_rq_pkt.cpu_id == {5'b0, bitrev3(exp_src)}, "route recorded in CPU_ID");
  end

  // per-client traffic state
  packet_t     sent_q [N][$];
  int unsigned t_sent [N][$];
  int unsigned max_lat [N];
  bit rq_taken [N];
  bit traffic_on = 0, stop_new = 0;
  int n_resp = 0;
  logic [31:0] ref_mem [64];

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++) begin
      rq_taken[i] = c_rq_valid[i] && c_rq_ready[i];
      if (rq_taken[i] && traffic_on) begin
        sent_q[i].push_back(c_rq_pkt[i]);
        if (c_rq_pkt[i].cmd == CMD_WRITE) ref_mem[c_rq_pkt[i].addr[7:2]] = c_rq_pkt[i].data;
      end
      if (c_rs_valid[i] && c_rs_ready[i] && traffic_on) begin
        automatic packet_t e;
        check(sent_q[i].size() > 0, "response for a client with a request");
        if (sent_q[i].size() > 0) begin
          e = sent_q[i].pop_front();
          check(c_rs_pkt[i].addr == e.addr && c_rs_pkt[i].cmd == e.cmd &&
                c_rs_pkt[i].cpu_id == e.cpu_id && c_rs_pkt[i].mem_id == e.mem_id,
                "response returns to its client in order");
        end
        n_resp++;
      end
    end
  end

  initial begin
    packet_t p;
    int unsigned t0;
    for (int i = 0; i < N; i++) begin
      c_rq_valid[i] = 0; c_rq_pkt[i] = '0; c_rs_ready[i] = 1;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 1. uncontended access from every client
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      exp_src = i;
      c_rq_valid[i] = 1; c_rq_pkt[i] = '0; c_rq_pkt[i].cmd = CMD_WRITE;
      c_rq_pkt[i].addr = 32'(i) << 2; c_rq_pkt[i].data = 32'hD000 + 32'(i);
      t0 = cyc;
      @(negedge clk);
      c_rq_valid[i] = 0;
      while (!c_rs_valid[i]) @(negedge clk);
      check(cyc - t0 == 2 * NB + TD, $sformatf("client %0d best-case latency %0d", i, cyc - t0));
      check(c_rs_pkt[i].cpu_id == 8'h00 && c_rs_pkt[i].data == 32'hD000 + 32'(i), "CPU_ID restored");
      @(negedge clk);
    end
    exp_src = -1;
    // 2. all clients at once, one read each: bound of the timing analysis
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      c_rq_valid[i] = 1; c_rq_pkt[i] = '0; c_rq_pkt[i].addr = 32'(i) << 2;
    end
    t0 = cyc;
    begin
      bit got [N];
      int left;
      left = N;
      got = '{default: 0};
      while (left > 0) begin
        @(negedge clk);
        for (int i = 0; i < N; i++) begin
          if (c_rq_valid[i] && rq_taken[i]) c_rq_valid[i] = 0;
          if (c_rs_valid[i] && !got[i]) begin
            got[i] = 1; left--;
            check(c_rs_pkt[i].data == 32'hD000 + 32'(i), "read under contention");
            check(cyc - t0 <= (wc_blocking(i) + 1) * TD + 2 * NB,
                  $sformatf("client %0d latency %0d within bound", i, cyc - t0));
          end
        end
        if (cyc - t0 > 500) break;
      end
      check(left == 0, "all contending requests served");
    end
    repeat (3) @(negedge clk);
    // 3. random traffic with back-pressure
    traffic_on = 1;
    for (int c = 0; c < 6000; c++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        if (!c_rq_valid[i] || rq_taken[i]) begin
          c_rq_valid[i] = (c < 5500) && ($urandom % 16) == 0;
          c_rq_pkt[i] = '0;
          c_rq_pkt[i].cmd = cmd_e'($urandom % 2);
          c_rq_pkt[i].addr = 32'({$urandom % 64}) << 2;
          c_rq_pkt[i].data = $urandom;
          c_rq_pkt[i].mem_id = 8'(i);   // tag: not used by a Bluetree
        end
        c_rs_ready[i] = (c >= 5500) || ($urandom % 4) != 0;
      end
    end
    for (int i = 0; i < N; i++) check(sent_q[i].size() == 0, "all random requests answered");
    check(n_resp > 300, $sformatf("enough random traffic (%0d)", n_resp));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
