// Testbench of meshed_bluetree at its default size (8 clients x 4 memories,
// N_R = 2, N_beta = 3, ALPHA = 1, static response priority) with four
// mbt_memory modules of t_D = 20 cycles.
//   1. Every client writes, then reads, every memory alone: the latency must
//      be the best case 2*(N_R+N_beta)+t_D = 30 and the data must match.
//   2. Four clients access four different memories at the same time: all
//      finish in the best case (no interference between memories); the same
//      four clients on one memory serialise behind it.
//   3. Random traffic from all clients (reads and writes, up to 2 outstanding
//      each, random memories): every response reaches its client with the
//      right data (each client uses its own words), and no access exceeds the worst-case bound of the timing
//      analysis, (N_RQ+1)*t_D + N_beta + N_R + N_D with N_RQ = 30, i.e. 629.
module tb_meshed_bluetree;
  import mbt_pkg::*;

  localparam int NC = 8;
  localparam int ND = 4;
  localparam int NR = 2;
  localparam int NB = 3;
  localparam int TD = 20;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic    c_rq_valid [NC], c_rq_ready [NC], c_rs_valid [NC], c_rs_ready [NC];
  packet_t c_rq_pkt [NC], c_rs_pkt [NC];
  logic    m_rq_valid [ND], m_rq_ready [ND], m_rs_valid [ND], m_rs_ready [ND];
  packet_t m_rq_pkt [ND], m_rs_pkt [ND];
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc++;

  meshed_bluetree dut (.*);

  for (genvar j = 0; j < ND; j++) begin : g_mem
    mbt_memory #(.LATENCY(TD), .WORDS(64)) u_mem (
      .clk, .rst_n, .rq_valid(m_rq_valid[j]), .rq_ready(m_rq_ready[j]), .rq_pkt(m_rq_pkt[j]),
      .rs_valid(m_rs_valid[j]), .rs_ready(m_rs_ready[j]), .rs_pkt(m_rs_pkt[j]));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // worst-case bound of the analysis, alpha = 1
  function automatic int wc_latency();
    int n = NR;
    for (int k = 0; k < NB; k++) n = n + (n + 1) + 1;
    return (n + 1) * TD + NB + NR + ND;
  endfunction

  // requests reach the memory their MEM_ID names
  always @(posedge clk) if (rst_n)
    for (int j = 0; j < ND; j++)
      if (m_rq_valid[j] && m_rq_ready[j]) check(m_rq_pkt[j].mem_id == 8'(j), "routed to its memory");

  // ---------- single accesses ----------
  task automatic one_access(input int i, input int j, input cmd_e cmd, input logic [31:0] addr,
                            input logic [31:0] data, output packet_t rsp, output int unsigned lat);
    int unsigned t0;
    @(negedge clk);
    c_rq_valid[i] = 1; c_rq_pkt[i] = '0; c_rq_pkt[i].cmd = cmd; c_rq_pkt[i].addr = addr;
    c_rq_pkt[i].data = data; c_rq_pkt[i].mem_id = 8'(j);
    t0 = cyc;
    @(negedge clk);
    c_rq_valid[i] = 0;
    while (!c_rs_valid[i]) @(negedge clk);
    lat = cyc - t0;
    rsp = c_rs_pkt[i];
  endtask

  // ---------- random traffic ----------
  typedef struct { int mem; int unsigned t; packet_t p; bit data_known; } out_t;
  out_t outst [NC][$];
  logic [31:0] ref_mem [ND][64];
  bit          known [ND][64];   // word written through the interconnect
  bit rq_taken [NC];
  bit traffic_on = 0;
  int n_resp = 0, worst = 0;

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < NC; i++) begin
      rq_taken[i] = c_rq_valid[i] && c_rq_ready[i];
      if (!traffic_on) continue;
      if (c_rs_valid[i] && c_rs_ready[i]) begin
        automatic int k = -1;
        foreach (outst[i][q]) if (k < 0 && outst[i][q].mem == int'(c_rs_pkt[i].mem_id)) k = q;
        check(k >= 0, "response matches a request");
        if (k >= 0) begin
          automatic int lat = int'(cyc - outst[i][k].t);
          automatic packet_t got = c_rs_pkt[i];
          if (!outst[i][k].data_known) got.data = outst[i][k].p.data;
          check(got == outst[i][k].p, "response content");
          check(lat <= wc_latency(), $sformatf("latency %0d within bound %0d", lat, wc_latency()));
          if (lat > worst) worst = lat;
          outst[i].delete(k);
        end
        n_resp++;
      end
    end
  end

  int unsigned t_offer [NC];
  initial begin
    packet_t r;
    int unsigned lat;
    for (int i = 0; i < NC; i++) begin c_rq_valid[i] = 0; c_rq_pkt[i] = '0; c_rs_ready[i] = 1; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 1. best case, every pair
    for (int i = 0; i < NC; i++)
      for (int j = 0; j < ND; j++) begin
        one_access(i, j, CMD_WRITE, 32'(i) << 2, 32'(1000 * j + i), r, lat);
        check(lat == 2 * (NR + NB) + TD, $sformatf("write %0d->%0d latency %0d", i, j, lat));
        check(r.cmd == CMD_WRITE && r.cpu_id == 0, "write acknowledge");
        ref_mem[j][i] = 32'(1000 * j + i);
        known[j][i] = 1;
      end
    for (int i = 0; i < NC; i++)
      for (int j = 0; j < ND; j++) begin
        one_access(i, j, CMD_READ, 32'(i) << 2, '0, r, lat);
        check(lat == 2 * (NR + NB) + TD && r.data == 32'(1000 * j + i),
              $sformatf("read %0d<-%0d latency %0d data %0d", i, j, lat, r.data));
      end
    // 2. parallel memories versus one shared memory
    for (int shared = 0; shared < 2; shared++) begin
      int unsigned t0, last;
      bit got [NC];
      int left;
      left = 4;
      got = '{default: 0};
      @(negedge clk);
      for (int k = 0; k < 4; k++) begin
        c_rq_valid[2 * k] = 1; c_rq_pkt[2 * k] = '0;
        c_rq_pkt[2 * k].mem_id = shared ? 8'd1 : 8'(k);
      end
      t0 = cyc; last = 0;
      while (left > 0 && cyc - t0 < 400) begin
        @(negedge clk);
        for (int k = 0; k < 4; k++) begin
          if (c_rq_valid[2 * k] && rq_taken[2 * k]) c_rq_valid[2 * k] = 0;
          if (c_rs_valid[2 * k] && !got[2 * k]) begin got[2 * k] = 1; left--; last = cyc - t0; end
        end
      end
      if (!shared) check(last == 2 * (NR + NB) + TD, $sformatf("four memories in parallel: %0d", last));
      else         check(last >= 2 * (NR + NB) + 4 * TD, $sformatf("one shared memory serialises: %0d", last));
      repeat (3) @(negedge clk);
    end
    // 3. random traffic
    traffic_on = 1;
    for (int c = 0; c < 20000; c++) begin
      @(negedge clk);
      for (int i = 0; i < NC; i++) begin
        if (c_rq_valid[i] && rq_taken[i]) begin
          automatic out_t o;
          o.mem = int'(c_rq_pkt[i].mem_id); o.t = t_offer[i]; o.p = c_rq_pkt[i];
          o.data_known = 1;
          if (o.p.cmd == CMD_WRITE) begin
            ref_mem[o.mem][o.p.addr[7:2]] = o.p.data;
            known[o.mem][o.p.addr[7:2]] = 1;
          end else begin
            o.p.data = ref_mem[o.mem][o.p.addr[7:2]];
            o.data_known = known[o.mem][o.p.addr[7:2]];
          end
          outst[i].push_back(o);
          c_rq_valid[i] = 0;
        end
        if (!c_rq_valid[i] && outst[i].size() < 2 && c < 19000 && ($urandom % 8) == 0) begin
          c_rq_valid[i] = 1; c_rq_pkt[i] = '0;
          c_rq_pkt[i].cmd = cmd_e'($urandom % 2);
          c_rq_pkt[i].mem_id = 8'(($urandom % 3 == 0) ? 0 : $urandom % ND);
          c_rq_pkt[i].addr = 32'(8 * i + ($urandom % 8)) << 2;   // own words per client
          c_rq_pkt[i].data = $urandom;
          t_offer[i] = cyc;
        end
      end
    end
    for (int i = 0; i < NC; i++) check(outst[i].size() == 0, "all random requests answered");
    check(n_resp > 1000, $sformatf("enough random traffic (%0d responses, worst latency %0d)", n_resp, worst));
    $display("random traffic: %0d responses, worst latency %0d, bound %0d", n_resp, worst, wc_latency());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
