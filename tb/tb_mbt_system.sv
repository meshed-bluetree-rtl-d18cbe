// End-to-end testbench of mbt_system: the synthetic-workload experiments.
// Four systems run the same workload (8 traffic generators, 100 reads each,
// at most 2 outstanding, intervals in [1,64]) side by side:
//   s1: 8 x 1 (a plain Bluetree), s2: 8 x 2, s4: 8 x 4 (all t_D = 20),
//   mx: 8 x 2 with a fast memory (t_D = 1) taking 50% of the reads beside a
//       slow one (t_D = 30).
// For each system: every request answered without error, the lowest latency
// equal to (and no latency below) the best case 2*(N_R+N_beta)+t_D of the fastest memory and none above the
// worst-case bound of the timing analysis for the slowest (8 x 2 and 8 x 4;
// for 8 x 1 a plain count of competing requests). Across systems:
// the total latency falls as memories are added, and the completion time
// (start to last response) stays close to the busiest memory's reads x t_D. Counted mechanisms (each
// must occur): a request waiting for a busy memory, both inputs of a
// Bluetree root multiplexer contending, a generator holding 2 outstanding
// requests, and two responses contending in a router. The last needs
// memories of different speed and more load than the paper's workload, so a
// fifth system (st: 8 x 4, t_D = 1/7/13/30, 4 outstanding, intervals in
// [1,4]) provides it; for it only completion is checked.
module tb_mbt_system;
  import mbt_pkg::*;

  localparam int NC = 8;

  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // worst-case bound of the analysis (alpha = 1, static router priority)
  function automatic int wc_bound(input int nr, input int nb, input int nd, input int td);
    int n = nr;
    for (int k = 0; k < nb; k++) n = n + (n + 1) + 1;
    return (n + 1) * td + nb + nr + nd;
  endfunction

  typedef logic [31:0] stat_t [NC];

`define MBT_SYS(NAME) \
  logic  NAME``_done; \
  stat_t NAME``_iss, NAME``_cmp, NAME``_err, NAME``_tot, NAME``_max, NAME``_min, NAME``_fin;
  `MBT_SYS(s1)
  `MBT_SYS(s2)
  `MBT_SYS(s4)
  `MBT_SYS(mx)
  `MBT_SYS(st)
`undef MBT_SYS

  mbt_system #(.N_MEM(1), .MEM_LATENCY({16'd20})) u_s1 (
    .clk, .rst_n, .start, .done(s1_done), .n_issued(s1_iss), .n_completed(s1_cmp),
    .n_errors(s1_err), .lat_total(s1_tot), .lat_max(s1_max), .lat_min(s1_min), .finish_cycle(s1_fin));
  mbt_system #(.N_MEM(2), .MEM_LATENCY({16'd20, 16'd20})) u_s2 (
    .clk, .rst_n, .start, .done(s2_done), .n_issued(s2_iss), .n_completed(s2_cmp),
    .n_errors(s2_err), .lat_total(s2_tot), .lat_max(s2_max), .lat_min(s2_min), .finish_cycle(s2_fin));
  mbt_system #(.N_MEM(4)) u_s4 (
    .clk, .rst_n, .start, .done(s4_done), .n_issued(s4_iss), .n_completed(s4_cmp),
    .n_errors(s4_err), .lat_total(s4_tot), .lat_max(s4_max), .lat_min(s4_min), .finish_cycle(s4_fin));
  // memory 0 fast (index 0 is the least significant element), memory 1 slow
  mbt_system #(.N_MEM(2), .MEM_LATENCY({16'd30, 16'd1}), .MEM0_PERCENT(50)) u_mx (
    .clk, .rst_n, .start, .done(mx_done), .n_issued(mx_iss), .n_completed(mx_cmp),
    .n_errors(mx_err), .lat_total(mx_tot), .lat_max(mx_max), .lat_min(mx_min), .finish_cycle(mx_fin));

  // stress: 4 memories of different speed, 4 outstanding, short intervals
  mbt_system #(.N_MEM(4), .MEM_LATENCY({16'd30, 16'd13, 16'd7, 16'd1}), .MAX_OUTSTANDING(4),
               .INTERVAL_MAX(4), .SEED(32'hA5A5_0F0F)) u_st (
    .clk, .rst_n, .start, .done(st_done), .n_issued(st_iss), .n_completed(st_cmp),
    .n_errors(st_err), .lat_total(st_tot), .lat_max(st_max), .lat_min(st_min), .finish_cycle(st_fin));

  // completion time: cycles from start until every response is back (the
  // "total latency" of the paper's evaluation: memory-bound, so about the
  // number of reads to the busiest memory times t_D)
  int cyc = 0, t_start = 0;
  int dt_s1 = 0, dt_s2 = 0, dt_s4 = 0, dt_mx = 0;
  always @(posedge clk) begin
    cyc++;
    if (start) t_start = cyc;
    if (s1_done && dt_s1 == 0) dt_s1 = cyc - t_start;
    if (s2_done && dt_s2 == 0) dt_s2 = cyc - t_start;
    if (s4_done && dt_s4 == 0) dt_s4 = cyc - t_start;
    if (mx_done && dt_mx == 0) dt_mx = cyc - t_start;
  end
  // reads served per memory of s2 and s4
  int served2 [2], served4 [4];
  initial begin served2 = '{0, 0}; served4 = '{0, 0, 0, 0}; end
  always @(posedge clk) if (rst_n) begin
    for (int j = 0; j < 2; j++) if (u_s2.m_rq_valid[j] && u_s2.m_rq_ready[j]) served2[j]++;
    for (int j = 0; j < 4; j++) if (u_s4.m_rq_valid[j] && u_s4.m_rq_ready[j]) served4[j]++;
  end

  // mechanism counters
  int mem_busy_stall = 0, root_contention = 0, outstanding_full = 0, router_contention = 0;
  always @(posedge clk) if (rst_n) begin
    if (u_s4.m_rq_valid[0] && !u_s4.m_rq_ready[0]) mem_busy_stall++;
    if (u_s4.u_net.g_bt[0].u_bt.g_node[1].u_mux.c_rq_valid[0] &&
        u_s4.u_net.g_bt[0].u_bt.g_node[1].u_mux.c_rq_valid[1]) root_contention++;
    if (u_s4.g_client[0].u_gen.slots[0].valid && u_s4.g_client[0].u_gen.slots[1].valid) outstanding_full++;
  end
  for (genvar i = 0; i < NC; i++) begin : g_rc
    always @(posedge clk) if (rst_n && u_mx.u_net.g_rt[i].u_rt.g_node[1].u_router.b_rs_valid[0] &&
                              u_mx.u_net.g_rt[i].u_rt.g_node[1].u_router.b_rs_valid[1]) router_contention++;
    always @(posedge clk) if (rst_n && u_st.u_net.g_rt[i].u_rt.g_node[1].u_router.b_rs_valid[0] &&
                              u_st.u_net.g_rt[i].u_rt.g_node[1].u_router.b_rs_valid[1]) router_contention++;
  end

  task automatic check_sys(input string name, input stat_t iss, input stat_t cmp, input stat_t err,
                           input stat_t tot, input stat_t mx, input stat_t mn,
                           input int bc, input int wc, input bit wc_applies,
                           output longint total, output int worst);
    int lowest;
    total = 0; worst = 0; lowest = 1 << 30;
    for (int i = 0; i < NC; i++) begin
      check(iss[i] == 100 && cmp[i] == 100 && err[i] == 0, $sformatf("%s client %0d complete", name, i));
      check(int'(mn[i]) >= bc, $sformatf("%s client %0d min latency %0d >= %0d", name, i, mn[i], bc));
      if (wc_applies)
        check(int'(mx[i]) <= wc, $sformatf("%s client %0d max latency %0d <= %0d", name, i, mx[i], wc));
      total += tot[i];
      if (int'(mx[i]) > worst) worst = int'(mx[i]);
      if (int'(mn[i]) < lowest) lowest = int'(mn[i]);
    end
    // with 800 reads some meet an idle path: the lowest latency is the best case
    check(lowest == bc, $sformatf("%s lowest latency %0d == best case %0d", name, lowest, bc));
    $display("%s: total latency %0d, average %0d, lowest %0d, highest %0d (analysis bound %0d)", name, total, total / (NC * 100), lowest, worst, wc);
  endtask

  initial begin
    longint t1, t2, t4, tm;
    int w1, w2, w4, wm;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (!(s1_done && s2_done && s4_done && mx_done && st_done)) @(posedge clk);
    repeat (2) @(posedge clk);
    check_sys("8x1", s1_iss, s1_cmp, s1_err, s1_tot, s1_max, s1_min, 2 * (0 + 3) + 20, wc_bound(0, 3, 1, 20), 0, t1, w1);
    check_sys("8x2", s2_iss, s2_cmp, s2_err, s2_tot, s2_max, s2_min, 2 * (1 + 3) + 20, wc_bound(1, 3, 2, 20), 1, t2, w2);
    check_sys("8x4", s4_iss, s4_cmp, s4_err, s4_tot, s4_max, s4_min, 2 * (2 + 3) + 20, wc_bound(2, 3, 4, 20), 1, t4, w4);
    check_sys("8x2 mixed", mx_iss, mx_cmp, mx_err, mx_tot, mx_max, mx_min, 2 * (1 + 3) + 1, wc_bound(1, 3, 2, 30), 1, tm, wm);
    // 8 x 1 has no router stage to hold a client's own earlier request, so the
    // analysis bound (which starts from N_R = 0 blocked requests) does not
    // cover a client with 2 outstanding requests; check the plain count
    // instead: at most 16 requests share the memory.
    check(w1 <= 2 * NC * 20 + 2 * 3, $sformatf("8x1 highest latency %0d <= %0d", w1, 2 * NC * 20 + 2 * 3));
    for (int i = 0; i < NC; i++)
      check(st_iss[i] == 100 && st_cmp[i] == 100 && st_err[i] == 0, $sformatf("stress client %0d complete", i));
    check(t2 < t1 && t4 < t2, "total latency falls as memories are added");
    begin
      int busiest2, busiest4;
      busiest2 = 0; busiest4 = 0;
      for (int j = 0; j < 2; j++) if (served2[j] > busiest2) busiest2 = served2[j];
      for (int j = 0; j < 4; j++) if (served4[j] > busiest4) busiest4 = served4[j];
      $display("completion time: 8x1 %0d, 8x2 %0d, 8x4 %0d, 8x2 mixed %0d cycles; busiest memory 8x2 %0d reads, 8x4 %0d reads",
               dt_s1, dt_s2, dt_s4, dt_mx, busiest2, busiest4);
      // a memory serves one read per t_D: the busiest one bounds completion
      check(dt_s1 >= NC * 100 * 20 && dt_s1 <= NC * 100 * 20 * 105 / 100, $sformatf("8x1 completion %0d within 5%% of 800 x 20", dt_s1));
      check(dt_s2 >= busiest2 * 20 && dt_s2 <= busiest2 * 20 * 110 / 100, $sformatf("8x2 completion %0d near %0d x 20", dt_s2, busiest2));
      check(dt_s4 >= busiest4 * 20 && dt_s4 <= busiest4 * 20 * 125 / 100, $sformatf("8x4 completion %0d near %0d x 20", dt_s4, busiest4));
      check(dt_s2 < dt_s1 && dt_s4 < dt_s2, "completion time falls as memories are added");
    end
    check(t4 * 2 < t1, "four memories at least halve the total latency of one");
    check(mem_busy_stall > 0, $sformatf("requests waited for a busy memory %0d cycles", mem_busy_stall));
    check(root_contention > 0, $sformatf("root multiplexer contention %0d cycles", root_contention));
    check(outstanding_full > 0, $sformatf("generator at outstanding limit %0d cycles", outstanding_full));
    $display("mechanisms: memory busy %0d, root contention %0d, outstanding limit %0d, router contention %0d",
             mem_busy_stall, root_contention, outstanding_full, router_contention);
    check(router_contention > 0, $sformatf("router response contention %0d cycles", router_contention));
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
