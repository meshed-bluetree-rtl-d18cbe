// Testbench of mbt_system for the mixed-memory experiment: 8 clients share a
// fast on-chip memory (t_D = 1, memory 0) and a slow DRAM-like memory
// (t_D = 30, memory 1) through an 8 x 2 Meshed Bluetree. Three systems run
// side by side with 10%, 30% and 50% of the reads sent to the fast memory
// (the rest to the slow one); workload otherwise as in the synthetic tests
// (100 reads per client, at most 2 outstanding, intervals in [1,64]).
// Checks: every read answered without error; the share of reads that reach
// memory 0 is within 5 points of the setting; no latency below the best case
// 2*(N_R+N_beta)+1 and none above the worst-case bound of the timing
// analysis for t_D = 30; the completion time is no less than the slow
// memory's reads x 30; total latency and completion time fall as the fast
// share rises.
module tb_mbt_system_mixed;
  import mbt_pkg::*;

  localparam int NC = 8;
  localparam int NS = 3;
  localparam int PCT [NS] = '{10, 30, 50};

  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int wc_bound(input int nr, input int nb, input int nd, input int td);
    int n = nr;
    for (int k = 0; k < nb; k++) n = n + (n + 1) + 1;
    return (n + 1) * td + nb + nr + nd;
  endfunction

  typedef logic [31:0] stat_t [NC];
  logic  done [NS];
  stat_t iss [NS], cmp [NS], err [NS], tot [NS], mx [NS], mn [NS], fin [NS];
  int    to_fast [NS], to_all [NS];

  // completion time: cycles from start until the last response
  int cyc = 0, t_start = 0;
  int dt [NS] = '{0, 0, 0};
  always @(posedge clk) begin
    cyc++;
    if (start) t_start = cyc;
    for (int s = 0; s < NS; s++) if (done[s] && dt[s] == 0) dt[s] = cyc - t_start;
  end

  for (genvar s = 0; s < NS; s++) begin : g_sys
    mbt_system #(.N_MEM(2), .MEM_LATENCY({16'd30, 16'd1}), .MEM0_PERCENT(PCT[s]),
                 .SEED(32'h1234_5678 + s)) u_sys (
      .clk, .rst_n, .start, .done(done[s]), .n_issued(iss[s]), .n_completed(cmp[s]),
      .n_errors(err[s]), .lat_total(tot[s]), .lat_max(mx[s]), .lat_min(mn[s]), .finish_cycle(fin[s]));
    initial begin to_fast[s] = 0; to_all[s] = 0; end
    always @(posedge clk) if (rst_n) begin
      if (u_sys.m_rq_valid[0] && u_sys.m_rq_ready[0]) begin to_fast[s]++; to_all[s]++; end
      if (u_sys.m_rq_valid[1] && u_sys.m_rq_ready[1]) to_all[s]++;
    end
  end

  initial begin
    longint total [NS];
    int bc, wc;
    bc = 2 * (1 + 3) + 1;
    wc = wc_bound(1, 3, 2, 30);
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (!(done[0] && done[1] && done[2])) @(posedge clk);
    repeat (2) @(posedge clk);
    for (int s = 0; s < NS; s++) begin
      int worst;
      total[s] = 0; worst = 0;
      for (int i = 0; i < NC; i++) begin
        check(iss[s][i] == 100 && cmp[s][i] == 100 && err[s][i] == 0,
              $sformatf("%0d%%: client %0d complete", PCT[s], i));
        check(int'(mn[s][i]) >= bc, $sformatf("%0d%%: client %0d min latency %0d >= %0d", PCT[s], i, mn[s][i], bc));
        check(int'(mx[s][i]) <= wc, $sformatf("%0d%%: client %0d max latency %0d <= %0d", PCT[s], i, mx[s][i], wc));
        total[s] += tot[s][i];
        if (int'(mx[s][i]) > worst) worst = int'(mx[s][i]);
      end
      check(to_all[s] == NC * 100, $sformatf("%0d%%: %0d reads reached the memories", PCT[s], to_all[s]));
      check(to_fast[s] * 100 >= (PCT[s] - 5) * to_all[s] && to_fast[s] * 100 <= (PCT[s] + 5) * to_all[s],
            $sformatf("%0d%%: %0d of %0d reads went to the fast memory", PCT[s], to_fast[s], to_all[s]));
      // the slow memory serves one read per 30 cycles: it bounds completion
      check(dt[s] >= (to_all[s] - to_fast[s]) * 30, $sformatf("%0d%%: completion %0d >= slow reads x 30", PCT[s], dt[s]));
      $display("fast share %0d%%: %0d reads to fast memory, total latency %0d, average %0d, highest %0d (bound %0d), completion %0d cycles",
               PCT[s], to_fast[s], total[s], total[s] / (NC * 100), worst, wc, dt[s]);
    end
    check(total[1] < total[0] && total[2] < total[1], "total latency falls as the fast share rises");
    check(dt[1] < dt[0] && dt[2] < dt[1], "completion time falls as the fast share rises");
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
