// Testbench of mbt_traffic_gen with its default workload (100 reads, at most
// 2 outstanding, intervals in [1,64]) over 4 memories. The testbench plays
// interconnect and memories: it accepts requests with random back-pressure
// and answers each after a delay that depends on the memory (4 cycles for
// memory 0, 25 for the others), so responses of different memories overtake
// each other. It measures every latency itself and compares the totals,
// maximum and minimum with the generator's counters. It also checks the
// outstanding limit, the interval range, the request fields and the spread
// over the memories.
module tb_mbt_traffic_gen;
  import mbt_pkg::*;

  localparam int ND = 4;
  localparam int NUM = 100;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, rq_valid, rq_ready, rs_valid, rs_ready, done;
  packet_t rq_pkt, rs_pkt;
  logic [31:0] n_issued, n_completed, n_errors, lat_total, lat_max, lat_min, finish_cycle;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(negedge clk) cyc++;   // stable while posedge monitors sample it

  mbt_traffic_gen #(.N_MEM(ND)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  typedef struct { int unsigned due; int unsigned t_offer; packet_t p; } pend_t;
  pend_t pend [$];
  int outstanding = 0, max_outstanding = 0;
  longint my_total = 0;
  int unsigned my_max = 0, my_min = 32'hffff_ffff;
  int per_mem [ND];
  int unsigned t_offer = 0, last_take = 0;
  bit prev_valid = 0;
  int n_taken = 0, n_back = 0;
  bit limited = 1;   // previous hand-over left no free slot

  // requests
  always @(posedge clk) if (rst_n) begin
    if (rq_valid && !prev_valid) t_offer = cyc;
    prev_valid = rq_valid && !rq_ready;
    if (rq_valid && rq_ready) begin
      automatic pend_t e;
      automatic int j = int'(rq_pkt.mem_id);
      check(j < ND && rq_pkt.cmd == CMD_READ && rq_pkt.cpu_id == 0 && rq_pkt.addr < 4096 &&
            rq_pkt.addr[1:0] == 0, "request fields");
      if (j < ND) per_mem[j]++;
      if (n_taken > 0 && !limited)
        check(t_offer - last_take >= 1 && t_offer - last_take <= 64,
              $sformatf("interval %0d in [1,64]", t_offer - last_take));
      last_take = cyc;
      limited = (outstanding + 1 >= 2);
      e.due = cyc + ((j == 0) ? 4 : 25);
      e.t_offer = t_offer;
      e.p = rq_pkt;
      e.p.cpu_id = '0;
      pend.push_back(e);
      outstanding++;
      n_taken++;
      if (outstanding > max_outstanding) max_outstanding = outstanding;
    end
  end

  // responses: the earliest due one, one per cycle
  int sel;
  always @(negedge clk) begin
    #1;
    rs_valid = 0;
    sel = -1;
    foreach (pend[k]) if (pend[k].due <= cyc && (sel < 0 || pend[k].due < pend[sel].due)) sel = k;
    if (sel >= 0) begin
      rs_valid = 1;
      rs_pkt = pend[sel].p;
      rs_pkt.data = 32'hBEEF;
    end
    rq_ready = ($urandom % 4) != 0;
  end
  always @(posedge clk) if (rst_n && rs_valid) begin
    automatic int unsigned lat = cyc - pend[sel].t_offer;
    check(rs_ready, "responses always taken");
    my_total += lat;
    if (lat > my_max) my_max = lat;
    if (lat < my_min) my_min = lat;
    pend.delete(sel);
    outstanding--;
    n_back++;
  end

  initial begin
    start = 0; rs_valid = 0; rs_pkt = '0; rq_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    check(!rq_valid && !done, "idle before start");
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!done && cyc < 40000) @(posedge clk);
    repeat (2) @(posedge clk);
    check(done, "generator finished");
    check(n_issued == NUM && n_completed == NUM && n_back == NUM, "request counts");
    check(n_errors == 0, "no unmatched response");
    check(max_outstanding == 2, $sformatf("outstanding limit reached and kept (%0d)", max_outstanding));
    check(64'(lat_total) == my_total, $sformatf("total latency %0d vs %0d", lat_total, my_total));
    check(lat_max == my_max && lat_min == my_min, $sformatf("max %0d/%0d min %0d/%0d", lat_max, my_max, lat_min, my_min));
    for (int j = 0; j < ND; j++) check(per_mem[j] >= 10, $sformatf("memory %0d got %0d requests", j, per_mem[j]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
