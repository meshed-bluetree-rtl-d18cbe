// Testbench of mbt_router_tree: one client, 4 memories (router depth 2),
// static response priority. The memories are mbt_memory instances with
// latencies 1, 3, 5 and 7 so that responses of different memories meet in
// the routers. Checks the uncontended latency 2*N_R + t_D for every memory,
// that each request reaches exactly the memory named by its MEM_ID, and,
// under random traffic with back-pressure at the client, that every response
// comes back with the right data (responses of one memory in order).
// Counts how often two responses contend at the root router.
module tb_mbt_router_tree;
  import mbt_pkg::*;

  localparam int ND = 4;
  localparam int NR = 2;
  localparam int LAT [ND] = '{1, 3, 5, 7};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic    c_rq_valid, c_rq_ready, c_rs_valid, c_rs_ready;
  packet_t c_rq_pkt, c_rs_pkt;
  logic    b_rq_valid [ND], b_rq_ready [ND], b_rs_valid [ND], b_rs_ready [ND];
  packet_t b_rq_pkt [ND], b_rs_pkt [ND];
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc++;

  mbt_router_tree #(.N_MEM(ND), .RS_ARB(RS_ARB_STATIC)) dut (.*);

  for (genvar j = 0; j < ND; j++) begin : g_mem
    mbt_memory #(.LATENCY(LAT[j]), .WORDS(64)) u_mem (
      .clk, .rst_n, .rq_valid(b_rq_valid[j]), .rq_ready(b_rq_ready[j]), .rq_pkt(b_rq_pkt[j]),
      .rs_valid(b_rs_valid[j]), .rs_ready(b_rs_ready[j]), .rs_pkt(b_rs_pkt[j]));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // every request must reach the memory its MEM_ID names
  always @(posedge clk) if (rst_n)
    for (int j = 0; j < ND; j++)
      if (b_rq_valid[j] && b_rq_ready[j]) check(b_rq_pkt[j].mem_id == 8'(j), "routed by MEM_ID");

  int contention = 0;
  always @(posedge clk) if (rst_n && dut.g_node[1].u_router.b_rs_valid[0] && dut.g_node[1].u_router.b_rs_valid[1])
    contention++;

  packet_t sent_q [ND][$];
  logic [31:0] ref_mem [ND][16];
  bit rq_taken = 0, traffic_on = 0;
  int n_resp = 0;

  always @(posedge clk) if (rst_n) begin
    rq_taken = c_rq_valid && c_rq_ready;
    if (traffic_on) begin
      if (rq_taken) begin
        automatic int j = int'(c_rq_pkt.mem_id);
        automatic packet_t e = c_rq_pkt;
        if (e.cmd == CMD_WRITE) ref_mem[j][e.addr[5:2]] = e.data;
        else e.data = ref_mem[j][e.addr[5:2]];
        sent_q[j].push_back(e);
      end
      if (c_rs_valid && c_rs_ready) begin
        automatic int j = int'(c_rs_pkt.mem_id);
        check(j < ND && sent_q[j].size() > 0 && c_rs_pkt == sent_q[j][0], "response content and order");
        if (j < ND && sent_q[j].size() > 0) void'(sent_q[j].pop_front());
        n_resp++;
      end
    end
  end

  initial begin
    int unsigned t0;
    c_rq_valid = 0; c_rq_pkt = '0; c_rs_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // initialise the words used, measuring the uncontended latency
    for (int j = 0; j < ND; j++) begin
      for (int w = 0; w < 16; w++) begin
        @(negedge clk);
        c_rq_valid = 1; c_rq_pkt = '0; c_rq_pkt.cmd = CMD_WRITE; c_rq_pkt.mem_id = 8'(j);
        c_rq_pkt.addr = 32'(w) << 2; c_rq_pkt.data = 32'(j * 100 + w);
        ref_mem[j][w] = c_rq_pkt.data;
        t0 = cyc;
        @(negedge clk);
        c_rq_valid = 0;
        while (!c_rs_valid) @(negedge clk);
        if (w == 0) check(cyc - t0 == 2 * NR + LAT[j], $sformatf("memory %0d best-case latency %0d", j, cyc - t0));
        check(c_rs_pkt.mem_id == 8'(j) && c_rs_pkt.cmd == CMD_WRITE, "write acknowledge");
      end
    end
    @(negedge clk);
    traffic_on = 1;
    for (int c = 0; c < 5000; c++) begin
      @(negedge clk);
      if (!c_rq_valid || rq_taken) begin
        c_rq_valid = (c < 4800) && ($urandom % 2) == 0;
        c_rq_pkt = '0;
        c_rq_pkt.cmd = cmd_e'($urandom % 2);
        c_rq_pkt.mem_id = 8'($urandom % ND);
        c_rq_pkt.addr = 32'($urandom % 16) << 2;
        c_rq_pkt.data = $urandom;
      end
      c_rs_ready = (c >= 4800) || ($urandom % 3) != 0;
    end
    for (int j = 0; j < ND; j++) check(sent_q[j].size() == 0, "all answered");
    check(n_resp > 1000, $sformatf("enough traffic (%0d)", n_resp));
    check(contention > 0, $sformatf("responses contended at the root router %0d times", contention));
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
