// Testbench of mbt_mux_arbiter. Two arbiters (ALPHA = 1 and ALPHA = 3) get
// the same random requests; a reference model of the blocking counter
// predicts every grant. Directed parts check the round-robin alternation for
// ALPHA = 1, the 3:1 pattern for ALPHA = 3 and that a lone direction-1
// request is never blocked.
module tb_mbt_mux_arbiter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req0, req1, advance;
  logic g0_a1, g1_a1, g0_a3, g1_a3;
  int checks = 0, failures = 0;

  mbt_mux_arbiter #(.ALPHA(1)) dut1 (.clk, .rst_n, .req0, .req1, .advance, .gnt0(g0_a1), .gnt1(g1_a1));
  mbt_mux_arbiter #(.ALPHA(3)) dut3 (.clk, .rst_n, .req0, .req1, .advance, .gnt0(g0_a3), .gnt1(g1_a3));

  int m1 = 0, m3 = 0;   // reference counters

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic bit ref_g1(int cnt, int alpha);
    return req1 && (!req0 || cnt >= alpha);
  endfunction

  task automatic step_check();
    bit e1_1, e1_3;
    e1_1 = ref_g1(m1, 1);
    e1_3 = ref_g1(m3, 3);
    check(g1_a1 == e1_1 && g0_a1 == (req0 && !e1_1), "grant alpha=1");
    check(g1_a3 == e1_3 && g0_a3 == (req0 && !e1_3), "grant alpha=3");
    if (advance) begin
      if (e1_1) m1 = 0; else if (req0 && m1 < 1) m1++;
      if (e1_3) m3 = 0; else if (req0 && m3 < 3) m3++;
    end
  endtask

  initial begin
    int seq1 [8];
    int seq3 [8];
    req0 = 0; req1 = 0; advance = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // random
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      req0 = ($urandom % 4) != 0;
      req1 = ($urandom % 3) == 0;
      advance = ($urandom % 4) != 0;
      #1 step_check();
    end
    // directed: both always requesting, always advancing
    @(negedge clk); req0 = 0; req1 = 1; advance = 1; #1 step_check();  // resets both counters
    for (int k = 0; k < 8; k++) begin
      @(negedge clk); req0 = 1; req1 = 1; advance = 1;
      #1 seq1[k] = g1_a1; seq3[k] = g1_a3;
      step_check();
    end
    check(seq1 == '{0,1,0,1,0,1,0,1}, "round robin when alpha=1");
    check(seq3 == '{0,0,0,1,0,0,0,1}, "three high per one low when alpha=3");
    // a lone low-priority request is granted at once
    @(negedge clk); req0 = 0; req1 = 1; #1 check(g1_a1 && g1_a3, "no blocking without direction 0");
    step_check();
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
