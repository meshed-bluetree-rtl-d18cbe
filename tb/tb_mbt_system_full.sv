// Full-size run of mbt_system with every parameter at its default: 8 traffic
// generators, a Meshed Bluetree of 8 x 4 (N_R = 2, N_beta = 3) and four
// memories with t_D = 20, each generator issuing 100 random reads with at
// most 2 outstanding. Checks that every request is answered without error,
// that no latency is below the best case 2*(N_R+N_beta)+t_D = 30 or above the
// worst-case bound (30+1)*20 + 3 + 2 + 4 = 629, and that the generators'
// finishing cycles and statistics are consistent.
module tb_mbt_system_full;
  logic clk = 0, rst_n = 0, start = 0, done;
  logic [31:0] n_issued [8], n_completed [8], n_errors [8], lat_total [8], lat_max [8], lat_min [8],
               finish_cycle [8];
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(negedge clk) cyc++;

  mbt_system dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    longint total = 0;
    int worst = 0, best = 1 << 30;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(posedge clk);
    repeat (2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      check(n_issued[i] == 100 && n_completed[i] == 100 && n_errors[i] == 0,
            $sformatf("client %0d: %0d issued, %0d answered, %0d errors", i, n_issued[i], n_completed[i], n_errors[i]));
      check(lat_min[i] >= 30, $sformatf("client %0d lowest latency %0d", i, lat_min[i]));
      check(lat_max[i] <= 629, $sformatf("client %0d highest latency %0d", i, lat_max[i]));
      check(lat_total[i] >= 100 * lat_min[i] && lat_total[i] <= 100 * lat_max[i], "latency sum consistent");
      check(finish_cycle[i] > 0 && finish_cycle[i] < cyc + 10, "finish cycle recorded");
      total += lat_total[i];
      if (int'(lat_max[i]) > worst) worst = int'(lat_max[i]);
      if (int'(lat_min[i]) < best) best = int'(lat_min[i]);
    end
    $display("8x4: total latency %0d, average %0d, lowest %0d, highest %0d", total, total / 800, best, worst);
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
