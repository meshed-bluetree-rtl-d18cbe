// Scaling testbench of meshed_bluetree over system sizes of the
// component-count study (4 x 1, 8 x 4, 16 x 2 and 32 x 8 clients x
// memories; the largest sizes of that study, up to 128 x 16, take too long
// to compile for a routine simulation). For each
// size an mbt_scale_unit lets every client write and read back a word in
// every memory and checks that each response returns to its sender intact.
// The testbench also evaluates the component-count formulas,
// multiplexers (N_mu-1)*N_D, routers (N_D-1)*N_mu and links
// (N_mu-1)*N_D + (2*N_D-1)*N_mu, and compares them with the published
// counts for these sizes; each unit builds exactly N_D Bluetrees of N_mu-1
// multiplexers and N_mu router trees of N_D-1 routers.
module tb_meshed_bluetree_sizes;
  import mbt_pkg::*;

  localparam int NS = 4;
  localparam int SZ_C [NS] = '{4, 8, 16, 32};
  localparam int SZ_M [NS] = '{1, 4, 2, 8};
  // published counts for these sizes: multiplexers, routers, links
  localparam int PUB_MUX [NS] = '{3, 28, 30, 248};
  localparam int PUB_RT  [NS] = '{0, 24, 16, 224};
  localparam int PUB_WR  [NS] = '{7, 84, 78, 728};

  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic u_done [NS];
  int   u_checks [NS], u_fail [NS];

  for (genvar s = 0; s < NS; s++) begin : g_size
    mbt_scale_unit #(.N_CLIENTS(SZ_C[s]), .N_MEM(SZ_M[s])) u_unit (
      .clk, .rst_n, .start, .done(u_done[s]), .checks(u_checks[s]), .failures(u_fail[s]));
  end

  initial begin
    bit all;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    do begin
      @(posedge clk);
      all = 1;
      for (int s = 0; s < NS; s++) all &= u_done[s];
    end while (!all);
    repeat (2) @(posedge clk);
    for (int s = 0; s < NS; s++) begin
      int nc, nm, mux, rt, wr;
      nc = SZ_C[s]; nm = SZ_M[s];
      mux = (nc - 1) * nm;
      rt  = (nm - 1) * nc;
      wr  = (nc - 1) * nm + (2 * nm - 1) * nc;
      checks++;
      if (mux != PUB_MUX[s] || rt != PUB_RT[s] || wr != PUB_WR[s]) begin
        failures++;
        $display("FAIL %0dx%0d counts %0d/%0d/%0d", nc, nm, mux, rt, wr);
      end
      checks++;
      if (u_checks[s] != nc * nm * 4) begin
        failures++;
        $display("FAIL %0dx%0d ran %0d checks", nc, nm, u_checks[s]);
      end
      checks += u_checks[s];
      failures += u_fail[s];
      $display("%0dx%0d: %0d multiplexers, %0d routers, %0d links; %0d client-memory pairs, %0d failures",
               nc, nm, mux, rt, wr, nc * nm, u_fail[s]);
    end
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
