// Testbench of mbt_memory at its default latency (t_D = 20) and size.
// Checks the exact response latency, that the memory refuses requests while
// one is in service, that a new request is taken in the cycle the previous
// response leaves (one access per t_D cycles under load), write
// acknowledgement and read data against a reference array, and that the
// route fields come back unchanged. Responses are accepted after random
// delays in the random part.
module tb_mbt_memory;
  import mbt_pkg::*;

  localparam int unsigned LAT = 20;
  localparam int unsigned WORDS = 1024;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic rq_valid, rq_ready, rs_valid, rs_ready;
  packet_t rq_pkt, rs_pkt;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;

  mbt_memory dut (.*);

  always @(posedge clk) cyc++;

  logic [31:0] ref_mem [WORDS];
  bit          written [WORDS];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // issue one request (at negedge), return the cycle it was taken
  task automatic issue(input packet_t p, output int unsigned t_take);
    rq_valid = 1; rq_pkt = p;
    @(posedge clk);
    while (!rq_ready) @(posedge clk);
    t_take = cyc;
    @(negedge clk);
    rq_valid = 0;
  endtask

  // wait for the response, take it after 'hold' extra cycles
  task automatic collect(input int hold, output packet_t p, output int unsigned t_seen);
    rs_ready = 0;
    while (!rs_valid) @(negedge clk);
    t_seen = cyc;
    repeat (hold) begin
      @(negedge clk);
      check(rs_valid && rq_ready == 1'b0, "response held, memory busy");
    end
    p = rs_pkt;
    rs_ready = 1;
    @(negedge clk);
    rs_ready = 0;
  endtask

  initial begin
    packet_t p, r;
    int unsigned t0, t1, t2;
    rq_valid = 0; rq_pkt = '0; rs_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(rq_ready && !rs_valid, "idle after reset");
    // write, exact latency and acknowledge
    p = '0; p.cmd = CMD_WRITE; p.addr = 32'h0000_0104; p.data = 32'hCAFE_0001;
    p.cpu_id = 8'h5A; p.mem_id = 8'h03;
    issue(p, t0);
    check(!rq_ready, "busy while serving");
    collect(0, r, t1);
    check(t1 - t0 == LAT, $sformatf("latency %0d", t1 - t0));
    check(r == p, "write acknowledge echoes the request");
    // read back
    p.cmd = CMD_READ; p.data = '0; p.cpu_id = 8'h11;
    issue(p, t0);
    collect(3, r, t1);
    check(t1 - t0 == LAT && r.cmd == CMD_READ && r.data == 32'hCAFE_0001 && r.cpu_id == 8'h11 &&
          r.mem_id == 8'h03 && r.addr == p.addr, "read data and route fields");
    // back to back with responses always taken: one access per LAT cycles
    rs_ready = 1;
    rq_valid = 1; rq_pkt = '0; rq_pkt.addr = 32'h10;
    @(posedge clk); t0 = cyc;   // taken at once
    @(negedge clk); rq_pkt.addr = 32'h14;
    @(posedge clk); while (!(rq_valid && rq_ready)) @(posedge clk);
    t1 = cyc;
    @(negedge clk); rq_valid = 0;
    check(t1 - t0 == LAT, $sformatf("second request taken %0d cycles later", t1 - t0));
    repeat (LAT + 2) @(negedge clk);
    rs_ready = 0;
    // random writes and reads against a reference array
    for (int k = 0; k < 150; k++) begin
      int unsigned w;
      p = '0;
      w = $urandom % 64;
      p.addr = 32'(w) << 2;
      p.cpu_id = 8'($urandom); p.mem_id = 8'($urandom);
      if (($urandom % 2) == 0 || !written[w]) begin
        p.cmd = CMD_WRITE; p.data = $urandom;
        ref_mem[w] = p.data; written[w] = 1;
      end else begin
        p.cmd = CMD_READ;
      end
      issue(p, t0);
      collect($urandom % 4, r, t2);
      check(t2 - t0 == LAT, "latency under random traffic");
      check(r.cmd == p.cmd && r.addr == p.addr && r.cpu_id == p.cpu_id && r.mem_id == p.mem_id &&
            r.data == ref_mem[w], "random access result");
    end
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
