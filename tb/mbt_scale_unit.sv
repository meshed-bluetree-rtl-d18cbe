// Connectivity driver for one Meshed Bluetree size, used by
// tb_meshed_bluetree_sizes. It instantiates meshed_bluetree with
// N_CLIENTS x N_MEM ports and one small mbt_memory (t_D = 1, N_CLIENTS
// words) per memory port. Every client, concurrently and with one request in
// flight, writes a word tagged with its own and the memory's index to word
// <client> of every memory and reads it back. Every response must come back
// to the client that sent it with CPU_ID 0, the right MEM_ID, command and
// data. A response may arrive at the earliest after the no-contention best
// case 2*(N_R+N_beta)+t_D. Outputs: done, and the check and failure counts.
module mbt_scale_unit
  import mbt_pkg::*;
#(
  parameter int N_CLIENTS = 8,
  parameter int N_MEM     = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int NB = $clog2(N_CLIENTS);
  localparam int NR = $clog2(N_MEM);
  localparam int BC = 2 * (NR + NB) + 1;

  logic    c_rq_valid [N_CLIENTS], c_rq_ready [N_CLIENTS];
  packet_t c_rq_pkt   [N_CLIENTS];
  logic    c_rs_valid [N_CLIENTS], c_rs_ready [N_CLIENTS];
  packet_t c_rs_pkt   [N_CLIENTS];
  logic    m_rq_valid [N_MEM], m_rq_ready [N_MEM];
  packet_t m_rq_pkt   [N_MEM];
  logic    m_rs_valid [N_MEM], m_rs_ready [N_MEM];
  packet_t m_rs_pkt   [N_MEM];

  meshed_bluetree #(.N_CLIENTS(N_CLIENTS), .N_MEM(N_MEM)) u_net (
    .clk, .rst_n,
    .c_rq_valid, .c_rq_ready, .c_rq_pkt, .c_rs_valid, .c_rs_ready, .c_rs_pkt,
    .m_rq_valid, .m_rq_ready, .m_rq_pkt, .m_rs_valid, .m_rs_ready, .m_rs_pkt);

  for (genvar j = 0; j < N_MEM; j++) begin : g_mem
    mbt_memory #(.LATENCY(1), .WORDS(N_CLIENTS)) u_mem (
      .clk, .rst_n,
      .rq_valid(m_rq_valid[j]), .rq_ready(m_rq_ready[j]), .rq_pkt(m_rq_pkt[j]),
      .rs_valid(m_rs_valid[j]), .rs_ready(m_rs_ready[j]), .rs_pkt(m_rs_pkt[j]));
  end

  int ck [N_CLIENTS], fl [N_CLIENTS];
  bit fin [N_CLIENTS];

  for (genvar i = 0; i < N_CLIENTS; i++) begin : g_cl
    assign c_rs_ready[i] = 1'b1;
    initial begin
      ck[i] = 0; fl[i] = 0; fin[i] = 0;
      c_rq_valid[i] = 0;
      c_rq_pkt[i] = '0;
      @(posedge start);
      for (int j = 0; j < N_MEM; j++) begin
        for (int w = 0; w < 2; w++) begin
          int t0;
          packet_t p, r;
          p.cmd    = (w == 0) ? CMD_WRITE : CMD_READ;
          p.addr   = 32'(i) << 2;
          p.data   = (w == 0) ? {16'(i), 16'(j)} : 32'hFFFF_FFFF;
          p.cpu_id = '0;
          p.mem_id = ID_W'(j);
          @(negedge clk);
          c_rq_valid[i] = 1;
          c_rq_pkt[i]   = p;
          t0 = 0;
          do begin @(posedge clk); t0++; end while (!c_rq_ready[i]);
          @(negedge clk);
          c_rq_valid[i] = 0;
          t0 = 0;
          do begin @(posedge clk); t0++; end while (!c_rs_valid[i]);
          r = c_rs_pkt[i];
          ck[i]++;
          if (r.cmd != p.cmd || r.cpu_id != '0 || r.mem_id != ID_W'(j) || r.addr != p.addr ||
              r.data != {16'(i), 16'(j)}) begin
            fl[i]++;
            $display("FAIL %0dx%0d client %0d memory %0d: got cmd %0d mem %0d cpu %0h data %h",
                     N_CLIENTS, N_MEM, i, j, r.cmd, r.mem_id, r.cpu_id, r.data);
          end
          // the response cannot beat the path: from the request being taken,
          // BC-1 more cycles at least
          ck[i]++;
          if (t0 < BC - 1) begin
            fl[i]++;
            $display("FAIL %0dx%0d client %0d memory %0d: response after %0d cycles", N_CLIENTS, N_MEM, i, j, t0);
          end
        end
      end
      fin[i] = 1;
    end
  end

  always_comb begin
    done = 1'b1;
    checks = 0;
    failures = 0;
    for (int i = 0; i < N_CLIENTS; i++) begin
      done &= fin[i];
      checks += ck[i];
      failures += fl[i];
    end
  end
endmodule
