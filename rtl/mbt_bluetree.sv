// Bluetree interconnect: N_CLIENTS client ports multiplexed onto one memory.
//
// A complete binary tree of Bluetree multiplexers (mbt_mux), N_CLIENTS-1 of
// them, log2(N_CLIENTS) stages deep (the Bluetree depth N_beta). Nodes use
// heap numbering: the root is node 1, the children of node n are 2n
// (direction 0) and 2n+1 (direction 1), and client i sits at leaf
// N_CLIENTS+i. Hence client i enters its leaf multiplexer on direction i%2,
// as in the published 8-client drawing where client 0 takes the high-priority
// and client 1 the low-priority side. Link k is the wire between node k and
// its parent; link 1 joins the root to the memory port.
//
// On the way to memory each stage appends its direction bit to CPU_ID, so the
// memory sees the client's index bit-reversed in CPU_ID[N_beta-1:0] above the
// bits the client itself sent (shifted left by N_beta). The response path
// undoes this, so the client gets back the CPU_ID it sent.
//
// Interface: c_* arrays are the client ports, m_* the memory port, all
// valid/ready. Timing: N_beta cycles each way when nothing is blocked.
// N_CLIENTS must be a power of two (1 gives a plain wire).
module mbt_bluetree
  import mbt_pkg::*;
#(
  parameter int unsigned N_CLIENTS = 8,
  parameter int unsigned ALPHA     = 1
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    c_rq_valid [N_CLIENTS],
  output logic    c_rq_ready [N_CLIENTS],
  input  packet_t c_rq_pkt   [N_CLIENTS],
  output logic    c_rs_valid [N_CLIENTS],
  input  logic    c_rs_ready [N_CLIENTS],
  output packet_t c_rs_pkt   [N_CLIENTS],
  output logic    m_rq_valid,
  input  logic    m_rq_ready,
  output packet_t m_rq_pkt,
  input  logic    m_rs_valid,
  output logic    m_rs_ready,
  input  packet_t m_rs_pkt
);

  localparam int unsigned N = N_CLIENTS;

  // link k: between node k and its parent (k = 1: root to memory)
  logic    rq_valid [1:2*N-1];
  logic    rq_ready [1:2*N-1];
  packet_t rq_pkt   [1:2*N-1];
  logic    rs_valid [1:2*N-1];
  logic    rs_ready [1:2*N-1];
  packet_t rs_pkt   [1:2*N-1];

  // clients drive the leaf links
  for (genvar i = 0; i < N; i++) begin : g_client
    assign rq_valid[N+i]   = c_rq_valid[i];
    assign rq_pkt[N+i]     = c_rq_pkt[i];
    assign c_rq_ready[i]   = rq_ready[N+i];
    assign c_rs_valid[i]   = rs_valid[N+i];
    assign c_rs_pkt[i]     = rs_pkt[N+i];
    assign rs_ready[N+i]   = c_rs_ready[i];
  end

  // memory port on the root link
  assign m_rq_valid = rq_valid[1];
  assign m_rq_pkt   = rq_pkt[1];
  assign rq_ready[1] = m_rq_ready;
  assign rs_valid[1] = m_rs_valid;
  assign rs_pkt[1]   = m_rs_pkt;
  assign m_rs_ready  = rs_ready[1];

  for (genvar n = 1; n < N; n++) begin : g_node
    logic    cq_valid [2];
    logic    cq_ready [2];
    packet_t cq_pkt   [2];
    logic    cs_valid [2];
    logic    cs_ready [2];
    packet_t cs_pkt   [2];

    for (genvar d = 0; d < 2; d++) begin : g_dir
      assign cq_valid[d]       = rq_valid[2*n+d];
      assign cq_pkt[d]         = rq_pkt[2*n+d];
      assign rq_ready[2*n+d]   = cq_ready[d];
      assign rs_valid[2*n+d]   = cs_valid[d];
      assign rs_pkt[2*n+d]     = cs_pkt[d];
      assign cs_ready[d]       = rs_ready[2*n+d];
    end

    mbt_mux #(.ALPHA(ALPHA)) u_mux (
      .clk        (clk),
      .rst_n      (rst_n),
      .c_rq_valid (cq_valid),
      .c_rq_ready (cq_ready),
      .c_rq_pkt   (cq_pkt),
      .c_rs_valid (cs_valid),
      .c_rs_ready (cs_ready),
      .c_rs_pkt   (cs_pkt),
      .m_rq_valid (rq_valid[n]),
      .m_rq_ready (rq_ready[n]),
      .m_rq_pkt   (rq_pkt[n]),
      .m_rs_valid (rs_valid[n]),
      .m_rs_ready (rs_ready[n]),
      .m_rs_pkt   (rs_pkt[n])
    );
  end

  initial begin
    assert (N >= 1 && (N & (N - 1)) == 0) else $error("N_CLIENTS must be a power of two");
    assert ($clog2(N) <= ID_W) else $error("Bluetree depth exceeds the CPU_ID width");
  end

endmodule
