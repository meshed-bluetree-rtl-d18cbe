// Meshed Bluetree interconnect: N_CLIENTS clients sharing N_MEM memories.
//
// The interconnect couples a router network with N_MEM Bluetrees in
// parallel. Each client owns a router tree (mbt_router_tree, depth
// N_R = log2 N_MEM) that forwards a request by its MEM_ID to one of N_MEM
// ports; port j of client i is wired to client input i of Bluetree j
// (mbt_bluetree, depth N_beta = log2 N_CLIENTS), whose root is memory port j.
// Responses retrace the path: the Bluetree demultiplexes by CPU_ID, the
// client's router tree merges the responses of the different memories.
// Requests to different memories travel on disjoint hardware and are served
// concurrently. Component counts: (N_CLIENTS-1)*N_MEM multiplexers,
// (N_MEM-1)*N_CLIENTS routers.
//
// Interface: c_*[i] is client i; the client sets MEM_ID (and usually
// CPU_ID = 0) in each request and receives its own CPU_ID back in the
// response. m_*[j] is memory module j: requests arrive with CPU_ID carrying
// the route back, and the memory must return that CPU_ID unchanged in the
// response. All ports are valid/ready.
// Timing: with no contention a request reaches its memory N_R+N_beta cycles
// after it is offered and a response reaches the client N_beta+N_R cycles
// after the memory offers it, so an access takes 2*(N_R+N_beta)+t_D cycles.
module meshed_bluetree
  import mbt_pkg::*;
#(
  parameter int unsigned N_CLIENTS = 8,
  parameter int unsigned N_MEM     = 4,
  parameter int unsigned ALPHA     = 1,
  parameter rs_arb_e     RS_ARB    = RS_ARB_STATIC
) (
  input  logic    clk,
  input  logic    rst_n,
  // clients
  input  logic    c_rq_valid [N_CLIENTS],
  output logic    c_rq_ready [N_CLIENTS],
  input  packet_t c_rq_pkt   [N_CLIENTS],
  output logic    c_rs_valid [N_CLIENTS],
  input  logic    c_rs_ready [N_CLIENTS],
  output packet_t c_rs_pkt   [N_CLIENTS],
  // memory modules
  output logic    m_rq_valid [N_MEM],
  input  logic    m_rq_ready [N_MEM],
  output packet_t m_rq_pkt   [N_MEM],
  input  logic    m_rs_valid [N_MEM],
  output logic    m_rs_ready [N_MEM],
  input  packet_t m_rs_pkt   [N_MEM]
);

  // link [client][memory], seen from the router side ...
  logic    rx_rq_valid [N_CLIENTS][N_MEM];
  logic    rx_rq_ready [N_CLIENTS][N_MEM];
  packet_t rx_rq_pkt   [N_CLIENTS][N_MEM];
  logic    rx_rs_valid [N_CLIENTS][N_MEM];
  logic    rx_rs_ready [N_CLIENTS][N_MEM];
  packet_t rx_rs_pkt   [N_CLIENTS][N_MEM];
  // ... and [memory][client], seen from the Bluetree side
  logic    bx_rq_valid [N_MEM][N_CLIENTS];
  logic    bx_rq_ready [N_MEM][N_CLIENTS];
  packet_t bx_rq_pkt   [N_MEM][N_CLIENTS];
  logic    bx_rs_valid [N_MEM][N_CLIENTS];
  logic    bx_rs_ready [N_MEM][N_CLIENTS];
  packet_t bx_rs_pkt   [N_MEM][N_CLIENTS];

  for (genvar i = 0; i < N_CLIENTS; i++) begin : g_x
    for (genvar j = 0; j < N_MEM; j++) begin : g_y
      assign bx_rq_valid[j][i] = rx_rq_valid[i][j];
      assign bx_rq_pkt[j][i]   = rx_rq_pkt[i][j];
      assign rx_rq_ready[i][j] = bx_rq_ready[j][i];
      assign rx_rs_valid[i][j] = bx_rs_valid[j][i];
      assign rx_rs_pkt[i][j]   = bx_rs_pkt[j][i];
      assign bx_rs_ready[j][i] = rx_rs_ready[i][j];
    end
  end

  for (genvar i = 0; i < N_CLIENTS; i++) begin : g_rt
    mbt_router_tree #(.N_MEM(N_MEM), .RS_ARB(RS_ARB)) u_rt (
      .clk        (clk),
      .rst_n      (rst_n),
      .c_rq_valid (c_rq_valid[i]),
      .c_rq_ready (c_rq_ready[i]),
      .c_rq_pkt   (c_rq_pkt[i]),
      .c_rs_valid (c_rs_valid[i]),
      .c_rs_ready (c_rs_ready[i]),
      .c_rs_pkt   (c_rs_pkt[i]),
      .b_rq_valid (rx_rq_valid[i]),
      .b_rq_ready (rx_rq_ready[i]),
      .b_rq_pkt   (rx_rq_pkt[i]),
      .b_rs_valid (rx_rs_valid[i]),
      .b_rs_ready (rx_rs_ready[i]),
      .b_rs_pkt   (rx_rs_pkt[i])
    );
  end

  for (genvar j = 0; j < N_MEM; j++) begin : g_bt
    mbt_bluetree #(.N_CLIENTS(N_CLIENTS), .ALPHA(ALPHA)) u_bt (
      .clk        (clk),
      .rst_n      (rst_n),
      .c_rq_valid (bx_rq_valid[j]),
      .c_rq_ready (bx_rq_ready[j]),
      .c_rq_pkt   (bx_rq_pkt[j]),
      .c_rs_valid (bx_rs_valid[j]),
      .c_rs_ready (bx_rs_ready[j]),
      .c_rs_pkt   (bx_rs_pkt[j]),
      .m_rq_valid (m_rq_valid[j]),
      .m_rq_ready (m_rq_ready[j]),
      .m_rq_pkt   (m_rq_pkt[j]),
      .m_rs_valid (m_rs_valid[j]),
      .m_rs_ready (m_rs_ready[j]),
      .m_rs_pkt   (m_rs_pkt[j])
    );
  end

endmodule
