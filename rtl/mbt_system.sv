// Synthetic-workload system: N_CLIENTS traffic generators sharing N_MEM
// memory modules through a Meshed Bluetree interconnect.
//
// This is the evaluation platform of the interconnect: every client is an
// mbt_traffic_gen, every memory an mbt_memory with its own latency
// (MEM_LATENCY[j] cycles for memory j; all 20 by default, as in the
// homogeneous experiments; give memory 0 a short latency and the others 30
// to model a fast on-chip RAM beside a DRAM). The default 8 x 4 system has
// a router depth N_R = 2 and a Bluetree depth N_beta = 3, with
// 28 multiplexers and 24 routers.
//
// Interface: start begins all generators at once; done rises when every
// generator has all its responses back. Per-client statistics are brought
// out as arrays (see mbt_traffic_gen). Each generator gets its own seed,
// derived from SEED and its index.
// Timing: an uncontended read takes 2*(N_R+N_beta)+t_D cycles.
module mbt_system
  import mbt_pkg::*;
#(
  parameter int unsigned N_CLIENTS       = 8,
  parameter int unsigned N_MEM           = 4,
  parameter int unsigned ALPHA           = 1,
  parameter rs_arb_e     RS_ARB          = RS_ARB_STATIC,
  parameter logic [N_MEM-1:0][15:0] MEM_LATENCY = {N_MEM{16'd20}},
  parameter int unsigned MEM_WORDS       = 1024,
  parameter int unsigned NUM_REQUESTS    = 100,
  parameter int unsigned MAX_OUTSTANDING = 2,
  parameter int unsigned INTERVAL_MAX    = 64,
  parameter int          MEM0_PERCENT    = -1,
  parameter logic [31:0] SEED            = 32'h1234_5678
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output logic        done,
  output logic [31:0] n_issued     [N_CLIENTS],
  output logic [31:0] n_completed  [N_CLIENTS],
  output logic [31:0] n_errors     [N_CLIENTS],
  output logic [31:0] lat_total    [N_CLIENTS],
  output logic [31:0] lat_max      [N_CLIENTS],
  output logic [31:0] lat_min      [N_CLIENTS],
  output logic [31:0] finish_cycle [N_CLIENTS]
);

  logic    c_rq_valid [N_CLIENTS];
  logic    c_rq_ready [N_CLIENTS];
  packet_t c_rq_pkt   [N_CLIENTS];
  logic    c_rs_valid [N_CLIENTS];
  logic    c_rs_ready [N_CLIENTS];
  packet_t c_rs_pkt   [N_CLIENTS];
  logic    m_rq_valid [N_MEM];
  logic    m_rq_ready [N_MEM];
  packet_t m_rq_pkt   [N_MEM];
  logic    m_rs_valid [N_MEM];
  logic    m_rs_ready [N_MEM];
  packet_t m_rs_pkt   [N_MEM];
  logic    gen_done   [N_CLIENTS];

  for (genvar i = 0; i < N_CLIENTS; i++) begin : g_client
    mbt_traffic_gen #(
      .N_MEM           (N_MEM),
      .MAX_OUTSTANDING (MAX_OUTSTANDING),
      .INTERVAL_MAX    (INTERVAL_MAX),
      .NUM_REQUESTS    (NUM_REQUESTS),
      .MEM0_PERCENT    (MEM0_PERCENT),
      .ADDR_WORDS      (MEM_WORDS),
      .SEED            (SEED ^ (32'(i + 1) * 32'h9e37_79b9))
    ) u_gen (
      .clk          (clk),
      .rst_n        (rst_n),
      .start        (start),
      .rq_valid     (c_rq_valid[i]),
      .rq_ready     (c_rq_ready[i]),
      .rq_pkt       (c_rq_pkt[i]),
      .rs_valid     (c_rs_valid[i]),
      .rs_ready     (c_rs_ready[i]),
      .rs_pkt       (c_rs_pkt[i]),
      .done         (gen_done[i]),
      .n_issued     (n_issued[i]),
      .n_completed  (n_completed[i]),
      .n_errors     (n_errors[i]),
      .lat_total    (lat_total[i]),
      .lat_max      (lat_max[i]),
      .lat_min      (lat_min[i]),
      .finish_cycle (finish_cycle[i])
    );
  end

  meshed_bluetree #(
    .N_CLIENTS (N_CLIENTS),
    .N_MEM     (N_MEM),
    .ALPHA     (ALPHA),
    .RS_ARB    (RS_ARB)
  ) u_net (
    .clk        (clk),
    .rst_n      (rst_n),
    .c_rq_valid (c_rq_valid),
    .c_rq_ready (c_rq_ready),
    .c_rq_pkt   (c_rq_pkt),
    .c_rs_valid (c_rs_valid),
    .c_rs_ready (c_rs_ready),
    .c_rs_pkt   (c_rs_pkt),
    .m_rq_valid (m_rq_valid),
    .m_rq_ready (m_rq_ready),
    .m_rq_pkt   (m_rq_pkt),
    .m_rs_valid (m_rs_valid),
    .m_rs_ready (m_rs_ready),
    .m_rs_pkt   (m_rs_pkt)
  );

  for (genvar j = 0; j < N_MEM; j++) begin : g_mem
    mbt_memory #(
      .LATENCY (int'(MEM_LATENCY[j])),
      .WORDS   (MEM_WORDS)
    ) u_mem (
      .clk      (clk),
      .rst_n    (rst_n),
      .rq_valid (m_rq_valid[j]),
      .rq_ready (m_rq_ready[j]),
      .rq_pkt   (m_rq_pkt[j]),
      .rs_valid (m_rs_valid[j]),
      .rs_ready (m_rs_ready[j]),
      .rs_pkt   (m_rs_pkt[j])
    );
  end

  always_comb begin
    done = 1'b1;
    for (int i = 0; i < N_CLIENTS; i++) done &= gen_done[i];
  end

endmodule
