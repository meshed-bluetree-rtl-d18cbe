// Bluetree multiplexer: one 2-to-1 stage of a Bluetree.
//
// Request path (client directions -> memory direction): the blocking-factor
// arbiter (mbt_mux_arbiter) picks one of the two incoming requests; the
// chosen packet has its CPU_ID shifted left by one bit with the direction
// number (0 = local high priority, 1 = local low priority) put into bit 0,
// which records the route, and is stored in the memory-direction buffer.
// Response path (memory direction -> client directions): non-blocking. The
// demultiplexer routes a response by CPU_ID bit 0, shifts CPU_ID right by one
// bit and stores it in the buffer of that client direction.
//
// Interface: c_rq_*/c_rs_* index 0 and 1 are client directions 0 and 1;
// m_rq_*/m_rs_* face the memory. All links use valid/ready; a packet moves on
// a clock edge with both high. Timing: one cycle per direction when not
// blocked. A response whose client buffer is full waits in place; it blocks
// only the responses behind it.
// What the paper leaves open and is chosen here: the valid/ready handshake,
// one-entry buffers, which CPU_ID bit is appended (the least significant).
module mbt_mux
  import mbt_pkg::*;
#(
  parameter int unsigned ALPHA = 1
) (
  input  logic    clk,
  input  logic    rst_n,
  // client directions
  input  logic    c_rq_valid [2],
  output logic    c_rq_ready [2],
  input  packet_t c_rq_pkt   [2],
  output logic    c_rs_valid [2],
  input  logic    c_rs_ready [2],
  output packet_t c_rs_pkt   [2],
  // memory direction
  output logic    m_rq_valid,
  input  logic    m_rq_ready,
  output packet_t m_rq_pkt,
  input  logic    m_rs_valid,
  output logic    m_rs_ready,
  input  packet_t m_rs_pkt
);

  // ---------------- request path: arbiter + buffer ----------------
  logic    gnt0, gnt1;
  logic    arb_valid, arb_ready;
  packet_t arb_pkt;

  mbt_mux_arbiter #(.ALPHA(ALPHA)) u_arb (
    .clk     (clk),
    .rst_n   (rst_n),
    .req0    (c_rq_valid[0]),
    .req1    (c_rq_valid[1]),
    .advance (arb_ready),
    .gnt0    (gnt0),
    .gnt1    (gnt1)
  );

  always_comb begin
    arb_valid     = gnt0 || gnt1;
    arb_pkt       = gnt1 ? c_rq_pkt[1] : c_rq_pkt[0];
    arb_pkt.cpu_id = {arb_pkt.cpu_id[ID_W-2:0], gnt1};
    c_rq_ready[0] = gnt0 && arb_ready;
    c_rq_ready[1] = gnt1 && arb_ready;
  end

  mbt_pipe_reg u_rq_buf (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (arb_valid),
    .in_ready  (arb_ready),
    .in_pkt    (arb_pkt),
    .out_valid (m_rq_valid),
    .out_ready (m_rq_ready),
    .out_pkt   (m_rq_pkt)
  );

  // ---------------- response path: demux + buffers ----------------
  logic    rs_dir;
  packet_t rs_pkt;
  logic    rs_buf_ready [2];

  always_comb begin
    rs_dir        = m_rs_pkt.cpu_id[0];
    rs_pkt        = m_rs_pkt;
    rs_pkt.cpu_id = {1'b0, m_rs_pkt.cpu_id[ID_W-1:1]};
    m_rs_ready    = rs_buf_ready[rs_dir];
  end

  for (genvar d = 0; d < 2; d++) begin : g_rs
    mbt_pipe_reg u_rs_buf (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (m_rs_valid && (rs_dir == 1'(d))),
      .in_ready  (rs_buf_ready[d]),
      .in_pkt    (rs_pkt),
      .out_valid (c_rs_valid[d]),
      .out_ready (c_rs_ready[d]),
      .out_pkt   (c_rs_pkt[d])
    );
  end

  // ---------------- handshake rules ----------------
  // An offered packet stays offered, unchanged, until it is taken.
  for (genvar d = 0; d < 2; d++) begin : g_chk
    a_rq_hold : assert property (@(posedge clk) disable iff (!rst_n)
      c_rq_valid[d] && !c_rq_ready[d] |=> c_rq_valid[d] && $stable(c_rq_pkt[d]));
  end
  a_rs_hold : assert property (@(posedge clk) disable iff (!rst_n)
    m_rs_valid && !m_rs_ready |=> m_rs_valid && $stable(m_rs_pkt));

endmodule
