// Bluetree router: one 1-to-2 stage of the router network.
//
// Request path (client direction -> Bluetree directions): non-blocking. The
// demultiplexer sends a request to Bluetree direction MEM_ID[SEL_BIT] and
// stores it in that direction's buffer. MEM_ID is not modified: a router at
// depth l of a network of depth N_R looks at bit N_R-1-l, so the first stage
// splits the memories into a lower and an upper half.
// Response path (Bluetree directions -> client direction): the arbiter picks
// one of the two incoming responses and stores it in the client-direction
// buffer. RS_ARB selects static priority (direction 0 always first, the
// configuration used in the published evaluation) or round robin (the
// blocking-factor arbiter with ALPHA = 1).
//
// Interface: c_* faces the client, b_*[0..1] face Bluetree directions 0/1.
// All links use valid/ready; one cycle per stage when nothing is blocked.
// This design's own choices: the handshake, one-entry buffers, routing on an
// unshifted MEM_ID bit, and direction 0 as the static high priority.
module mbt_router
  import mbt_pkg::*;
#(
  parameter int unsigned SEL_BIT = 0,
  parameter rs_arb_e     RS_ARB  = RS_ARB_STATIC
) (
  input  logic    clk,
  input  logic    rst_n,
  // client direction
  input  logic    c_rq_valid,
  output logic    c_rq_ready,
  input  packet_t c_rq_pkt,
  output logic    c_rs_valid,
  input  logic    c_rs_ready,
  output packet_t c_rs_pkt,
  // Bluetree directions
  output logic    b_rq_valid [2],
  input  logic    b_rq_ready [2],
  output packet_t b_rq_pkt   [2],
  input  logic    b_rs_valid [2],
  output logic    b_rs_ready [2],
  input  packet_t b_rs_pkt   [2]
);

  // ---------------- request path: demux + buffers ----------------
  logic rq_dir;
  logic rq_buf_ready [2];

  assign rq_dir     = c_rq_pkt.mem_id[SEL_BIT];
  assign c_rq_ready = rq_buf_ready[rq_dir];

  for (genvar d = 0; d < 2; d++) begin : g_rq
    mbt_pipe_reg u_rq_buf (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (c_rq_valid && (rq_dir == 1'(d))),
      .in_ready  (rq_buf_ready[d]),
      .in_pkt    (c_rq_pkt),
      .out_valid (b_rq_valid[d]),
      .out_ready (b_rq_ready[d]),
      .out_pkt   (b_rq_pkt[d])
    );
  end

  // ---------------- response path: arbiter + buffer ----------------
  logic    gnt0, gnt1;
  logic    arb_ready;
  packet_t arb_pkt;

  if (RS_ARB == RS_ARB_RR) begin : g_rr
    mbt_mux_arbiter #(.ALPHA(1)) u_arb (
      .clk     (clk),
      .rst_n   (rst_n),
      .req0    (b_rs_valid[0]),
      .req1    (b_rs_valid[1]),
      .advance (arb_ready),
      .gnt0    (gnt0),
      .gnt1    (gnt1)
    );
  end else begin : g_static
    assign gnt0 = b_rs_valid[0];
    assign gnt1 = b_rs_valid[1] && !b_rs_valid[0];
  end

  assign arb_pkt       = gnt1 ? b_rs_pkt[1] : b_rs_pkt[0];
  assign b_rs_ready[0] = gnt0 && arb_ready;
  assign b_rs_ready[1] = gnt1 && arb_ready;

  mbt_pipe_reg u_rs_buf (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (gnt0 || gnt1),
    .in_ready  (arb_ready),
    .in_pkt    (arb_pkt),
    .out_valid (c_rs_valid),
    .out_ready (c_rs_ready),
    .out_pkt   (c_rs_pkt)
  );

  // ---------------- handshake rules ----------------
  a_rq_hold : assert property (@(posedge clk) disable iff (!rst_n)
    c_rq_valid && !c_rq_ready |=> c_rq_valid && $stable(c_rq_pkt));
  for (genvar d = 0; d < 2; d++) begin : g_chk
    a_rs_hold : assert property (@(posedge clk) disable iff (!rst_n)
      b_rs_valid[d] && !b_rs_ready[d] |=> b_rs_valid[d] && $stable(b_rs_pkt[d]));
  end

endmodule
