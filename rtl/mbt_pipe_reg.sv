// One-entry pipeline buffer with a valid/ready handshake.
//
// Each direction of a Bluetree multiplexer and of a Bluetree router ends in
// one such buffer, so every stage costs exactly one clock cycle when nothing
// is blocked. The buffer accepts a packet whenever it is empty or its content
// leaves in the same cycle (in_ready = !full | out_ready), so a chain of
// buffers moves one packet per cycle. Note that in_ready therefore depends
// combinationally on out_ready.
//
// Interface: in_* is the upstream side, out_* the downstream side. A packet
// is transferred on a rising clock edge where valid and ready are both high.
// Timing: a packet accepted at edge t is offered at out_* from edge t on.
// Reset is asynchronous and active low; it empties the buffer.
// The one-entry depth is this design's reading of the published register
// counts of the multiplexer and router (about three packet registers each).
module mbt_pipe_reg
  import mbt_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  output logic    in_ready,
  input  packet_t in_pkt,
  output logic    out_valid,
  input  logic    out_ready,
  output packet_t out_pkt
);

  logic    full;
  packet_t data_q;

  assign in_ready  = !full || out_ready;
  assign out_valid = full;
  assign out_pkt   = data_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        full <= 1'b0;
    else if (in_ready) full <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) data_q <= in_pkt;
  end

endmodule
