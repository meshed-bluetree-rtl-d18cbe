// Request arbiter of a Bluetree multiplexer, with blocking factor ALPHA.
//
// Direction 0 is the local high-priority path and direction 1 the local
// low-priority path. A blocking counter counts the grants given to direction
// 0 since direction 1 was last served, saturating at ALPHA. When both
// directions request, direction 1 wins only once the counter has reached
// ALPHA; so every ALPHA requests from direction 0 can be blocked by at most
// one from direction 1, and one request from direction 1 waits behind at most
// ALPHA from direction 0. A lone request is always granted (no blocking of
// direction 1 when direction 0 is idle). ALPHA = 1 gives round robin.
//
// Interface: req0/req1 are the valid signals of the two directions, gnt0/gnt1
// the combinational one-hot grant, advance is high in a cycle where the
// granted packet is actually taken (the counter only moves then, so a grant
// that is waiting for a full buffer keeps its decision basis).
// Reset (asynchronous, active low) clears the counter.
module mbt_mux_arbiter #(
  parameter int unsigned ALPHA = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic req0,
  input  logic req1,
  input  logic advance,
  output logic gnt0,
  output logic gnt1
);

  localparam int unsigned CNT_W = $clog2(ALPHA + 1);

  logic [CNT_W-1:0] blk_cnt;

  always_comb begin
    gnt1 = req1 && (!req0 || (32'(blk_cnt) >= ALPHA));
    gnt0 = req0 && !gnt1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      blk_cnt <= '0;
    end else if (advance) begin
      if (gnt1)                                   blk_cnt <= '0;
      else if (gnt0 && (32'(blk_cnt) < ALPHA))    blk_cnt <= blk_cnt + 1'b1;
    end
  end

  initial begin
    assert (ALPHA >= 1) else $error("ALPHA must be at least 1");
  end

endmodule
