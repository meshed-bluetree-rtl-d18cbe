// Memory module at the root of a Bluetree: a single-port on-chip RAM whose
// answer is held back by a fixed delay, so that every access takes exactly
// LATENCY cycles (the root memory latency t_D).
//
// The module serves one request at a time. A request is taken when the
// module is idle, or in the cycle its previous response leaves; the RAM is
// read or written at once, and the response is offered LATENCY cycles after
// the request was taken and held until accepted. While a request is in
// service, rq_ready is low: this is what stalls a whole Bluetree behind a
// busy memory. The response copies CMD, ADDR, CPU_ID and MEM_ID of the
// request (CPU_ID carries the route back through the Bluetree); DATA holds the
// read word, or the written word as write acknowledgement.
//
// Interface: rq_* and rs_* are valid/ready ports in the interconnect's packet
// format. ADDR is a byte address; word ADDR[log2(WORDS)+1:2] is used, the
// other bits are ignored. Reset (asynchronous, active low) empties the
// service slot; the RAM contents are not reset.
// From the paper: the fixed added delay (20 cycles in the homogeneous
// experiments), single-port operation, 4 KB as smallest configured size.
// This design's choices: response format, word addressing, the ready rule.
module mbt_memory
  import mbt_pkg::*;
#(
  parameter int unsigned LATENCY = 20,    // t_D in cycles, at least 1
  parameter int unsigned WORDS   = 1024   // 32-bit words (1024 = 4 KB)
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    rq_valid,
  output logic    rq_ready,
  input  packet_t rq_pkt,
  output logic    rs_valid,
  input  logic    rs_ready,
  output packet_t rs_pkt
);

  localparam int unsigned IDX_W = (WORDS > 1) ? $clog2(WORDS) : 1;
  localparam int unsigned CNT_W = $clog2(LATENCY + 1);

  logic [DATA_W-1:0] ram [WORDS];
  logic              busy;
  logic [CNT_W-1:0]  wait_cnt;
  packet_t           rsp_q;
  logic [IDX_W-1:0]  idx;
  logic              take;

  assign idx      = IDX_W'(rq_pkt.addr[IDX_W+1:2]);
  assign rs_valid = busy && (wait_cnt == '0);
  assign rs_pkt   = rsp_q;
  assign rq_ready = !busy || (rs_valid && rs_ready);
  assign take     = rq_valid && rq_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      wait_cnt <= '0;
    end else if (take) begin
      busy     <= 1'b1;
      wait_cnt <= CNT_W'(LATENCY - 1);
    end else if (rs_valid && rs_ready) begin
      busy     <= 1'b0;
    end else if (busy && wait_cnt != '0) begin
      wait_cnt <= wait_cnt - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (take) begin
      rsp_q <= rq_pkt;
      if (rq_pkt.cmd == CMD_WRITE) ram[idx] <= rq_pkt.data;
      else                         rsp_q.data <= ram[idx];
    end
  end

  initial begin
    assert (LATENCY >= 1) else $error("LATENCY must be at least 1");
  end

  a_rq_hold : assert property (@(posedge clk) disable iff (!rst_n)
    rq_valid && !rq_ready |=> rq_valid && $stable(rq_pkt));

endmodule
