// Router tree of one client: the client's share of the router network R.
//
// A complete binary tree of Bluetree routers (mbt_router), N_MEM-1 of them,
// log2(N_MEM) stages deep (the router depth N_R), fanning one client port out
// to one port per memory module. The router network of an N_mu x N_D system
// is N_mu of these trees, one per client. Nodes use heap numbering: the root
// (node 1) faces the client, the children of node n are 2n (direction 0) and
// 2n+1 (direction 1), and leaf N_MEM+j leads to memory j. A router at depth l
// routes on MEM_ID bit N_R-1-l, so a request with MEM_ID = j reaches leaf j.
//
// Interface: c_* is the client port, b_*[j] the port towards Bluetree j, all
// valid/ready. Timing: N_R cycles each way when nothing is blocked; responses
// from different memories meet at the routers' response arbiters (RS_ARB).
// N_MEM must be a power of two (1 gives a plain wire).
module mbt_router_tree
  import mbt_pkg::*;
#(
  parameter int unsigned N_MEM  = 4,
  parameter rs_arb_e     RS_ARB = RS_ARB_STATIC
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    c_rq_valid,
  output logic    c_rq_ready,
  input  packet_t c_rq_pkt,
  output logic    c_rs_valid,
  input  logic    c_rs_ready,
  output packet_t c_rs_pkt,
  output logic    b_rq_valid [N_MEM],
  input  logic    b_rq_ready [N_MEM],
  output packet_t b_rq_pkt   [N_MEM],
  input  logic    b_rs_valid [N_MEM],
  output logic    b_rs_ready [N_MEM],
  input  packet_t b_rs_pkt   [N_MEM]
);

  localparam int unsigned N   = N_MEM;
  localparam int unsigned N_R = $clog2(N_MEM);

  // link k: between node k and its parent (k = 1: client to root)
  logic    rq_valid [1:2*N-1];
  logic    rq_ready [1:2*N-1];
  packet_t rq_pkt   [1:2*N-1];
  logic    rs_valid [1:2*N-1];
  logic    rs_ready [1:2*N-1];
  packet_t rs_pkt   [1:2*N-1];

  assign rq_valid[1] = c_rq_valid;
  assign rq_pkt[1]   = c_rq_pkt;
  assign c_rq_ready  = rq_ready[1];
  assign c_rs_valid  = rs_valid[1];
  assign c_rs_pkt    = rs_pkt[1];
  assign rs_ready[1] = c_rs_ready;

  for (genvar j = 0; j < N; j++) begin : g_mem
    assign b_rq_valid[j] = rq_valid[N+j];
    assign b_rq_pkt[j]   = rq_pkt[N+j];
    assign rq_ready[N+j] = b_rq_ready[j];
    assign rs_valid[N+j] = b_rs_valid[j];
    assign rs_pkt[N+j]   = b_rs_pkt[j];
    assign b_rs_ready[j] = rs_ready[N+j];
  end

  for (genvar n = 1; n < N; n++) begin : g_node
    localparam int unsigned LEVEL = $clog2(n + 1) - 1;

    logic    bq_valid [2];
    logic    bq_ready [2];
    packet_t bq_pkt   [2];
    logic    bs_valid [2];
    logic    bs_ready [2];
    packet_t bs_pkt   [2];

    for (genvar d = 0; d < 2; d++) begin : g_dir
      assign rq_valid[2*n+d] = bq_valid[d];
      assign rq_pkt[2*n+d]   = bq_pkt[d];
      assign bq_ready[d]     = rq_ready[2*n+d];
      assign bs_valid[d]     = rs_valid[2*n+d];
      assign bs_pkt[d]       = rs_pkt[2*n+d];
      assign rs_ready[2*n+d] = bs_ready[d];
    end

    mbt_router #(.SEL_BIT(N_R - 1 - LEVEL), .RS_ARB(RS_ARB)) u_router (
      .clk        (clk),
      .rst_n      (rst_n),
      .c_rq_valid (rq_valid[n]),
      .c_rq_ready (rq_ready[n]),
      .c_rq_pkt   (rq_pkt[n]),
      .c_rs_valid (rs_valid[n]),
      .c_rs_ready (rs_ready[n]),
      .c_rs_pkt   (rs_pkt[n]),
      .b_rq_valid (bq_valid),
      .b_rq_ready (bq_ready),
      .b_rq_pkt   (bq_pkt),
      .b_rs_valid (bs_valid),
      .b_rs_ready (bs_ready),
      .b_rs_pkt   (bs_pkt)
    );
  end

  initial begin
    assert (N >= 1 && (N & (N - 1)) == 0) else $error("N_MEM must be a power of two");
    assert (N_R <= ID_W) else $error("router depth exceeds the MEM_ID width");
  end

endmodule
