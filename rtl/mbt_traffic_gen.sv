// Synthetic-workload client: a traffic generator that issues random memory
// reads and measures the latency of each one.
//
// After start, the generator issues NUM_REQUESTS read requests. Successive
// requests are separated by a random interval drawn uniformly from
// [1, INTERVAL_MAX] cycles; once MAX_OUTSTANDING requests are in flight it
// stalls until a response returns, and then issues at once if its interval
// has already run out. Each request reads a random word address; its MEM_ID
// is drawn uniformly over the N_MEM memories, or, when MEM0_PERCENT >= 0,
// memory 0 is chosen with that percentage (an 8-bit random r picks memory 0
// when r*100/256 < MEM0_PERCENT) and the others share the rest.
// Random numbers come from a free-running 32-bit xorshift generator
// (x ^= x<<13; x ^= x>>17; x ^= x<<5) seeded with SEED.
//
// Latency is counted from the cycle a request is first offered to the cycle
// its response is taken (responses are always taken at once). A response is
// matched to the oldest outstanding request to the same MEM_ID: responses of
// one memory return in order, responses of different memories may overtake
// each other. A response matching nothing, or not a read response with the
// CPU_ID sent (0), counts as an error.
//
// Interface: rq_*/rs_* are the client port of the interconnect. Outputs: done
// once all responses are back, and the statistics below (all saturate-free
// 32-bit counters, valid when done).
// The workload parameters (2 outstanding, intervals in [1,64], reads at
// random addresses, uniform or percentage split) follow the paper; the
// generator's structure, random source and matching rule are this design's.
module mbt_traffic_gen
  import mbt_pkg::*;
#(
  parameter int unsigned N_MEM           = 4,
  parameter int unsigned MAX_OUTSTANDING = 2,
  parameter int unsigned INTERVAL_MAX    = 64,
  parameter int unsigned NUM_REQUESTS    = 100,
  parameter int          MEM0_PERCENT    = -1,
  parameter int unsigned ADDR_WORDS      = 1024,
  parameter logic [31:0] SEED            = 32'h2545_f491
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output logic        rq_valid,
  input  logic        rq_ready,
  output packet_t     rq_pkt,
  input  logic        rs_valid,
  output logic        rs_ready,
  input  packet_t     rs_pkt,
  output logic        done,
  output logic [31:0] n_issued,
  output logic [31:0] n_completed,
  output logic [31:0] n_errors,
  output logic [31:0] lat_total,
  output logic [31:0] lat_max,
  output logic [31:0] lat_min,
  output logic [31:0] finish_cycle
);

  localparam int unsigned SLOT_W = (MAX_OUTSTANDING > 1) ? $clog2(MAX_OUTSTANDING) : 1;
  localparam int unsigned MEM_W  = (N_MEM > 1) ? $clog2(N_MEM) : 1;

  typedef struct packed {
    logic            valid;
    logic [ID_W-1:0] mem_id;
    logic [31:0]     t_issue;
  } slot_t;

  logic [31:0] rnd;
  logic [31:0] now;
  logic        running;
  logic [31:0] wait_cnt;
  logic        pending;
  logic        offered;
  logic [31:0] t_form;
  logic [31:0] n_formed;
  slot_t       slots [MAX_OUTSTANDING];

  // ---------------- random source ----------------
  function automatic logic [31:0] xorshift(input logic [31:0] x);
    logic [31:0] y;
    y = x ^ (x << 13);
    y = y ^ (y >> 17);
    y = y ^ (y << 5);
    return y;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rnd <= (SEED == '0) ? 32'h1 : SEED;
      now <= '0;
    end else begin
      rnd <= xorshift(rnd);
      now <= now + 1'b1;
    end
  end

  // ---------------- request fields drawn from rnd ----------------
  logic [31:0]     next_interval;
  logic [ID_W-1:0] next_mem;
  logic [31:0]     next_word;

  always_comb begin
    next_interval = (32'(rnd[7:0]) % INTERVAL_MAX) + 1;
    next_word     = 32'(rnd[31:16]) % ADDR_WORDS;
    if (MEM0_PERCENT >= 0) begin
      if (((32'(rnd[15:8]) * 100) >> 8) < 32'(MEM0_PERCENT) || N_MEM == 1) next_mem = '0;
      else next_mem = ID_W'(1 + (32'(rnd[23:16]) % ((N_MEM > 1) ? N_MEM - 1 : 1)));
    end else begin
      next_mem = ID_W'(MEM_W'(rnd[15:8]));
    end
  end

  // ---------------- outstanding slots ----------------
  logic              have_free;
  logic [SLOT_W-1:0] free_idx;
  logic              match;
  logic [SLOT_W-1:0] match_idx;
  int unsigned       n_busy_slots_after_take;

  always_comb begin
    have_free = 1'b0;
    free_idx  = '0;
    for (int s = MAX_OUTSTANDING - 1; s >= 0; s--) begin
      if (!slots[s].valid) begin
        have_free = 1'b1;
        free_idx  = SLOT_W'(s);
      end
    end
    n_busy_slots_after_take = 1;   // the slot being filled
    for (int s = 0; s < MAX_OUTSTANDING; s++) if (slots[s].valid) n_busy_slots_after_take++;
    match     = 1'b0;
    match_idx = '0;
    for (int s = 0; s < MAX_OUTSTANDING; s++) begin
      if (slots[s].valid && slots[s].mem_id == rs_pkt.mem_id &&
          (!match || slots[s].t_issue < slots[match_idx].t_issue)) begin
        match     = 1'b1;
        match_idx = SLOT_W'(s);
      end
    end
  end

  // A request is formed (fields drawn) as soon as a slot is free and fewer
  // than NUM_REQUESTS have been formed; it is offered once the interval
  // since the previous hand-over has run out.
  logic        form_now, take;
  logic [31:0] t_offer;

  assign rs_ready = 1'b1;
  assign rq_valid = pending && (wait_cnt == '0);
  assign take     = rq_valid && rq_ready;
  assign done     = running && (n_completed == NUM_REQUESTS);
  assign t_offer  = offered ? t_form : now;
  assign form_now = running && (!pending || take) && n_formed < NUM_REQUESTS &&
                    (take ? (n_busy_slots_after_take < MAX_OUTSTANDING) : have_free);

  logic [31:0] lat_now;
  assign lat_now = now - slots[match_idx].t_issue;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running      <= 1'b0;
      wait_cnt     <= '0;
      pending      <= 1'b0;
      offered      <= 1'b0;
      t_form       <= '0;
      rq_pkt       <= '0;
      n_formed     <= '0;
      n_issued     <= '0;
      n_completed  <= '0;
      n_errors     <= '0;
      lat_total    <= '0;
      lat_max      <= '0;
      lat_min      <= '1;
      finish_cycle <= '0;
      for (int s = 0; s < MAX_OUTSTANDING; s++) slots[s] <= '0;
    end else begin
      if (start && !running) begin
        running  <= 1'b1;
        wait_cnt <= next_interval - 1;
      end else if (running && wait_cnt != '0) begin
        wait_cnt <= wait_cnt - 1'b1;
      end

      // remember when the offered request first became visible
      if (rq_valid && !take && !offered) begin
        offered <= 1'b1;
        t_form  <= now;
      end

      // hand-over: occupy a slot, start the next interval
      if (take) begin
        pending                 <= 1'b0;
        offered                 <= 1'b0;
        n_issued                <= n_issued + 1'b1;
        slots[free_idx].valid   <= 1'b1;
        slots[free_idx].mem_id  <= rq_pkt.mem_id;
        slots[free_idx].t_issue <= t_offer;
        wait_cnt                <= next_interval - 1;
      end

      // form the next request
      if (form_now) begin
        pending       <= 1'b1;
        n_formed      <= n_formed + 1'b1;
        rq_pkt        <= '0;
        rq_pkt.cmd    <= CMD_READ;
        rq_pkt.addr   <= next_word << 2;
        rq_pkt.mem_id <= next_mem;
      end

      // take a response
      if (rs_valid && running) begin
        n_completed <= n_completed + 1'b1;
        if (!match || rs_pkt.cmd != CMD_READ || rs_pkt.cpu_id != '0) begin
          n_errors <= n_errors + 1'b1;
        end
        if (match) begin
          slots[match_idx].valid <= 1'b0;
          lat_total <= lat_total + lat_now;
          if (lat_now > lat_max) lat_max <= lat_now;
          if (lat_now < lat_min) lat_min <= lat_now;
        end
        if (n_completed + 1 == NUM_REQUESTS) finish_cycle <= now;
      end
    end
  end

  initial begin
    assert (INTERVAL_MAX >= 1 && INTERVAL_MAX <= 256) else $error("INTERVAL_MAX out of range");
    assert (MAX_OUTSTANDING >= 1) else $error("MAX_OUTSTANDING must be at least 1");
  end

endmodule
