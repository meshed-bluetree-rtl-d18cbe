// Shared types and constants of the Meshed Bluetree interconnect.
//
// Every link of the interconnect carries one packet per handshake. A packet
// holds the memory access information (CMD, ADDR, DATA) and the route
// information (CPU_ID, MEM_ID), 81 bits in all, in the field order
// CMD | ADDR | DATA | CPU_ID | MEM_ID (CMD is the most significant bit).
// The field widths follow the published packet format. CPU_ID is built up
// by the multiplexers on the way to memory (one bit appended per stage) and
// consumed again on the way back; MEM_ID is set by the client and selects the
// memory module. It reaches the memory unchanged in this implementation.
package mbt_pkg;

  localparam int unsigned ADDR_W = 32;
  localparam int unsigned DATA_W = 32;
  localparam int unsigned ID_W   = 8;   // CPU_ID and MEM_ID: up to 8 stages each

  // Request: 0 read, 1 write. Response: 0 read data, 1 write acknowledge.
  typedef enum logic {
    CMD_READ  = 1'b0,
    CMD_WRITE = 1'b1
  } cmd_e;

  typedef struct packed {
    cmd_e              cmd;
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] data;
    logic [ID_W-1:0]   cpu_id;
    logic [ID_W-1:0]   mem_id;
  } packet_t;

  // Response-path arbitration of a router: static priority (direction 0
  // always first) or round robin.
  typedef enum logic {
    RS_ARB_STATIC = 1'b0,
    RS_ARB_RR     = 1'b1
  } rs_arb_e;

endpackage
