// Shared types and constants of the quad-core system.
//
// Memory messages come in two widths. The processor-to-cache port carries
// 4-byte words (mem_req_4B_t / mem_resp_4B_t); the cache-to-memory port carries
// whole 16-byte cache lines (mem_req_16B_t / mem_resp_16B_t). Both share one
// layout: message type, an 8-bit opaque field that every memory component must
// return unchanged, the address, a length in bytes (0 meaning the full width)
// and the data. The networks write the requester id into the top bits of the
// opaque field so that a response can find its way back.
package mcore_pkg;

  localparam int unsigned NUM_CORES    = 4;   // cores, instruction caches, data-cache banks
  localparam int unsigned OPAQUE_NBITS = 8;
  localparam int unsigned NODE_NBITS   = 2;   // id of a ring node / core / bank

  typedef enum logic [2:0] {
    MEM_READ  = 3'd0,
    MEM_WRITE = 3'd1
  } mem_type_e;

  typedef struct packed {
    mem_type_e                typ;
    logic [OPAQUE_NBITS-1:0]  opaque;
    logic [31:0]              addr;
    logic [1:0]               len;    // 0: 4 bytes, 1: 1 byte, 2: 2 bytes
    logic [31:0]              data;
  } mem_req_4B_t;

  typedef struct packed {
    mem_type_e                typ;
    logic [OPAQUE_NBITS-1:0]  opaque;
    logic [1:0]               test;   // cache responses: bit 0 set on a hit
    logic [1:0]               len;
    logic [31:0]              data;
  } mem_resp_4B_t;

  typedef struct packed {
    mem_type_e                typ;
    logic [OPAQUE_NBITS-1:0]  opaque;
    logic [31:0]              addr;
    logic [3:0]               len;    // 0: 16 bytes
    logic [127:0]             data;
  } mem_req_16B_t;

  typedef struct packed {
    mem_type_e                typ;
    logic [OPAQUE_NBITS-1:0]  opaque;
    logic [1:0]               test;
    logic [3:0]               len;
    logic [127:0]             data;
  } mem_resp_16B_t;

  // Coprocessor-0 register numbers used by mfc0 / mtc0
  localparam logic [4:0] CP0_MNGR2PROC = 5'd1;
  localparam logic [4:0] CP0_PROC2MNGR = 5'd2;
  localparam logic [4:0] CP0_NUMCORES  = 5'd16;
  localparam logic [4:0] CP0_COREID    = 5'd17;
  localparam logic [4:0] CP0_STATS_EN  = 5'd21;

  localparam logic [31:0] RESET_VECTOR = 32'h0000_0200;

endpackage
