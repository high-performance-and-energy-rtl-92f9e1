// Shared types and constants of the two-level instruction cache.
//
// The cache line is 128 bits (four 32-bit instruction words), addresses are
// 32-bit byte addresses. A transfer between a private L1 and the shared L1.5
// carries a one-bit transfer ID in front of the address: 0 marks a demand
// refill, 1 a prefetch. The ID travels back with the response so that the L1
// can tell the two apart when they return out of order.
package icache_pkg;

  localparam int unsigned ADDR_W   = 32;
  localparam int unsigned LINE_W   = 128;
  localparam int unsigned LINE_B   = LINE_W / 8;          // bytes per line
  localparam int unsigned OFFS_W   = $clog2(LINE_B);      // byte offset bits
  localparam int unsigned WORD_W   = 32;
  localparam int unsigned WORDS    = LINE_W / WORD_W;     // words per line

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [LINE_W-1:0] line_t;
  typedef logic [WORD_W-1:0] word_t;

  // Transfer ID carried in the MSB of the L1 -> L1.5 request.
  typedef enum logic {
    ID_REFILL   = 1'b0,
    ID_PREFETCH = 1'b1
  } xfer_id_e;

  // L1 -> L1.5 request: {id, address}; the ID is the most significant bit.
  typedef struct packed {
    xfer_id_e id;
    addr_t    addr;
  } l15_req_t;

  // L1.5 -> L1 response: {id, line}.
  typedef struct packed {
    xfer_id_e id;
    line_t    data;
  } l15_rsp_t;

  // Line-aligned address of a byte address.
  function automatic addr_t line_addr(addr_t a);
    return {a[ADDR_W-1:OFFS_W], {OFFS_W{1'b0}}};
  endfunction

endpackage
