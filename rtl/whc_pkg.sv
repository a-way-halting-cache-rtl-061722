// Shared constants and types of the way-halting cache.
//
// The default organisation is an 8 KB, four-way set-associative cache with
// 32-byte lines and 32-bit addresses: 64 sets, so an address splits into a
// 21-bit tag, a 6-bit set index and a 5-bit byte offset. The four lowest tag
// bits of every line are kept in the halt tag array; the other 17 tag bits
// live in the main tag array. These numbers follow the published design.
// The 32-bit word width and the controller states are this implementation's
// own choices.
package whc_pkg;

  localparam int unsigned DEF_ADDR_W      = 32;    // processor address width
  localparam int unsigned DEF_WORD_W      = 32;    // one word is read per access
  localparam int unsigned DEF_WAYS        = 4;     // associativity
  localparam int unsigned DEF_CACHE_BYTES = 8192;  // total capacity
  localparam int unsigned DEF_LINE_BYTES  = 32;    // line size
  localparam int unsigned DEF_HALT_BITS   = 4;     // low-order tag bits in the halt tag array

  // Cache controller states.
  typedef enum logic [1:0] {
    ST_IDLE     = 2'd0,  // lookups flow, one per cycle
    ST_FILL_REQ = 2'd1,  // load miss: line read requested from memory
    ST_FILL     = 2'd2,  // load miss: line words arriving and being written
    ST_WRITE    = 2'd3   // store being written through to memory
  } ctrl_state_t;

endpackage
