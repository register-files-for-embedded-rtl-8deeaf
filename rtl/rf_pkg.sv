// rf_pkg: types and constants shared by the cache and register-file blocks.
//
// The cache is 8 KB, 4-way set associative, with 16-byte lines of four
// 32-bit words, built from eight 1 KB groups of 16 sets each. A tag entry is
// 24 bits: a 21-bit address tag plus valid, lock and least-recently-filled
// (LRF) bits. These sizes follow the design; the order of the fields inside a
// tag entry and the operation encoding are this implementation's choice.
// The register file holds 32 entries of 32 data bits plus one parity bit per
// nibble (even parity, an implementation choice).
package rf_pkg;

  // ---------------- cache ----------------
  localparam int unsigned CACHE_WAYS     = 4;
  localparam int unsigned CACHE_WORDS    = 4;   // 32-bit words per line
  localparam int unsigned CACHE_SETS_GRP = 16;  // sets in one cache group
  localparam int unsigned CACHE_GROUPS   = 8;
  localparam int unsigned TAG_BITS       = 21;

  typedef enum logic [1:0] {
    OP_LOOKUP     = 2'd0,  // compare all four tags, return the hit way's word
    OP_READ       = 2'd1,  // read the addressed set and way
    OP_WRITE      = 2'd2,  // write data and/or tag of the addressed set and way
    OP_INVALIDATE = 2'd3   // clear every valid bit of the cache
  } cache_op_e;

  typedef struct packed {
    logic                lrf;    // least recently filled
    logic                lock;
    logic                valid;
    logic [TAG_BITS-1:0] tag;
  } tag_entry_t;                 // 24 bits

  // ---------------- register file ----------------
  localparam int unsigned RF_ENTRIES = 32;
  localparam int unsigned RF_DATA    = 32;
  localparam int unsigned RF_PARITY  = RF_DATA / 4;       // one per nibble
  localparam int unsigned RF_WIDTH   = RF_DATA + RF_PARITY; // 40
  localparam int unsigned RF_NRD     = 3;                 // Rs, Rt, RtRd

  typedef enum logic [1:0] {
    PORT_RS   = 2'd0,
    PORT_RT   = 2'd1,
    PORT_RTRD = 2'd2
  } rd_port_e;

  // Even parity of every nibble: bit i covers data[4i+3:4i].
  function automatic logic [RF_PARITY-1:0] nibble_parity(input logic [RF_DATA-1:0] d);
    logic [RF_PARITY-1:0] p;
    for (int i = 0; i < int'(RF_PARITY); i++) p[i] = ^d[4*i +: 4];
    return p;
  endfunction

endpackage
