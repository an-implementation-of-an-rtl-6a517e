// addr_gen_pkg: types and constants shared by the address generator.
//
// The address generator answers, for an n-bit input vector, the index (1..k)
// of the matching registered vector, or 0 when the input is not registered.
// Its contents (hash functions, hash memories, AUX memories and the
// reconfigurable PLA) are loaded at run time through one configuration
// port, described by cfg_req_t below. The configuration port, its target
// encoding and its field widths are choices of this design; the document
// only states that the generator is reconfigured by rewriting its memories.
package addr_gen_pkg;

  // Width of the configuration address and data fields. CFG_DATA_W bounds
  // the vector width n (a PLA word is written with one request).
  localparam int unsigned CFG_ADDR_W = 16;
  localparam int unsigned CFG_DATA_W = 64;

  // What a configuration write updates.
  typedef enum logic [2:0] {
    CFG_HASH1_NET = 3'd0,  // hash network 1: addr = output bit i, data = X2 bit j
    CFG_HASH1_MEM = 3'd1,  // hash memory 1:  addr = Y1,            data = index
    CFG_AUX1      = 3'd2,  // AUX memory 1:   addr = index,         data = X2
    CFG_HASH2_NET = 3'd3,  // hash network 2
    CFG_HASH2_MEM = 3'd4,  // hash memory 2
    CFG_AUX2      = 3'd5,  // AUX memory 2
    CFG_PLA_VEC   = 3'd6,  // PLA word:       addr = word,          data = vector
    CFG_PLA_ADDR  = 3'd7   // PLA output:     addr = word,          data = index (0 frees the word)
  } cfg_target_e;

  typedef struct packed {
    logic                  valid;
    cfg_target_e           target;
    logic [CFG_ADDR_W-1:0] addr;
    logic [CFG_DATA_W-1:0] data;
  } cfg_req_t;

  // Width needed to hold an index 0..n-1 (at least 1 bit).
  function automatic int unsigned idx_w(input int unsigned n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

endpackage
