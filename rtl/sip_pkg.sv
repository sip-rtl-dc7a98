// sip_pkg: types and constants shared by the SIP (Separating the Irregular
// Properties) blocks.
//
// SIP adds, next to the D-cache of a core, a small property cache (P-cache)
// and two prefetchers that walk a graph stored in CSR form. The blocks share
// a 32-bit virtual address / data word (the evaluated core is a 32-bit x86),
// the set of configuration registers loaded by the single added
// register-configuration instruction, and the tags used on the structure
// prefetcher's memory port.
//
// The register list and its meaning follow the document's register table;
// the numeric register indices (the order of that table) and the packing into
// a struct are this design's own choice.
package sip_pkg;

  localparam int unsigned XLEN = 32;
  typedef logic [XLEN-1:0] word_t;

  // Index operand of the register-configuration instruction.
  typedef enum logic [3:0] {
    CFG_SIZE      = 4'd0,   // data size in bytes (power of two)
    CFG_ACTIVE    = 4'd1,   // 1: all-active application, 0: active list
    CFG_ACTIVE1   = 4'd2,   // all-active: min vertex ID; else: active list start address
    CFG_ACTIVE2   = 4'd3,   // all-active: max vertex ID; else: active list end address
    CFG_OFF_LIST  = 4'd4,   // start address of the offset list
    CFG_NEI_LIST  = 4'd5,   // start address of the neighbor list
    CFG_PROP_LIST = 4'd6,   // start address of the property list
    CFG_NEI1      = 4'd7,   // neighbor list address range, start
    CFG_NEI2      = 4'd8,   // neighbor list address range, end (exclusive)
    CFG_PROP1     = 4'd9,   // property list address range, start
    CFG_PROP2     = 4'd10,  // property list address range, end (exclusive)
    CFG_THRESHOLD = 4'd11   // counter threshold that stalls edge prefetching
  } cfg_idx_e;

  localparam int unsigned NUM_CFG = 12;

  typedef struct packed {
    word_t size;
    logic  all_active;
    word_t active1;
    word_t active2;
    word_t off_list;
    word_t nei_list;
    word_t prop_list;
    word_t nei1;
    word_t nei2;
    word_t prop1;
    word_t prop2;
    word_t threshold;
  } sip_cfg_t;

  // Tags of the structure prefetcher's memory requests: which stage asked.
  typedef enum logic [1:0] {
    TAG_VERTEX = 2'd0,  // stage 1: active list entry
    TAG_OFFSET = 2'd1,  // stage 2: front / rear offset
    TAG_EDGE   = 2'd2   // stage 3: neighbor list entry
  } sp_tag_e;

endpackage
