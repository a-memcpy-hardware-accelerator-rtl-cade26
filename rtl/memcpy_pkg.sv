// memcpy_pkg: types and constants shared by the cache and memcpy unit.
//
// The processor's data side carries a 22-bit word address, split as in a
// 32 KB direct-mapped cache with 32-byte lines of eight 32-bit words:
// 9 tag bits, 10 index bits and 3 word-offset bits. The indexing table is
// addressed by index and offset together, so it has 2^13 = 8192 slots, one per
// word of the cache. Those splits follow the document; the 32-bit word and the
// 4-bit signed encoding of the offset difference are this design's choice.
package memcpy_pkg;

  localparam int unsigned TAG_W     = 9;
  localparam int unsigned INDEX_W   = 10;
  localparam int unsigned OFFSET_W  = 3;
  localparam int unsigned ADDR_W    = TAG_W + INDEX_W + OFFSET_W;  // 22
  localparam int unsigned SLOT_W    = INDEX_W + OFFSET_W;          // 13
  localparam int unsigned DATA_W    = 32;
  localparam int unsigned BE_W      = DATA_W / 8;
  localparam int unsigned LINE_WORDS = 1 << OFFSET_W;              // 8
  localparam int unsigned OFFCAL_W  = OFFSET_W + 1;                // -7..+7
  localparam int unsigned SIZE_W    = SLOT_W + 1;                  // up to 8192 words

  // Word address as seen on the processor's data side.
  typedef struct packed {
    logic [TAG_W-1:0]    tag;
    logic [INDEX_W-1:0]  index;
    logic [OFFSET_W-1:0] offset;
  } waddr_t;

  // One indexing-table entry (the valid bit is held apart, see indexing_table).
  typedef struct packed {
    logic [INDEX_W-1:0]         index_src;  // line of the original word, as seen from this slot
    logic [TAG_W-1:0]           tag_dst;    // tag of the copy's address
    logic signed [OFFCAL_W-1:0] offset_calc; // offset_dst - offset_src
    logic [TAG_W-1:0]           tag_src;    // tag of the line index_src refers to
  } itab_entry_t;

  // States of cache_ctrl: processor read (LOOKUP, RCOPY), processor write
  // (WSEARCH..WCWR), line refill (FILL, FILL_DIR), write-back of one copy
  // (F_*) and the memcpy loop (E_ISSUE, E_CHECK).
  typedef enum logic [4:0] {
    S_IDLE, S_LOOKUP, S_RCOPY,
    S_WSEARCH, S_WSCHK, S_WMEM, S_WCRD, S_WCWR,
    S_FILL, S_FILL_DIR,
    S_F_RD, S_F_TR, S_F_DATA, S_F_MEM, S_F_CRD, S_F_CWR, S_F_INV,
    S_E_ISSUE, S_E_CHECK
  } state_t;

endpackage
