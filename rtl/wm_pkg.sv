// wm_pkg: shared constants and types of the way-memoizing instruction cache.
//
// The default geometry is the main configuration of the design: a 16 KB
// instruction cache with 32-byte lines, 64-way set-associative with CAM tags,
// split into 8 sub-banks. With 512 lines and 64 ways there are 8 sets, and
// each sub-bank holds exactly one set, so the set index also selects the
// sub-bank. Addresses are 32-bit byte addresses of 32-bit (MIPS) instruction
// words: bits [1:0] are the byte offset, [4:2] the word in the line, [7:5]
// the set/sub-bank and [31:8] the tag. A way field (the "link" payload) is
// log2(64) = 6 bits. The 32-bit address width is this design's choice.
package wm_pkg;

  parameter int unsigned ADDR_W = 32;
  parameter int unsigned INSTR_W = 32;

  // Kind of control flow that leads from the previous fetch to this one,
  // supplied by the processor with every fetch request.
  typedef enum logic [1:0] {
    FK_SEQ      = 2'd0,  // next sequential word (previous address + 4)
    FK_BRANCH   = 2'd1,  // fixed target of a taken branch or absolute jump
    FK_INDIRECT = 2'd2   // variable target (indirect jump), or a restart
  } fetch_kind_e;

  // One-cycle event strobes, brought out for performance and energy counting.
  typedef struct packed {
    logic intra_line;     // fetch inside the previous line, no tag search
    logic seq_link;       // fetch followed a valid sequential link
    logic br_link;        // fetch followed a valid branch link
    logic tag_search;     // CAM search performed for a fetch
    logic hit;            // that search hit
    logic miss;           // that search missed
    logic seq_link_made;  // a sequential link was written
    logic br_link_made;   // a branch link was written
    logic overflow_set;   // an overflow bit was set on a branch target line
    logic bank_stall;     // fetch held one cycle: link write in the same sub-bank
    logic victim_valid;   // the evicted way held a valid line
    logic seq_inval;      // the sequential link of line E-1 was cleared
    logic flash_clear;    // all branch links were cleared (victim overflow bit set)
    logic refill_done;    // a line was written into the cache
  } wm_events_t;

  function automatic int unsigned clog2u(int unsigned v);
    return (v <= 1) ? 1 : $clog2(v);
  endfunction

endpackage
