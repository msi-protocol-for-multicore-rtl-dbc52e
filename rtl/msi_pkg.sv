// msi_pkg: types, geometry and state encodings shared by the dual-core MSI
// data memory system.
//
// Address split (32-bit byte address, fixed by the cache organisation):
//   [1:0]  byte select (1 of 4 bytes)
//   [3:2]  word select (1 of 4 words in a line)
//   [5:4]  index       (1 of 4 lines)
//   [31:6] tag         (26 bits)
//
// Coherence state. Each coherency tag entry holds a 5-bit state word
// {M[1:0], S, I[1:0]} that describes the line as seen by both cores at once:
//   M = 00 not modified, 01 modified by MIPS1, 10 modified by MIPS2
//   S = 1  clean copies in both caches
//   I = 01 clean copy held by MIPS1 only, 10 clean copy held by MIPS2 only
//   all zero: no cache holds the line (the reset value)
// From one core's point of view a line is M when M names it, S when it holds a
// clean copy (S set, or I names it), and I otherwise; so every core still sees
// plain MSI. The field layout and widths follow the original design; the reading of
// the I field as "which core holds the only clean copy" is derived from its
// transition table, and the all-zero meaning is this design's choice.
//
// Cores are numbered 0 (MIPS1) and 1 (MIPS2) in arrays.
package msi_pkg;

  localparam int unsigned ADDR_W      = 32;
  localparam int unsigned WORD_W      = 32;
  localparam int unsigned LINE_WORDS  = 4;
  localparam int unsigned LINE_W      = LINE_WORDS * WORD_W;   // 128
  localparam int unsigned NUM_LINES   = 4;
  localparam int unsigned BYTE_SEL_W  = 2;
  localparam int unsigned WORD_SEL_W  = 2;
  localparam int unsigned INDEX_W     = 2;
  localparam int unsigned OFFSET_W    = BYTE_SEL_W + WORD_SEL_W; // 4
  localparam int unsigned TAG_W       = ADDR_W - OFFSET_W - INDEX_W; // 26
  localparam int unsigned NCORES      = 2;

  typedef logic [ADDR_W-1:0]  addr_t;
  typedef logic [WORD_W-1:0]  word_t;
  typedef logic [LINE_W-1:0]  line_t;
  typedef logic [INDEX_W-1:0] index_t;
  typedef logic [TAG_W-1:0]   tag_t;

  // Access size from the core; the byte select picks the lane.
  typedef enum logic [1:0] {
    SIZE_BYTE = 2'd0,
    SIZE_HALF = 2'd1,
    SIZE_WORD = 2'd2
  } size_e;

  typedef struct packed {
    logic [1:0] m;
    logic       s;
    logic [1:0] i;
  } msi_t;

  localparam msi_t MSI_NONE   = 5'b00_0_00;
  localparam msi_t MSI_ONLY1  = 5'b00_0_01;
  localparam msi_t MSI_ONLY2  = 5'b00_0_10;
  localparam msi_t MSI_SHARED = 5'b00_1_00;
  localparam msi_t MSI_MOD1   = 5'b01_0_00;
  localparam msi_t MSI_MOD2   = 5'b10_0_00;

  // Protocol cases of the coherency controller, numbered as in the
  // original design's state table. ST400 is "do nothing" (no transaction).
  typedef enum logic [4:0] {
    ST0  = 5'd0,   // MIPS1 read, tracked line held by nobody      -> ONLY1
    ST1  = 5'd1,   // MIPS1 read hit (ONLY1, MOD1, SHARED)          -> unchanged
    ST2  = 5'd2,   // MIPS1 read, line clean in MIPS2 only         -> SHARED
    ST3  = 5'd3,   // MIPS1 read, line modified by MIPS2: flush    -> SHARED
    ST4  = 5'd4,   // MIPS2 read, tracked line held by nobody      -> ONLY2
    ST5  = 5'd5,   // MIPS2 read hit (ONLY2, MOD2, SHARED)          -> unchanged
    ST6  = 5'd6,   // MIPS2 read, line clean in MIPS1 only         -> SHARED
    ST7  = 5'd7,   // MIPS2 read, line modified by MIPS1: flush    -> SHARED
    ST8  = 5'd8,   // MIPS1 write, line not modified                -> MOD1
    ST9  = 5'd9,   // MIPS1 write, line modified by MIPS2: flush   -> MOD1
    ST10 = 5'd10,  // MIPS2 write, line not modified                -> MOD2
    ST11 = 5'd11,  // MIPS2 write, line modified by MIPS1: flush   -> MOD2
    ST12 = 5'd12,  // MIPS1 read, address in neither tag copy       -> ONLY1
    ST13 = 5'd13,  // MIPS1 write, address in neither tag copy      -> MOD1
    ST14 = 5'd14,  // MIPS2 read, address in neither tag copy       -> ONLY2
    ST15 = 5'd15,  // MIPS2 write, address in neither tag copy      -> MOD2
    ST400 = 5'd31  // idle
  } coh_case_e;

  function automatic msi_t msi_only(input logic core);
    return core ? MSI_ONLY2 : MSI_ONLY1;
  endfunction

  function automatic msi_t msi_mod(input logic core);
    return core ? MSI_MOD2 : MSI_MOD1;
  endfunction

  // Does this core's cache hold a valid copy under state st?
  function automatic logic msi_holds(input msi_t st, input logic core);
    return st.s || (st.i == (core ? 2'b10 : 2'b01)) || (st.m == (core ? 2'b10 : 2'b01));
  endfunction

  function automatic logic msi_modified_by(input msi_t st, input logic core);
    return st.m == (core ? 2'b10 : 2'b01);
  endfunction

  // State after this core drops its copy (eviction or invalidation).
  function automatic msi_t msi_drop(input msi_t st, input logic core);
    if (st.s) return msi_only(!core);
    if (msi_holds(st, core)) return MSI_NONE;
    return st;
  endfunction

  // State after this core fetches a clean copy for reading.
  function automatic msi_t msi_add_reader(input msi_t st, input logic core);
    if (st == MSI_NONE) return msi_only(core);
    if (msi_holds(st, core)) return st;
    return MSI_SHARED; // the other core holds it (clean, or flushed first)
  endfunction

  function automatic index_t addr_index(input addr_t a);
    return a[OFFSET_W +: INDEX_W];
  endfunction

  function automatic tag_t addr_tag(input addr_t a);
    return a[ADDR_W-1 -: TAG_W];
  endfunction

endpackage
