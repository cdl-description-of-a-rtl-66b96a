// mb_pkg: widths, address formats and shared types of the memory buffer.
//
// A main-memory (MM) address is 16 bits: a 10-bit page address, a 4-bit
// block address and a 2-bit word address, most significant first.  A
// buffer-memory (BM) address has the same layout with a 4-bit page address.
// Words are 128 bits; a block is 4 words and a page 16 blocks.  These numbers
// are those of the organisation described; the enum for the activity-list
// operation and the bit order (bit 15 = most significant page-address bit)
// are choices of this implementation.
package mb_pkg;

  localparam int unsigned WORD_W   = 128;  // word length, both memories
  localparam int unsigned PA_W     = 10;   // MM page address
  localparam int unsigned BA_W     = 4;    // block address within a page
  localparam int unsigned WA_W     = 2;    // word address within a block
  localparam int unsigned QA_W     = 4;    // BM page address
  localparam int unsigned N_PAGES  = 16;   // pages held in the buffer
  localparam int unsigned N_BLOCKS = 16;   // blocks per page
  localparam int unsigned MM_AW    = PA_W + BA_W + WA_W;  // 16
  localparam int unsigned BM_AW    = QA_W + BA_W + WA_W;  // 10
  localparam int unsigned MM_CYCLE_CLKS = 13;  // 1 us / 80 ns, rounded up

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [MM_AW-1:0]  mm_addr_t;
  typedef logic [BM_AW-1:0]  bm_addr_t;
  typedef logic [PA_W-1:0]   page_addr_t;
  typedef logic [QA_W-1:0]   bpage_addr_t;

  // Fields of an effective address S(PA, BA, WA).
  typedef struct packed {
    logic [PA_W-1:0] pa;
    logic [BA_W-1:0] ba;
    logic [WA_W-1:0] wa;
  } mm_fields_t;

  // Operation applied to the P/Q/V array registers in one clock.
  typedef enum logic [1:0] {
    LIST_HOLD   = 2'd0,  // keep contents
    LIST_INSERT = 2'd1,  // page miss: S(PA)-P <- shr, Q <- cir Q, V <- shr V
    LIST_UPDATE = 2'd2   // page hit: rotate matched entry to the top
  } list_op_e;

  // One-clock event pulses from the access sequence, for monitoring.
  typedef struct packed {
    logic page_hit;       // read found its page in P (UPDATE)
    logic page_miss;      // read did not: bottom page replaced (INSERT)
    logic block_fill;     // a block was loaded from MM into BM
    logic buffer_read;    // the word was read from BM
    logic write_through;  // a word was stored into MM
    logic write_buffer;   // ... and into BM, its page being active
  } mb_events_t;

endpackage
