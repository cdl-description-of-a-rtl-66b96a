// memory_buffer_top: a CPU-side buffer ("cache") in front of a slow main
// memory, organised by pages and blocks.
//
// A 1,024-word buffer memory holds 16 pages of the 64K-word main memory.  The
// 16 pages present are tagged by their main-memory page addresses in the P
// registers, which are searched associatively (page_match) on every
// reference, and kept in order of use (activity_list) so that a new page
// replaces the least recently used one.  The Q registers say where in the
// buffer each page lives, and the V registers which of its 16 four-word
// blocks have been loaded.  Reads that find their block in the buffer are
// served from it; otherwise the block is loaded word by word from main
// memory, the requested word first and passed on to the CPU at once.  Writes
// always go to main memory and, if the page is present, to the buffer too.
// buffer_access_ctrl sequences all of this.
//
// CPU interface: when busy is 0, a one-clock cpu_start loads cpu_addr,
// cpu_wdata and cpu_rw (1 = write) and starts an access; done pulses for one
// clock at its end, when cpu_rdata holds the word read.  match_pos is the
// encoder output N, the list position of the page that matched in the last
// search, with match_hit = 1 when any page matched; events gives one-clock
// pulses of what each access did.  mm_busy_o shows the main memory busy.
//
// The sizes and the sequence follow the organisation described; the clocking
// of each step, the memory timing model and the handshake are this
// implementation's.  MM_CLKS sets the main-memory cycle in clocks.
module memory_buffer_top
  import mb_pkg::*;
#(
  parameter int unsigned MM_CLKS = mb_pkg::MM_CYCLE_CLKS
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cpu_start,
  input  mm_addr_t    cpu_addr,
  input  word_t       cpu_wdata,
  input  logic        cpu_rw,
  output logic        busy,
  output logic        done,
  output word_t       cpu_rdata,
  output logic [QA_W-1:0] match_pos,
  output logic        match_hit,
  output logic        mm_busy_o,
  output mb_events_t  events
);

  list_op_e           list_op;
  page_addr_t         list_new_pa;
  logic [N_PAGES-1:0] m;
  logic [N_PAGES-1:0] match;
  logic               set_valid;
  logic [BA_W-1:0]    blk;
  page_addr_t         p [N_PAGES];
  bpage_addr_t        q_top;
  logic [N_BLOCKS-1:0] v_top;
  logic               valid_bit;

  logic     mm_read, mm_write, mm_busy, mm_done;
  mm_addr_t mm_addr;
  word_t    mm_wdata, mm_rdata;

  logic     bm_rb, bm_wb;
  bm_addr_t bm_addr;
  word_t    bm_wdata, bm_rdata;

  mb_events_t ev;

  buffer_access_ctrl u_ctrl (
    .clk, .rst_n,
    .cpu_start, .cpu_addr, .cpu_wdata, .cpu_rw,
    .busy, .done, .cpu_rdata,
    .list_op, .list_new_pa, .m, .set_valid, .blk,
    .match, .q_top, .valid_bit,
    .mm_read, .mm_write, .mm_addr, .mm_wdata, .mm_busy, .mm_done, .mm_rdata,
    .bm_rb, .bm_wb, .bm_addr, .bm_wdata, .bm_rdata,
    .events(ev)
  );

  activity_list u_list (
    .clk, .rst_n,
    .op(list_op), .new_pa(list_new_pa), .m, .set_valid, .blk,
    .p, .q_top, .v_top, .valid_bit
  );

  page_match u_match (
    .p, .key(list_new_pa), .match   // key: S(PA), held in the controller
  );

  match_encoder u_enc (
    .m, .n(match_pos), .hit(match_hit)
  );

  main_memory #(.CYCLE_CLKS(MM_CLKS)) u_mm (
    .clk, .rst_n,
    .read(mm_read), .write(mm_write), .addr(mm_addr), .wdata(mm_wdata),
    .busy(mm_busy), .done(mm_done), .rdata(mm_rdata)
  );

  buffer_memory u_bm (
    .clk, .rb(bm_rb), .wb(bm_wb), .bar(bm_addr), .wdata(bm_wdata),
    .rdata(bm_rdata)
  );

  assign mm_busy_o = mm_busy;
  assign events    = ev;

  // v_top (the valid bits of the top page) is used only through valid_bit.
  logic unused_v;
  assign unused_v = ^v_top;

endmodule
