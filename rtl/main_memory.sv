// main_memory: the main memory MM, 64K words of 128 bits, four-way
// interleaved.
//
// The words are spread over four banks by the word address (the two least
// significant address bits), so the four words of a block lie in four
// different banks, each a 16K-word array with its own data register.  The
// memory has a cycle time of 1 us against the 80 ns clock, modelled as
// CYCLE_CLKS clocks per access (13 by default, 1 us / 80 ns rounded up).
//
// With INTERLEAVED_READ = 1 (the default) a read that has to go to the banks
// starts all four of them on the addressed block, so the whole block arrives
// in the bank data registers in one memory cycle.  A later read of a word of
// that same block is then served from its bank's data register in one clock.
// This is how the interleaving lets a block move in one memory cycle while
// the access sequence still asks for one word at a time.  A write always
// takes a full cycle, goes to its one bank, and also updates the data
// register if that register holds the block written, so the registers never
// hold stale words.  With INTERLEAVED_READ = 0 every access takes a full
// cycle on its own bank.
//
// Interface: read (READ) or write (WRITE) is a one-clock request taken when
// busy is 0, with addr (MAR) and, for a write, wdata (MBR).  The memory is
// then busy for CYCLE_CLKS clocks, or for one clock when a read is served
// from the data registers; in the last of them done is 1 and, for a read,
// rdata holds the word (valid only while done is 1).  CYCLE_CLKS must be at
// least 2.  The arrays are not reset; the data registers are marked empty.
module main_memory #(
  parameter int unsigned AW               = mb_pkg::MM_AW,
  parameter int unsigned WORD_W           = mb_pkg::WORD_W,
  parameter int unsigned N_BANKS          = 4,
  parameter int unsigned CYCLE_CLKS       = mb_pkg::MM_CYCLE_CLKS,
  parameter bit          INTERLEAVED_READ = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              read,
  input  logic              write,
  input  logic [AW-1:0]     addr,
  input  logic [WORD_W-1:0] wdata,
  output logic              busy,
  output logic              done,
  output logic [WORD_W-1:0] rdata
);

  localparam int unsigned BANK_W     = $clog2(N_BANKS);
  localparam int unsigned ROW_W      = AW - BANK_W;
  localparam int unsigned BANK_DEPTH = 1 << ROW_W;
  localparam int unsigned CNT_W      = $clog2(CYCLE_CLKS + 1);

  logic [AW-1:0]     addr_r;
  logic [WORD_W-1:0] wdata_r;
  logic              is_write;
  logic [CNT_W-1:0]  cnt;
  logic              strobe;     // the clock in which the banks are accessed

  // Bank data registers and the block they hold.
  logic [WORD_W-1:0] bank_reg [N_BANKS];
  logic [ROW_W-1:0]  reg_row;
  logic              reg_full;

  logic [BANK_W-1:0] bank_sel;
  logic [ROW_W-1:0]  row;
  logic              reg_hit;

  assign bank_sel = addr_r[BANK_W-1:0];
  assign row      = addr_r[AW-1:BANK_W];
  assign reg_hit  = INTERLEAVED_READ && reg_full && (reg_row == addr[AW-1:BANK_W]);
  assign done     = busy && (cnt == CNT_W'(CYCLE_CLKS - 1));
  assign strobe   = busy && (cnt == CNT_W'(CYCLE_CLKS - 2));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      cnt      <= '0;
      is_write <= 1'b0;
      addr_r   <= '0;
      wdata_r  <= '0;
    end else if (!busy) begin
      if (read || write) begin
        busy     <= 1'b1;
        // A read of the block already in the data registers skips the cycle.
        cnt      <= (read && reg_hit) ? CNT_W'(CYCLE_CLKS - 1) : '0;
        is_write <= write;
        addr_r   <= addr;
        wdata_r  <= wdata;
      end
    end else if (done) begin
      busy <= 1'b0;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      reg_full <= 1'b0;
      reg_row  <= '0;
    end else if (strobe && !is_write && INTERLEAVED_READ) begin
      reg_full <= 1'b1;
      reg_row  <= row;
    end
  end

  for (genvar b = 0; b < N_BANKS; b++) begin : g_bank
    logic [WORD_W-1:0] mem [BANK_DEPTH];
    logic sel;
    assign sel = (bank_sel == BANK_W'(b));
    always_ff @(posedge clk) begin
      if (strobe && is_write && sel) mem[row] <= wdata_r;
      if (strobe && !is_write && (sel || INTERLEAVED_READ)) bank_reg[b] <= mem[row];
      else if (strobe && is_write && sel && reg_full && reg_row == row) bank_reg[b] <= wdata_r;
    end
  end

  if (CYCLE_CLKS < 2) begin : g_bad_cycle
    $error("main_memory: CYCLE_CLKS must be at least 2");
  end

  always_comb rdata = bank_reg[bank_sel];

  a_no_req_busy: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> !(read || write));
  a_one_req: assert property (@(posedge clk) disable iff (!rst_n)
    !(read && write));

endmodule
