// tb_memory_buffer_top: end-to-end test of the memory buffer at its default
// sizes (64K-word main memory with a 13-clock cycle, 1,024-word buffer, 16
// pages in the activity list).
//
// A working set of 24 main-memory pages, four blocks each, is first stored
// through the CPU port.  Then thousands of random reads and writes run, most
// of them on a hot subset of the pages so that pages are both found and
// replaced.  A reference model, an ordered list of (page, block valid bits)
// plus a copy of main memory, predicts for every access the word read, the
// clock count from start to done, the events and the encoder output N (the
// list position of the matched page).  Every mechanism of the organisation
// must occur at least once: page hit, page miss with replacement of the least
// recently used page, block load with first-word forwarding, word read from
// the buffer, store-through with and without a buffer write, and a hit below
// the top of the list.  A block load is expected to end 19 + T clocks after
// the start: the first word costs a main-memory cycle of T clocks, the other
// three come from the interleaved banks' data registers.
module tb_memory_buffer_top;
  import mb_pkg::*;
  localparam int T        = MM_CYCLE_CLKS;
  localparam int N_WS     = 24;   // pages in the working set
  localparam int N_HOT    = 12;   // pages referenced most often
  localparam int N_OPS    = 4000;

  typedef struct {
    int          page;
    logic [15:0] v;
  } lent_t;

  logic clk = 0, rst_n = 0;
  logic cpu_start, cpu_rw, busy, done, match_hit, mm_busy_o;
  mm_addr_t cpu_addr;
  word_t cpu_wdata, cpu_rdata;
  logic [3:0] match_pos;
  mb_events_t events, ev_seen;

  word_t mm_model [int];
  lent_t list_model [$];
  int    ws_page [N_WS];
  int    ws_block [N_WS][4];

  int checks = 0, failures = 0;
  int n_page_hit = 0, n_page_miss = 0, n_replace = 0, n_fill = 0, n_buf_read = 0;
  int n_write_mm_only = 0, n_write_both = 0, n_hit_below_top = 0, n_forward = 0;
  int latched = -1;   // block whose words the main-memory bank registers hold

  always #5 clk = ~clk;

  memory_buffer_top dut (.clk, .rst_n, .cpu_start, .cpu_addr, .cpu_wdata, .cpu_rw,
                         .busy, .done, .cpu_rdata, .match_pos, .match_hit,
                         .mm_busy_o, .events);

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL: %s", msg);
  endtask

  function automatic int find_page(int page);
    foreach (list_model[i]) if (list_model[i].page == page) return i;
    return -1;
  endfunction

  // Runs one access on the DUT and checks it against the model.
  task automatic access(input bit rw, input mm_addr_t a, input word_t d);
    int page, block, pos, lat, first, exp_lat, exp_first;
    bit fill;
    word_t exp_q;
    lent_t e;
    page  = int'(a[15:6]);
    block = int'(a[5:2]);
    // Model: search, list move, block validity.
    pos  = find_page(page);
    fill = 0;
    if (rw) begin
      mm_model[int'(a)] = d;
      if (pos >= 0) begin
        e = list_model[pos];
        list_model.delete(pos);
        list_model.push_front(e);
      end
      exp_lat = 5 + T;
    end else begin
      if (pos >= 0) begin
        e = list_model[pos];
        list_model.delete(pos);
        list_model.push_front(e);
      end else begin
        if (list_model[15].page != 0) n_replace++;
        void'(list_model.pop_back());
        e.page = page;
        e.v = '0;
        list_model.push_front(e);
      end
      fill = !list_model[0].v[block];
      list_model[0].v[block] = 1'b1;
      // The first word of a load costs a main-memory cycle unless the banks
      // already hold the block; the other three come from the bank registers.
      exp_lat = !fill ? 7 : (latched == int'(a[15:2])) ? 20 : 19 + T;
      exp_first = (latched == int'(a[15:2])) ? 8 : 7 + T;
      if (fill) latched = int'(a[15:2]);
    end
    exp_q = mm_model.exists(int'(a)) ? mm_model[int'(a)] : '0;

    // DUT.
    @(negedge clk);
    cpu_start = 1; cpu_rw = rw; cpu_addr = a; cpu_wdata = d;
    ev_seen = '0;
    first = -1;
    @(negedge clk);
    cpu_start = 0; cpu_addr = ~a; cpu_wdata = ~d;
    lat = 1;
    while (!done && lat < 200) begin
      ev_seen |= events;
      if (lat == 2) begin
        checks++;
        if (match_hit !== (pos >= 0) || (pos >= 0 && int'(match_pos) != pos))
          fail($sformatf("encoder N=%0d hit=%b, expected position %0d", match_pos, match_hit, pos));
      end
      if (first < 0 && !rw && cpu_rdata === exp_q) first = lat;
      @(negedge clk);
      lat++;
    end
    ev_seen |= events;

    checks++;
    if (lat != exp_lat) fail($sformatf("%s %h took %0d clocks, expected %0d",
                                      rw ? "write" : "read", a, lat, exp_lat));
    if (!rw) begin
      checks++;
      if (cpu_rdata !== exp_q) fail($sformatf("read %h got %h expected %h", a, cpu_rdata, exp_q));
      if (fill) begin
        checks++;
        if (first == exp_first) n_forward++;
        else fail($sformatf("first word of block load at clock %0d", first));
      end
    end
    checks++;
    if (ev_seen.page_hit      != (!rw && pos >= 0) ||
        ev_seen.page_miss     != (!rw && pos < 0) ||
        ev_seen.block_fill    != fill ||
        ev_seen.buffer_read   != (!rw && !fill) ||
        ev_seen.write_through != rw ||
        ev_seen.write_buffer  != (rw && pos >= 0))
      fail($sformatf("events %b for %s %h (pos %0d fill %0d)", ev_seen, rw ? "write" : "read", a, pos, fill));

    if (!rw && pos >= 0)  n_page_hit++;
    if (!rw && pos < 0)   n_page_miss++;
    if (fill)             n_fill++;
    if (!rw && !fill)     n_buf_read++;
    if (rw && pos < 0)    n_write_mm_only++;
    if (rw && pos >= 0)   n_write_both++;
    if (pos > 0)          n_hit_below_top++;
  endtask

  function automatic mm_addr_t ws_addr(int pi, int bi, int wd);
    return {10'(ws_page[pi]), 4'(ws_block[pi][bi]), 2'(wd)};
  endfunction

  function automatic word_t rand_word();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  task automatic count(string name, int n);
    checks++;
    $display("  %-28s %0d", name, n);
    if (n == 0) fail($sformatf("mechanism never happened: %s", name));
  endtask

  initial begin
    lent_t e;
    cpu_start = 0; cpu_rw = 0; cpu_addr = '0; cpu_wdata = '0;
    for (int i = 0; i < 16; i++) begin
      e.page = 0; e.v = '0;
      list_model.push_back(e);
    end
    // Distinct non-zero pages, four distinct blocks each.
    for (int i = 0; i < N_WS; i++) begin
      bit dup;
      do begin
        ws_page[i] = $urandom_range(1, 1023);
        dup = 0;
        for (int j = 0; j < i; j++) if (ws_page[j] == ws_page[i]) dup = 1;
      end while (dup);
      for (int b = 0; b < 4; b++) ws_block[i][b] = (int'($urandom_range(0, 3)) + 4 * b);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // Store the working set: no page is active yet, so main memory only.
    for (int i = 0; i < N_WS; i++)
      for (int b = 0; b < 4; b++)
        for (int wd = 0; wd < 4; wd++)
          access(1, ws_addr(i, b, wd), rand_word());

    for (int t = 0; t < N_OPS; t++) begin
      int pi;
      pi = ($urandom_range(0, 9) < 8) ? $urandom_range(0, N_HOT - 1)
                                      : $urandom_range(0, N_WS - 1);
      access($urandom_range(0, 3) == 0, ws_addr(pi, $urandom_range(0, 3), $urandom_range(0, 3)),
             rand_word());
    end

    $display("mechanisms:");
    count("page hit (read)", n_page_hit);
    count("page miss (read)", n_page_miss);
    count("LRU page replaced", n_replace);
    count("block loaded", n_fill);
    count("first word forwarded", n_forward);
    count("word read from buffer", n_buf_read);
    count("store to main memory only", n_write_mm_only);
    count("store to both memories", n_write_both);
    count("hit below top of list", n_hit_below_top);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
