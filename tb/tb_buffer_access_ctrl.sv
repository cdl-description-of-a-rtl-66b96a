// tb_buffer_access_ctrl: directed test of the buffer-access sequence, with
// the real activity list, page search and memories around the controller
// (main memory at its default 13-clock cycle).  Each step checks the word
// returned, the clock count from start to done (7 for a word in the buffer,
// 19+13 for a block load, 5+13 for a write), the first-word forwarding
// time of a block load (6+13) and the events the sequence reports.
module tb_buffer_access_ctrl;
  import mb_pkg::*;
  localparam int T = 13;

  logic clk = 0, rst_n = 0;
  logic cpu_start, cpu_rw, busy, done;
  mm_addr_t cpu_addr;
  word_t cpu_wdata, cpu_rdata;
  list_op_e list_op;
  page_addr_t list_new_pa;
  logic [15:0] m, match;
  logic set_valid, valid_bit;
  logic [3:0] blk;
  page_addr_t p [16];
  bpage_addr_t q_top;
  logic [15:0] v_top;
  logic mm_read, mm_write, mm_busy, mm_done;
  mm_addr_t mm_addr;
  word_t mm_wdata, mm_rdata;
  logic bm_rb, bm_wb;
  bm_addr_t bm_addr;
  word_t bm_wdata, bm_rdata;
  mb_events_t events, ev_seen;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  buffer_access_ctrl dut (.*);
  activity_list u_list (.clk, .rst_n, .op(list_op), .new_pa(list_new_pa), .m,
                        .set_valid, .blk, .p, .q_top, .v_top, .valid_bit);
  page_match u_match (.p, .key(list_new_pa), .match);
  main_memory u_mm (.clk, .rst_n, .read(mm_read), .write(mm_write), .addr(mm_addr),
                    .wdata(mm_wdata), .busy(mm_busy), .done(mm_done), .rdata(mm_rdata));
  buffer_memory u_bm (.clk, .rb(bm_rb), .wb(bm_wb), .bar(bm_addr), .wdata(bm_wdata),
                      .rdata(bm_rdata));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic mm_addr_t A(int page, int block, int word);
    return {10'(page), 4'(block), 2'(word)};
  endfunction

  function automatic word_t pattern(mm_addr_t a, int salt);
    return {4{32'(a) ^ 32'(salt * 32'h9e37_79b9)}};
  endfunction

  // One access; lat = clock in which done is high, the start clock being 0.
  // first = clock in which the word read first appears in DATA.
  task automatic access(input bit rw, input mm_addr_t a, input word_t d,
                        output word_t q, output int lat, output int first,
                        input word_t expect_first = '0);
    @(negedge clk);
    cpu_start = 1; cpu_rw = rw; cpu_addr = a; cpu_wdata = d;
    ev_seen = '0;
    lat = 0;
    first = -1;
    @(negedge clk);
    cpu_start = 0; cpu_addr = ~a; cpu_wdata = ~d;
    lat = 1;
    while (!done) begin
      ev_seen |= events;
      if (first < 0 && !rw && cpu_rdata === expect_first) first = lat;
      @(negedge clk);
      lat++;
    end
    ev_seen |= events;
    q = cpu_rdata;
    checks++;
    if (!busy) begin
      failures++;
      $display("busy low before done");
    end
    @(negedge clk);
    checks++;
    if (busy) begin
      failures++;
      $display("B not cleared after done");
    end
  endtask

  task automatic expect_int(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic expect_word(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    word_t q, w;
    int lat, first;
    cpu_start = 0; cpu_rw = 0; cpu_addr = '0; cpu_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. Store the four words of page 5, block 3: page not active, so main
    //    memory only.
    for (int wd = 0; wd < 4; wd++) begin
      access(1, A(5, 3, wd), pattern(A(5, 3, wd), 1), q, lat, first);
      expect_int("write latency", lat, 5 + T);
      expect_int("write through", int'(ev_seen.write_through), 1);
      expect_int("no buffer write on inactive page", int'(ev_seen.write_buffer), 0);
    end

    // 2. Read word 2 of that block: page miss, block loaded, word 2 first.
    w = pattern(A(5, 3, 2), 1);
    access(0, A(5, 3, 2), '0, q, lat, first, w);
    expect_word("read after block load", q, w);
    expect_int("block load latency", lat, 19 + T);
    expect_int("first word forwarded", first, 7 + T);
    expect_int("page miss", int'(ev_seen.page_miss), 1);
    expect_int("block fill", int'(ev_seen.block_fill), 1);
    expect_int("P(0) holds new page", int'(p[0]), 5);

    // 3. The other words of the block now come from the buffer.
    for (int wd = 0; wd < 4; wd++) begin
      access(0, A(5, 3, wd), '0, q, lat, first);
      expect_word("read from buffer", q, pattern(A(5, 3, wd), 1));
      expect_int("buffer read latency", lat, 7);
      expect_int("buffer read event", int'(ev_seen.buffer_read), 1);
      expect_int("page hit event", int'(ev_seen.page_hit), 1);
    end

    // 4. Write to the active page: both memories; read back from the buffer.
    w = pattern(A(5, 3, 1), 2);
    access(1, A(5, 3, 1), w, q, lat, first);
    expect_int("write hit latency", lat, 5 + T);
    expect_int("write into buffer", int'(ev_seen.write_buffer), 1);
    access(0, A(5, 3, 1), '0, q, lat, first);
    expect_word("buffer holds stored word", q, w);
    expect_int("buffer read latency", lat, 7);

    // 5. Fifteen other pages: page 5 drifts to the bottom of the list.
    for (int pg = 6; pg <= 20; pg++) begin
      access(0, A(pg, 0, 0), '0, q, lat, first);
      expect_int("page miss on new page", int'(ev_seen.page_miss), 1);
    end
    expect_int("page 5 at the bottom", int'(p[15]), 5);

    // 6. Touch page 5 again (hit, moved to the top), then two more pages:
    //    pages 6 and 7, now least recently used, are replaced, not page 5.
    access(0, A(5, 3, 1), '0, q, lat, first);
    expect_int("page hit at bottom", int'(ev_seen.page_hit), 1);
    expect_word("word after move to top", q, w);
    expect_int("P(0) is page 5", int'(p[0]), 5);
    access(0, A(21, 0, 0), '0, q, lat, first);
    access(0, A(22, 0, 0), '0, q, lat, first);
    access(0, A(5, 3, 3), '0, q, lat, first);
    expect_int("page 5 still active", int'(ev_seen.page_hit), 1);
    expect_int("block still valid", lat, 7);

    // 7. Sixteen further pages evict page 5; its block is loaded again from
    //    main memory, which holds the stored word.
    for (int pg = 30; pg < 46; pg++) access(0, A(pg, 1, 0), '0, q, lat, first);
    access(0, A(5, 3, 1), '0, q, lat, first, w);
    expect_int("page 5 replaced", int'(ev_seen.page_miss), 1);
    expect_word("reloaded word", q, w);
    expect_int("reload latency", lat, 19 + T);

    // 8. A different block of an active page: page hit, block load.
    access(1, A(5, 9, 0), pattern(A(5, 9, 0), 3), q, lat, first);
    access(0, A(5, 9, 0), '0, q, lat, first);
    expect_int("hit on page", int'(ev_seen.page_hit), 1);
    expect_int("block load on active page", int'(ev_seen.block_fill), 1);
    expect_word("new block word", q, pattern(A(5, 9, 0), 3));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
