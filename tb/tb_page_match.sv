// tb_page_match: checks the associative page search.  Random P contents and
// keys, some keys copied from a P entry so that matches occur; the expected
// match vector is computed by plain integer comparison.
module tb_page_match;
  localparam int N = 16;
  logic [9:0]   p [N];
  logic [9:0]   key;
  logic [N-1:0] match;
  int checks = 0, failures = 0;

  page_match dut (.p, .key, .match);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] exp;
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < N; i++) p[i] = 10'($urandom_range(0, 1023));
      // Distinct entries, as in the list; sometimes a duplicate-free subset.
      if (t % 3 == 0) key = p[$urandom_range(0, N-1)];
      else if (t % 3 == 1) key = p[$urandom_range(0, N-1)] ^ (10'd1 << $urandom_range(0, 9));
      else key = 10'($urandom_range(0, 1023));
      #1;
      for (int i = 0; i < N; i++) exp[i] = (int'(p[i]) == int'(key));
      checks++;
      if (match !== exp) begin
        failures++;
        if (failures < 10) $display("mismatch key=%0d got %h exp %h", key, match, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
