// tb_buffer_memory: writes random words to random buffer addresses, then
// reads them back; the word must appear in rdata one clock after rb.
module tb_buffer_memory;
  logic         clk = 0;
  logic         rb, wb;
  logic [9:0]   bar;
  logic [127:0] wdata, rdata;
  logic [127:0] model [1024];
  bit           written [1024];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  buffer_memory dut (.clk, .rb, .wb, .bar, .wdata, .rdata);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rb = 0; wb = 0; bar = 0; wdata = 0;
    for (int t = 0; t < 3000; t++) begin
      int a;
      a = $urandom_range(0, 1023);
      @(negedge clk);
      if ($urandom_range(0, 1) == 0 || !written[a]) begin
        bar = 10'(a); wb = 1; rb = 0;
        wdata = {$urandom, $urandom, $urandom, $urandom};
        model[a] = wdata; written[a] = 1;
        @(negedge clk);
        wb = 0;
      end else begin
        bar = 10'(a); rb = 1;
        @(negedge clk);
        rb = 0;
        bar = ~bar;   // rdata must hold the word read, not follow bar
        checks++;
        if (rdata !== model[a]) begin
          failures++;
          if (failures < 10) $display("addr %0d got %h exp %h", a, rdata, model[a]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
