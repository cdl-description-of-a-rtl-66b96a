// tb_main_memory: stores and loads words at addresses spread over the four
// banks at the default cycle of 13 clocks.  Checks the data, that busy covers
// the access and that done comes exactly 13 clocks after the request, or one
// clock after it for a read of a word of the block that the last full read
// brought into the bank data registers (four-way interleaving).  Also checks
// that a write into that block updates what those registers return.
module tb_main_memory;
  localparam int T = 13;
  logic         clk = 0, rst_n = 0;
  logic         read, write, busy, done;
  logic [15:0]  addr;
  logic [127:0] wdata, rdata;
  logic [127:0] model [int];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  main_memory dut (.clk, .rst_n, .read, .write, .addr, .wdata, .busy, .done, .rdata);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int latched = -1;   // block (address >> 2) held in the bank registers
  int n_fast = 0;

  task automatic access(input bit wr, input logic [15:0] a, input logic [127:0] d,
                        output logic [127:0] q);
    int n, exp_n;
    exp_n = (!wr && latched == int'(a[15:2])) ? 1 : T;
    if (exp_n == 1) n_fast++;
    if (!wr) latched = int'(a[15:2]);
    @(negedge clk);
    read = !wr; write = wr; addr = a; wdata = d;
    @(negedge clk);
    read = 0; write = 0; addr = ~a; wdata = ~d;
    n = 1;
    while (!done) begin
      checks++;
      if (!busy) failures++;
      @(negedge clk);
      n++;
    end
    q = rdata;
    checks++;
    if (n != exp_n) begin
      failures++;
      $display("access took %0d clocks, expected %0d", n, exp_n);
    end
    @(negedge clk);
    checks++;
    if (busy) failures++;
  endtask

  initial begin
    logic [15:0] addrs [32];
    logic [127:0] q;
    read = 0; write = 0; addr = 0; wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 32; i++) begin
      addrs[i] = 16'($urandom);
      if (i < 4) addrs[i] = {14'h155, 2'(i)};  // one block: four banks
    end
    for (int i = 0; i < 32; i++) begin
      logic [127:0] d;
      d = {$urandom, $urandom, $urandom, $urandom};
      access(1, addrs[i], d, q);
      model[int'(addrs[i])] = d;
    end
    for (int i = 31; i >= 0; i--) begin
      access(0, addrs[i], '0, q);
      checks++;
      if (q !== model[int'(addrs[i])]) begin
        failures++;
        $display("addr %h got %h exp %h", addrs[i], q, model[int'(addrs[i])]);
      end
    end
    // The block just read: all four words come from the bank registers.
    for (int i = 0; i < 4; i++) begin
      access(0, {14'h155, 2'(3 - i)}, '0, q);
      checks++;
      if (q !== model[int'({14'h155, 2'(3 - i)})]) failures++;
    end
    // Write into the block held in the registers, then read it back.
    begin
      logic [127:0] d;
      d = {$urandom, $urandom, $urandom, $urandom};
      access(1, addrs[1], d, q);
      model[int'(addrs[1])] = d;
      access(0, addrs[1], '0, q);
      checks++;
      if (q !== d) begin
        failures++;
        $display("bank register not updated by write: %h", q);
      end
      access(0, addrs[2], '0, q);
      checks++;
      if (q !== model[int'(addrs[2])]) failures++;
    end
    checks++;
    if (n_fast < 4) begin
      failures++;
      $display("only %0d reads served from the bank registers", n_fast);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
