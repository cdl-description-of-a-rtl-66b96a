// tb_match_encoder: checks encoder N on every one-hot match vector, on zero,
// and on random vectors (lowest set bit expected).
module tb_match_encoder;
  logic [15:0] m;
  logic [3:0]  n;
  logic        hit;
  int checks = 0, failures = 0;

  match_encoder dut (.m, .n, .hit);

  task automatic check(input logic [15:0] v);
    int exp_n;
    m = v;
    #1;
    exp_n = 0;
    for (int i = 15; i >= 0; i--) if (v[i]) exp_n = i;
    checks++;
    if (hit !== (v != 0) || (v != 0 && int'(n) != exp_n)) begin
      failures++;
      $display("m=%h n=%0d hit=%b exp n=%0d", v, n, hit, exp_n);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'h0000);
    for (int i = 0; i < 16; i++) check(16'd1 << i);
    for (int t = 0; t < 200; t++) check(16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
