// tb_activity_list: drives random INSERT, UPDATE and set-valid operations on
// the P/Q/V array registers and compares every entry of P, and Q(0), V(0)
// and V(0,blk), with a model kept as an ordered list (queue): INSERT pushes
// the new page in front and recycles the buffer page of the last entry;
// UPDATE removes entry k and pushes it in front.  Also checks the reset
// state and that the Q entries stay a permutation of 0..15.
module tb_activity_list;
  import mb_pkg::*;

  typedef struct {
    int p;
    int q;
    logic [15:0] v;
  } entry_t;

  logic        clk = 0, rst_n = 0;
  list_op_e    op;
  logic [9:0]  new_pa;
  logic [15:0] m;
  logic        set_valid;
  logic [3:0]  blk;
  logic [9:0]  p [16];
  logic [3:0]  q_top;
  logic [15:0] v_top;
  logic        valid_bit;
  entry_t      model [$];
  int checks = 0, failures = 0;
  int n_insert = 0, n_update = 0, n_valid = 0;

  always #5 clk = ~clk;

  activity_list dut (.clk, .rst_n, .op, .new_pa, .m, .set_valid, .blk,
                     .p, .q_top, .v_top, .valid_bit);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    checks++;
    for (int i = 0; i < 16; i++) begin
      if (int'(p[i]) != model[i].p) begin
        failures++;
        if (failures < 10) $display("P(%0d)=%0d exp %0d", i, p[i], model[i].p);
      end
    end
    checks++;
    if (int'(q_top) != model[0].q || v_top !== model[0].v ||
        valid_bit !== model[0].v[blk]) begin
      failures++;
      if (failures < 10)
        $display("Q(0)=%0d exp %0d V(0)=%h exp %h", q_top, model[0].q, v_top, model[0].v);
    end
  endtask

  initial begin
    entry_t e;
    op = LIST_HOLD; new_pa = 0; m = 0; set_valid = 0; blk = 0;
    for (int i = 0; i < 16; i++) begin
      e.p = 0; e.q = i; e.v = '0;
      model.push_back(e);
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    compare();
    for (int t = 0; t < 5000; t++) begin
      int r, k;
      r = $urandom_range(0, 9);
      op = LIST_HOLD; m = '0; set_valid = 0;
      blk = 4'($urandom);
      if (r < 3) begin
        op = LIST_INSERT;
        new_pa = 10'($urandom_range(1, 1023));
        e.p = int'(new_pa); e.q = model[15].q; e.v = '0;
        void'(model.pop_back());
        model.push_front(e);
        n_insert++;
      end else if (r < 7) begin
        op = LIST_UPDATE;
        k = $urandom_range(0, 15);
        m = 16'd1 << k;
        e = model[k];
        model.delete(k);
        model.push_front(e);
        n_update++;
      end else if (r < 9) begin
        set_valid = 1;
        model[0].v[blk] = 1'b1;
        n_valid++;
      end
      @(negedge clk);
      compare();
      // Q stays a permutation of the buffer pages.
      begin
        bit seen [16];
        foreach (model[i]) seen[model[i].q] = 1;
        checks++;
        foreach (seen[i]) if (!seen[i]) failures++;
      end
    end
    // UPDATE with M = 0 changes nothing.
    op = LIST_UPDATE; m = '0;
    @(negedge clk);
    compare();
    if (n_insert == 0 || n_update == 0 || n_valid == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
