// activity_list: the P, Q and V array registers, one entry per buffer page.
//
// Entry i holds P(i), the main-memory page address of a page in the buffer,
// Q(i), the buffer-memory page where that page is kept, and V(i), one valid
// bit per block of the page.  The entries are kept in order of use: entry 0
// is the most recently referenced page (top of the list), entry N_PAGES-1 the
// next to be replaced (bottom).  Two moves keep the order, as in the
// organisation described:
//
//   LIST_INSERT (page miss): P shifts down one entry with the new page
//     address entering at the top and the bottom address falling out; Q is
//     rotated circularly, so the buffer page freed at the bottom comes to the
//     top; V shifts down with zeros entering, so no block of the new page is
//     valid.
//   LIST_UPDATE (page hit): for match vector m with m(k)=1, entries 0..k are
//     rotated circularly by one, bringing entry k to the top and moving the
//     intervening entries down one.  P, Q and V move together.  m = 0 leaves
//     the list unchanged.
//
// set_valid sets V(0, blk), the valid bit of block blk of the top page.  It
// may be given in the same clock as LIST_HOLD only.  All updates happen on the
// rising clock edge; the outputs are the register contents.
//
// Reset is this implementation's choice: P is cleared to page address 0
// (main-memory page 0 does not exist, so an empty entry never matches), Q(i)
// is set to i so that the Q entries are a permutation of the buffer pages,
// and all of V is cleared.
module activity_list
#(
  parameter int unsigned N_PAGES  = mb_pkg::N_PAGES,
  parameter int unsigned N_BLOCKS = mb_pkg::N_BLOCKS,
  parameter int unsigned PA_W     = mb_pkg::PA_W,
  parameter int unsigned QA_W     = $clog2(N_PAGES),
  parameter int unsigned BA_W     = $clog2(N_BLOCKS)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  mb_pkg::list_op_e            op,
  input  logic [PA_W-1:0]     new_pa,     // page entering at the top on INSERT
  input  logic [N_PAGES-1:0]  m,          // match register for UPDATE
  input  logic                set_valid,
  input  logic [BA_W-1:0]     blk,        // S(BA)
  output logic [PA_W-1:0]     p [N_PAGES],
  output logic [QA_W-1:0]     q_top,      // Q(0)
  output logic [N_BLOCKS-1:0] v_top,      // V(0)
  output logic                valid_bit   // V(0, blk)
);

  logic [PA_W-1:0]     p_r [N_PAGES];
  logic [QA_W-1:0]     q_r [N_PAGES];
  logic [N_BLOCKS-1:0] v_r [N_PAGES];

  // shift_en[i]: entry i takes entry i-1 in an UPDATE, i.e. some m(k) with
  // k >= i is set.  sel_*: the matched entry, moved to the top.
  logic [N_PAGES-1:0]  shift_en;
  logic [PA_W-1:0]     sel_p;
  logic [QA_W-1:0]     sel_q;
  logic [N_BLOCKS-1:0] sel_v;

  always_comb begin
    shift_en[N_PAGES-1] = m[N_PAGES-1];
    for (int i = N_PAGES - 2; i >= 0; i--) shift_en[i] = shift_en[i+1] | m[i];
    sel_p = '0;
    sel_q = '0;
    sel_v = '0;
    for (int k = 0; k < N_PAGES; k++) begin
      sel_p |= {PA_W{m[k]}} & p_r[k];
      sel_q |= {QA_W{m[k]}} & q_r[k];
      sel_v |= {N_BLOCKS{m[k]}} & v_r[k];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N_PAGES; i++) begin
        p_r[i] <= '0;
        q_r[i] <= QA_W'(i);
        v_r[i] <= '0;
      end
    end else begin
      unique case (op)
        mb_pkg::LIST_INSERT: begin
          p_r[0] <= new_pa;
          q_r[0] <= q_r[N_PAGES-1];
          v_r[0] <= '0;
          for (int i = 1; i < N_PAGES; i++) begin
            p_r[i] <= p_r[i-1];
            q_r[i] <= q_r[i-1];
            v_r[i] <= v_r[i-1];
          end
        end
        mb_pkg::LIST_UPDATE: begin
          if (|m) begin
            p_r[0] <= sel_p;
            q_r[0] <= sel_q;
            v_r[0] <= sel_v;
          end
          for (int i = 1; i < N_PAGES; i++) begin
            if (shift_en[i]) begin
              p_r[i] <= p_r[i-1];
              q_r[i] <= q_r[i-1];
              v_r[i] <= v_r[i-1];
            end
          end
        end
        default: begin
          if (set_valid) v_r[0][blk] <= 1'b1;
        end
      endcase
    end
  end

  assign p         = p_r;
  assign q_top     = q_r[0];
  assign v_top     = v_r[0];
  assign valid_bit = v_r[0][blk];

  // The match register never marks more than one entry.
  a_m_onehot: assert property (@(posedge clk) disable iff (!rst_n)
    (op == mb_pkg::LIST_UPDATE) |-> $onehot0(m));
  a_valid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    set_valid |-> (op == mb_pkg::LIST_HOLD));

endmodule
