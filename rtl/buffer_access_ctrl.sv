// buffer_access_ctrl: the buffer-access sequence and the registers it uses.
//
// The CPU places the effective address in S, the data word in DATA and the
// read/write command in RW (1 = write) and sets B.  While B is 1 the sequence
// below runs; it ends by clearing B and M.  The states follow the steps of
// the sequence described for this organisation:
//
//   IDLE     on cpu_start: S, DATA, RW <- CPU, B <- 1, MAR <- S
//   SEARCH   M <- P match S(PA)
//   U        read:  M = 0 -> INSERT S(PA) at the top of the activity list
//                   M /= 0 -> UPDATE (matched page to the top)
//   VTEST    test V(0, S(BA)); BAR <- Q(0)-S(BA,WA).  If 0: V(0,S(BA)) <- 1,
//            C <- 0 and load the block, else read the word from BM.
//   R_REQ    READ <- 1, C <- countup C              (block load, 4 times)
//   R_WAIT   MBR <- MM(MAR) when MM signals done
//   R_BBR    BBR <- MBR, WB <- 1
//   R_WB     BM(BAR) <- BBR; if C = 1, DATA <- BBR (first word, the one the
//            CPU asked for); if C /= 0 count up BAR and MAR word addresses
//            and go back to R_REQ, else finish
//   X_RB     RB <- 1                                (word in buffer)
//   X_BBR    BBR <- BM(BAR)
//   X_DATA   DATA <- BBR
//   Y_UPD    write: if M /= 0, UPDATE
//   Y_REG    MBR <- DATA; if M /= 0, BBR <- DATA and BAR <- Q(0)-S(BA,WA)
//   Y_WR     WRITE <- 1; if M /= 0, WB <- 1 and BM(BAR) <- BBR
//   Y_WAIT   wait for MM to finish the store ("storage through")
//   Z        B <- 0, M <- 0, done
//
// Each step takes one clock, except waits on the main memory.  The READ,
// WRITE, RB and WB control flip-flops are decoded from the state.  Timing,
// counting the clock in which cpu_start is high as clock 0, with a main
// memory cycle of T clocks whose interleaved banks deliver the other three
// words of a block one clock after they are asked for: done is high in
// clock 7 for a read whose block is in the buffer, in clock 19 + T for a
// read that loads the block (the requested word is in DATA from clock
// 7 + T), and in clock 5 + T for a write.  With T = 13 that is 7, 32 and 18.
// (With a memory that takes T clocks for every word, a block load ends in
// clock 16 + 4*T.)
//
// Choices of this implementation, where the sequence leaves room: BAR is
// formed from Q(0), S(BA) and S(WA) once, before the block load, and only its
// word address is counted up in the loop (the sequence also re-forms it in
// the loop, which would undo the count); the write path forms BAR before the
// buffer write; the CPU handshake is start/busy/done.
module buffer_access_ctrl
  import mb_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // CPU side
  input  logic        cpu_start,   // load S, DATA, RW and set B; only when B = 0
  input  mm_addr_t    cpu_addr,
  input  word_t       cpu_wdata,
  input  logic        cpu_rw,      // 1 = write, 0 = read
  output logic        busy,        // register B
  output logic        done,        // one clock, at the end of the sequence
  output word_t       cpu_rdata,   // register DATA
  // activity list (P, Q, V) and match
  output list_op_e    list_op,
  output page_addr_t  list_new_pa,
  output logic [N_PAGES-1:0] m,    // match register M
  output logic        set_valid,
  output logic [BA_W-1:0] blk,
  input  logic [N_PAGES-1:0] match,
  input  bpage_addr_t q_top,
  input  logic        valid_bit,
  // main memory
  output logic        mm_read,     // READ
  output logic        mm_write,    // WRITE
  output mm_addr_t    mm_addr,     // MAR
  output word_t       mm_wdata,    // MBR
  input  logic        mm_busy,
  input  logic        mm_done,
  input  word_t       mm_rdata,
  // buffer memory
  output logic        bm_rb,       // RB
  output logic        bm_wb,       // WB
  output bm_addr_t    bm_addr,     // BAR
  output word_t       bm_wdata,    // BBR
  input  word_t       bm_rdata,
  // monitoring
  output mb_events_t  events
);

  typedef enum logic [3:0] {
    S_IDLE, S_SEARCH, S_U, S_VTEST,
    S_R_REQ, S_R_WAIT, S_R_BBR, S_R_WB,
    S_X_RB, S_X_BBR, S_X_DATA,
    S_Y_UPD, S_Y_REG, S_Y_WR, S_Y_WAIT,
    S_Z
  } state_e;

  state_e     state;
  logic       b_r;
  mm_fields_t s_r;
  word_t      data_r;
  logic       rw_r;
  logic [N_PAGES-1:0] m_r;
  logic [1:0] c_r;
  mm_addr_t   mar;
  word_t      mbr;
  bm_addr_t   bar;
  word_t      bbr;
  logic       m_nz;

  assign m_nz = |m_r;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      b_r    <= 1'b0;
      s_r    <= '0;
      data_r <= '0;
      rw_r   <= 1'b0;
      m_r    <= '0;
      c_r    <= '0;
      mar    <= '0;
      mbr    <= '0;
      bar    <= '0;
      bbr    <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          // The CPU's loading of S, DATA, RW and B shares its clock with
          // the first step of the sequence, MAR <- S.
          if (cpu_start) begin
            s_r    <= cpu_addr;
            data_r <= cpu_wdata;
            rw_r   <= cpu_rw;
            b_r    <= 1'b1;
            mar    <= cpu_addr;
            state  <= S_SEARCH;
          end
        end
        S_SEARCH: begin
          m_r   <= match;
          state <= rw_r ? S_Y_UPD : S_U;
        end
        S_U: state <= S_VTEST;
        S_VTEST: begin
          bar <= {q_top, s_r.ba, s_r.wa};
          if (valid_bit) begin
            state <= S_X_RB;
          end else begin
            c_r   <= '0;
            state <= S_R_REQ;
          end
        end
        S_R_REQ: begin
          c_r   <= c_r + 1'b1;
          state <= S_R_WAIT;
        end
        S_R_WAIT: begin
          if (mm_done) begin
            mbr   <= mm_rdata;
            state <= S_R_BBR;
          end
        end
        S_R_BBR: begin
          bbr   <= mbr;
          state <= S_R_WB;
        end
        S_R_WB: begin
          if (c_r == 2'd1) data_r <= bbr;
          if (c_r != 2'd0) begin
            bar[1:0] <= bar[1:0] + 1'b1;
            mar[1:0] <= mar[1:0] + 1'b1;
            state    <= S_R_REQ;
          end else begin
            state <= S_Z;
          end
        end
        S_X_RB:  state <= S_X_BBR;
        S_X_BBR: begin
          bbr   <= bm_rdata;
          state <= S_X_DATA;
        end
        S_X_DATA: begin
          data_r <= bbr;
          state  <= S_Z;
        end
        S_Y_UPD: state <= S_Y_REG;
        S_Y_REG: begin
          mbr <= data_r;
          if (m_nz) begin
            bbr <= data_r;
            bar <= {q_top, s_r.ba, s_r.wa};
          end
          state <= S_Y_WR;
        end
        S_Y_WR:   state <= S_Y_WAIT;
        S_Y_WAIT: if (mm_done) state <= S_Z;
        S_Z: begin
          b_r   <= 1'b0;
          m_r   <= '0;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Control decoded from the state.
  always_comb begin
    list_op = LIST_HOLD;
    if (state == S_U)     list_op = m_nz ? LIST_UPDATE : LIST_INSERT;
    if (state == S_Y_UPD) list_op = m_nz ? LIST_UPDATE : LIST_HOLD;
  end

  assign list_new_pa = s_r.pa;
  assign m           = m_r;
  assign blk         = s_r.ba;
  assign set_valid   = (state == S_VTEST) && !valid_bit;

  assign mm_read   = (state == S_R_REQ);
  assign mm_write  = (state == S_Y_WR);
  assign mm_addr   = mar;
  assign mm_wdata  = mbr;

  assign bm_rb     = (state == S_X_RB);
  assign bm_wb     = (state == S_R_WB) || (state == S_Y_WR && m_nz);
  assign bm_addr   = bar;
  assign bm_wdata  = bbr;

  assign busy      = b_r;
  assign done      = (state == S_Z);
  assign cpu_rdata = data_r;

  assign events.page_hit      = (state == S_U) && m_nz;
  assign events.page_miss     = (state == S_U) && !m_nz;
  assign events.block_fill    = (state == S_VTEST) && !rw_r && !valid_bit;
  assign events.buffer_read   = (state == S_X_RB);
  assign events.write_through = (state == S_Y_WR);
  assign events.write_buffer  = (state == S_Y_WR) && m_nz;

  // Rules of the handshakes.
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
    cpu_start |-> !b_r);
  a_mm_idle: assert property (@(posedge clk) disable iff (!rst_n)
    (mm_read || mm_write) |-> !mm_busy);
  a_no_page0: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_SEARCH) |-> (s_r.pa != '0));
  a_m_onehot: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(m_r));

endmodule
