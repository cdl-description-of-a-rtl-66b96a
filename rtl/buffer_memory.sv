// buffer_memory: the buffer memory BM, 1,024 words of 128 bits.
//
// The buffer is a high-speed memory whose cycle equals the CPU clock period
// (80 ns), so it is modelled as a synchronous single-port RAM doing one
// access per clock.  rb (the RB control flip-flop) reads the word at bar into
// rdata at the clock edge, so it is available the following clock; wb (WB)
// writes wdata (the buffer register BBR) at bar on the clock edge.  Reads and
// writes in the same clock are not used by the controller; if both are given
// the read returns the old word.  The contents are not reset: a word is only
// read after its block has been loaded, which the valid bits track.
module buffer_memory
#(
  parameter int unsigned DEPTH  = 1024,
  parameter int unsigned WORD_W = mb_pkg::WORD_W,
  parameter int unsigned AW     = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rb,
  input  logic              wb,
  input  logic [AW-1:0]     bar,
  input  logic [WORD_W-1:0] wdata,
  output logic [WORD_W-1:0] rdata
);

  logic [WORD_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wb) mem[bar] <= wdata;
    if (rb) rdata <= mem[bar];
  end

endmodule
