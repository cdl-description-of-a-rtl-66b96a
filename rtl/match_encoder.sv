// match_encoder: the encoder N that turns match register M into a 4-bit
// number, the position in the activity list of the entry that matched.
//
// The organisation names the encoder and its width but not its circuit.
// This is a plain binary encoder; M holds at most one 1 because the page
// addresses held in P are distinct, and should more than one bit ever be set
// the lowest position wins.  'hit' is 1 when M is not zero.  Combinational.
module match_encoder #(
  parameter int unsigned N_IN  = mb_pkg::N_PAGES,
  parameter int unsigned OUT_W = $clog2(N_IN)
) (
  input  logic [N_IN-1:0]  m,
  output logic [OUT_W-1:0] n,
  output logic             hit
);

  always_comb begin
    n   = '0;
    hit = |m;
    for (int i = N_IN - 1; i >= 0; i--) begin
      if (m[i]) n = OUT_W'(i);
    end
  end

endmodule
