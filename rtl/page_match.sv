// page_match: associative search of the main-memory page-address registers.
//
// Every P register is compared in parallel with the page address being
// looked up.  Bit j of the result is the AND, over all ten bit positions, of
// the equivalence (XNOR) of P(j) and the key, exactly as the match operator is
// defined for the organisation.  The result is loaded into the match register
// M by the controller.  Purely combinational: the result is valid in the same
// clock as the inputs.
//
//   p     : the N_PAGES page-address registers, index 0 = top of the list
//   key   : page address searched for, S(PA)
//   match : one bit per P register, 1 where it equals the key
module page_match #(
  parameter int unsigned N_PAGES = mb_pkg::N_PAGES,
  parameter int unsigned PA_W    = mb_pkg::PA_W
) (
  input  logic [PA_W-1:0]    p [N_PAGES],
  input  logic [PA_W-1:0]    key,
  output logic [N_PAGES-1:0] match
);

  always_comb begin
    for (int j = 0; j < N_PAGES; j++) begin
      match[j] = &(p[j] ~^ key);
    end
  end

endmodule
