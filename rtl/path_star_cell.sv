// path_star_cell: the "*" (repetition) operator cell of a compiled path expression.
//
// The cell ORs the token arriving from above (offer_i) with the token its body
// returns from below (done_body_i) and sends the result both down into the body
// again and up to the parent. The token therefore circulates at the cell: the
// body may be repeated any number of times, and at each pass the parent's
// continuation is offered the token as well. This is the OR-gate cell of the
// document's layout; the single-cycle synchronous timing is this design's.
//
// Interface: offer_i from the parent, offer_body_o to the body, done_body_i
// from the body, done_o to the parent. Purely combinational.
module path_star_cell (
  input  logic offer_i,
  output logic offer_body_o,
  input  logic done_body_i,
  output logic done_o
);
  logic circ;
  always_comb begin
    circ         = offer_i | done_body_i;
    offer_body_o = circ;
    done_o       = circ;
  end
endmodule
