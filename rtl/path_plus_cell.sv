// path_plus_cell: the "+" (choice) operator cell of a compiled path expression.
//
// A path expression is laid out as its parse tree. The token that sequences
// the path travels down a cell's "offer" wire to the children and comes back
// up a "done" wire. A choice cell offers the token to both alternatives at
// once (free flow downwards) and ORs the two up-going completions, so whichever
// alternative accepts an event returns the token to the parent. Following the
// document, this OR gate is the only logic on the path and so the only delay a
// token meets when it climbs through a choice.
//
// Interface: offer_i from the parent, offer_l_o/offer_r_o to the children,
// done_l_i/done_r_i from the children, done_o to the parent. Purely
// combinational; all signals are active-high single-cycle strobes.
module path_plus_cell (
  input  logic offer_i,
  output logic offer_l_o,
  output logic offer_r_o,
  input  logic done_l_i,
  input  logic done_r_i,
  output logic done_o
);
  always_comb begin
    offer_l_o = offer_i;
    offer_r_o = offer_i;
    done_o    = done_l_i | done_r_i;
  end
endmodule
