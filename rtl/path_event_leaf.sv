// path_event_leaf: a leaf of a compiled path expression that waits for an event.
//
// When the token is offered to the leaf (offer_i) the leaf is armed: it holds
// the token from the next clock on and waits for an event whose code is
// EVENT. While armed, a matching event fires the leaf: done_o rises in the same
// cycle, and the token climbs the tree combinationally to the next waiting
// points, which are armed at the clock edge that ends the cycle.
//
// A path carries a single token. When any leaf of the path fires (advance_i,
// the OR of all leaves' done_o) every other armed leaf gives its offer up;
// only leaves offered the token again in that cycle stay armed. The document
// describes this as the token moving down to the accepting leaf; the shared
// advance wire is how this synchronous version realises it.
//
// Interface: ev_valid_i/ev_code_i is the event presented this cycle (at most
// one per cycle). armed_o shows that the leaf holds the token. Reset clears it.
module path_event_leaf
  import psi_pkg::*;
#(
  parameter psi_event_e EVENT = EV_RR
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       offer_i,
  input  logic       advance_i,
  input  logic       ev_valid_i,
  input  psi_event_e ev_code_i,
  output logic       done_o,
  output logic       armed_o
);
  logic armed_q;

  always_comb done_o = armed_q & ev_valid_i & (ev_code_i == EVENT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) armed_q <= 1'b0;
    else        armed_q <= offer_i | (armed_q & ~advance_i);
  end

  assign armed_o = armed_q;
endmodule
