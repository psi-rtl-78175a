// rbusy_path: the remote-busy path machine of IEEE 802.2, compiled as a tree.
//
// Path expression (events a=RR, b=REJ, c=I_LPDU, d=RNR; actions e, f):
//
//     [ (a+b+c)* ; d ; e ; d* ; (a+b+c) ; f ]*
//      1 2    3  4   5   6  7 8  9  10   11 12      (cell numbers)
//
//   e = Rb=1 & Snd=0 & load(Is_Ct) & IH_Rb      f = Rb=0 & IH_Rb_Off
//
// While the remote station is not busy, RR, REJ and I frames are accepted
// with no action. An RNR sets the remote-busy state (action e); further RNRs
// are ignored; the next RR, REJ or I frame clears it (action f) and the path
// starts over. Events that no waiting leaf accepts are ignored.
//
// The machine is the parse tree of the expression, built from operator cells
// numbered as in the document's layout: "+" cells 1, 2, 9, 10, "*" cells 3,
// 7, 12 and ";" cells 4, 5, 6, 8, 11. A ";" cell only routes wires (offer from
// the parent goes to the left child, the left child's completion to the right
// child, the right child's completion back to the parent), and an action leaf
// returns the token in the same instant it fires its action, so both are
// plain wiring here. The token state lives in the eight event leaves.
//
// Timing: one clock after reset the root cell is offered the token once
// (ready_o rises), arming the leaves a, b, c and d of the first sub-path.
// From then on one event can be presented per cycle; an accepted event moves
// the token, fires the action strobes act_o[e/f] in the same cycle, and arms
// the next waiting leaves at the clock edge. accepted_o tells that the event
// was taken.
module rbusy_path
  import psi_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ev_valid_i,
  input  psi_event_e          ev_code_i,
  output logic                ready_o,
  output logic                accepted_o,
  output logic [CP_NACTS-1:0] act_o,     // [ACT_RB_ON]=e, [ACT_RB_OFF]=f
  output logic [7:0]          armed_o    // {c9,b9,a9,d7,d4,c1,b1,a1}
);
  // Offer (down) and done (up) wires, named after the cell numbers.
  logic start;
  logic offer11, done11;
  logic offer8, done8, offer6, done6, offer5, done5, offer4, done4;
  logic offer3, done3, offer2, done2, offer1, done1;
  logic offer7, done7, offer10, done10, offer9, done9;
  logic offer_a1, offer_b1, offer_c1, done_a1, done_b1, done_c1;
  logic offer_d4, done_d4, offer_d7, done_d7;
  logic offer_a9, offer_b9, offer_c9, done_a9, done_b9, done_c9;
  logic act_e, act_f;
  logic advance;
  logic started_q;
  logic done12_unused;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) started_q <= 1'b0;
    else        started_q <= 1'b1;
  end
  assign start   = ~started_q;
  assign ready_o = started_q;

  // 12: outer repetition; body is ;-cell 11
  path_star_cell u12 (.offer_i(start), .offer_body_o(offer11), .done_body_i(done11), .done_o(done12_unused));
  // 11: [...8...] ; f
  assign offer8 = offer11;
  assign act_f  = done8;          // action leaf f fires and returns at once
  assign done11 = act_f;
  // 8: [...6...] ; (a+b+c)_10
  assign offer6  = offer8;
  assign offer10 = done6;
  assign done8   = done10;
  // 10 and 9: (a + b) + c
  path_plus_cell u10 (.offer_i(offer10), .offer_l_o(offer9), .offer_r_o(offer_c9),
                      .done_l_i(done9), .done_r_i(done_c9), .done_o(done10));
  path_plus_cell u9  (.offer_i(offer9), .offer_l_o(offer_a9), .offer_r_o(offer_b9),
                      .done_l_i(done_a9), .done_r_i(done_b9), .done_o(done9));
  // 6: [...5...] ; d*_7
  assign offer5 = offer6;
  assign offer7 = done5;
  assign done6  = done7;
  // 7: d*
  path_star_cell u7 (.offer_i(offer7), .offer_body_o(offer_d7), .done_body_i(done_d7), .done_o(done7));
  // 5: [...4...] ; e
  assign offer4 = offer5;
  assign act_e  = done4;
  assign done5  = act_e;
  // 4: (a+b+c)*_3 ; d
  assign offer3   = offer4;
  assign offer_d4 = done3;
  assign done4    = done_d4;
  // 3: (a+b+c)*
  path_star_cell u3 (.offer_i(offer3), .offer_body_o(offer2), .done_body_i(done2), .done_o(done3));
  // 2 and 1: (a + b) + c
  path_plus_cell u2 (.offer_i(offer2), .offer_l_o(offer1), .offer_r_o(offer_c1),
                     .done_l_i(done1), .done_r_i(done_c1), .done_o(done2));
  path_plus_cell u1 (.offer_i(offer1), .offer_l_o(offer_a1), .offer_r_o(offer_b1),
                     .done_l_i(done_a1), .done_r_i(done_b1), .done_o(done1));

  // Event leaves
  path_event_leaf #(.EVENT(EV_RR))     la1 (.clk, .rst_n, .offer_i(offer_a1), .advance_i(advance),
    .ev_valid_i, .ev_code_i, .done_o(done_a1), .armed_o(armed_o[0]));
  path_event_leaf #(.EVENT(EV_REJ))    lb1 (.clk, .rst_n, .offer_i(offer_b1), .advance_i(advance),
    .ev_valid_i, .ev_code_i, .done_o(done_b1), .armed_o(armed_o[1]));
  path_event_leaf #(.EVENT(EV_I_LPDU)) lc1 (.clk, .rst_n, .offer_i(offer_c1), .advance_i(advance),
    .ev_valid_i, .ev_code_i, .done_o(done_c1), .armed_o(armed_o[2]));
  path_event_leaf #(.EVENT(EV_RNR))    ld4 (.clk, .rst_n, .offer_i(offer_d4), .advance_i(advance),
    .ev_valid_i, .ev_code_i, .done_o(done_d4), .armed_o(armed_o[3]));
  path_event_leaf #(.EVENT(EV_RNR))    ld7 (.clk, .rst_n, .offer_i(offer_d7), .advance_i(advance),
    .ev_valid_i, .ev_code_i, .done_o(done_d7), .armed_o(armed_o[4]));
  path_event_leaf #(.EVENT(EV_RR))     la9 (.clk, .rst_n, .offer_i(offer_a9), .advance_i(advance),
    .ev_valid_i, .ev_code_i, .done_o(done_a9), .armed_o(armed_o[5]));
  path_event_leaf #(.EVENT(EV_REJ))    lb9 (.clk, .rst_n, .offer_i(offer_b9), .advance_i(advance),
    .ev_valid_i, .ev_code_i, .done_o(done_b9), .armed_o(armed_o[6]));
  path_event_leaf #(.EVENT(EV_I_LPDU)) lc9 (.clk, .rst_n, .offer_i(offer_c9), .advance_i(advance),
    .ev_valid_i, .ev_code_i, .done_o(done_c9), .armed_o(armed_o[7]));

  assign advance = done_a1 | done_b1 | done_c1 | done_d4 | done_d7 | done_a9 | done_b9 | done_c9;
  assign accepted_o = advance;

  always_comb begin
    act_o             = '0;
    act_o[ACT_RB_ON]  = act_e;
    act_o[ACT_RB_OFF] = act_f;
  end

  // A single token: at most one waiting leaf may accept any one event.
  assert property (@(posedge clk) disable iff (!rst_n)
                   $onehot0({done_a1, done_b1, done_c1, done_d4, done_d7, done_a9, done_b9, done_c9}));
endmodule
