// cp_output_unit: output queue of a connection processor onto the CP->OP bus.
//
// When the state transition machine fires an action that sends a message,
// the unit builds the bus word (message code, this connection's number, the
// event's parameters and the packet pointer) and queues it. The head of the
// queue is offered to the CP->OP bus arbiter (req_o); a grant (gnt_i) removes
// it at the clock edge. A first-in first-out queue of DEPTH words lets the
// connection processor keep taking events while the bus is busy; full_o tells
// the connection processor to stop taking events. The queue and its depth are
// this design's choice: the document only shows an output unit fed by the
// state machine and the pointer.
//
// Interface: push_i with msg_i/par_i/ptr_i at a rising edge enqueues;
// req_o/msg_o show the head; gnt_i pops it. Pushing into a full queue is a
// protocol error (assertion). Words appear on req_o one cycle after the push.
module cp_output_unit
  import psi_pkg::*;
#(
  parameter logic [CONN_W-1:0] CONN_ID = '0,
  parameter int                DEPTH   = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push_i,
  input  psi_msg_e         msg_i,
  input  psi_params_t      par_i,
  input  logic [PTR_W-1:0] ptr_i,
  output logic             full_o,
  output logic             req_o,
  output op_msg_t          msg_o,
  input  logic             gnt_i
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  op_msg_t        mem [DEPTH];
  logic [AW-1:0]  rd_q, wr_q;
  logic [AW:0]    cnt_q;
  op_msg_t        word;
  logic           pop, push;

  always_comb begin
    word          = '0;
    word.msg      = msg_i;
    word.conn     = CONN_ID;
    word.direct   = 1'b0;
    word.par      = par_i;
    word.ptr      = ptr_i;
    pop           = gnt_i && (cnt_q != 0);
    push          = push_i && (cnt_q != (AW+1)'(DEPTH));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (push) wr_q <= (wr_q == AW'(DEPTH - 1)) ? '0 : wr_q + 1'b1;
      if (pop)  rd_q <= (rd_q == AW'(DEPTH - 1)) ? '0 : rd_q + 1'b1;
      cnt_q <= cnt_q + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_q] <= word;
  end

  assign full_o = (cnt_q == (AW+1)'(DEPTH));
  assign req_o  = (cnt_q != 0);
  assign msg_o  = mem[rd_q];

  assert property (@(posedge clk) disable iff (!rst_n) push_i |-> !full_o);
  assert property (@(posedge clk) disable iff (!rst_n) gnt_i |-> req_o);
endmodule
