// op_bus_arbiter: the CP->OP bus, shared by all connection processors.
//
// Any number of connection processors (and the dummy connection processor)
// may hold a message for the output processor at the same time, so the
// second bus of the pipeline needs an arbiter. It picks one requester per
// cycle in round-robin order, starting after the one granted last, puts its
// word on the bus and grants it when the output processor can take it. The
// round-robin policy is this design's choice; the document only shows the bus.
//
// Interface: req_i/msg_i per requester; valid_o/msg_o/src_o is the selected
// word; ready_i from the output processor; gnt_o (one-hot) is valid_o &&
// ready_i for the selected requester. The selection is combinational; the
// round-robin pointer moves at the edge of a granted cycle.
module op_bus_arbiter
  import psi_pkg::*;
#(
  parameter int N = 9
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [N-1:0]       req_i,
  input  op_msg_t [N-1:0]    msg_i,
  output logic               valid_o,
  output op_msg_t            msg_o,
  output logic [$clog2(N+1)-1:0] src_o,
  input  logic               ready_i,
  output logic [N-1:0]       gnt_o
);
  localparam int SW = $clog2(N + 1);

  logic [SW-1:0] last_q;
  logic [SW-1:0] win;
  logic          any;

  // Round-robin: the lowest requester above last_q wins, else the lowest one.
  always_comb begin
    logic          hi_any;
    logic [SW-1:0] hi_win, lo_win;
    hi_any = 1'b0;
    hi_win = '0;
    lo_win = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (req_i[i] && (i > int'(last_q))) begin
        hi_any = 1'b1;
        hi_win = SW'(i);
      end
      if (req_i[i]) lo_win = SW'(i);
    end
    any = |req_i;
    win = hi_any ? hi_win : lo_win;
  end

  assign valid_o = any;
  assign msg_o   = msg_i[win];
  assign src_o   = win;

  always_comb begin
    gnt_o = '0;
    for (int i = 0; i < N; i++) gnt_o[i] = any && ready_i && (win == SW'(i));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              last_q <= SW'(N - 1);
    else if (any && ready_i) last_q <= win;
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt_o));
endmodule
