// dummy_cp: buffers that stand in for a connection processor.
//
// Work that belongs to no connection (datagram indications, TEST/XID
// responses, datagram sends) is finished by the header processor itself, and
// its result must still reach the output processor over the same CP->OP bus
// as the connection processors' messages. The dummy connection processor is a
// first-in first-out buffer of DEPTH bus words that looks to the bus arbiter
// exactly like a connection processor: it requests the bus while it holds a
// word and drops the head when granted. Depth is this design's choice.
//
// Interface: push side valid_i/msg_i/ready_o (ready while not full), bus side
// req_o/msg_o/gnt_i. A word pushed at a clock edge is requested from the
// next cycle.
module dummy_cp
  import psi_pkg::*;
#(
  parameter int DEPTH = 4
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    valid_i,
  input  op_msg_t msg_i,
  output logic    ready_o,
  output logic    req_o,
  output op_msg_t msg_o,
  input  logic    gnt_i
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  op_msg_t       buf_q [DEPTH];
  logic [AW-1:0] rd_q, wr_q;
  logic [AW:0]   cnt_q;
  logic          push, pop;

  assign ready_o = (cnt_q != (AW+1)'(DEPTH));
  assign push    = valid_i && ready_o;
  assign pop     = gnt_i && (cnt_q != 0);

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
    if (push) buf_q[wr_q] <= msg_i;
  end

  assign req_o = (cnt_q != 0);
  assign msg_o = buf_q[rd_q];

  assert property (@(posedge clk) disable iff (!rst_n) gnt_i |-> req_o);
endmodule
