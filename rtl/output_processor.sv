// output_processor: last pipeline stage, the inverse of the header processor.
//
// Takes one message per cycle from the CP->OP bus and turns it into
//   * an indication for the upper layer (IH_Rb, IH_Rb_Off, datagram
//     indication), tagged with the connection and the remote address, or
//   * a frame header for the lower layer: the LLC header is assembled from
//     the message (control field built in S or U format with P/F, N(R) and
//     C/R from the message parameters) and the addresses. Messages from the
//     dummy connection processor carry their addresses; for a connection
//     processor's message they are looked up by connection number in
//     conn_addr_table. The payload pointer passes through.
//
// Timing: each direction has one output register. A message is taken
// (ready_o) when the register of its direction is empty or being emptied, and
// appears on that output one cycle later, held until the layer takes it.
// The address table is written through the tbl_* port at connection set-up.
module output_processor
  import psi_pkg::*;
#(
  parameter int NUM_CP = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // CP->OP bus
  input  logic              valid_i,
  input  op_msg_t           msg_i,
  output logic              ready_o,
  // address table set-up
  input  logic              tbl_wr_i,
  input  logic [CONN_W-1:0] tbl_conn_i,
  input  llc_addr_t         tbl_local_i,
  input  llc_addr_t         tbl_remote_i,
  // to the upper layer
  output logic              ul_valid_o,
  output upper_ind_t        ul_ind_o,
  input  logic              ul_ready_i,
  // to the lower layer
  output logic              ll_valid_o,
  output llc_frame_t        ll_frame_o,
  input  logic              ll_ready_i
);
  llc_addr_t  t_local, t_remote, a_local, a_remote;
  logic       to_upper, to_lower;
  upper_ind_t ind_d, ind_q;
  llc_frame_t frm_d, frm_q;
  logic       ul_v_q, ll_v_q, ul_free, ll_free;

  conn_addr_table #(.N(NUM_CP), .IDX_W(CONN_W)) u_tbl (
    .clk, .rst_n, .wr_i(tbl_wr_i), .wr_idx_i(tbl_conn_i), .wr_local_i(tbl_local_i),
    .wr_remote_i(tbl_remote_i), .rd_idx_i(msg_i.conn), .rd_local_o(t_local),
    .rd_remote_o(t_remote));

  always_comb begin
    a_local  = msg_i.direct ? msg_i.local_a  : t_local;
    a_remote = msg_i.direct ? msg_i.remote_a : t_remote;

    to_upper = 1'b0;
    to_lower = 1'b0;
    case (msg_i.msg)
      MSG_IH_RB, MSG_IH_RB_OFF, MSG_DATAGRAM_IND: to_upper = 1'b1;
      MSG_TX_UI, MSG_TX_TEST_RSP, MSG_TX_XID_RSP,
      MSG_TX_RR, MSG_TX_RNR, MSG_TX_REJ:           to_lower = 1'b1;
      default: ;
    endcase

    ind_d = '{ind: msg_i.msg, conn: msg_i.conn, remote_a: a_remote, par: msg_i.par,
              ptr: msg_i.ptr};

    frm_d      = '0;
    frm_d.da   = a_remote.mac;
    frm_d.sa   = a_local.mac;
    frm_d.dsap = a_remote.sap;
    frm_d.ssap = {a_local.sap[SAP_W-1:1], msg_i.par.cr};
    frm_d.ptr  = msg_i.ptr;
    case (msg_i.msg)
      MSG_TX_UI:       frm_d.ctrl = {8'h00, U_UI   | {3'b000, msg_i.par.pf, 4'b0000}};
      MSG_TX_TEST_RSP: frm_d.ctrl = {8'h00, U_TEST | {3'b000, msg_i.par.pf, 4'b0000}};
      MSG_TX_XID_RSP:  frm_d.ctrl = {8'h00, U_XID  | {3'b000, msg_i.par.pf, 4'b0000}};
      MSG_TX_RR:       frm_d.ctrl = {msg_i.par.nr, msg_i.par.pf, 4'b0000, 2'b00, 2'b01};
      MSG_TX_RNR:      frm_d.ctrl = {msg_i.par.nr, msg_i.par.pf, 4'b0000, 2'b01, 2'b01};
      MSG_TX_REJ:      frm_d.ctrl = {msg_i.par.nr, msg_i.par.pf, 4'b0000, 2'b10, 2'b01};
      default: ;
    endcase

    ul_free = !ul_v_q || ul_ready_i;
    ll_free = !ll_v_q || ll_ready_i;
    ready_o = to_upper ? ul_free : (to_lower ? ll_free : 1'b1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ul_v_q <= 1'b0;
      ll_v_q <= 1'b0;
      ind_q  <= '0;
      frm_q  <= '0;
    end else begin
      if (ul_free) ul_v_q <= valid_i && to_upper;
      if (ll_free) ll_v_q <= valid_i && to_lower;
      if (valid_i && to_upper && ul_free) ind_q <= ind_d;
      if (valid_i && to_lower && ll_free) frm_q <= frm_d;
    end
  end

  assign ul_valid_o = ul_v_q;
  assign ul_ind_o   = ind_q;
  assign ll_valid_o = ll_v_q;
  assign ll_frame_o = frm_q;
endmodule
