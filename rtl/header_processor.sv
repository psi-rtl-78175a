// header_processor: first pipeline stage of the layer processor.
//
// Takes frames from the lower layer and commands from the upper layer, one
// per cycle, and does all connection-independent work:
//   * a frame's control field is parsed (llc_ctrl_parser, all formats in
//     parallel) and its address pair is looked up in the connection CAM;
//   * a frame that belongs to a connection becomes a bus word {conn, event,
//     parameters, pointer} on the HP->CP bus, i.e. it is written to the
//     connection processor at "address" conn;
//   * a UI datagram becomes a datagram indication, and a TEST or XID command
//     becomes the matching response, both sent through the dummy connection
//     processor to the output processor with the addresses attached;
//   * an upper-layer command carries its connection number and goes straight
//     to that connection processor, or, for a datagram, to the dummy CP as a
//     UI send request;
//   * frames that match no connection, undefined control fields, XID/TEST
//     responses and commands for a connection number out of range are dropped
//     and counted in drop_count_o.
// The payload is not touched: it stays in the shared packet memory and only
// its pointer travels with the event.
//
// Timing: one register stage. An input is taken (ready high) when the stage is
// empty or its word leaves in the same cycle; the word appears on the bus in
// the next cycle and stays until the addressed connection processor (or the
// dummy CP) is ready. Lower-layer frames have priority over upper-layer
// commands (this design's choice). CAM writes (connection set-up) go through
// the cam_* port.
module header_processor
  import psi_pkg::*;
#(
  parameter int NUM_CP = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // from the lower layer
  input  logic              ll_valid_i,
  input  llc_frame_t        ll_frame_i,
  output logic              ll_ready_o,
  // from the upper layer
  input  logic              ul_valid_i,
  input  upper_cmd_t        ul_cmd_i,
  output logic              ul_ready_o,
  // connection set-up: CAM entry conn <- {remote, local}
  input  logic              cam_wr_i,
  input  logic [CONN_W-1:0] cam_conn_i,
  input  llc_addr_t         cam_local_i,
  input  llc_addr_t         cam_remote_i,
  input  logic              cam_valid_i,
  // HP->CP bus
  output cp_bus_t           cp_bus_o,
  input  logic [NUM_CP-1:0] cp_ready_i,
  // to the dummy connection processor
  output logic              dm_valid_o,
  output op_msg_t           dm_msg_o,
  input  logic              dm_ready_i,
  output logic [15:0]       drop_count_o
);
  localparam int KEY_W = 2 * $bits(llc_addr_t);

  cp_bus_t     cp_q;
  logic        dm_valid_q;
  op_msg_t     dm_q;
  logic [15:0] drop_q;

  logic        p_conn, p_ui, p_xid, p_test;
  psi_event_e  p_ev;
  psi_params_t p_par;
  llc_addr_t   f_local, f_remote;
  logic        cam_hit;
  logic [CONN_W-1:0] cam_idx;
  logic        free, take_ll, take_ul;
  cp_bus_t     cp_d;
  logic        dm_valid_d;
  op_msg_t     dm_d;
  logic        drop_d;

  llc_ctrl_parser u_parse (
    .ctrl_i(ll_frame_i.ctrl), .cr_i(ll_frame_i.ssap[0]), .conn_o(p_conn), .ev_o(p_ev),
    .ui_o(p_ui), .xid_o(p_xid), .test_o(p_test), .par_o(p_par));

  assign f_local  = '{mac: ll_frame_i.da, sap: ll_frame_i.dsap};
  assign f_remote = '{mac: ll_frame_i.sa, sap: {ll_frame_i.ssap[SAP_W-1:1], 1'b0}};

  conn_cam #(.N(NUM_CP), .KEY_W(KEY_W), .IDX_W(CONN_W)) u_cam (
    .clk, .rst_n, .wr_i(cam_wr_i), .wr_idx_i(cam_conn_i), .wr_key_i({cam_remote_i, cam_local_i}),
    .wr_valid_i(cam_valid_i), .key_i({f_remote, f_local}), .hit_o(cam_hit), .idx_o(cam_idx));

  // The output stage empties when its word is taken.
  always_comb begin
    free = 1'b1;
    if (cp_q.valid) begin
      free = 1'b0;
      for (int i = 0; i < NUM_CP; i++) if (cp_q.conn == CONN_W'(i)) free = cp_ready_i[i];
    end
    if (dm_valid_q) free = dm_ready_i;
  end

  assign take_ll    = ll_valid_i && free;
  assign take_ul    = ul_valid_i && free && !ll_valid_i;
  assign ll_ready_o = free;
  assign ul_ready_o = free && !ll_valid_i;

  always_comb begin
    cp_d       = '0;
    dm_valid_d = 1'b0;
    dm_d       = '0;
    drop_d     = 1'b0;
    if (take_ll) begin
      dm_d.direct   = 1'b1;
      dm_d.local_a  = f_local;
      dm_d.remote_a = f_remote;
      dm_d.par      = p_par;
      dm_d.ptr      = ll_frame_i.ptr;
      if (p_conn && cam_hit) begin
        cp_d = '{valid: 1'b1, conn: cam_idx, ev: p_ev, par: p_par, ptr: ll_frame_i.ptr};
      end else if (p_ui) begin
        dm_valid_d = 1'b1;
        dm_d.msg   = MSG_DATAGRAM_IND;
      end else if ((p_xid || p_test) && !p_par.cr) begin
        dm_valid_d  = 1'b1;
        dm_d.msg    = p_xid ? MSG_TX_XID_RSP : MSG_TX_TEST_RSP;
        dm_d.par.cr = 1'b1;
      end else begin
        drop_d = 1'b1;
      end
    end else if (take_ul) begin
      if (ul_cmd_i.datagram) begin
        dm_valid_d    = 1'b1;
        dm_d.msg      = MSG_TX_UI;
        dm_d.direct   = 1'b1;
        dm_d.local_a  = ul_cmd_i.local_a;
        dm_d.remote_a = ul_cmd_i.remote_a;
        dm_d.par      = ul_cmd_i.par;
        dm_d.par.cr   = 1'b0;
        dm_d.ptr      = ul_cmd_i.ptr;
      end else if (int'(ul_cmd_i.conn) < NUM_CP) begin
        cp_d = '{valid: 1'b1, conn: ul_cmd_i.conn, ev: ul_cmd_i.ev, par: ul_cmd_i.par,
                 ptr: ul_cmd_i.ptr};
      end else begin
        drop_d = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cp_q       <= '0;
      dm_valid_q <= 1'b0;
      dm_q       <= '0;
      drop_q     <= '0;
    end else begin
      if (free) begin
        cp_q       <= cp_d;
        dm_valid_q <= dm_valid_d;
        dm_q       <= dm_d;
      end
      if (drop_d) drop_q <= drop_q + 1'b1;
    end
  end

  assign cp_bus_o     = cp_q;
  assign dm_valid_o   = dm_valid_q;
  assign dm_msg_o     = dm_q;
  assign drop_count_o = drop_q;

  assert property (@(posedge clk) disable iff (!rst_n) !(cp_q.valid && dm_valid_q));
endmodule
