// psi_layer_processor: one protocol layer processed in silicon, 802.2 LLC.
//
// The layer is a pipeline of three kinds of processors joined by two buses:
//
//   lower layer frames ---+                                +--> upper layer
//   upper layer commands -+-> header    HP->CP  connection  CP->OP   output
//                             processor  bus   processors    bus   processor
//                                 |            (one per            ^ |
//                                 +-> dummy CP   connection) ------+ +--> lower layer
//
// Every connection has its own connection processor holding its state in
// flags, counters and timers, so no connection context is ever loaded or
// saved. The header processor parses the header, finds the connection with a
// CAM and writes {event, parameters, packet pointer} to that connection
// processor over the HP->CP bus, which addresses the connection processors
// like memory words. Each connection processor runs the protocol's path
// machine (here the remote-busy path) and queues output messages; a
// round-robin arbiter moves them over the CP->OP bus to the output processor,
// which builds indications for the upper layer and frame headers for the
// lower layer. Connection-independent work goes from the header processor to
// the output processor through the dummy connection processor.
//
// Throughput is one frame or command per clock while the output side keeps up.
// A frame that produces a message passes three registers (header register,
// output-unit queue, output register): presented in clock cycle n and taken at
// the edge ending it, its indication is on up_valid_o in cycle n+3.
// Connection set-up (cfg_*) writes the same {local, remote} address pair into
// the header processor's CAM and the output processor's address table.
module psi_layer_processor
  import psi_pkg::*;
#(
  parameter int NUM_CP = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tick_i,
  // lower layer -> this layer
  input  logic              ll_valid_i,
  input  llc_frame_t        ll_frame_i,
  output logic              ll_ready_o,
  // upper layer -> this layer
  input  logic              ul_valid_i,
  input  upper_cmd_t        ul_cmd_i,
  output logic              ul_ready_o,
  // connection set-up
  input  logic              cfg_wr_i,
  input  logic [CONN_W-1:0] cfg_conn_i,
  input  llc_addr_t         cfg_local_i,
  input  llc_addr_t         cfg_remote_i,
  input  logic              cfg_valid_i,
  // this layer -> upper layer
  output logic              up_valid_o,
  output upper_ind_t        up_ind_o,
  input  logic              up_ready_i,
  // this layer -> lower layer
  output logic              dn_valid_o,
  output llc_frame_t        dn_frame_o,
  input  logic              dn_ready_i,
  // status
  output logic [15:0]       drop_count_o,
  output logic [NUM_CP-1:0][CP_NFLAGS-1:0]            cp_flags_o,
  output logic [NUM_CP-1:0][CP_NCTRS-1:0][CTR_W-1:0]  cp_ctr_o
);
  cp_bus_t             cp_bus;
  logic [NUM_CP-1:0]   cp_ready;
  logic                dm_push_valid, dm_push_ready;
  op_msg_t             dm_push_msg;
  logic [NUM_CP:0]     req, gnt;
  op_msg_t [NUM_CP:0]  req_msg;
  logic                op_valid, op_ready;
  op_msg_t             op_msg;
  logic [$clog2(NUM_CP+2)-1:0] op_src_unused;
  logic [NUM_CP-1:0][CP_NTMRS-1:0] tmr_running_unused;
  logic [NUM_CP-1:0][7:0]          armed_unused;
  logic [NUM_CP-1:0]               accepted_unused;

  header_processor #(.NUM_CP(NUM_CP)) u_hp (
    .clk, .rst_n,
    .ll_valid_i, .ll_frame_i, .ll_ready_o,
    .ul_valid_i, .ul_cmd_i, .ul_ready_o,
    .cam_wr_i(cfg_wr_i), .cam_conn_i(cfg_conn_i), .cam_local_i(cfg_local_i),
    .cam_remote_i(cfg_remote_i), .cam_valid_i(cfg_valid_i),
    .cp_bus_o(cp_bus), .cp_ready_i(cp_ready),
    .dm_valid_o(dm_push_valid), .dm_msg_o(dm_push_msg), .dm_ready_i(dm_push_ready),
    .drop_count_o);

  for (genvar i = 0; i < NUM_CP; i++) begin : g_cp
    connection_processor #(.CONN_ID(CONN_W'(i))) u_cp (
      .clk, .rst_n, .tick_i,
      .bus_i(cp_bus), .ready_o(cp_ready[i]),
      .req_o(req[i]), .msg_o(req_msg[i]), .gnt_i(gnt[i]),
      .flags_o(cp_flags_o[i]), .ctr_o(cp_ctr_o[i]),
      .tmr_running_o(tmr_running_unused[i]), .armed_o(armed_unused[i]),
      .accepted_o(accepted_unused[i]));
  end

  dummy_cp u_dummy (
    .clk, .rst_n, .valid_i(dm_push_valid), .msg_i(dm_push_msg), .ready_o(dm_push_ready),
    .req_o(req[NUM_CP]), .msg_o(req_msg[NUM_CP]), .gnt_i(gnt[NUM_CP]));

  op_bus_arbiter #(.N(NUM_CP + 1)) u_arb (
    .clk, .rst_n, .req_i(req), .msg_i(req_msg), .valid_o(op_valid), .msg_o(op_msg),
    .src_o(op_src_unused), .ready_i(op_ready), .gnt_o(gnt));

  output_processor #(.NUM_CP(NUM_CP)) u_op (
    .clk, .rst_n, .valid_i(op_valid), .msg_i(op_msg), .ready_o(op_ready),
    .tbl_wr_i(cfg_wr_i), .tbl_conn_i(cfg_conn_i), .tbl_local_i(cfg_local_i),
    .tbl_remote_i(cfg_remote_i),
    .ul_valid_o(up_valid_o), .ul_ind_o(up_ind_o), .ul_ready_i(up_ready_i),
    .ll_valid_o(dn_valid_o), .ll_frame_o(dn_frame_o), .ll_ready_i(dn_ready_i));
endmodule
