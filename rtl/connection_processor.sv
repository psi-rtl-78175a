// connection_processor: a dedicated processor holding one connection's state.
//
// Each connection gets its own processor, so no connection context is ever
// swapped in or out: the flags, counters and timers that make up the context
// are active registers inside it. The header processor addresses connection
// processors like memory locations: a bus word whose conn field equals
// CONN_ID is taken by this processor. Inside (after the document's template):
//
//   bus event --> combinational logic --> state transition machine (path
//   machines) --> action strobes --> flags / counters / timers / output unit
//
// The state transition machine here is the 802.2 remote-busy path machine.
// Its action leaves are mapped to control strobes and an output message by
// ACTION_MAP (one cp_action_t per action leaf); the default is the document's
// Rbusy actions. Timer expiries re-enter the state machine as EV_TIMER events.
//
// Timing: an event is taken in the cycle it is on the bus while ready_o is
// high; its state updates happen at that cycle's clock edge, and a message it
// sends is requested on the CP->OP bus from the next cycle. ready_o is low for
// the first cycle after reset and while the output queue is full.
module connection_processor
  import psi_pkg::*;
#(
  parameter logic [CONN_W-1:0] CONN_ID      = '0,
  parameter cp_action_map_t    ACTION_MAP   = RBUSY_ACTION_MAP,
  parameter logic [TMR_W-1:0]  TIMER_PERIOD = TMR_W'(1000),
  parameter int                OUT_DEPTH    = 2
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          tick_i,
  // HP->CP bus
  input  cp_bus_t                       bus_i,
  output logic                          ready_o,
  // CP->OP bus
  output logic                          req_o,
  output op_msg_t                       msg_o,
  input  logic                          gnt_i,
  // connection state, for observation
  output logic [CP_NFLAGS-1:0]          flags_o,
  output logic [CP_NCTRS-1:0][CTR_W-1:0] ctr_o,
  output logic [CP_NTMRS-1:0]           tmr_running_o,
  output logic [7:0]                    armed_o,
  output logic                          accepted_o
);
  logic                 path_ready, out_full, enable, take;
  logic                 ev_valid;
  psi_event_e           ev;
  psi_params_t          par, par_last;
  logic [PTR_W-1:0]     ptr, ptr_last;
  logic [CP_NTMRS-1:0]  tmr_pending, tmr_ack;
  logic [CP_NACTS-1:0]  act;
  logic [CP_NFLAGS-1:0] flag_set, flag_clr;
  logic [CP_NCTRS-1:0]  ctr_load, ctr_inc;
  logic [CP_NTMRS-1:0]  tmr_start, tmr_stop;
  psi_msg_e             msg;
  logic                 push;
  logic [CP_NTMRS-1:0][TMR_W-1:0] tmr_count_unused;

  assign enable  = path_ready && !out_full;
  assign take    = bus_i.valid && (bus_i.conn == CONN_ID) && enable;
  assign ready_o = enable;

  cp_comb_logic #(.NT(CP_NTMRS)) u_comb (
    .enable_i(enable), .ext_valid_i(take), .ext_ev_i(bus_i.ev), .ext_par_i(bus_i.par),
    .ext_ptr_i(bus_i.ptr), .tmr_pending_i(tmr_pending), .par_last_i(par_last),
    .ptr_last_i(ptr_last), .ev_valid_o(ev_valid), .ev_o(ev), .par_o(par), .ptr_o(ptr),
    .ack_o(tmr_ack));

  rbusy_path u_stm (
    .clk, .rst_n, .ev_valid_i(ev_valid), .ev_code_i(ev), .ready_o(path_ready),
    .accepted_o, .act_o(act), .armed_o);

  // Action leaves -> control strobes and message
  always_comb begin
    flag_set  = '0;
    flag_clr  = '0;
    ctr_load  = '0;
    ctr_inc   = '0;
    tmr_start = '0;
    tmr_stop  = '0;
    msg       = MSG_NONE;
    for (int i = 0; i < CP_NACTS; i++) begin
      if (act[i]) begin
        flag_set  |= ACTION_MAP[i].flag_set;
        flag_clr  |= ACTION_MAP[i].flag_clr;
        ctr_load  |= ACTION_MAP[i].ctr_load;
        ctr_inc   |= ACTION_MAP[i].ctr_inc;
        tmr_start |= ACTION_MAP[i].tmr_start;
        tmr_stop  |= ACTION_MAP[i].tmr_stop;
        if (ACTION_MAP[i].msg != MSG_NONE) msg = ACTION_MAP[i].msg;
      end
    end
    push = (msg != MSG_NONE);
  end

  cp_flags #(.N(CP_NFLAGS), .RESET(FLAG_RESET)) u_flags (
    .clk, .rst_n, .set_i(flag_set), .clr_i(flag_clr), .flags_o);

  cp_counters_regs #(.N(CP_NCTRS), .W(CTR_W)) u_ctrs (
    .clk, .rst_n, .load_i(ctr_load), .inc_i(ctr_inc), .clr_i('0), .ev_valid_i(take),
    .par_i(par), .ptr_i(ptr), .ctr_o, .par_o(par_last), .ptr_o(ptr_last));

  for (genvar t = 0; t < CP_NTMRS; t++) begin : g_tmr
    cp_timer #(.W(TMR_W)) u_tmr (
      .clk, .rst_n, .tick_i, .start_i(tmr_start[t]), .stop_i(tmr_stop[t]),
      .period_i(TIMER_PERIOD), .ack_i(tmr_ack[t]), .running_o(tmr_running_o[t]),
      .pending_o(tmr_pending[t]), .count_o(tmr_count_unused[t]));
  end

  cp_output_unit #(.CONN_ID(CONN_ID), .DEPTH(OUT_DEPTH)) u_out (
    .clk, .rst_n, .push_i(push), .msg_i(msg), .par_i(par), .ptr_i(ptr),
    .full_o(out_full), .req_o, .msg_o, .gnt_i);

  // An event runs at most one action leaf that sends a message.
  always_comb begin
    int n;
    n = 0;
    for (int i = 0; i < CP_NACTS; i++) if (act[i] && ACTION_MAP[i].msg != MSG_NONE) n++;
    assert (!(rst_n && n > 1));
  end
endmodule
