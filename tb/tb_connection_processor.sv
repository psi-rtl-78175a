// tb_connection_processor: one connection processor against a model.
//
// Random bus words (for this connection or another one, random event codes)
// and random output grants drive the processor. The model keeps the
// remote-busy state, the Rb/Snd flags, the Is_Ct counter and the queue of
// expected output messages, and checks ready, flags, counter and every
// message word. The action map is overridden so that the RNR action also
// starts timer 0; a directed part at the end lets that timer expire and
// checks that the time-out is taken as an internal event without disturbing
// the path state. Backpressure (a full output queue) must occur.
module tb_connection_processor;
  import psi_pkg::*;
  localparam logic [CONN_W-1:0] ID = 8'd3;
  localparam cp_action_t ON_T = '{flag_set: CP_NFLAGS'(1 << FLAG_RB),
    flag_clr: CP_NFLAGS'(1 << FLAG_SND), ctr_load: CP_NCTRS'(1), ctr_inc: '0,
    tmr_start: CP_NTMRS'(1), tmr_stop: '0, msg: MSG_IH_RB};
  localparam cp_action_map_t MAP = {ACTION_RB_OFF, ON_T};

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, tick = 0;
  cp_bus_t bus;
  logic ready, req, gnt, accepted;
  op_msg_t msg;
  logic [CP_NFLAGS-1:0] flags;
  logic [CP_NCTRS-1:0][CTR_W-1:0] ctr;
  logic [CP_NTMRS-1:0] trun;
  logic [7:0] armed;

  logic busy;
  logic [CP_NFLAGS-1:0] m_flags;
  logic [CTR_W-1:0] m_ctr;
  op_msg_t q[$];
  int n_on = 0, n_off = 0, n_full = 0, n_other = 0;

  connection_processor #(.CONN_ID(ID), .ACTION_MAP(MAP), .TIMER_PERIOD(16'd4)) dut (
    .clk, .rst_n, .tick_i(tick), .bus_i(bus), .ready_o(ready), .req_o(req), .msg_o(msg),
    .gnt_i(gnt), .flags_o(flags), .ctr_o(ctr), .tmr_running_o(trun), .armed_o(armed),
    .accepted_o(accepted));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  initial begin
    logic take, abc;
    op_msg_t w;
    bus = '0; gnt = 0; busy = 0; m_flags = FLAG_RESET; m_ctr = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 4000; n++) begin
      bus.valid = ($urandom_range(0, 3) != 0);
      bus.conn  = ($urandom_range(0, 3) == 0) ? CONN_W'($urandom_range(0, 7)) : ID;
      bus.ev    = psi_event_e'($urandom_range(1, 11));
      bus.par   = psi_params_t'($urandom);
      bus.ptr   = PTR_W'($urandom);
      gnt       = req && ($urandom_range(0, 2) == 0);
      #1;
      chk(ready == (q.size() < 2), "ready follows the output queue");
      chk(flags == m_flags && ctr[0] == m_ctr, "flags and counter");
      chk(req == (q.size() != 0), "request");
      if (q.size() != 0) chk(msg == q[0], "output word");
      if (!ready) n_full++;
      take = bus.valid && bus.conn == ID && ready;
      if (bus.valid && bus.conn != ID) n_other++;
      abc  = bus.ev == EV_RR || bus.ev == EV_REJ || bus.ev == EV_I_LPDU;
      chk(accepted == (take && (abc || bus.ev == EV_RNR)), "accepted");
      @(posedge clk);
      if (gnt) void'(q.pop_front());
      if (take) begin
        w = '0; w.conn = ID; w.par = bus.par; w.ptr = bus.ptr;
        if (!busy && bus.ev == EV_RNR) begin
          busy = 1; n_on++;
          m_flags[FLAG_RB] = 1; m_flags[FLAG_SND] = 0; m_ctr = bus.par.nr;
          w.msg = MSG_IH_RB; q.push_back(w);
        end else if (busy && abc) begin
          busy = 0; n_off++;
          m_flags[FLAG_RB] = 0;
          w.msg = MSG_IH_RB_OFF; q.push_back(w);
        end
      end
      @(negedge clk);
    end
    // drain, then the timer: RNR while not busy starts timer 0
    bus = '0;
    repeat (4) begin
      gnt = req;
      @(negedge clk);
    end
    gnt = 0;
    if (busy) begin
      bus = '{valid: 1'b1, conn: ID, ev: EV_RR, par: '0, ptr: '0};
      @(negedge clk);
      busy = 0;
    end
    bus = '{valid: 1'b1, conn: ID, ev: EV_RNR, par: '0, ptr: '0};
    @(negedge clk);
    bus = '0;
    chk(trun[0], "RNR action started timer 0");
    tick = 1;
    repeat (3) @(negedge clk);
    chk(trun[0], "timer still running after 3 ticks");
    @(negedge clk);
    chk(!trun[0], "timer expired after 4 ticks");
    tick = 0;
    @(negedge clk);
    chk(armed == 8'b1111_0000, "time-out event leaves the path in the busy state");
    chk(flags[FLAG_RB], "Rb still set");
    $display("on=%0d off=%0d full=%0d other=%0d", n_on, n_off, n_full, n_other);
    chk(n_on > 0 && n_off > 0 && n_full > 0 && n_other > 0, "all cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
