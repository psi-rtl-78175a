// tb_psi_layer_processor: the whole layer processor, end to end, at its
// default size (eight connection processors).
//
// Eight connections are set up. Phase 1 sends a back-to-back burst of
// RNR/RR frames to one connection with both layers always ready, and checks
// that one frame is taken per clock and that the first indication appears
// three clock edges after its frame was taken. Phase 2 runs a long random mix
// of lower-layer frames (I, RR, RNR, REJ, SABME, UI, TEST and XID commands,
// frames from unknown stations) and upper-layer commands (datagram sends and
// connection commands), with random backpressure from both layers.
//
// A model keeps every connection's remote-busy state and the expected
// indications and frames per source (each connection processor, and the
// dummy connection processor): order is kept within a source but not across
// sources, since the CP->OP bus arbiter interleaves them. Every output is
// compared with the head of its source's queue, the Rb flag and Is_Ct
// counter of every connection and the drop count are compared each cycle,
// and all queues must be empty at the end.
//
// Mechanisms counted (each must happen): silent RR/REJ/I loop, RNR entering
// remote busy (IH_Rb), repeated RNR ignored, leaving remote busy
// (IH_Rb_Off), event ignored by the path, datagram indication, TEST and XID
// responses, UI send, upper-layer connection command, CAM miss drop, a
// connection processor holding up the header processor, two or more
// processors requesting the CP->OP bus at once, and output backpressure.
module tb_psi_layer_processor;
  import psi_pkg::*;
  localparam int NCP = 8;   // the design's default
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic tick = 0;
  logic ll_valid, ll_ready, ul_valid, ul_ready;
  llc_frame_t frame;
  upper_cmd_t cmd;
  logic cfg_wr, cfg_valid;
  logic [CONN_W-1:0] cfg_conn;
  llc_addr_t cfg_local, cfg_remote;
  logic up_valid, up_ready, dn_valid, dn_ready;
  upper_ind_t up_ind;
  llc_frame_t dn_frame;
  logic [15:0] drops;
  logic [NCP-1:0][CP_NFLAGS-1:0] flags;
  logic [NCP-1:0][CP_NCTRS-1:0][CTR_W-1:0] ctrs;

  psi_layer_processor dut (.clk, .rst_n, .tick_i(tick),
    .ll_valid_i(ll_valid), .ll_frame_i(frame), .ll_ready_o(ll_ready),
    .ul_valid_i(ul_valid), .ul_cmd_i(cmd), .ul_ready_o(ul_ready),
    .cfg_wr_i(cfg_wr), .cfg_conn_i(cfg_conn), .cfg_local_i(cfg_local),
    .cfg_remote_i(cfg_remote), .cfg_valid_i(cfg_valid),
    .up_valid_o(up_valid), .up_ind_o(up_ind), .up_ready_i(up_ready),
    .dn_valid_o(dn_valid), .dn_frame_o(dn_frame), .dn_ready_i(dn_ready),
    .drop_count_o(drops), .cp_flags_o(flags), .cp_ctr_o(ctrs));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  // ------------------------------------------------------------ model state
  llc_addr_t  loc [NCP], rem [NCP];
  logic       busy [NCP];
  logic [CTR_W-1:0] m_is_ct [NCP];
  upper_ind_t upq [NCP+1][$];     // index NCP: dummy connection processor
  llc_frame_t dnq [$];            // only the dummy CP sends frames in this configuration
  int         m_drops = 0;
  // Connection state as the connection processors must hold it: updated when
  // a bus word is taken by its connection processor (the frame model above
  // runs one pipeline stage earlier, when the header processor takes a frame).
  logic       cp_busy [NCP], cp_snd [NCP];
  logic [CTR_W-1:0] cp_is_ct [NCP];

  always @(posedge clk) begin
    if (rst_n && dut.cp_bus.valid && int'(dut.cp_bus.conn) < NCP && dut.cp_ready[dut.cp_bus.conn[2:0]]) begin
      automatic int k = int'(dut.cp_bus.conn);
      automatic psi_event_e e = dut.cp_bus.ev;
      if (!cp_busy[k] && e == EV_RNR) begin
        cp_busy[k] <= 1'b1; cp_snd[k] <= 1'b0; cp_is_ct[k] <= dut.cp_bus.par.nr;
      end else if (cp_busy[k] && (e == EV_RR || e == EV_REJ || e == EV_I_LPDU)) begin
        cp_busy[k] <= 1'b0;
      end
    end
  end

  // mechanism counters
  int c_loop0 = 0, c_rb_on = 0, c_rnr_again = 0, c_rb_off = 0, c_ignored = 0;
  int c_dgram = 0, c_test = 0, c_xid = 0, c_ui_send = 0, c_ul_conn = 0, c_miss = 0;
  int c_cp_stall = 0, c_bus_conflict = 0, c_out_block = 0;

  typedef struct {
    llc_frame_t f;
    int         k;
    int         t;
  } frame_job_t;

  function automatic frame_job_t new_frame(input int k, input int t);
    frame_job_t j;
    logic [6:0] ns, nr;
    logic pf;
    ns = 7'($urandom); nr = 7'($urandom); pf = 1'($urandom);
    j.k = k; j.t = t;
    j.f.da = loc[k].mac; j.f.dsap = loc[k].sap;
    j.f.sa = rem[k].mac; j.f.ssap = {rem[k].sap[7:1], 1'($urandom)};
    j.f.ptr = PTR_W'($urandom);
    case (t)
      0: j.f.ctrl = {nr, pf, ns, 1'b0};          // I
      1: j.f.ctrl = {nr, pf, 8'h01};             // RR
      2: j.f.ctrl = {nr, pf, 8'h05};             // RNR
      3: j.f.ctrl = {nr, pf, 8'h09};             // REJ
      4: j.f.ctrl = {8'h00, 8'h6F | {3'b0, pf, 4'b0}};   // SABME
      5: j.f.ctrl = {8'h00, 8'h03 | {3'b0, pf, 4'b0}};   // UI
      6: begin j.f.ctrl = {8'h00, 8'hE3 | {3'b0, pf, 4'b0}}; j.f.ssap[0] = 1'b0; end // TEST cmd
      7: begin j.f.ctrl = {8'h00, 8'hAF | {3'b0, pf, 4'b0}}; j.f.ssap[0] = 1'b0; end // XID cmd
      default: begin j.f.ctrl = {nr, pf, 8'h01}; j.f.sa = ~j.f.sa; end            // unknown
    endcase
    return j;
  endfunction

  // What a taken frame must cause.
  task automatic model_frame(input frame_job_t j);
    int k;
    logic cr, pf;
    logic [6:0] nr;
    logic abc;
    upper_ind_t u;
    llc_frame_t r;
    k = j.k;
    cr = j.f.ssap[0];
    nr = j.f.ctrl[15:9];
    case (j.t)
      0, 1, 2, 3: begin
        abc = (j.t != 2);
        pf = j.f.ctrl[8];
        u = '{ind: MSG_NONE, conn: CONN_W'(k), remote_a: rem[k],
              par: '{cr: cr, pf: pf, nr: nr, ns: (j.t == 0) ? j.f.ctrl[7:1] : 7'd0},
              ptr: j.f.ptr};
        if (!busy[k] && !abc) begin
          busy[k] = 1; c_rb_on++; m_is_ct[k] = nr;
          u.ind = MSG_IH_RB; upq[k].push_back(u);
        end else if (busy[k] && abc) begin
          busy[k] = 0; c_rb_off++;
          u.ind = MSG_IH_RB_OFF; upq[k].push_back(u);
        end else if (busy[k]) c_rnr_again++;
        else c_loop0++;
      end
      4: c_ignored++;
      5: begin
        pf = j.f.ctrl[4];
        u = '{ind: MSG_DATAGRAM_IND, conn: '0, remote_a: '{mac: j.f.sa, sap: {j.f.ssap[7:1], 1'b0}},
              par: '{cr: cr, pf: pf, nr: 7'd0, ns: 7'd0}, ptr: j.f.ptr};
        upq[NCP].push_back(u); c_dgram++;
      end
      6, 7: begin
        pf = j.f.ctrl[4];
        r.da = j.f.sa; r.sa = j.f.da; r.dsap = {j.f.ssap[7:1], 1'b0}; r.ssap = {j.f.dsap[7:1], 1'b1};
        r.ctrl = {8'h00, ((j.t == 6) ? 8'hE3 : 8'hAF) | {3'b0, pf, 4'b0}};
        r.ptr = j.f.ptr;
        dnq.push_back(r);
        if (j.t == 6) c_test++; else c_xid++;
      end
      default: begin m_drops++; c_miss++; end
    endcase
  endtask

  function automatic upper_cmd_t new_cmd();
    upper_cmd_t c;
    c = upper_cmd_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                      $urandom});
    c.datagram = 1'($urandom_range(0, 1));
    c.conn = CONN_W'($urandom_range(0, NCP - 1));
    c.ev = EV_DATA_REQ;
    return c;
  endfunction

  task automatic model_cmd(input upper_cmd_t c);
    llc_frame_t r;
    if (c.datagram) begin
      r.da = c.remote_a.mac; r.sa = c.local_a.mac; r.dsap = c.remote_a.sap;
      r.ssap = {c.local_a.sap[7:1], 1'b0};
      r.ctrl = {8'h00, 8'h03 | {3'b0, c.par.pf, 4'b0}};
      r.ptr = c.ptr;
      dnq.push_back(r);
      c_ui_send++;
    end else c_ul_conn++;
  endtask

  // ------------------------------------------------------------ checking
  task automatic check_outputs();
    int src;
    for (int k = 0; k < NCP; k++) begin
      chk(flags[k][FLAG_RB] == cp_busy[k], $sformatf("Rb flag of connection %0d", k));
      chk(flags[k][FLAG_SND] == cp_snd[k], $sformatf("Snd flag of connection %0d", k));
      chk(ctrs[k][CTR_IS] == cp_is_ct[k], $sformatf("Is_Ct of connection %0d", k));
    end
    chk(drops == 16'(m_drops), "drop count");
    if (up_valid) begin
      src = (up_ind.ind == MSG_DATAGRAM_IND) ? NCP : int'(up_ind.conn);
      chk(src <= NCP && upq[src].size() != 0, "indication expected");
      if (src <= NCP && upq[src].size() != 0) chk(up_ind == upq[src][0], "indication");
    end
    if (dn_valid) begin
      chk(dnq.size() != 0, "frame expected");
      if (dnq.size() != 0) chk(dn_frame == dnq[0], "frame header");
    end
  endtask

  task automatic pop_outputs();
    int src;
    if (up_valid && up_ready) begin
      src = (up_ind.ind == MSG_DATAGRAM_IND) ? NCP : int'(up_ind.conn);
      if (src <= NCP && upq[src].size() != 0) void'(upq[src].pop_front());
    end
    if (dn_valid && dn_ready && dnq.size() != 0) void'(dnq.pop_front());
  endtask

  function automatic int reqs();
    return $countones(dut.req);
  endfunction

  initial begin
    frame_job_t fj;
    upper_cmd_t uc;
    int t_take, lat, burst_taken;
    ll_valid = 0; ul_valid = 0; frame = '0; cmd = '0;
    cfg_wr = 0; cfg_valid = 0; cfg_conn = '0; cfg_local = '0; cfg_remote = '0;
    up_ready = 1; dn_ready = 1;
    for (int k = 0; k < NCP; k++) begin
      loc[k] = '{mac: {$urandom, 16'($urandom)}, sap: {7'($urandom), 1'b0}};
      rem[k] = '{mac: {$urandom, 16'($urandom)}, sap: {7'($urandom), 1'b0}};
      busy[k] = 0;
      m_is_ct[k] = '0;
      cp_busy[k] = 0;
      cp_snd[k] = 1;
      cp_is_ct[k] = '0;
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < NCP; k++) begin
      cfg_wr = 1; cfg_valid = 1; cfg_conn = CONN_W'(k); cfg_local = loc[k]; cfg_remote = rem[k];
      @(negedge clk);
    end
    cfg_wr = 0;
    repeat (2) @(negedge clk);

    // ---------------- phase 1: burst, throughput and latency
    burst_taken = 0;
    t_take = -1;
    lat = -1;
    for (int n = 0; n < 16; n++) begin
      fj = new_frame(1, (n % 2 == 0) ? 2 : 1);   // RNR, RR, RNR, ...
      frame = fj.f;
      ll_valid = 1;
      #1;
      check_outputs();
      chk(ll_ready, "one frame per clock");
      if (up_valid && lat < 0) lat = n - t_take;
      @(posedge clk);
      if (ll_valid && ll_ready) begin
        burst_taken++;
        if (t_take < 0) t_take = n;
        model_frame(fj);
      end
      pop_outputs();
      @(negedge clk);
    end
    ll_valid = 0;
    chk(burst_taken == 16, "burst of 16 frames in 16 clocks");
    chk(lat == 3, $sformatf("latency frame->indication is 3 clocks (got %0d)", lat));
    $display("burst: %0d frames in 16 clocks, latency %0d clocks", burst_taken, lat);

    // ---------------- phase 2: random traffic
    fj = new_frame($urandom_range(0, NCP - 1), $urandom_range(0, 8));
    uc = new_cmd();
    for (int n = 0; n < 20000; n++) begin
      frame = fj.f;
      cmd = uc;
      ll_valid = ($urandom_range(0, 3) != 0);
      ul_valid = ($urandom_range(0, 4) == 0);
      up_ready = ($urandom_range(0, 4) != 0);
      dn_ready = ($urandom_range(0, 4) != 0);
      #1;
      check_outputs();
      if (dut.cp_bus.valid && !dut.cp_ready[dut.cp_bus.conn[2:0]]) c_cp_stall++;
      if (reqs() >= 2) c_bus_conflict++;
      if ((up_valid && !up_ready) || (dn_valid && !dn_ready)) c_out_block++;
      @(posedge clk);
      pop_outputs();
      if (ll_valid && ll_ready) begin
        model_frame(fj);
        // mostly one connection at a time, to get busy/unbusy sequences
        fj = new_frame(($urandom_range(0, 3) == 0) ? $urandom_range(0, NCP - 1) : (n / 500) % NCP,
                       ($urandom_range(0, 2) == 0) ? $urandom_range(0, 8) : $urandom_range(0, 3));
      end else if (ul_valid && ul_ready) begin
        model_cmd(uc);
        uc = new_cmd();
      end
      @(negedge clk);
    end

    // drain
    ll_valid = 0; ul_valid = 0; up_ready = 1; dn_ready = 1;
    repeat (40) begin
      #1;
      check_outputs();
      @(posedge clk);
      pop_outputs();
      @(negedge clk);
    end
    for (int s = 0; s <= NCP; s++) chk(upq[s].size() == 0, $sformatf("indications of source %0d all delivered", s));
    chk(dnq.size() == 0, "frames all delivered");

    $display("loop(a+b+c)*=%0d IH_Rb=%0d RNR-again=%0d IH_Rb_Off=%0d ignored=%0d", c_loop0,
             c_rb_on, c_rnr_again, c_rb_off, c_ignored);
    $display("datagram-ind=%0d TEST-rsp=%0d XID-rsp=%0d UI-send=%0d upper-conn-cmd=%0d CAM-miss=%0d",
             c_dgram, c_test, c_xid, c_ui_send, c_ul_conn, c_miss);
    $display("CP-stall=%0d bus-conflict=%0d output-blocked=%0d", c_cp_stall, c_bus_conflict,
             c_out_block);
    chk(c_loop0 > 0, "silent (a+b+c)* loop happened");
    chk(c_rb_on > 0, "remote busy entered");
    chk(c_rnr_again > 0, "repeated RNR ignored");
    chk(c_rb_off > 0, "remote busy left");
    chk(c_ignored > 0, "event ignored by the path");
    chk(c_dgram > 0 && c_test > 0 && c_xid > 0, "connection-independent frames");
    chk(c_ui_send > 0 && c_ul_conn > 0, "upper-layer commands");
    chk(c_miss > 0, "CAM miss");
    chk(c_cp_stall > 0, "connection processor backpressure");
    chk(c_bus_conflict > 0, "CP->OP bus arbitration");
    chk(c_out_block > 0, "output backpressure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
