// tb_header_processor: frames and commands of every kind through the header
// processor, with random backpressure from the connection processors and the
// dummy connection processor.
//
// Four connections are set up in the CAM. The test builds each input from
// its fields and knows the outcome it must have: a bus word for connection
// k (I, RR, RNR, REJ, SABME ... frames from a known address pair, or an
// upper-layer command), a message to the dummy CP (UI datagram indication,
// TEST/XID response with C/R set, UI send request), or a drop (unknown
// address pair, undefined control field, TEST response, connection number out
// of range). Expected outputs are queued when the input is taken and compared
// in order when the output is taken. Every outcome must occur.
module tb_header_processor;
  import psi_pkg::*;
  localparam int NCP = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic ll_valid, ll_ready, ul_valid, ul_ready;
  llc_frame_t frame;
  upper_cmd_t cmd;
  logic cam_wr, cam_valid;
  logic [CONN_W-1:0] cam_conn;
  llc_addr_t cam_local, cam_remote;
  cp_bus_t bus;
  logic [NCP-1:0] cp_ready;
  logic dm_valid, dm_ready;
  op_msg_t dm_msg;
  logic [15:0] drops;

  typedef struct {
    int      kind;   // 0 bus word, 1 dummy message, 2 drop
    cp_bus_t w;
    op_msg_t m;
  } exp_t;
  exp_t q[$];
  llc_addr_t loc [NCP], rem [NCP];
  int n_kind [3] = '{0, 0, 0};
  int n_stall = 0, m_drops = 0;

  header_processor #(.NUM_CP(NCP)) dut (.clk, .rst_n, .ll_valid_i(ll_valid), .ll_frame_i(frame),
    .ll_ready_o(ll_ready), .ul_valid_i(ul_valid), .ul_cmd_i(cmd), .ul_ready_o(ul_ready),
    .cam_wr_i(cam_wr), .cam_conn_i(cam_conn), .cam_local_i(cam_local), .cam_remote_i(cam_remote),
    .cam_valid_i(cam_valid), .cp_bus_o(bus), .cp_ready_i(cp_ready), .dm_valid_o(dm_valid),
    .dm_msg_o(dm_msg), .dm_ready_i(dm_ready), .drop_count_o(drops));

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

  // Build a random lower-layer frame and the outcome it must have.
  task automatic make_frame(output llc_frame_t f, output exp_t e);
    int k, t;
    logic [6:0] ns, nr;
    logic pf, cr;
    psi_params_t p;
    k  = $urandom_range(0, NCP - 1);
    t  = $urandom_range(0, 11);
    ns = 7'($urandom); nr = 7'($urandom); pf = 1'($urandom); cr = 1'($urandom);
    f.da = loc[k].mac; f.dsap = loc[k].sap;
    f.sa = rem[k].mac; f.ssap = {rem[k].sap[7:1], cr};
    f.ptr = PTR_W'($urandom);
    e.w = '0; e.m = '0;
    e.m.direct = 1; e.m.local_a = loc[k]; e.m.remote_a = rem[k]; e.m.ptr = f.ptr;
    p = '{cr: cr, pf: pf, nr: nr, ns: '0};
    e.kind = 0;
    case (t)
      0: begin f.ctrl = {nr, pf, ns, 1'b0}; p.ns = ns; e.w.ev = EV_I_LPDU; end
      1: begin f.ctrl = {nr, pf, 8'h01}; e.w.ev = EV_RR; end
      2: begin f.ctrl = {nr, pf, 8'h05}; e.w.ev = EV_RNR; end
      3: begin f.ctrl = {nr, pf, 8'h09}; e.w.ev = EV_REJ; end
      4: begin f.ctrl = {8'h00, 8'h6F | {3'b0, pf, 4'b0}}; p.nr = '0; e.w.ev = EV_SABME; end
      5: begin f.ctrl = {8'h00, 8'h43 | {3'b0, pf, 4'b0}}; p.nr = '0; e.w.ev = EV_DISC; end
      6: begin // UI: datagram indication
           f.ctrl = {8'h00, 8'h03 | {3'b0, pf, 4'b0}}; p.nr = '0;
           e.kind = 1; e.m.msg = MSG_DATAGRAM_IND;
         end
      7: begin // TEST command answered, TEST response dropped
           f.ctrl = {8'h00, 8'hE3 | {3'b0, pf, 4'b0}}; p.nr = '0;
           e.kind = cr ? 2 : 1; e.m.msg = MSG_TX_TEST_RSP;
         end
      8: begin
           f.ctrl = {8'h00, 8'hAF | {3'b0, pf, 4'b0}}; p.nr = '0;
           e.kind = cr ? 2 : 1; e.m.msg = MSG_TX_XID_RSP;
         end
      9: begin f.ctrl = {nr, pf, 8'h0D}; e.kind = 2; end          // undefined S
      10: begin f.ctrl = {nr, pf, 8'h01}; f.sa = f.sa ^ 48'h1; e.kind = 2; end // unknown peer
      default: begin f.ctrl = {nr, pf, 8'h01}; f.dsap = f.dsap ^ 8'h80; e.kind = 2; end
    endcase
    if (e.kind == 1) begin
      e.m.par = p;
      if (e.m.msg != MSG_DATAGRAM_IND) e.m.par.cr = 1'b1;
    end
    e.w.valid = 1; e.w.conn = CONN_W'(k); e.w.par = p; e.w.ptr = f.ptr;
  endtask

  task automatic make_cmd(output upper_cmd_t c, output exp_t e);
    c = upper_cmd_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                      $urandom});
    c.datagram = ($urandom_range(0, 2) == 0);
    c.conn = CONN_W'($urandom_range(0, NCP));   // NCP is out of range
    c.ev = EV_DATA_REQ;
    e.w = '0; e.m = '0;
    if (c.datagram) begin
      e.kind = 1;
      e.m.msg = MSG_TX_UI; e.m.direct = 1; e.m.local_a = c.local_a; e.m.remote_a = c.remote_a;
      e.m.par = c.par; e.m.par.cr = 1'b0; e.m.ptr = c.ptr;
    end else if (int'(c.conn) < NCP) begin
      e.kind = 0;
      e.w = '{valid: 1'b1, conn: c.conn, ev: c.ev, par: c.par, ptr: c.ptr};
    end else begin
      e.kind = 2;
    end
  endtask

  initial begin
    exp_t fe, ce;
    llc_frame_t nf;
    upper_cmd_t nc;
    ll_valid = 0; ul_valid = 0; frame = '0; cmd = '0; cam_wr = 0; cam_valid = 0;
    cam_conn = '0; cam_local = '0; cam_remote = '0; cp_ready = '0; dm_ready = 0;
    for (int k = 0; k < NCP; k++) begin
      loc[k] = '{mac: {$urandom, 16'($urandom)}, sap: {7'($urandom), 1'b0}};
      rem[k] = '{mac: {$urandom, 16'($urandom)}, sap: {7'($urandom), 1'b0}};
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < NCP; k++) begin
      cam_wr = 1; cam_valid = 1; cam_conn = CONN_W'(k); cam_local = loc[k]; cam_remote = rem[k];
      @(negedge clk);
    end
    cam_wr = 0;
    make_frame(nf, fe);
    make_cmd(nc, ce);
    for (int n = 0; n < 4000; n++) begin
      ll_valid = ($urandom_range(0, 2) != 0);
      ul_valid = ($urandom_range(0, 2) != 0);
      frame = nf;
      cmd = nc;
      cp_ready = NCP'($urandom);
      dm_ready = ($urandom_range(0, 3) != 0);
      #1;
      chk(drops == 16'(m_drops), "drop count");
      // output side
      if (bus.valid || dm_valid) begin
        chk(q.size() != 0, "output expected");
        if (q.size() != 0) begin
          if (q[0].kind == 0) chk(bus == q[0].w && !dm_valid, "bus word");
          else                chk(dm_valid && dm_msg == q[0].m && !bus.valid, "dummy message");
        end
      end else begin
        chk(q.size() == 0 || q[0].kind == 2, "no output pending");
      end
      if (bus.valid && !cp_ready[bus.conn[1:0]]) n_stall++;
      @(posedge clk);
      if (q.size() != 0 && ((bus.valid && cp_ready[bus.conn[1:0]]) || (dm_valid && dm_ready)))
        void'(q.pop_front());
      if (ll_valid && ll_ready) begin
        n_kind[fe.kind]++;
        if (fe.kind == 2) m_drops++; else q.push_back(fe);
        make_frame(nf, fe);
      end else if (ul_valid && ul_ready) begin
        n_kind[ce.kind]++;
        if (ce.kind == 2) m_drops++; else q.push_back(ce);
        make_cmd(nc, ce);
      end
      @(negedge clk);
    end
    $display("bus=%0d dummy=%0d drop=%0d stalls=%0d", n_kind[0], n_kind[1], n_kind[2], n_stall);
    chk(n_kind[0] > 0 && n_kind[1] > 0 && n_kind[2] > 0 && n_stall > 0, "all outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
