// tb_output_processor: random bus messages of every kind, with random
// backpressure from both layers.
//
// Connection addresses are set up in the table. For each message the test
// works out, from the 802.2 field layout, the indication or frame header it
// must produce: addresses from the message itself when it is direct, from
// the table otherwise; destination = remote, source = local, SSAP low bit =
// C/R; U control octet = code | P/F<<4; S control = N(R)<<9 | P/F<<8 | SS<<2 | 01.
// Outputs are compared in order; ready must follow the output registers.
module tb_output_processor;
  import psi_pkg::*;
  localparam int NCP = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic valid, ready, tbl_wr, ul_valid, ul_ready, ll_valid, ll_ready;
  op_msg_t msg;
  logic [CONN_W-1:0] tbl_conn;
  llc_addr_t tbl_local, tbl_remote;
  upper_ind_t ind;
  llc_frame_t frm;
  llc_addr_t loc [NCP], rem [NCP];
  upper_ind_t uq[$];
  llc_frame_t lq[$];
  int n_up = 0, n_dn = 0, n_lookup = 0, n_block = 0;

  output_processor #(.NUM_CP(NCP)) dut (.clk, .rst_n, .valid_i(valid), .msg_i(msg),
    .ready_o(ready), .tbl_wr_i(tbl_wr), .tbl_conn_i(tbl_conn), .tbl_local_i(tbl_local),
    .tbl_remote_i(tbl_remote), .ul_valid_o(ul_valid), .ul_ind_o(ind), .ul_ready_i(ul_ready),
    .ll_valid_o(ll_valid), .ll_frame_o(frm), .ll_ready_i(ll_ready));

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
    llc_addr_t la, ra;
    upper_ind_t ei;
    llc_frame_t ef;
    logic up, dn, exp_ready;
    valid = 0; msg = '0; tbl_wr = 0; tbl_conn = '0; tbl_local = '0; tbl_remote = '0;
    ul_ready = 0; ll_ready = 0;
    for (int k = 0; k < NCP; k++) begin
      loc[k] = '{mac: {$urandom, 16'($urandom)}, sap: 8'($urandom)};
      rem[k] = '{mac: {$urandom, 16'($urandom)}, sap: 8'($urandom)};
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < NCP; k++) begin
      tbl_wr = 1; tbl_conn = CONN_W'(k); tbl_local = loc[k]; tbl_remote = rem[k];
      @(negedge clk);
    end
    tbl_wr = 0;
    for (int n = 0; n < 4000; n++) begin
      msg = op_msg_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                       $urandom});
      msg.msg = psi_msg_e'($urandom_range(1, 9));
      msg.conn = CONN_W'($urandom_range(0, NCP - 1));
      valid = ($urandom_range(0, 3) != 0);
      ul_ready = ($urandom_range(0, 2) != 0);
      ll_ready = ($urandom_range(0, 2) != 0);
      #1;
      la = msg.direct ? msg.local_a : loc[msg.conn];
      ra = msg.direct ? msg.remote_a : rem[msg.conn];
      up = msg.msg inside {MSG_IH_RB, MSG_IH_RB_OFF, MSG_DATAGRAM_IND};
      dn = !up;
      exp_ready = up ? (uq.size() == 0 || ul_ready) : (lq.size() == 0 || ll_ready);
      chk(ready == exp_ready, "ready");
      chk(ul_valid == (uq.size() != 0), "upper valid");
      chk(ll_valid == (lq.size() != 0), "lower valid");
      if (uq.size() != 0) chk(ind == uq[0], "indication");
      if (lq.size() != 0) chk(frm == lq[0], "frame header");
      if (!exp_ready) n_block++;
      ei = '{ind: msg.msg, conn: msg.conn, remote_a: ra, par: msg.par, ptr: msg.ptr};
      ef.da = ra.mac; ef.sa = la.mac; ef.dsap = ra.sap; ef.ssap = {la.sap[7:1], msg.par.cr};
      ef.ptr = msg.ptr;
      case (msg.msg)
        MSG_TX_UI:       ef.ctrl = 16'h0003 | (16'(msg.par.pf) << 4);
        MSG_TX_TEST_RSP: ef.ctrl = 16'h00E3 | (16'(msg.par.pf) << 4);
        MSG_TX_XID_RSP:  ef.ctrl = 16'h00AF | (16'(msg.par.pf) << 4);
        MSG_TX_RR:       ef.ctrl = (16'(msg.par.nr) << 9) | (16'(msg.par.pf) << 8) | 16'h0001;
        MSG_TX_RNR:      ef.ctrl = (16'(msg.par.nr) << 9) | (16'(msg.par.pf) << 8) | 16'h0005;
        default:         ef.ctrl = (16'(msg.par.nr) << 9) | (16'(msg.par.pf) << 8) | 16'h0009;
      endcase
      @(posedge clk);
      if (ul_valid && ul_ready) void'(uq.pop_front());
      if (ll_valid && ll_ready) void'(lq.pop_front());
      if (valid && exp_ready) begin
        if (up) begin uq.push_back(ei); n_up++; end
        else begin lq.push_back(ef); n_dn++; if (!msg.direct) n_lookup++; end
      end
      @(negedge clk);
    end
    $display("up=%0d down=%0d lookups=%0d blocked=%0d", n_up, n_dn, n_lookup, n_block);
    chk(n_up > 0 && n_dn > 0 && n_lookup > 0 && n_block > 0, "all cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
