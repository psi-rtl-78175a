// tb_llc_ctrl_parser: control fields built field by field from the 802.2
// formats (independently of the parser) and checked against the expected
// classification, event and parameters. Every I, S and U case is covered,
// with random sequence numbers and P/F bits.
module tb_llc_ctrl_parser;
  import psi_pkg::*;
  int checks = 0, failures = 0;
  logic [15:0] ctrl;
  logic cr, conn, ui, xid, test;
  psi_event_e ev;
  psi_params_t par;

  llc_ctrl_parser dut (.ctrl_i(ctrl), .cr_i(cr), .conn_o(conn), .ev_o(ev), .ui_o(ui),
                       .xid_o(xid), .test_o(test), .par_o(par));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s ctrl=%h", what, ctrl); end
  endtask

  initial begin
    logic [6:0] ns, nr;
    logic pf;
    psi_event_e s_ev [3] = '{EV_RR, EV_RNR, EV_REJ};
    logic [7:0] u_code [8] = '{8'h03, 8'h6F, 8'h43, 8'h63, 8'h0F, 8'h87, 8'hAF, 8'hE3};
    psi_event_e u_ev [8] = '{EV_NONE, EV_SABME, EV_DISC, EV_UA, EV_DM, EV_FRMR, EV_NONE, EV_NONE};
    for (int n = 0; n < 300; n++) begin
      ns = 7'($urandom); nr = 7'($urandom); pf = 1'($urandom); cr = 1'($urandom);
      // I frame: octet 1 = N(S)<<1 | 0, octet 2 = N(R)<<1 | P/F
      ctrl = {nr, pf, ns, 1'b0};
      #1;
      chk(conn && ev == EV_I_LPDU && !ui && !xid && !test, "I class");
      chk(par.ns == ns && par.nr == nr && par.pf == pf && par.cr == cr, "I params");
      // S frames: octet 1 = 0000 SS 01
      for (int s = 0; s < 3; s++) begin
        ctrl = {nr, pf, 4'b0000, 2'(s), 2'b01};
        #1;
        chk(conn && ev == s_ev[s], "S class");
        chk(par.nr == nr && par.pf == pf && par.cr == cr, "S params");
      end
      ctrl = {nr, pf, 4'b0000, 2'b11, 2'b01};
      #1;
      chk(!conn && !ui && !xid && !test, "undefined S");
      // U frames: P/F in bit 4
      for (int u = 0; u < 8; u++) begin
        ctrl = {8'(ns), u_code[u] | {3'b000, pf, 4'b0000}};
        #1;
        chk(conn == (u_ev[u] != EV_NONE) && (!conn || ev == u_ev[u]), "U connection class");
        chk(ui == (u == 0) && xid == (u == 6) && test == (u == 7), "U station class");
        chk(par.pf == pf && par.cr == cr, "U params");
      end
      ctrl = {8'h00, 8'hFF};
      #1;
      chk(!conn && !ui && !xid && !test, "undefined U");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
