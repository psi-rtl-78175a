// llc_ctrl_parser: parses an 802.2 LLC control field in all formats at once.
//
// The control field of an LLC frame has three formats: information (I, first
// bit 0), supervisory (S, first bits 01) and unnumbered (U, first bits 11).
// Instead of testing the format first and then decoding, three decoders run
// in parallel on the same 16 bits, each as if the frame had its format, and
// the format bits pick one result at the end. This trades area for parsing
// speed, as the document proposes for variable-format headers.
//
//   I: ctrl[0]=0,     N(S)=ctrl[7:1], P/F=ctrl[8], N(R)=ctrl[15:9]
//   S: ctrl[1:0]=01,  SS=ctrl[3:2] (00 RR, 01 RNR, 10 REJ), P/F=ctrl[8], N(R)=ctrl[15:9]
//   U: ctrl[1:0]=11,  one octet, P/F=ctrl[4], modifier = ctrl[7:0] with P/F cleared
//
// Outputs: conn_o marks a frame for a connection processor (I, S, and the U
// commands/responses SABME, DISC, UA, DM, FRMR) with its event ev_o; ui_o,
// xid_o and test_o mark connection-independent U frames handled by the header
// processor itself; none of them is set for an undefined code. par_o carries
// C/R (from the SSAP's low bit), P/F, N(R) and N(S). Purely combinational.
module llc_ctrl_parser
  import psi_pkg::*;
(
  input  logic [15:0] ctrl_i,
  input  logic        cr_i,
  output logic        conn_o,
  output psi_event_e  ev_o,
  output logic        ui_o,
  output logic        xid_o,
  output logic        test_o,
  output psi_params_t par_o
);
  // --- I-format decoder
  psi_params_t i_par;
  // --- S-format decoder
  psi_params_t s_par;
  psi_event_e  s_ev;
  logic        s_ok;
  // --- U-format decoder
  psi_params_t u_par;
  psi_event_e  u_ev;
  logic        u_conn, u_ui, u_xid, u_test;
  logic [7:0]  u_mod;

  always_comb begin
    i_par = '{cr: cr_i, pf: ctrl_i[8], nr: ctrl_i[15:9], ns: ctrl_i[7:1]};

    s_par = '{cr: cr_i, pf: ctrl_i[8], nr: ctrl_i[15:9], ns: '0};
    s_ok  = 1'b1;
    unique case (ctrl_i[3:2])
      2'b00:   s_ev = EV_RR;
      2'b01:   s_ev = EV_RNR;
      2'b10:   s_ev = EV_REJ;
      default: begin s_ev = EV_NONE; s_ok = 1'b0; end
    endcase

    u_par  = '{cr: cr_i, pf: ctrl_i[4], nr: '0, ns: '0};
    u_mod  = ctrl_i[7:0] & 8'hEF;
    u_conn = 1'b1;
    u_ui   = 1'b0;
    u_xid  = 1'b0;
    u_test = 1'b0;
    u_ev   = EV_NONE;
    case (u_mod)
      U_SABME: u_ev = EV_SABME;
      U_DISC:  u_ev = EV_DISC;
      U_UA:    u_ev = EV_UA;
      U_DM:    u_ev = EV_DM;
      U_FRMR:  u_ev = EV_FRMR;
      U_UI:    begin u_conn = 1'b0; u_ui   = 1'b1; end
      U_XID:   begin u_conn = 1'b0; u_xid  = 1'b1; end
      U_TEST:  begin u_conn = 1'b0; u_test = 1'b1; end
      default: u_conn = 1'b0;
    endcase

    // --- select by format
    conn_o = 1'b0;
    ev_o   = EV_NONE;
    ui_o   = 1'b0;
    xid_o  = 1'b0;
    test_o = 1'b0;
    if (!ctrl_i[0]) begin
      conn_o = 1'b1;
      ev_o   = EV_I_LPDU;
      par_o  = i_par;
    end else if (!ctrl_i[1]) begin
      conn_o = s_ok;
      ev_o   = s_ev;
      par_o  = s_par;
    end else begin
      conn_o = u_conn;
      ev_o   = u_ev;
      ui_o   = u_ui;
      xid_o  = u_xid;
      test_o = u_test;
      par_o  = u_par;
    end
  end
endmodule
