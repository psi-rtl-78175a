// psi_pkg: types and constants shared by the protocol layer processor.
//
// The layer processor is a three-stage pipeline: a header processor turns each
// incoming frame or upper-layer command into an event for one dedicated
// connection processor; the connection processor runs the protocol's path
// machines and emits messages; an output processor turns those messages into
// frames for the lower layer or indications for the upper layer. This package
// holds the records that travel on the two buses between those stages, the
// event and message codes, and the sizing of the connection processor
// template for the IEEE 802.2 (LLC type 2) remote-busy configuration.
//
// Event and message names (RR, RNR, REJ, I_LPDU, Rb, Snd, Is_Ct, IH_Rb,
// IH_Rb_Off) follow the path expression of the remote-busy path machine. The
// bit widths, the control-field layout and the U-frame codes are the 802.2
// frame format; the code values and field widths of the bus records are this
// design's own choices.
package psi_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int CONN_W = 8;   // connection number width: up to 256 connection processors
  localparam int PTR_W  = 16;  // pointer into the packet data memory
  localparam int MAC_W  = 48;  // IEEE 802 MAC address
  localparam int SAP_W  = 8;   // LLC service access point
  localparam int SEQ_W  = 7;   // 802.2 modulo-128 sequence numbers N(S), N(R)

  // Connection processor template sizes for the 802.2 remote-busy configuration.
  localparam int CP_NFLAGS = 2;   // Rb, Snd
  localparam int CP_NCTRS  = 1;   // Is_Ct
  localparam int CP_NTMRS  = 3;   // dedicated timers per connection
  localparam int CP_NACTS  = 2;   // action leaves of the path machine (e, f)
  localparam int CTR_W     = SEQ_W;
  localparam int TMR_W     = 16;

  localparam int FLAG_RB  = 0;    // remote busy
  localparam int FLAG_SND = 1;    // sending allowed
  localparam int CTR_IS   = 0;    // Is_Ct
  localparam int ACT_RB_ON  = 0;  // leaf e: Rb=1 & Snd=0 & load(Is_Ct) & IH_Rb
  localparam int ACT_RB_OFF = 1;  // leaf f: Rb=0 & IH_Rb_Off

  // ---------------------------------------------------------------- codes
  // Events delivered to a connection processor.
  typedef enum logic [3:0] {
    EV_NONE    = 4'd0,
    EV_RR      = 4'd1,   // receive ready (S frame)
    EV_RNR     = 4'd2,   // receive not ready (S frame)
    EV_REJ     = 4'd3,   // reject (S frame)
    EV_I_LPDU  = 4'd4,   // information frame
    EV_SABME   = 4'd5,
    EV_DISC    = 4'd6,
    EV_UA      = 4'd7,
    EV_DM      = 4'd8,
    EV_FRMR    = 4'd9,
    EV_CONN_REQ = 4'd10, // upper-layer command addressed to a connection
    EV_DATA_REQ = 4'd11,
    EV_TIMER   = 4'd12   // expiry of a dedicated timer (raised inside the CP)
  } psi_event_e;

  // Messages on the CP->OP bus.
  typedef enum logic [3:0] {
    MSG_NONE         = 4'd0,
    MSG_IH_RB        = 4'd1,  // tell the upper layer: remote station busy
    MSG_IH_RB_OFF    = 4'd2,  // tell the upper layer: remote busy cleared
    MSG_DATAGRAM_IND = 4'd3,  // connectionless UI frame received
    MSG_TX_UI        = 4'd4,  // send a UI frame (addresses carried in the message)
    MSG_TX_TEST_RSP  = 4'd5,  // answer a TEST command (addresses carried)
    MSG_TX_XID_RSP   = 4'd6,  // answer an XID command (addresses carried)
    MSG_TX_RR        = 4'd7,  // send an S frame on a connection (addresses looked up)
    MSG_TX_RNR       = 4'd8,
    MSG_TX_REJ       = 4'd9
  } psi_msg_e;

  // 802.2 U-frame control octets with the P/F bit (bit 4) cleared.
  localparam logic [7:0] U_UI    = 8'h03;
  localparam logic [7:0] U_SABME = 8'h6F;
  localparam logic [7:0] U_DISC  = 8'h43;
  localparam logic [7:0] U_UA    = 8'h63;
  localparam logic [7:0] U_DM    = 8'h0F;
  localparam logic [7:0] U_FRMR  = 8'h87;
  localparam logic [7:0] U_XID   = 8'hAF;
  localparam logic [7:0] U_TEST  = 8'hE3;

  // ---------------------------------------------------------------- records
  typedef struct packed {
    logic [MAC_W-1:0] mac;
    logic [SAP_W-1:0] sap;
  } llc_addr_t;

  // Event parameters (the "Parameters" input of the connection processor).
  typedef struct packed {
    logic             cr;   // command(0)/response(1)
    logic             pf;   // poll/final
    logic [SEQ_W-1:0] nr;   // N(R)
    logic [SEQ_W-1:0] ns;   // N(S)
  } psi_params_t;

  // LLC frame header as exchanged with the lower layer; the payload stays in
  // the shared packet memory at ptr. ctrl[7:0] is the first control octet.
  typedef struct packed {
    logic [MAC_W-1:0] da;
    logic [MAC_W-1:0] sa;
    logic [SAP_W-1:0] dsap;
    logic [SAP_W-1:0] ssap;
    logic [15:0]      ctrl;
    logic [PTR_W-1:0] ptr;
  } llc_frame_t;

  // Command from the upper layer. datagram=1: connectionless send (UI) with
  // explicit addresses; otherwise an event for connection `conn`.
  typedef struct packed {
    logic              datagram;
    logic [CONN_W-1:0] conn;
    psi_event_e        ev;
    psi_params_t       par;
    llc_addr_t         local_a;
    llc_addr_t         remote_a;
    logic [PTR_W-1:0]  ptr;
  } upper_cmd_t;

  // HP->CP bus word: the header processor writes it to "address" conn.
  typedef struct packed {
    logic              valid;
    logic [CONN_W-1:0] conn;
    psi_event_e        ev;
    psi_params_t       par;
    logic [PTR_W-1:0]  ptr;
  } cp_bus_t;

  // CP->OP bus word. direct=1: addresses are carried (dummy CP); otherwise the
  // output processor looks them up by conn.
  typedef struct packed {
    psi_msg_e          msg;
    logic [CONN_W-1:0] conn;
    logic              direct;
    llc_addr_t         local_a;
    llc_addr_t         remote_a;
    psi_params_t       par;
    logic [PTR_W-1:0]  ptr;
  } op_msg_t;

  // Indication to the upper layer.
  typedef struct packed {
    psi_msg_e          ind;
    logic [CONN_W-1:0] conn;
    llc_addr_t         remote_a;
    psi_params_t       par;
    logic [PTR_W-1:0]  ptr;
  } upper_ind_t;

  // ------------------------------------------------- connection processor map
  // What one action leaf of the state transition machine does: the control
  // signals it sends to flags, counters and timers and the message it queues.
  typedef struct packed {
    logic [CP_NFLAGS-1:0] flag_set;
    logic [CP_NFLAGS-1:0] flag_clr;
    logic [CP_NCTRS-1:0]  ctr_load;   // load from the event's N(R)
    logic [CP_NCTRS-1:0]  ctr_inc;
    logic [CP_NTMRS-1:0]  tmr_start;
    logic [CP_NTMRS-1:0]  tmr_stop;
    psi_msg_e             msg;
  } cp_action_t;

  typedef cp_action_t [CP_NACTS-1:0] cp_action_map_t;

  // Remote-busy path: e = Rb=1 & Snd=0 & load(Is_Ct) & IH_Rb ; f = Rb=0 & IH_Rb_Off
  localparam cp_action_t ACTION_RB_ON = '{
    flag_set: CP_NFLAGS'(1 << FLAG_RB), flag_clr: CP_NFLAGS'(1 << FLAG_SND),
    ctr_load: CP_NCTRS'(1 << CTR_IS),   ctr_inc: '0,
    tmr_start: '0, tmr_stop: '0, msg: MSG_IH_RB};
  localparam cp_action_t ACTION_RB_OFF = '{
    flag_set: '0, flag_clr: CP_NFLAGS'(1 << FLAG_RB),
    ctr_load: '0, ctr_inc: '0,
    tmr_start: '0, tmr_stop: '0, msg: MSG_IH_RB_OFF};
  localparam cp_action_map_t RBUSY_ACTION_MAP = {ACTION_RB_OFF, ACTION_RB_ON};

  // Flag values after reset: not busy, sending allowed.
  localparam logic [CP_NFLAGS-1:0] FLAG_RESET = CP_NFLAGS'(1 << FLAG_SND);

endpackage
