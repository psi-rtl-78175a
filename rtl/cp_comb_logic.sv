// cp_comb_logic: event selection in front of the state transition machine.
//
// The connection processor's state transition machine takes one event per
// cycle. This logic decides which: an event written by the header processor
// over the bus (ext_valid_i) always goes first; otherwise the lowest-numbered
// timer with a pending time-out is presented as EV_TIMER and acknowledged
// (ack_o) so that the timer drops it. Nothing is presented while enable_i is
// low (the connection processor cannot take an event). The pointer and
// parameters of a bus event pass with it; a time-out carries the parameters
// of the last accepted event (par_last_i), with N(S) holding the timer index.
// The priority order is this design's choice.
//
// Purely combinational.
module cp_comb_logic
  import psi_pkg::*;
#(
  parameter int NT = 3
) (
  input  logic              enable_i,
  input  logic              ext_valid_i,
  input  psi_event_e        ext_ev_i,
  input  psi_params_t       ext_par_i,
  input  logic [PTR_W-1:0]  ext_ptr_i,
  input  logic [NT-1:0]     tmr_pending_i,
  input  psi_params_t       par_last_i,
  input  logic [PTR_W-1:0]  ptr_last_i,
  output logic              ev_valid_o,
  output psi_event_e        ev_o,
  output psi_params_t       par_o,
  output logic [PTR_W-1:0]  ptr_o,
  output logic [NT-1:0]     ack_o
);
  always_comb begin
    ev_valid_o = 1'b0;
    ev_o       = EV_NONE;
    par_o      = ext_par_i;
    ptr_o      = ext_ptr_i;
    ack_o      = '0;
    if (enable_i) begin
      if (ext_valid_i) begin
        ev_valid_o = 1'b1;
        ev_o       = ext_ev_i;
      end else begin
        for (int i = NT - 1; i >= 0; i--) begin
          if (tmr_pending_i[i]) begin
            ack_o  = NT'(1) << i;
            par_o  = par_last_i;
            par_o.ns = SEQ_W'(i);
            ptr_o  = ptr_last_i;
          end
        end
        if (|tmr_pending_i) begin
          ev_valid_o = 1'b1;
          ev_o       = EV_TIMER;
        end
      end
    end
  end
endmodule
