// cp_counters_regs: counters and parameter registers of a connection processor.
//
// The counters hold the connection's sequence-number state (for the 802.2
// remote-busy path, Is_Ct). Each counter can be loaded from the N(R) field of
// the event being processed, incremented modulo 2**W, or cleared, by strobes
// from the state transition machine; load has priority over increment, and
// clear over both. The registers keep the parameters and the packet pointer of
// the last event the connection processor accepted, as the document's
// "Counters & Registers" box receives the event parameters directly.
//
// Interface: strobes and ev_valid_i act at the rising clock edge; all outputs
// are registered. Loading from N(R) is this design's reading of load(Is_Ct).
module cp_counters_regs
  import psi_pkg::*;
#(
  parameter int N = 1,
  parameter int W = 7
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N-1:0]        load_i,
  input  logic [N-1:0]        inc_i,
  input  logic [N-1:0]        clr_i,
  input  logic                ev_valid_i,
  input  psi_params_t         par_i,
  input  logic [PTR_W-1:0]    ptr_i,
  output logic [N-1:0][W-1:0] ctr_o,
  output psi_params_t         par_o,
  output logic [PTR_W-1:0]    ptr_o
);
  logic [N-1:0][W-1:0] ctr_q;
  psi_params_t         par_q;
  logic [PTR_W-1:0]    ptr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctr_q <= '0;
      par_q <= '0;
      ptr_q <= '0;
    end else begin
      for (int i = 0; i < N; i++) begin
        if (clr_i[i])       ctr_q[i] <= '0;
        else if (load_i[i]) ctr_q[i] <= W'(par_i.nr);
        else if (inc_i[i])  ctr_q[i] <= ctr_q[i] + 1'b1;
      end
      if (ev_valid_i) begin
        par_q <= par_i;
        ptr_q <= ptr_i;
      end
    end
  end

  assign ctr_o = ctr_q;
  assign par_o = par_q;
  assign ptr_o = ptr_q;
endmodule
