// cp_flags: the flag bank of a connection processor.
//
// Part of the connection's state that the document keeps in "active memory"
// inside each dedicated connection processor instead of in a context store.
// Each flag is a register that the state transition machine sets or clears
// through its control strobes; the flags are read by the connection
// processor's combinational logic and brought out for observation. If a flag
// is set and cleared in the same cycle, the set wins (this design's choice).
//
// Interface: set_i/clr_i are per-flag strobes, applied at the rising clock
// edge; flags_o is the registered value. RESET gives the value after reset.
module cp_flags #(
  parameter int              N     = 2,
  parameter logic [N-1:0]    RESET = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] set_i,
  input  logic [N-1:0] clr_i,
  output logic [N-1:0] flags_o
);
  logic [N-1:0] flags_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) flags_q <= RESET;
    else        flags_q <= (flags_q & ~clr_i) | set_i;
  end

  assign flags_o = flags_q;
endmodule
