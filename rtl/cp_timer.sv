// cp_timer: one dedicated protocol timer of a connection processor.
//
// Every connection processor owns its timers, so no shared timer bank has to
// be searched or updated in memory. start_i loads period_i and starts the
// count (restarting a running timer); each tick_i while running counts down by
// one; the tick that takes the count to zero stops the timer and raises
// pending_o, the time-out event, which stays up until the combinational logic
// takes it (ack_i). stop_i cancels the timer and any pending time-out. start
// wins over stop and over the expiry in the same cycle.
//
// Interface: tick_i is a shared time base strobe (its rate is the system's
// choice); all outputs are registered. A period of 0 expires on the first tick.
module cp_timer #(
  parameter int W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         tick_i,
  input  logic         start_i,
  input  logic         stop_i,
  input  logic [W-1:0] period_i,
  input  logic         ack_i,
  output logic         running_o,
  output logic         pending_o,
  output logic [W-1:0] count_o
);
  logic [W-1:0] cnt_q;
  logic         run_q, pend_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q  <= '0;
      run_q  <= 1'b0;
      pend_q <= 1'b0;
    end else if (start_i) begin
      cnt_q  <= period_i;
      run_q  <= 1'b1;
      pend_q <= 1'b0;
    end else if (stop_i) begin
      run_q  <= 1'b0;
      pend_q <= 1'b0;
    end else begin
      if (ack_i) pend_q <= 1'b0;
      if (run_q && tick_i) begin
        if (cnt_q <= W'(1)) begin
          cnt_q  <= '0;
          run_q  <= 1'b0;
          pend_q <= 1'b1;
        end else begin
          cnt_q <= cnt_q - 1'b1;
        end
      end
    end
  end

  assign running_o = run_q;
  assign pending_o = pend_q;
  assign count_o   = cnt_q;
endmodule
