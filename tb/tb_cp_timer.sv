// tb_cp_timer: directed test of a dedicated timer.
// A timer started with period P must raise its time-out exactly on the P-th
// tick and not before, hold it until acknowledged, restart on a new start,
// and drop everything on stop. Ticks arrive every third cycle.
module tb_cp_timer;
  localparam int W = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic tick, start, stop, ack, running, pending;
  logic [W-1:0] period, count;
  int ticks_seen;

  cp_timer #(.W(W)) dut (.clk, .rst_n, .tick_i(tick), .start_i(start), .stop_i(stop),
    .period_i(period), .ack_i(ack), .running_o(running), .pending_o(pending), .count_o(count));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  // Run from start until time-out; count ticks taken.
  task automatic run_to_timeout(input int p);
    period = W'(p);
    start = 1;
    @(negedge clk);
    start = 0;
    chk(running && !pending && count == W'(p), "started");
    ticks_seen = 0;
    for (int c = 0; c < 10 * p + 10 && !pending; c++) begin
      tick = (c % 3 == 2);
      @(posedge clk);
      if (tick && running) ticks_seen++;
      @(negedge clk);
      tick = 0;
      if (!pending) chk(running, "running until time-out");
    end
    chk(pending && !running, "timed out");
    chk(ticks_seen == p, $sformatf("time-out after %0d ticks (saw %0d)", p, ticks_seen));
  endtask

  initial begin
    tick = 0; start = 0; stop = 0; ack = 0; period = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    chk(!running && !pending, "idle after reset");
    for (int p = 1; p <= 20; p++) begin
      run_to_timeout(p);
      repeat (3) @(negedge clk);
      chk(pending, "time-out held until acknowledged");
      ack = 1;
      @(negedge clk);
      ack = 0;
      chk(!pending, "acknowledged");
    end
    // stop cancels a running timer and its time-out
    period = 8'd5; start = 1; @(negedge clk); start = 0;
    tick = 1; repeat (2) @(negedge clk); tick = 0;
    stop = 1; @(negedge clk); stop = 0;
    chk(!running && !pending, "stopped");
    tick = 1; repeat (10) @(negedge clk); tick = 0;
    chk(!pending, "no time-out after stop");
    // restart while running begins a fresh period
    run_to_timeout(4);
    stop = 1; @(negedge clk); stop = 0;
    chk(!pending, "stop clears a pending time-out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
