// tb_rbusy_path: the remote-busy path machine against its state diagram.
// A reference model with the two resting states of the diagram (NOT_BUSY and
// BUSY) is driven with the same random stream of RR, REJ, I, RNR and other
// events, one per cycle. In NOT_BUSY, RR/REJ/I are accepted silently and RNR
// runs action e and enters BUSY; in BUSY, RNR is accepted silently and
// RR/REJ/I run action f and return to NOT_BUSY. Anything else is ignored.
// The test checks acceptance, both action strobes and the armed leaves, and
// counts that every transition happened.
module tb_rbusy_path;
  import psi_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic ev_valid, ready, accepted;
  psi_event_e ev;
  logic [CP_NACTS-1:0] act;
  logic [7:0] armed;
  logic busy;
  int n_e = 0, n_f = 0, n_loop0 = 0, n_loop2 = 0, n_ign = 0;

  rbusy_path dut (.clk, .rst_n, .ev_valid_i(ev_valid), .ev_code_i(ev), .ready_o(ready),
                  .accepted_o(accepted), .act_o(act), .armed_o(armed));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL %s @%0t", what, $time);
    end
  endtask

  initial begin
    logic exp_acc, exp_e, exp_f, is_abc;
    ev_valid = 0; ev = EV_NONE; busy = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    #1;
    chk(!ready, "not ready in the start cycle");
    @(negedge clk);
    chk(ready, "ready one cycle after start");
    chk(armed == 8'b0000_1111, "initial armed leaves a1 b1 c1 d4");
    for (int n = 0; n < 5000; n++) begin
      ev_valid = ($urandom_range(0, 7) != 0);
      ev = psi_event_e'($urandom_range(0, 12));
      #1;
      is_abc  = ev_valid && (ev == EV_RR || ev == EV_REJ || ev == EV_I_LPDU);
      exp_acc = is_abc || (ev_valid && ev == EV_RNR);
      exp_e   = !busy && ev_valid && ev == EV_RNR;
      exp_f   = busy && is_abc;
      chk(accepted == exp_acc, "accepted");
      chk(act[ACT_RB_ON] == exp_e, "action e");
      chk(act[ACT_RB_OFF] == exp_f, "action f");
      chk(armed == (busy ? 8'b1111_0000 : 8'b0000_1111), "armed leaves");
      if (exp_e) n_e++;
      if (exp_f) n_f++;
      if (!busy && is_abc) n_loop0++;
      if (busy && ev_valid && ev == EV_RNR) n_loop2++;
      if (!exp_acc) n_ign++;
      @(posedge clk);
      if (exp_e) busy = 1;
      else if (exp_f) busy = 0;
      @(negedge clk);
    end
    $display("e=%0d f=%0d (a+b+c)*=%0d d*=%0d ignored=%0d", n_e, n_f, n_loop0, n_loop2, n_ign);
    chk(n_e > 0 && n_f > 0 && n_loop0 > 0 && n_loop2 > 0 && n_ign > 0, "all transitions seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
