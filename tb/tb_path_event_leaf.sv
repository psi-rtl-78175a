// tb_path_event_leaf: random test of an event leaf against a one-bit model.
// The leaf is offered the token, sees random events and random "token moved
// elsewhere" strobes; done must be armed && matching event, and the armed
// state must follow offer | (armed & ~advance).
module tb_path_event_leaf;
  import psi_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic offer, advance, ev_valid, done, armed;
  psi_event_e ev;
  logic model_armed;
  int fires = 0;

  path_event_leaf #(.EVENT(EV_RNR)) dut (.clk, .rst_n, .offer_i(offer), .advance_i(advance),
    .ev_valid_i(ev_valid), .ev_code_i(ev), .done_o(done), .armed_o(armed));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    offer = 0; advance = 0; ev_valid = 0; ev = EV_NONE; model_armed = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      offer    = ($urandom_range(0, 3) == 0);
      ev_valid = $urandom_range(0, 1);
      ev       = ($urandom_range(0, 1) == 1) ? EV_RNR : psi_event_e'($urandom_range(1, 4));
      advance  = ($urandom_range(0, 3) == 0);
      #1;
      checks++;
      if (done !== (model_armed && ev_valid && ev == EV_RNR) || armed !== model_armed) begin
        failures++;
        $display("FAIL n=%0d done=%b armed=%b model=%b", n, done, armed, model_armed);
      end
      if (done) begin
        fires++;
        advance = 1;   // as in a path: the firing leaf moves the token
      end
      @(posedge clk);
      model_armed = offer || (model_armed && !advance);
    end
    checks++;
    if (fires == 0) failures++;
    $display("fires=%0d", fires);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
