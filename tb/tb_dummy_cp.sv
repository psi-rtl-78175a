// tb_dummy_cp: the dummy connection processor's buffer against a queue
// model with random pushes and grants; it must fill up at least once.
module tb_dummy_cp;
  import psi_pkg::*;
  localparam int DEPTH = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic valid, ready, req, gnt;
  op_msg_t din, head;
  op_msg_t q[$];
  int n_full = 0;

  dummy_cp #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .valid_i(valid), .msg_i(din), .ready_o(ready),
    .req_o(req), .msg_o(head), .gnt_i(gnt));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    valid = 0; gnt = 0; din = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      valid = ($urandom_range(0, 2) != 0);
      din = op_msg_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      gnt = req && ($urandom_range(0, 2) == 0);
      #1;
      checks++;
      if (ready !== (q.size() < DEPTH) || req !== (q.size() != 0) ||
          (q.size() != 0 && head !== q[0])) begin
        failures++;
        $display("FAIL n=%0d size=%0d ready=%b req=%b", n, q.size(), ready, req);
      end
      if (!ready) n_full++;
      @(posedge clk);
      if (gnt) void'(q.pop_front());
      if (valid && q.size() + (gnt ? 1 : 0) < DEPTH + (gnt ? 1 : 0) && ready) q.push_back(din);
      @(negedge clk);
    end
    checks++;
    if (n_full == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
