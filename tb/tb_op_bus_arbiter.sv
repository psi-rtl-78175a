// tb_op_bus_arbiter: random requests and ready; checks that the grant is
// one-hot, goes only to a requester, carries that requester's word, follows
// round-robin order after the last grant, and that a requester that keeps
// requesting is served within N grants.
module tb_op_bus_arbiter;
  import psi_pkg::*;
  localparam int N = 5;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, gnt;
  op_msg_t [N-1:0] msgs;
  op_msg_t bus;
  logic valid, ready;
  logic [$clog2(N+1)-1:0] src;
  int last, wait_n [N];
  int n_grants = 0;
  logic [N-1:0] got = '0;   // granted at the last clock edge

  op_bus_arbiter #(.N(N)) dut (.clk, .rst_n, .req_i(req), .msg_i(msgs), .valid_o(valid),
    .msg_o(bus), .src_o(src), .ready_i(ready), .gnt_o(gnt));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    req = '0; ready = 0; msgs = '0; last = N - 1;
    for (int i = 0; i < N; i++) wait_n[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      for (int i = 0; i < N; i++) begin
        msgs[i] = '0;
        msgs[i].conn = CONN_W'(i);
        msgs[i].ptr = PTR_W'($urandom);
        // keep a waiting requester requesting
        if (!req[i] || got[i]) req[i] = ($urandom_range(0, 2) == 0);
        if (!req[i]) wait_n[i] = 0;
      end
      ready = ($urandom_range(0, 3) != 0);
      #1;
      exp = -1;
      for (int k = 1; k <= N && exp < 0; k++) if (req[(last + k) % N]) exp = (last + k) % N;
      checks++;
      if (valid !== (req != 0) || (exp >= 0 && (int'(src) != exp || bus !== msgs[exp])) ||
          gnt !== ((exp >= 0 && ready) ? N'(1 << exp) : N'(0))) begin
        failures++;
        $display("FAIL n=%0d req=%b gnt=%b src=%0d exp=%0d", n, req, gnt, src, exp);
      end
      for (int i = 0; i < N; i++) begin
        if (req[i] && !gnt[i] && ready && valid) wait_n[i]++;
        if (gnt[i]) wait_n[i] = 0;
        checks++;
        if (wait_n[i] >= N) begin failures++; $display("FAIL starvation of %0d", i); end
      end
      @(posedge clk);
      got = gnt;
      if (exp >= 0 && ready) begin last = exp; n_grants++; end
      @(negedge clk);
    end
    $display("grants=%0d", n_grants);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
