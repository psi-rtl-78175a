// tb_cp_output_unit: the output queue against a queue model.
// Random pushes (only when not full) and random grants (only when
// requesting); the head word, its connection number and the full flag are
// compared with the model every cycle, and the queue must fill at least once.
module tb_cp_output_unit;
  import psi_pkg::*;
  localparam logic [CONN_W-1:0] ID = 8'd5;
  localparam int DEPTH = 2;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic push, full, req, gnt;
  psi_msg_e msg;
  psi_params_t par;
  logic [PTR_W-1:0] ptr;
  op_msg_t head;
  op_msg_t q[$];
  int n_full = 0, n_pop = 0;

  cp_output_unit #(.CONN_ID(ID), .DEPTH(DEPTH)) dut (.clk, .rst_n, .push_i(push), .msg_i(msg),
    .par_i(par), .ptr_i(ptr), .full_o(full), .req_o(req), .msg_o(head), .gnt_i(gnt));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    op_msg_t w;
    push = 0; gnt = 0; msg = MSG_NONE; par = '0; ptr = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      checks++;
      if (req !== (q.size() != 0) || full !== (q.size() == DEPTH) ||
          (q.size() != 0 && head !== q[0])) begin
        failures++;
        $display("FAIL n=%0d req=%b full=%b size=%0d", n, req, full, q.size());
      end
      if (full) n_full++;
      push = !full && ($urandom_range(0, 2) != 0);
      gnt  = req && ($urandom_range(0, 1) == 1);
      msg  = psi_msg_e'($urandom_range(1, 9));
      par  = psi_params_t'($urandom);
      ptr  = PTR_W'($urandom);
      w = '0;
      w.msg = msg; w.conn = ID; w.direct = 1'b0; w.par = par; w.ptr = ptr;
      @(posedge clk);
      if (gnt) begin void'(q.pop_front()); n_pop++; end
      if (push) q.push_back(w);
      @(negedge clk);
    end
    checks++;
    if (n_full == 0 || n_pop == 0) failures++;
    $display("full cycles=%0d pops=%0d", n_full, n_pop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
