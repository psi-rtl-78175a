// tb_cp_counters_regs: random load/increment/clear strobes and event
// parameters against a model of the counters and the parameter registers.
module tb_cp_counters_regs;
  import psi_pkg::*;
  localparam int N = 2, W = 7;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] load, inc, clr;
  logic ev_valid;
  psi_params_t par, par_q, m_par;
  logic [PTR_W-1:0] ptr, ptr_q, m_ptr;
  logic [N-1:0][W-1:0] ctr, m_ctr;

  cp_counters_regs #(.N(N), .W(W)) dut (.clk, .rst_n, .load_i(load), .inc_i(inc), .clr_i(clr),
    .ev_valid_i(ev_valid), .par_i(par), .ptr_i(ptr), .ctr_o(ctr), .par_o(par_q), .ptr_o(ptr_q));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = '0; inc = '0; clr = '0; ev_valid = 0; par = '0; ptr = '0;
    m_ctr = '0; m_par = '0; m_ptr = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      load = N'($urandom_range(0, 3) == 0 ? $urandom : 0);
      inc  = N'($urandom);
      clr  = N'($urandom_range(0, 7) == 0 ? $urandom : 0);
      ev_valid = $urandom_range(0, 1);
      par = psi_params_t'($urandom);
      ptr = PTR_W'($urandom);
      @(posedge clk);
      for (int i = 0; i < N; i++) begin
        if (clr[i]) m_ctr[i] = '0;
        else if (load[i]) m_ctr[i] = par.nr;
        else if (inc[i]) m_ctr[i] = W'(m_ctr[i] + 1);
      end
      if (ev_valid) begin m_par = par; m_ptr = ptr; end
      @(negedge clk);
      checks++;
      if (ctr !== m_ctr || par_q !== m_par || ptr_q !== m_ptr) begin
        failures++;
        $display("FAIL n=%0d ctr=%h model=%h", n, ctr, m_ctr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
