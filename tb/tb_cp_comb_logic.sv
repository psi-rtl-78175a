// tb_cp_comb_logic: random test of the event selection.
// The bus event must win when present; otherwise the lowest pending timer is
// presented as EV_TIMER with its index in N(S) and acknowledged; nothing
// passes while disabled.
module tb_cp_comb_logic;
  import psi_pkg::*;
  localparam int NT = 3;
  int checks = 0, failures = 0;
  logic enable, ext_valid, ev_valid;
  psi_event_e ext_ev, ev;
  psi_params_t ext_par, par_last, par;
  logic [PTR_W-1:0] ext_ptr, ptr_last, ptr;
  logic [NT-1:0] pend, ack;
  int n_ext = 0, n_tmr = 0;

  cp_comb_logic #(.NT(NT)) dut (.enable_i(enable), .ext_valid_i(ext_valid), .ext_ev_i(ext_ev),
    .ext_par_i(ext_par), .ext_ptr_i(ext_ptr), .tmr_pending_i(pend), .par_last_i(par_last),
    .ptr_last_i(ptr_last), .ev_valid_o(ev_valid), .ev_o(ev), .par_o(par), .ptr_o(ptr),
    .ack_o(ack));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ok;
    int lo;
    for (int n = 0; n < 2000; n++) begin
      enable    = ($urandom_range(0, 5) != 0);
      ext_valid = $urandom_range(0, 1);
      ext_ev    = psi_event_e'($urandom_range(1, 11));
      ext_par   = psi_params_t'($urandom);
      ext_ptr   = PTR_W'($urandom);
      par_last  = psi_params_t'($urandom);
      ptr_last  = PTR_W'($urandom);
      pend      = NT'($urandom);
      #1;
      lo = -1;
      for (int i = NT - 1; i >= 0; i--) if (pend[i]) lo = i;
      if (!enable)
        ok = !ev_valid && ack == 0;
      else if (ext_valid)
        ok = ev_valid && ev == ext_ev && par == ext_par && ptr == ext_ptr && ack == 0;
      else if (lo >= 0)
        ok = ev_valid && ev == EV_TIMER && ack == NT'(1 << lo) && ptr == ptr_last &&
             par.ns == SEQ_W'(lo) && par.nr == par_last.nr && par.cr == par_last.cr;
      else
        ok = !ev_valid && ack == 0;
      if (enable && ext_valid) n_ext++;
      if (enable && !ext_valid && lo >= 0) n_tmr++;
      checks++;
      if (!ok) begin
        failures++;
        $display("FAIL n=%0d en=%b ext=%b pend=%b -> v=%b ev=%0d ack=%b", n, enable, ext_valid,
                 pend, ev_valid, ev, ack);
      end
    end
    checks++;
    if (n_ext == 0 || n_tmr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
