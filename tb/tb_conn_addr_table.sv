// tb_conn_addr_table: random writes and reads against an array model,
// including out-of-range indexes, which must read zero and not write.
module tb_conn_addr_table;
  import psi_pkg::*;
  localparam int N = 6, IDX_W = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic wr;
  logic [IDX_W-1:0] wr_idx, rd_idx;
  llc_addr_t wl, wrm, rl, rr;
  llc_addr_t ml [N], mr [N];

  conn_addr_table #(.N(N), .IDX_W(IDX_W)) dut (.clk, .rst_n, .wr_i(wr), .wr_idx_i(wr_idx),
    .wr_local_i(wl), .wr_remote_i(wrm), .rd_idx_i(rd_idx), .rd_local_o(rl), .rd_remote_o(rr));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr = 0; wr_idx = '0; rd_idx = '0; wl = '0; wrm = '0;
    for (int i = 0; i < N; i++) begin ml[i] = '0; mr[i] = '0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      wr = $urandom_range(0, 1);
      wr_idx = IDX_W'($urandom_range(0, N + 1));
      wl = {$urandom, $urandom};
      wrm = {$urandom, $urandom};
      rd_idx = IDX_W'($urandom_range(0, N + 1));
      #1;
      checks++;
      if (int'(rd_idx) < N ? (rl !== ml[rd_idx] || rr !== mr[rd_idx]) : (rl !== '0 || rr !== '0)) begin
        failures++;
        $display("FAIL n=%0d idx=%0d", n, rd_idx);
      end
      @(posedge clk);
      if (wr && int'(wr_idx) < N) begin ml[wr_idx] = wl; mr[wr_idx] = wrm; end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
