// tb_conn_cam: fills the CAM with random keys, then looks up stored keys,
// random keys and the keys of freed entries (which must miss), comparing against an array model.
module tb_conn_cam;
  localparam int N = 8, KEY_W = 112, IDX_W = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic wr, wr_valid, hit;
  logic [IDX_W-1:0] wr_idx, idx;
  logic [KEY_W-1:0] wr_key, key;
  logic [KEY_W-1:0] m_key [N];
  logic m_valid [N];
  logic m_written [N];
  int n_hit = 0, n_miss = 0;

  conn_cam #(.N(N), .KEY_W(KEY_W), .IDX_W(IDX_W)) dut (.clk, .rst_n, .wr_i(wr),
    .wr_idx_i(wr_idx), .wr_key_i(wr_key), .wr_valid_i(wr_valid), .key_i(key), .hit_o(hit),
    .idx_o(idx));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [KEY_W-1:0] rkey();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    int e;
    wr = 0; wr_valid = 0; wr_idx = '0; wr_key = '0; key = '0;
    for (int i = 0; i < N; i++) begin m_valid[i] = 0; m_written[i] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    key = rkey();
    #1;
    checks++;
    if (hit) begin failures++; $display("FAIL hit after reset"); end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      wr = ($urandom_range(0, 3) == 0);
      wr_idx = IDX_W'($urandom_range(0, N - 1));
      wr_valid = ($urandom_range(0, 4) != 0);
      wr_key = rkey();
      e = $urandom_range(0, N - 1);
      key = (m_written[e] && $urandom_range(0, 3) != 0) ? m_key[e] : rkey();   // includes freed entries
      #1;
      begin
        int exp_idx;
        exp_idx = -1;
        for (int i = N - 1; i >= 0; i--) if (m_valid[i] && m_key[i] == key) exp_idx = i;
        checks++;
        if (hit !== (exp_idx >= 0) || (exp_idx >= 0 && idx !== IDX_W'(exp_idx))) begin
          failures++;
          $display("FAIL n=%0d hit=%b idx=%0d exp=%0d", n, hit, idx, exp_idx);
        end
        if (exp_idx >= 0) n_hit++; else n_miss++;
      end
      @(posedge clk);
      if (wr) begin m_valid[wr_idx] = wr_valid; m_key[wr_idx] = wr_key; m_written[wr_idx] = 1; end
    end
    checks++;
    if (n_hit == 0 || n_miss == 0) failures++;
    $display("hits=%0d misses=%0d", n_hit, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
