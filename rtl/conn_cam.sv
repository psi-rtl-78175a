// conn_cam: content addressable memory from frame addresses to connection number.
//
// A direct look-up table indexed by the address pair would be far too sparse,
// and hashing too slow, so the connection number is found by comparing the
// key against every stored entry at once. Entry i holds the key of
// connection i; a match on entry i returns i. The key is the remote LLC
// address (source MAC and SAP) and the local one (destination MAC and SAP).
//
// Interface: wr_i writes key wr_key_i (wr_valid_i=0 frees the entry) into
// entry wr_idx_i at the clock edge. The lookup is combinational: hit_o and
// idx_o (lowest matching entry) answer key_i in the same cycle. All entries
// are empty after reset.
module conn_cam #(
  parameter int N     = 8,
  parameter int KEY_W = 112,
  parameter int IDX_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_i,
  input  logic [IDX_W-1:0] wr_idx_i,
  input  logic [KEY_W-1:0] wr_key_i,
  input  logic             wr_valid_i,
  input  logic [KEY_W-1:0] key_i,
  output logic             hit_o,
  output logic [IDX_W-1:0] idx_o
);
  logic [KEY_W-1:0] key_q [N];
  logic [N-1:0]     valid_q;
  logic [N-1:0]     match;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_q <= '0;
    else for (int i = 0; i < N; i++) if (wr_i && wr_idx_i == IDX_W'(i)) valid_q[i] <= wr_valid_i;
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < N; i++) if (wr_i && wr_idx_i == IDX_W'(i)) key_q[i] <= wr_key_i;
  end

  always_comb begin
    for (int i = 0; i < N; i++) match[i] = valid_q[i] && (key_q[i] == key_i);
    hit_o = |match;
    idx_o = '0;
    for (int i = N - 1; i >= 0; i--) if (match[i]) idx_o = IDX_W'(i);
  end
endmodule
