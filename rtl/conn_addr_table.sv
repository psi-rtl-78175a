// conn_addr_table: per-connection address store of the output processor.
//
// Connection processors only know their connection number; the frame they
// send needs the local and remote LLC addresses. The output processor looks
// them up here, indexed directly by connection number (dense, unlike the
// header processor's reverse mapping, which needs a CAM).
//
// Interface: wr_i writes entry wr_idx_i at the clock edge; the read of
// rd_idx_i is combinational. An index of N or above reads zero and is not
// written. Entries are zero after reset.
module conn_addr_table
  import psi_pkg::*;
#(
  parameter int N     = 8,
  parameter int IDX_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_i,
  input  logic [IDX_W-1:0] wr_idx_i,
  input  llc_addr_t        wr_local_i,
  input  llc_addr_t        wr_remote_i,
  input  logic [IDX_W-1:0] rd_idx_i,
  output llc_addr_t        rd_local_o,
  output llc_addr_t        rd_remote_o
);
  llc_addr_t local_q  [N];
  llc_addr_t remote_q [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) begin
        local_q[i]  <= '0;
        remote_q[i] <= '0;
      end
    end else begin
      for (int i = 0; i < N; i++) begin
        if (wr_i && wr_idx_i == IDX_W'(i)) begin
          local_q[i]  <= wr_local_i;
          remote_q[i] <= wr_remote_i;
        end
      end
    end
  end

  always_comb begin
    rd_local_o  = '0;
    rd_remote_o = '0;
    for (int i = 0; i < N; i++) begin
      if (rd_idx_i == IDX_W'(i)) begin
        rd_local_o  = local_q[i];
        rd_remote_o = remote_q[i];
      end
    end
  end
endmodule
