// tb_cp_flags: random set/clear strobes against a register model.
// Checks the reset value and that set wins over clear.
module tb_cp_flags;
  localparam int N = 4;
  localparam logic [N-1:0] RST = 4'b1010;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] set, clr, flags, model;

  cp_flags #(.N(N), .RESET(RST)) dut (.clk, .rst_n, .set_i(set), .clr_i(clr), .flags_o(flags));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    set = '0; clr = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    model = RST;
    checks++;
    if (flags !== RST) begin failures++; $display("FAIL reset value %b", flags); end
    for (int n = 0; n < 1000; n++) begin
      set = N'($urandom);
      clr = N'($urandom);
      @(posedge clk);
      model = (model & ~clr) | set;
      @(negedge clk);
      checks++;
      if (flags !== model) begin
        failures++;
        $display("FAIL n=%0d flags=%b model=%b", n, flags, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
