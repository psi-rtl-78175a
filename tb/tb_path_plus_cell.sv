// tb_path_plus_cell: exhaustive check of the "+" path cell.
// Every input combination is applied; the token offer must reach both
// children and the parent must see a completion when either child completes.
module tb_path_plus_cell;
  int checks = 0, failures = 0;
  logic offer, done_l, done_r, offer_l, offer_r, done;

  path_plus_cell dut (.offer_i(offer), .offer_l_o(offer_l), .offer_r_o(offer_r),
                      .done_l_i(done_l), .done_r_i(done_r), .done_o(done));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {offer, done_l, done_r} = 3'(v);
      #1;
      checks++;
      if (offer_l !== offer || offer_r !== offer || done !== (done_l || done_r)) begin
        failures++;
        $display("FAIL v=%0d: offer_l=%b offer_r=%b done=%b", v, offer_l, offer_r, done);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
