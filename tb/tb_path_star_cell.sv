// tb_path_star_cell: exhaustive check of the "*" path cell.
// The token from above or from the body must be offered to the body again
// and passed up to the parent.
module tb_path_star_cell;
  int checks = 0, failures = 0;
  logic offer, done_body, offer_body, done;

  path_star_cell dut (.offer_i(offer), .offer_body_o(offer_body), .done_body_i(done_body),
                      .done_o(done));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {offer, done_body} = 2'(v);
      #1;
      checks++;
      if (offer_body !== (offer || done_body) || done !== (offer || done_body)) begin
        failures++;
        $display("FAIL v=%0d: offer_body=%b done=%b", v, offer_body, done);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
