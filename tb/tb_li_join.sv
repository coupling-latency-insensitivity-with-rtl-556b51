// tb_li_join: exhaustive check of the join controller for three inputs:
// output valid only when all inputs are valid; a valid input is stopped
// when another input is invalid or when the output is stopped; an invalid
// input is never stopped; nothing is stopped when all are valid and the
// output is free.
module tb_li_join;
  logic [2:0] in_valid, in_stop;
  logic out_valid, out_stop;
  int checks = 0, failures = 0;
  li_join #(.N(3)) dut (.*);
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int v = 0; v < 8; v++)
      for (int s = 0; s < 2; s++) begin
        in_valid = 3'(v); out_stop = s[0];
        #1;
        checks++;
        if (out_valid !== (v == 7)) begin failures++; $display("FAIL valid v=%0d", v); end
        for (int i = 0; i < 3; i++) begin
          bit exp;
          exp = in_valid[i] && (s == 1 || v != 7);
          checks++;
          if (in_stop[i] !== exp) begin failures++; $display("FAIL stop[%0d] v=%0d s=%0d", i, v, s); end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
