// tb_decision_logic: walks all 16 input combinations through the decision
// rules (no check -> no error; identical -> no error; several bits differ
// -> error; one bit differs -> error unless it is a one-code step).
module tb_decision_logic;
  int checks = 0, failures = 0;
  logic chk, same, one, dst, err;

  decision_logic dut (
    .check_i(chk), .same_i(same), .one_diff_i(one), .dist_one_i(dst), .err_o(err)
  );

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    for (int v = 0; v < 16; v++) begin
      {chk, same, one, dst} = 4'(v);
      #1;
      if (!chk)      exp = 1'b0;
      else if (same) exp = 1'b0;
      else if (!one) exp = 1'b1;
      else           exp = !dst;
      checks++;
      if (err !== exp) begin
        failures++;
        $display("FAIL chk=%b A=%b B=%b C=%b err=%b", chk, same, one, dst, err);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
