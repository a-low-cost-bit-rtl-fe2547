// tb_binary_to_gray: checks the binary-to-Gray converter exhaustively at the
// default width (5 bits) against b ^ (b >> 1), and a 3-bit copy against the
// 3-bit binary/Gray table (0..7 -> 000 001 011 010 110 111 101 100).
module tb_binary_to_gray;
  int checks = 0, failures = 0;

  logic [4:0] b5, g5;
  logic [2:0] b3, g3;
  logic [2:0] table3 [8];

  binary_to_gray dut5 (.bin_i(b5), .gray_o(g5));
  binary_to_gray #(.N(3)) dut3 (.bin_i(b3), .gray_o(g3));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    table3 = '{3'b000, 3'b001, 3'b011, 3'b010, 3'b110, 3'b111, 3'b101, 3'b100};
    for (int i = 0; i < 32; i++) begin
      b5 = 5'(i);
      #1;
      checks++;
      if (g5 !== 5'(i ^ (i >> 1))) begin
        failures++;
        $display("FAIL 5-bit %0d -> %b", i, g5);
      end
    end
    for (int i = 0; i < 8; i++) begin
      b3 = 3'(i);
      #1;
      checks++;
      if (g3 !== table3[i]) begin
        failures++;
        $display("FAIL 3-bit %0d -> %b expected %b", i, g3, table3[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
