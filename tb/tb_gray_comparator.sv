// tb_gray_comparator: checks the adder-free code-distance test on every pair
// of 5-bit Gray codes. The reference converts both codes back to binary and
// takes the absolute difference: a pair is an error exactly when that
// difference exceeds one. Parts A and B are checked on their own, and the
// verification codes of a 3-bit copy are compared with the 3-bit table
// (Gray 000..100 in binary order -> 001 011 011 101 101 011 011 001).
module tb_gray_comparator;
  int checks = 0, failures = 0;

  logic [4:0] cur, prev, verif;
  logic       same, one_diff, dist_one;
  logic [2:0] cur3, prev3, verif3;
  logic       s3, o3, d3;
  logic [2:0] vtab [8];

  gray_comparator dut (
    .cur_i(cur), .prev_i(prev), .same_o(same), .one_diff_o(one_diff),
    .dist_one_o(dist_one), .verif_o(verif)
  );
  gray_comparator #(.N(3)) dut3 (
    .cur_i(cur3), .prev_i(prev3), .same_o(s3), .one_diff_o(o3),
    .dist_one_o(d3), .verif_o(verif3)
  );

  function automatic int gray2bin(input logic [4:0] g);
    int b = 0;
    logic acc = 1'b0;
    for (int k = 4; k >= 0; k--) begin
      acc = acc ^ g[k];
      b = b | (int'(acc) << k);
    end
    return b;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int  bc, bp, dst, ones;
    logic err_ref, err_dut;
    for (int i = 0; i < 32; i++) begin
      for (int j = 0; j < 32; j++) begin
        cur  = 5'(i);
        prev = 5'(j);
        #1;
        bc = gray2bin(cur);
        bp = gray2bin(prev);
        dst = (bc > bp) ? bc - bp : bp - bc;
        ones = $countones(cur ^ prev);
        err_ref = (dst > 1);
        err_dut = ~same & (~one_diff | ~dist_one);
        checks += 3;
        if (same !== (i == j)) begin
          failures++;
          $display("FAIL part A %b %b", cur, prev);
        end
        if (one_diff !== (ones == 1)) begin
          failures++;
          $display("FAIL part B %b %b", cur, prev);
        end
        if (err_dut !== err_ref) begin
          failures++;
          $display("FAIL decision %b %b dst %0d", cur, prev, dst);
        end
      end
    end
    vtab = '{3'b001, 3'b011, 3'b011, 3'b101, 3'b101, 3'b011, 3'b011, 3'b001};
    for (int i = 0; i < 8; i++) begin
      cur3  = 3'(i ^ (i >> 1));
      prev3 = cur3;
      #1;
      checks++;
      if (verif3 !== vtab[i]) begin
        failures++;
        $display("FAIL verification code of %b: %b expected %b", cur3, verif3, vtab[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
