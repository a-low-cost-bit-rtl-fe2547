// tb_flash_encoder: every clean thermometer level 0..31 must give the Gray
// code of the level one clock later; thermometer codes with a bubble must
// give the OR of the Gray codes of every level where the column steps from
// one to zero (worked out here by scanning the column).
module tb_flash_encoder;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst = 1'b1;
  logic [30:0] therm;
  logic [4:0] gray;

  flash_encoder dut (.clk, .rst, .therm_i(therm), .gray_o(gray));

  always #5 clk = ~clk;

  function automatic logic [4:0] expect_code(input logic [30:0] t);
    logic [4:0] g = '0;
    logic above;
    for (int lvl = 1; lvl <= 31; lvl++) begin
      above = (lvl == 31) ? 1'b0 : t[lvl];
      if (t[lvl-1] && !above) g = g | 5'(lvl ^ (lvl >> 1));
    end
    return g;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] e;
    therm = '0;
    @(negedge clk);
    rst = 1'b0;
    for (int lvl = 0; lvl <= 31; lvl++) begin
      therm = 31'((64'd1 << lvl) - 1);
      @(negedge clk);
      checks++;
      if (gray !== 5'(lvl ^ (lvl >> 1))) begin
        failures++;
        $display("FAIL level %0d gray %b", lvl, gray);
      end
    end
    for (int i = 0; i < 300; i++) begin
      int lvl = $urandom_range(2, 31);
      therm = 31'((64'd1 << lvl) - 1);
      therm[$urandom_range(0, lvl - 2)] = 1'b0;
      e = expect_code(therm);
      @(negedge clk);
      checks++;
      if (gray !== e) begin
        failures++;
        $display("FAIL bubble %b gray %b expected %b", therm, gray, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
