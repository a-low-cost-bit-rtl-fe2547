// tb_clock_divider: for every division select 0..5 the enable must come in
// the first cycle after reset and then exactly every 2**min(sel, 4) cycles.
module tb_clock_divider;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst = 1'b1;
  logic [2:0] sel;
  logic en;

  clock_divider dut (.clk, .rst, .div_sel_i(sel), .sample_en_o(en));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d, pulses;
    for (int s = 0; s <= 5; s++) begin
      sel = 3'(s);
      d = 1 << ((s > 4) ? 4 : s);
      rst = 1'b1;
      @(negedge clk);
      @(negedge clk);
      rst = 1'b0;
      pulses = 0;
      for (int c = 0; c < 64; c++) begin
        checks++;
        if (en !== (c % d == 0)) begin
          failures++;
          $display("FAIL sel=%0d cycle %0d en=%b", s, c, en);
        end
        pulses += int'(en);
        @(negedge clk);
      end
      checks++;
      if (pulses != 64 / d) begin
        failures++;
        $display("FAIL sel=%0d %0d pulses in 64 cycles", s, pulses);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
