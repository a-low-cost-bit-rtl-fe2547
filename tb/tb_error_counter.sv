// tb_error_counter: random error pulses into the 4-bit counter. The count
// must follow the number of pulses up to 15; the sixteenth pulse must set
// the overflow flag, after which the count stays at 15 whatever comes.
module tb_error_counter;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst = 1'b1;
  logic inc, end_f;
  logic [3:0] count;

  error_counter dut (.clk, .rst, .inc_i(inc), .count_o(count), .end_o(end_f));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    inc = 1'b0;
    @(negedge clk);
    rst = 1'b0;
    n = 0;
    for (int c = 0; c < 300; c++) begin
      inc = ($urandom_range(0, 3) == 0);
      @(posedge clk);
      if (inc) n++;
      @(negedge clk);
      checks += 2;
      if (count !== 4'((n > 15) ? 15 : n)) begin
        failures++;
        $display("FAIL after %0d pulses count=%0d", n, count);
      end
      if (end_f !== (n > 15)) begin
        failures++;
        $display("FAIL after %0d pulses end=%b", n, end_f);
      end
    end
    checks++;
    if (n <= 15) begin
      failures++;
      $display("FAIL overflow never reached");
    end
    // Reset clears the record and the overflow flag.
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    checks++;
    if (count !== 4'd0 || end_f !== 1'b0) begin
      failures++;
      $display("FAIL reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
