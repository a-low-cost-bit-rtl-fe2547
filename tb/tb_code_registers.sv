// tb_code_registers: random codes and a random load enable; the two stages
// must hold the last and the second-to-last loaded codes, and valid must
// rise with the second load after reset.
module tb_code_registers;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst = 1'b1;
  logic en, valid;
  logic [4:0] code, cur, prev;

  code_registers dut (
    .clk, .rst, .sample_en_i(en), .code_i(code),
    .cur_o(cur), .prev_o(prev), .valid_o(valid)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] m_cur, m_prev;
    int loads;
    en = 1'b0;
    code = '0;
    @(negedge clk);
    rst = 1'b0;
    m_cur = '0;
    m_prev = '0;
    loads = 0;
    for (int c = 0; c < 1000; c++) begin
      en   = ($urandom_range(0, 2) == 0);
      code = 5'($urandom);
      @(posedge clk);
      if (en) begin
        m_prev = m_cur;
        m_cur  = code;
        loads++;
      end
      @(negedge clk);
      checks += 3;
      if (cur !== m_cur)   begin failures++; $display("FAIL cur %b vs %b", cur, m_cur); end
      if (prev !== m_prev) begin failures++; $display("FAIL prev %b vs %b", prev, m_prev); end
      if (valid !== (loads >= 2)) begin failures++; $display("FAIL valid after %0d loads", loads); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
