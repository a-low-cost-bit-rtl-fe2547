// tb_parallel_to_serial: the serial stream must repeat every 8 cycles, start
// each frame with 1011 and then give, most significant bit first, the count
// that was on count_i in the last header cycle, even when count_i changes
// while the record is being sent.
module tb_parallel_to_serial;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst = 1'b1;
  logic [3:0] count;
  logic ser, fs;

  parallel_to_serial dut (.clk, .rst, .count_i(count), .ser_o(ser), .frame_start_o(fs));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] frame;
    logic [3:0] snap;
    int frames;
    count = '0;
    @(negedge clk);
    rst = 1'b0;
    frames = 0;
    for (int f = 0; f < 100; f++) begin
      for (int b = 0; b < 8; b++) begin
        checks++;
        if (fs !== (b == 0)) begin
          failures++;
          $display("FAIL frame %0d bit %0d frame_start=%b", f, b, fs);
        end
        frame[7-b] = ser;
        if (b == 3) snap = count;
        @(negedge clk);
        count = 4'($urandom);
      end
      checks += 2;
      if (frame[7:4] !== 4'b1011) begin
        failures++;
        $display("FAIL frame %0d header %b", f, frame[7:4]);
      end
      if (frame[3:0] !== snap) begin
        failures++;
        $display("FAIL frame %0d record %b expected %b", f, frame[3:0], snap);
      end
      frames++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
