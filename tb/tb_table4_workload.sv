// tb_table4_workload: the eight measurement cases of the prototype's
// BIST-versus-logic-analyzer comparison, scaled in length. Each case feeds
// the flash ADC back end with a sine near fs/d (d = 8 for cases 1-4, d = 16
// for cases 5-8), f_in = fs/d + 0.8 * fs / (2**N * pi * d), and injects
// thermometer bubbles at sampled conversions until the reference has seen
// the case's error count (198, 35, 150, 101, 19, 93, 63, 50). 3000 sampled
// pairs are used per case instead of the measured 4.2 million samples.
//
// Two tops share the stimulus: one at the default sizes (4-bit record), one
// with an 8-bit record (header 10111011, this test's own choice). The reference
// (an independent encoder and binary code distance, as a logic analyzer plus
// post-processing would do) must agree with the 8-bit record, read from the
// serial output, while the 4-bit top must report its overflow (every case
// exceeds 15 errors) with its record frozen at 15.
module tb_table4_workload;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst = 1'b1;
  logic [2:0] sel;
  logic [30:0] therm;
  logic ser4, err4, end4, fs4;
  logic [3:0] count4;
  logic ser8, err8, end8, fs8;
  logic [7:0] count8;
  logic [4:0] g4, g8;

  adc_ber_bist_top dut4 (
    .clk, .rst, .div_sel_i(sel), .therm_i(therm), .bin_i(5'd0), .use_bin_i(1'b0),
    .adc_gray_o(g4), .ser_o(ser4), .err_o(err4), .count_o(count4), .end_o(end4),
    .frame_start_o(fs4)
  );

  adc_ber_bist_top #(.B(8), .HEADER(8'b1011_1011)) dut8 (
    .clk, .rst, .div_sel_i(sel), .therm_i(therm), .bin_i(5'd0), .use_bin_i(1'b0),
    .adc_gray_o(g8), .ser_o(ser8), .err_o(err8), .count_o(count8), .end_o(end8),
    .frame_start_o(fs8)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [4:0] to_gray(input int b);
    return 5'(b ^ (b >> 1));
  endfunction

  function automatic int to_bin(input logic [4:0] g);
    int b = 0;
    logic acc = 1'b0;
    for (int k = 4; k >= 0; k--) begin
      acc = acc ^ g[k];
      b = b | (int'(acc) << k);
    end
    return b;
  endfunction

  function automatic logic [4:0] encode(input logic [30:0] t);
    logic [4:0] g = '0;
    logic above;
    for (int lvl = 1; lvl <= 31; lvl++) begin
      above = (lvl == 31) ? 1'b0 : t[lvl];
      if (t[lvl-1] && !above) g = g | to_gray(lvl);
    end
    return g;
  endfunction

  localparam int PAIRS = 3000;

  task automatic run_case(input int id, input int s, input int target);
    int d, samples, nerr, lvl, k, rate;
    real f, x;
    logic [4:0] code, prev_code;
    logic [15:0] frame;
    d = 1 << s;
    sel = 3'(s);
    f = 1.0 / d + 0.8 / (32.0 * 3.14159265358979 * d);
    rate = (target * 1000) / PAIRS;  // bubbles per 1000 samples, about half the errors
    rst = 1'b1;
    therm = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    samples = 0;
    nerr = 0;
    prev_code = '0;
    k = 0;
    while (samples <= PAIRS || nerr < target) begin
      x = 16.0 + 16.5 * $sin(2.0 * 3.14159265358979 * f * k);
      lvl = (x < 0.0) ? 0 : (x >= 31.0) ? 31 : int'($floor(x));
      therm = 31'((64'd1 << lvl) - 1);
      if (k % d == 0) begin
        // Two errors are still allowed: a bubble may cost the pair before
        // and the pair after it.
        if (lvl >= 3 && nerr <= target - 2 && $urandom_range(0, 999) < rate)
          therm[$urandom_range(0, lvl - 3)] = 1'b0;
        code = encode(therm);
        samples++;
        if (samples >= 2) begin
          int a = to_bin(code), b = to_bin(prev_code);
          if (((a > b) ? a - b : b - a) > 1) nerr++;
        end
        prev_code = code;
      end
      @(negedge clk);
      k++;
      if (nerr == target - 1 && samples > PAIRS) begin
        // Last error: a bubble held from now on costs exactly one pair (the
        // step into it), since the codes that follow are identical. The
        // input is frozen on a bubbled column whose code lies more than one
        // level away from the last sample.
        logic found = 1'b0;
        for (int l = 3; l <= 31 && !found; l++) begin
          for (int j = 1; j <= l - 2 && !found; j++) begin
            int e;
            therm = 31'((64'd1 << l) - 1);
            therm[j] = 1'b0;
            e = to_bin(encode(therm));
            if (((e > to_bin(prev_code)) ? e - to_bin(prev_code) : to_bin(prev_code) - e) > 1)
              found = 1'b1;
          end
        end
        repeat (2 * d) begin
          if (k % d == 0) begin
            code = encode(therm);
            samples++;
            begin
              int a = to_bin(code), b = to_bin(prev_code);
              if (((a > b) ? a - b : b - a) > 1) nerr++;
            end
            prev_code = code;
          end
          @(negedge clk);
          k++;
        end
        break;
      end
    end
    // Hold the last column and let two full 16-bit frames go out.
    repeat (40) @(negedge clk);
    while (!fs8) @(negedge clk);
    for (int b = 0; b < 16; b++) begin
      frame[15-b] = ser8;
      @(negedge clk);
    end
    checks += 5;
    if (frame !== {8'b1011_1011, 8'(nerr)}) begin
      failures++;
      $display("FAIL case %0d serial frame %b, reference %0d errors", id, frame, nerr);
    end
    if (count8 !== 8'(nerr) || end8) begin
      failures++;
      $display("FAIL case %0d 8-bit record %0d end=%b", id, count8, end8);
    end
    if (nerr != target) begin
      failures++;
      $display("FAIL case %0d reference %0d errors, wanted %0d", id, nerr, target);
    end
    if (!end4 || count4 !== 4'd15) begin
      failures++;
      $display("FAIL case %0d default top: end=%b record=%0d", id, end4, count4);
    end
    if (g4 !== g8) begin
      failures++;
      $display("FAIL case %0d tops disagree on the ADC code", id);
    end
    $display("case %0d ratio 1/%0d: %0d sampled pairs, reference %0d errors, BIST (8-bit) %0d, BIST (4-bit) overflow=%b",
             id, d, samples - 1, nerr, count8, end4);
  endtask

  initial begin
    int target[8] = '{198, 35, 150, 101, 19, 93, 63, 50};
    for (int c = 0; c < 8; c++) run_case(c + 1, (c < 4) ? 3 : 4, target[c]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
