// tb_adc_ber_bist_top: end-to-end test of the flash-ADC back end and the
// Gray-code BER BIST, with every parameter at its default (5-bit ADC, 4-bit
// record, header 1011, ratios up to 16).
//
// The comparator outputs of the flash ADC are produced here from a sine wave
// whose amplitude slightly exceeds full scale:
//   * ratio 1: low-frequency input, f_in = 0.8 * fs / (2**N * pi), so that
//     consecutive conversions differ by at most one level;
//   * ratios 2, 4, 8 and 16: high-frequency input near fs/d,
//     f_in = fs/d + 0.8 * fs / (2**N * pi * d); only every d-th conversion is
//     slow-moving, the others swing freely and must be ignored.
// Conversion errors are injected as bubbles in the thermometer column (one
// comparator below the top reads low), both in sampled and in skipped
// cycles. A binary-coded run drives bin_i through the binary-to-Gray path.
// A last run injects errors until the 4-bit counter overflows.
//
// The reference encodes each thermometer word itself (OR of the Gray codes
// of every one-to-zero step in the column), checks adc_gray_o every cycle,
// keeps its own samples at the divided rate, expects an error pulse for
// every sampled pair more than one level apart (in binary), checks err_o in
// every cycle, the final count and overflow flag, and decodes every serial
// frame (header 1011 + the count copied in the last header cycle).
// Each mechanism is counted and must occur at least once.
module tb_adc_ber_bist_top;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst = 1'b1;
  logic [2:0] sel;
  logic [30:0] therm;
  logic [4:0] bin, gray;
  logic use_bin;
  logic ser, err, end_f, fs;
  logic [3:0] count;

  adc_ber_bist_top dut (
    .clk, .rst, .div_sel_i(sel), .therm_i(therm), .bin_i(bin), .use_bin_i(use_bin),
    .adc_gray_o(gray), .ser_o(ser), .err_o(err), .count_o(count), .end_o(end_f),
    .frame_start_o(fs)
  );

  always #5 clk = ~clk;

  // Mechanism counters.
  int n_ratio[5] = '{default: 0};
  int n_bubble_sampled = 0, n_bubble_skipped = 0;
  int n_err_multi = 0, n_err_onebit = 0, n_same = 0, n_step = 0;
  int n_overflow = 0, n_binary = 0, frames_ok = 0;

  initial begin
    repeat (400000) @(posedge clk);
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

  // Frame checker, free running.
  int fbit = -1;
  logic [7:0] frame;
  logic [3:0] snap;
  logic rst_d = 1'b1;
  always @(negedge clk) begin
    // The BIST leaves reset one clock after rst falls.
    rst_d <= rst;
    if (rst || rst_d) fbit = -1;
    else begin
      if (fs) begin
        checks++;
        if (fbit != -1 && fbit != 8) begin
          failures++;
          $display("FAIL frame length %0d", fbit);
        end
        fbit = 0;
      end
      if (fbit >= 0 && fbit < 8) begin
        frame[7-fbit] = ser;
        if (fbit == 3) snap = count;
        fbit++;
        if (fbit == 8) begin
          checks++;
          if (frame !== {4'b1011, snap}) begin
            failures++;
            $display("FAIL frame %b expected %b", frame, {4'b1011, snap});
          end else frames_ok++;
        end
      end
    end
  end

  // One test run. mode 0: flash ADC with sine input, mode 1: binary ramp.
  // bubble_per_1000: bubble rate; max_err: stop injecting at this count.
  task automatic run(input int s, input int mode, input int cycles,
                     input int bubble_per_1000, input int max_err, output int nerr);
    int d, samples, lvl, prev_lvl;
    real f, x;
    logic [4:0] exp_code, prev_code, exp_gray_q;
    logic err_hist[4];
    logic expect_err;
    d = 1 << s;
    sel = 3'(s);
    use_bin = (mode == 1);
    f = (d == 1) ? 0.8 / (32.0 * 3.14159265358979) :
                   1.0 / d + 0.8 / (32.0 * 3.14159265358979 * d);
    rst = 1'b1;
    therm = '0;
    bin = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    samples = 0;
    nerr = 0;
    prev_code = '0;
    exp_gray_q = '0;
    err_hist = '{default: 1'b0};
    for (int k = 0; k < cycles + 3; k++) begin
      // err_o now belongs to the pair that ended with sample k-2.
      expect_err = err_hist[0];
      checks++;
      if (err !== expect_err) begin
        failures++;
        $display("FAIL ratio %0d k=%0d err=%b expected %b", d, k, err, expect_err);
      end
      if (k > 0) begin
        checks++;
        if (gray !== exp_gray_q) begin
          failures++;
          $display("FAIL ratio %0d k=%0d adc code %b expected %b", d, k, gray, exp_gray_q);
        end
      end
      err_hist[0] = err_hist[1];
      err_hist[1] = 1'b0;
      // Input for conversion k.
      if (k >= cycles) begin
        // Flush: repeat the last sampled code.
        if (mode == 0) therm = 31'((64'd1 << to_bin(prev_code)) - 1);
        else bin = 5'(to_bin(prev_code));
      end else if (mode == 0) begin
        x = 16.0 + 16.5 * $sin(2.0 * 3.14159265358979 * f * k);
        lvl = (x < 0.0) ? 0 : (x >= 31.0) ? 31 : int'($floor(x));
        therm = 31'((64'd1 << lvl) - 1);
        if (lvl >= 3 && nerr < max_err && $urandom_range(0, 999) < bubble_per_1000) begin
          therm[$urandom_range(0, lvl - 3)] = 1'b0;
          if (k % d == 0) n_bubble_sampled++;
          else n_bubble_skipped++;
        end
      end else begin
        lvl = (k / 3) % 32;
        if (nerr < max_err && $urandom_range(0, 999) < bubble_per_1000)
          lvl = (lvl + $urandom_range(2, 29)) % 32;
        bin = 5'(lvl);
        n_binary++;
      end
      exp_code = (mode == 0) ? encode(therm) : to_gray(int'(bin));
      exp_gray_q = exp_code;
      if (k % d == 0) begin
        samples++;
        if (samples >= 2) begin
          int a = to_bin(exp_code), b = to_bin(prev_code);
          int dd = (a > b) ? a - b : b - a;
          if (dd > 1) begin
            err_hist[1] = 1'b1;
            nerr++;
            if ($countones(exp_code ^ prev_code) == 1) n_err_onebit++;
            else n_err_multi++;
          end else if (dd == 1) n_step++;
          else n_same++;
        end
        prev_code = exp_code;
      end
      @(negedge clk);
    end
    repeat (20) @(negedge clk);
    checks += 2;
    if (count !== 4'((nerr > 15) ? 15 : nerr)) begin
      failures++;
      $display("FAIL ratio %0d count %0d expected %0d", d, count, nerr);
    end
    if (end_f !== (nerr > 15)) begin
      failures++;
      $display("FAIL ratio %0d end flag %b after %0d errors", d, end_f, nerr);
    end
    if (end_f) n_overflow++;
    n_ratio[s]++;
    $display("run ratio %0d mode %0d: %0d sampled pairs, %0d errors, record %0d",
             d, mode, samples - 1, nerr, count);
  endtask

  initial begin
    int nerr;
    run(0, 0, 400, 20, 14, nerr);
    run(1, 0, 600, 20, 14, nerr);
    run(2, 0, 1200, 30, 14, nerr);
    run(3, 0, 2400, 60, 14, nerr);
    run(4, 0, 4800, 120, 14, nerr);
    run(0, 1, 400, 20, 8, nerr);
    run(0, 0, 1000, 200, 1000, nerr);
    checks++;
    if (n_ratio[0] == 0 || n_ratio[1] == 0 || n_ratio[2] == 0 || n_ratio[3] == 0 ||
        n_ratio[4] == 0 || n_bubble_sampled == 0 || n_bubble_skipped == 0 ||
        n_err_multi == 0 || n_err_onebit == 0 || n_same == 0 || n_step == 0 ||
        n_overflow == 0 || n_binary == 0 || frames_ok == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("bubbles sampled %0d skipped %0d; errors multi-bit %0d one-bit %0d; identical %0d one-step %0d; overflows %0d; binary-path codes %0d; frames %0d",
             n_bubble_sampled, n_bubble_skipped, n_err_multi, n_err_onebit,
             n_same, n_step, n_overflow, n_binary, frames_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
