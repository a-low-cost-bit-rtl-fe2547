// tb_ber_bist: the BIST on its own, at its default sizes (5-bit codes,
// 4-bit record, header 1011, ratios up to 16).
//
// For every division ratio 1, 2, 4, 8 and 16 a random code stream is applied:
// in the cycles the BIST samples, the code moves by -1, 0 or +1 levels, or
// now and then jumps (several bits change) or has one Gray bit flipped at a
// position that is not a neighbour (one bit changes, but the step is not
// one code); in the cycles it skips, the code is random and must be ignored.
// The reference keeps its own sampled codes in binary and expects an error
// pulse in the cycle after each sampled pair more than one level apart. It
// checks err_o in every cycle, the count, and every serial frame (header
// 1011, then the count copied in the last header cycle). A last run drives
// errors until the 4-bit counter overflows and checks that the test stops.
module tb_ber_bist;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst = 1'b1;
  logic [2:0] sel;
  logic [4:0] code;
  logic ser, err, end_f, fs;
  logic [3:0] count;

  ber_bist dut (
    .clk, .rst, .div_sel_i(sel), .code_i(code), .ser_o(ser), .err_o(err),
    .count_o(count), .end_o(end_f), .frame_start_o(fs)
  );

  always #5 clk = ~clk;

  int n_jump = 0, n_flip = 0, n_step = 0, n_same = 0;

  initial begin
    repeat (200000) @(posedge clk);
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

  // Frame checker, free running.
  int fbit = -1;
  logic [7:0] frame;
  logic [3:0] snap;
  int frames_ok = 0;
  always @(negedge clk) begin
    if (rst) fbit = -1;
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

  // One run at ratio 2**s. Returns the number of errors the reference saw.
  task automatic run(input int s, input int cycles, input int max_err, output int nerr);
    int d, lvl, prev_lvl, samples;
    logic exp_err, exp_next;
    logic [4:0] g;
    d = 1 << s;
    sel = 3'(s);
    rst = 1'b1;
    code = '0;
    @(negedge clk);
    @(negedge clk);
    rst = 1'b0;
    lvl = 15;
    prev_lvl = 15;
    samples = 0;
    nerr = 0;
    exp_next = 1'b0;
    for (int c = 0; c < cycles; c++) begin
      // Output of the pair judged in this cycle.
      exp_err = exp_next;
      exp_next = 1'b0;
      checks++;
      if (err !== exp_err) begin
        failures++;
        $display("FAIL d=%0d cycle %0d err=%b expected %b", d, c, err, exp_err);
      end
      if (c % d == 0) begin
        int r = $urandom_range(0, 15);
        prev_lvl = lvl;
        if (nerr < max_err && r == 0) begin
          lvl = (lvl + $urandom_range(2, 29)) % 32;
          g = to_gray(lvl);
        end else if (nerr < max_err && r == 1) begin
          // One Gray bit flipped that does not lead to a neighbour.
          int k;
          do begin
            k = $urandom_range(0, 4);
            g = to_gray(lvl) ^ (5'd1 << k);
          end while (to_bin(g) == lvl + 1 || to_bin(g) == lvl - 1);
          lvl = to_bin(g);
        end else begin
          int step = $urandom_range(0, 2) - 1;
          if (lvl + step >= 0 && lvl + step <= 31) lvl = lvl + step;
          g = to_gray(lvl);
        end
        code = g;
        samples++;
        if (samples >= 2) begin
          int dd = (lvl > prev_lvl) ? lvl - prev_lvl : prev_lvl - lvl;
          if (dd > 1) begin
            exp_next = 1'b1;
            nerr++;
            if ($countones(to_gray(lvl) ^ to_gray(prev_lvl)) == 1) n_flip++;
            else n_jump++;
          end else if (dd == 1) n_step++;
          else n_same++;
        end
      end else begin
        code = 5'($urandom);
      end
      @(negedge clk);
    end
    // Flush: hold the code, let the last frames go out.
    code = to_gray(lvl);
    repeat (2) begin
      exp_err = exp_next;
      exp_next = 1'b0;
      checks++;
      if (err !== exp_err) begin
        failures++;
        $display("FAIL d=%0d flush err=%b", d, err);
      end
      @(negedge clk);
    end
    code = to_gray(lvl);
    sel = 3'd0;
    repeat (20) @(negedge clk);
  endtask

  initial begin
    int nerr;
    int f0;
    for (int s = 0; s <= 4; s++) begin
      run(s, 600 * (1 << s) / 2 + 300, 14, nerr);
      checks += 2;
      if (count !== 4'((nerr > 15) ? 15 : nerr)) begin
        failures++;
        $display("FAIL d=%0d count %0d expected %0d", 1 << s, count, nerr);
      end
      if (end_f !== 1'b0) begin
        failures++;
        $display("FAIL d=%0d unexpected overflow", 1 << s);
      end
      $display("ratio %0d: %0d errors", 1 << s, nerr);
    end
    // Overflow run: the counter must stop at 15 and flag the end of the test.
    run(0, 2000, 1000, nerr);
    checks += 2;
    if (end_f !== 1'b1 || nerr <= 15) begin
      failures++;
      $display("FAIL overflow not flagged (%0d errors)", nerr);
    end
    if (count !== 4'd15) begin
      failures++;
      $display("FAIL count after overflow %0d", count);
    end
    checks++;
    if (n_jump == 0 || n_flip == 0 || n_step == 0 || n_same == 0 || frames_ok < 10) begin
      failures++;
      $display("FAIL coverage jump=%0d flip=%0d step=%0d same=%0d frames=%0d",
               n_jump, n_flip, n_step, n_same, frames_ok);
    end
    $display("pairs: multi-bit errors %0d, one-bit non-adjacent errors %0d, one-code steps %0d, identical %0d, frames %0d",
             n_jump, n_flip, n_step, n_same, frames_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
