// End-to-end testbench of fpga_pid_pwm at its default (and only) size.
//
// Runs 300 samples of 272 clocks, the length of the original design's FPGA test,
// feeding a new sign-magnitude error and new coefficients every sample, as
// an on-line tuner would. For each sample a reference model kept here
// (sign-magnitude to two's complement, the PID law in Q4.11, conversion
// back, truncation to bits 12..5) predicts the number of clocks Pulses is
// high; the testbench checks that count, that a non-empty pulse starts at
// clock 16 of the sample (so the sample period is 272 clocks) and that it
// is one contiguous run. It counts how often each mechanism occurred and
// fails if one never did: a negative error converted at the input, a
// negative control action converted at the output (zero duty), a positive
// duty, a duty in the top quarter of the range and integrator carry-over between samples.
module tb_fpga_pid_pwm;
  logic        CLK = 1'b0;
  logic        Reset = 1'b0;
  logic [15:0] Error = '0, Kp = '0, Ki = '0, Kd = '0;
  logic        Pulses;
  int checks = 0, failures = 0;

  localparam int SAMPLE = 272;
  localparam int N_SAMPLES = 300;

  fpga_pid_pwm dut (.CLK, .Reset, .Error, .Kp, .Ki, .Kd, .Pulses);

  always #7.25ns CLK = ~CLK;   // 14.5 ns clock

  initial begin
    repeat (SAMPLE * (N_SAMPLES + 5)) @(posedge CLK);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ---- reference model -------------------------------------------------
  int f_m = 0, e1_m = 0;

  function automatic int wrap16(input longint v);
    return int'(16'(v)) <<< 16 >>> 16;
  endfunction

  function automatic int fmul(input int a, input int b);
    return wrap16((longint'(a) * longint'(b)) >>> 11);
  endfunction

  function automatic int sm_value(input logic [15:0] w);
    return w[15] ? -int'(w[14:0]) : int'(w[14:0]);
  endfunction

  // Returns the control action u(k) as a signed integer (Q4.11 units).
  function automatic int pid_model(input int e, input int kp, input int ki, input int kd);
    int p, d, u;
    p   = fmul(kp, e);
    d   = fmul(kd, wrap16(e - e1_m));
    f_m = wrap16(f_m + fmul(ki, wrap16(e + e1_m)));
    u   = wrap16(wrap16(p + f_m) + d);
    e1_m = e;
    return u;
  endfunction

  function automatic int duty_of(input int u);
    if (u < 0) return 0;
    return (u >> 5) & 255;
  endfunction

  // ---- stimulus and checking ---------------------------------------------
  int n_neg_err = 0, n_neg_u = 0, n_pos_duty = 0, n_full = 0, n_carry = 0;

  initial begin
    repeat (3) @(negedge CLK);
    for (int n = 0; n < N_SAMPLES; n++) begin
      int e_val, kp, ki, kd, u, want, high, first_high, last_high;
      // Error within +-2 V, realistic coefficient ranges, some extremes.
      e_val = $signed($urandom_range(0, 8191)) - 4096;
      if (n % 50 == 7) e_val = 7000;          // large positive error
      kp = $urandom_range(0, 4095);            // 0 .. 2
      ki = $urandom_range(0, 409);             // 0 .. 0.2
      kd = $urandom_range(0, 205);             // 0 .. 0.1
      Error = e_val < 0 ? {1'b1, 15'(-e_val)} : {1'b0, 15'(e_val)};
      Kp = 16'(kp); Ki = 16'(ki); Kd = 16'(kd);
      if (n == 0) Reset = 1'b1;               // sample 0 starts now
      if (e_val < 0) n_neg_err++;
      if (f_m != 0) n_carry++;
      u = pid_model(e_val, kp, ki, kd);
      want = duty_of(u);
      if (u < 0) n_neg_u++;
      if (want > 0) n_pos_duty++;
      if (want >= 192) n_full++;
      high = 0; first_high = -1; last_high = -1;
      for (int c = 0; c < SAMPLE; c++) begin
        #1;
        if (Pulses) begin
          high++;
          if (first_high < 0) first_high = c;
          last_high = c;
        end
        @(negedge CLK);
      end
      check(high == want, $sformatf("sample %0d: %0d high clocks, want %0d (u=%0d)",
                                    n, high, want, u));
      if (want > 0) begin
        check(first_high == 16, $sformatf("sample %0d: pulse starts at clock %0d", n, first_high));
        check(last_high - first_high + 1 == high, $sformatf("sample %0d: pulse not contiguous", n));
      end
    end
    $display("mechanisms: negative error %0d, negative action %0d, positive duty %0d, large duty %0d, integrator carry %0d",
             n_neg_err, n_neg_u, n_pos_duty, n_full, n_carry);
    check(n_neg_err > 0, "no negative error converted");
    check(n_neg_u > 0, "no negative control action");
    check(n_pos_duty > 0, "no positive duty");
    check(n_full > 0, "no duty in the top quarter");
    check(n_carry > 0, "no integrator carry-over");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
