// Self-checking testbench of digital_pid.
//
// Part 1 replays the original design's PID waveform with integer multipliers
// (FRAC = 0): e = 2, kp = 3, ki = 2, kd = 2 must give u = 14 after the
// Clear + CS1..CS10 sequence (11 clocks), and u must not change before CS10.
// Part 2 runs the Q4.11 datapath (the default) over many samples with
// random errors and coefficients and compares u with a reference model of
// the PID law kept here: P = kp*e, F += ki*(e + e(k-1)),
// D = kd*(e - e(k-1)), u = P + F + D, products rescaled by 2**-11 and
// truncated to 16 bits. This also checks that Clear leaves the integrator
// and e(k-1) alone, and that reset clears them.
module tb_digital_pid;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  // Two instances share the strobes: integer and Q4.11 arithmetic.
  logic        clear = 1'b0;
  logic [10:1] cs = '0;
  logic signed [15:0] e0 = '0, kp0 = '0, ki0 = '0, kd0 = '0, u0;
  logic signed [15:0] e1 = '0, kp1 = '0, ki1 = '0, kd1 = '0, u1;

  digital_pid #(.FRAC(0)) dut_int (.clk, .rst_n, .clear, .cs,
    .e(e0), .kp(kp0), .ki(ki0), .kd(kd0), .u(u0));
  digital_pid dut_q (.clk, .rst_n, .clear, .cs,
    .e(e1), .kp(kp1), .ki(ki1), .kd(kd1), .u(u1));

  // Reference model state (Q4.11 instance).
  int f_m = 0, e1_m = 0;

  function automatic int wrap16(input longint v);
    return int'(16'(v)) <<< 16 >>> 16;
  endfunction

  function automatic int fmul(input int a, input int b, input int frac);
    longint p;
    p = longint'(a) * longint'(b);
    return wrap16(p >>> frac);
  endfunction

  // Drive Clear, CS1..CS10 on consecutive clocks; check u holds until CS10.
  task automatic run_sequence(output int clocks);
    logic signed [15:0] u0_before, u1_before;
    u0_before = u0; u1_before = u1;
    clocks = 0;
    @(negedge clk); clear = 1'b1; clocks++;
    @(negedge clk); clear = 1'b0;
    for (int k = 1; k <= 10; k++) begin
      cs = '0; cs[k] = 1'b1; clocks++;
      @(negedge clk);
      if (k < 10) check(u0 == u0_before && u1 == u1_before,
                        $sformatf("u moved before CS10 (after CS%0d)", k));
    end
    cs = '0;
  endtask

  function automatic int model_step(input int e, input int kp, input int ki, input int kd);
    int p, s, dif, d, i, pi, pid;
    p   = fmul(kp, e, 11);
    s   = wrap16(e + e1_m);
    dif = wrap16(e - e1_m);
    d   = fmul(kd, dif, 11);
    i   = fmul(ki, s, 11);
    f_m = wrap16(f_m + i);
    pi  = wrap16(p + f_m);
    pid = wrap16(pi + d);
    e1_m = e;
    return pid;
  endfunction

  initial begin
    int clocks, want;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Part 1: the original design's waveform values.
    e0 = 16'sd2; kp0 = 16'sd3; ki0 = 16'sd2; kd0 = 16'sd2;
    run_sequence(clocks);
    check(u0 == 16'sd14, $sformatf("waveform sample: u=%0d, want 14", u0));
    check(clocks == 11, $sformatf("sequence took %0d clocks, want 11", clocks));
    // Same error again: e(k-1)=2, F=4+2*(2+2)=12: u = 6 + 12 + 2*0 = 18.
    run_sequence(clocks);
    check(u0 == 16'sd18, $sformatf("second sample: u=%0d, want 18", u0));

    // Part 2: Q4.11 against the reference model, from reset.
    rst_n = 1'b0; f_m = 0; e1_m = 0;
    @(negedge clk); rst_n = 1'b1;
    check(u1 == 0, "reset clears u");
    for (int n = 0; n < 400; n++) begin
      int e, kp, ki, kd;
      if (n < 200) begin
        // Realistic range: |e| < 4 V, kp 0..3, ki*Ts/2 0..0.4, kd/Ts 0..0.16
        e  = $signed($urandom_range(0, 16383)) - 8192;
        kp = $urandom_range(0, 6143);
        ki = $urandom_range(0, 819);
        kd = $urandom_range(0, 327);
      end else begin
        e  = wrap16($urandom);
        kp = wrap16($urandom);
        ki = wrap16($urandom);
        kd = wrap16($urandom);
      end
      e1 = 16'(e); kp1 = 16'(kp); ki1 = 16'(ki); kd1 = 16'(kd);
      want = model_step(e, kp, ki, kd);
      run_sequence(clocks);
      check(int'(u1) == want, $sformatf("sample %0d: u=%0d want %0d", n, u1, want));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
