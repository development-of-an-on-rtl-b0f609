// Closed-loop testbench: fpga_pid_pwm regulating a behavioural buck
// converter model (buck_model).
//
// Every 272-clock sample the testbench measures the output voltage at the
// start of the sample, forms the error Vref - Vout, quantises it to a
// sign-magnitude Q4.11 word and applies it to the controller with fixed
// coefficients kp = 1, ki*Ts/2 = 0.1 and kd/Ts = 0.05 (the values the
// on-line tuner settles to in the design example). The run lasts 300
// samples (1.18 ms): a step of the reference from 0 V to 1.25 V at the
// start, a 10 % decrease of the load resistance at sample 57 (0.225 ms) and
// a reference step down to 1.0 V at sample 180. It checks that the output
// has settled within 30 mV of the reference just before the second step and
// at the end of the run, and that the error changes sign (negative errors reach the input
// converter); it counts overshoots, the disturbance and the reference
// steps and fails if one did not happen.
module tb_closed_loop;
  logic        CLK = 1'b0;
  logic        Reset = 1'b0;
  logic [15:0] Error = '0;
  logic [15:0] Kp = 16'd2048, Ki = 16'd205, Kd = 16'd102;
  logic        Pulses;
  real         r_load = 2.345;
  real         vout, il;
  int checks = 0, failures = 0;

  localparam int SAMPLE = 272;
  localparam int N_SAMPLES = 300;

  fpga_pid_pwm dut (.CLK, .Reset, .Error, .Kp, .Ki, .Kd, .Pulses);
  buck_model plant (.clk(CLK), .rst_n(Reset), .gate(Pulses), .r_load, .vout, .il);

  always #7.25ns CLK = ~CLK;

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

  function automatic logic [15:0] to_sm(input real v);
    int q;
    q = int'(v * 2048.0);
    if (q > 32767) q = 32767;
    if (q < -32767) q = -32767;
    return q < 0 ? {1'b1, 15'(-q)} : {1'b0, 15'(q)};
  endfunction

  int  n_neg_err = 0, n_overshoot = 0, n_disturb = 0, n_ref_steps = 0;

  initial begin
    real vref, err, peak;
    vref = 1.25;
    peak = 0.0;
    n_ref_steps = 1;
    repeat (3) @(negedge CLK);
    for (int n = 0; n < N_SAMPLES; n++) begin
      if (n == 57) begin
        r_load = 2.345 * 0.9;
        n_disturb++;
      end
      if (n == 180) begin
        vref = 1.0;
        n_ref_steps++;
      end
      err = vref - vout;
      Error = to_sm(err);
      if (err < 0.0) n_neg_err++;
      if (n < 57 && vout > peak) peak = vout;
      if (n == 0) Reset = 1'b1;
      if (n == 179 || n == N_SAMPLES - 1)
        check(err < 0.03 && err > -0.03,
              $sformatf("sample %0d: Vout %.4f V, Vref %.3f V", n, vout, vref));
      if (n % 20 == 0)
        $display("sample %0d  Vout %.4f V  iL %.4f A", n, vout, il);
      repeat (SAMPLE) @(negedge CLK);
    end
    if (peak > 1.25) n_overshoot++;
    $display("peak before disturbance %.4f V; mechanisms: negative error %0d, overshoot %0d, load step %0d, reference steps %0d",
             peak, n_neg_err, n_overshoot, n_disturb, n_ref_steps);
    check(n_neg_err > 0, "error never negative");
    check(n_disturb > 0, "no load step");
    check(n_ref_steps > 1, "no reference step");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
