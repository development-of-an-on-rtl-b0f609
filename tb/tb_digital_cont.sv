// Self-checking testbench of digital_cont, the strobe sequencer.
//
// Over several samples it checks, clock by clock, that exactly the expected
// strobe is active: steps 0..14 (Load_E, CO_E, Clear, CS1..CS10, XX, Load_U)
// one clock each, then CO_U for 257 clocks, and that the sample period, from
// one Load_E to the next, is 272 clocks. A reset in the middle of a sample
// must restart the sequence at Load_E.
module tb_digital_cont;
  import pid_pwm_pkg::*;
  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  digital_cont dut (.clk, .rst_n, .ctrl);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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

  // Expected strobe vector at clock t of a sample.
  function automatic logic [15:0] expect_at(input int t);
    if (t < 15) return 16'(1) << t;
    return 16'h8000;
  endfunction

  initial begin
    int last_load_e, t;
    repeat (2) @(negedge clk);
    check(ctrl.load_e && $countones(ctrl) == 1, "Load_E during reset");
    rst_n = 1'b1;
    last_load_e = -1;
    for (int c = 0; c < 272 * 3; c++) begin
      t = c % 272;
      check(16'(ctrl) == expect_at(t),
            $sformatf("clock %0d: strobes %b want %b", c, 16'(ctrl), expect_at(t)));
      if (ctrl.load_e) begin
        if (last_load_e >= 0)
          check(c - last_load_e == 272, $sformatf("sample period %0d", c - last_load_e));
        last_load_e = c;
      end
      @(negedge clk);
    end
    // Named strobes in order.
    check(ctrl.load_e, "sample 4 starts with Load_E");
    @(negedge clk); check(ctrl.co_e, "CO_E second");
    @(negedge clk); check(ctrl.clear, "Clear third");
    for (int k = 1; k <= 10; k++) begin
      @(negedge clk); check(ctrl.cs[k], $sformatf("CS%0d", k));
    end
    @(negedge clk); check(ctrl.xx, "XX");
    @(negedge clk); check(ctrl.load_u, "Load_U");
    @(negedge clk); check(ctrl.co_u, "CO_U");
    // Reset in the middle of the PWM period.
    repeat (40) @(negedge clk);
    rst_n = 1'b0;
    @(negedge clk); rst_n = 1'b1;
    check(ctrl.load_e, "restart at Load_E after reset");
    @(negedge clk); check(ctrl.co_e, "CO_E after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
