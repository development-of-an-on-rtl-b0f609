// Self-checking testbench of pwm.
//
// A small sequencer here drives XX, Load_U and then CO_U for 257 clocks, as
// the control unit does. For each control-action word the testbench counts
// the clocks with the pulse high and checks that the count equals the
// expected duty (bits 12..5 of the word, zero for a negative word), that the
// high clocks come first and form one run, and that the pulse is low in the
// first CO_U clock and while the strobes run.
module tb_pwm;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [15:0] word = '0;
  logic        xx = 1'b0, load_u = 1'b0, co_u = 1'b0;
  logic        pulse;
  int checks = 0, failures = 0;

  pwm dut (.clk, .rst_n, .word, .xx, .load_u, .co_u, .pulse);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  task automatic period(input logic [15:0] w);
    int high, want, first_low;
    bit seen_low;
    want = w[15] ? 0 : int'(w[12:5]);
    // Strobe phase: 13 quiet clocks, XX, Load_U; pulse must be low.
    co_u = 1'b0;
    repeat (13) begin @(negedge clk); check(!pulse, "pulse during strobes"); end
    xx = 1'b1; @(negedge clk); xx = 1'b0;
    load_u = 1'b1; @(negedge clk); load_u = 1'b0;
    // CO_U: first clock loads the word (the word changes at its end).
    co_u = 1'b1;
    #1 check(!pulse, "pulse in the first CO_U clock");
    @(negedge clk);
    word = w;
    high = 0; seen_low = 0; first_low = -1;
    for (int c = 0; c < 256; c++) begin
      #1;
      if (pulse) begin
        high++;
        if (seen_low) check(0, "pulse not a single run");
      end else if (!seen_low) begin
        seen_low = 1; first_low = c;
      end
      @(negedge clk);
    end
    co_u = 1'b0;
    check(high == want, $sformatf("word %h: %0d high clocks, want %0d", w, high, want));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    period(16'h0000);                 // zero duty
    period(16'h0280);                 // 20: the original design's waveform duty (00010100)
    period(16'h1FE0);                 // 255: maximum
    period(16'h8280);                 // negative: zero
    period(16'h1000);                 // 2.0 V in Q4.11 -> 128
    for (int i = 0; i < 40; i++) period(16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
