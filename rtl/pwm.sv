// Digital pulse width modulator driving the buck converter switch.
//
// The 16-bit control action arrives in sign-magnitude form from the output
// converter. It is normalised to 8 bits by truncation: the duty value is the
// 8-bit field starting at bit DUTY_LSB of the word (bits 12..5 by default,
// i.e. 0..3.98 V of a Q4.11 value in steps of 1/64 V, which spans the
// 3.75 V supply). A negative control action gives a zero duty.
// An 8-bit counter counts the 256 levels of the period and a comparator sets
// the pulse high while the duty value is larger than the counter, so the
// pulse is high for `duty` clocks of each period.
//
// Timing: the period runs while the control unit holds CO_U, starting one
// clock after CO_U rises (the clock in which the output converter loads the
// new word); the counter is cleared on Load_U and XX, so it starts at zero
// in every sample. Outside the period (the 16 clocks of the strobe
// sequence) the pulse is low. The 8-bit counter and comparator and the
// truncation to 8 bits follow the original design; which 8 bits are kept, the
// treatment of negative values and the low pulse during the sequence are
// this design's choices.
module pwm
  import pid_pwm_pkg::*;
#(
  parameter int unsigned W        = WORD_W,
  parameter int unsigned CNT_W    = PWM_W,
  parameter int unsigned DUTY_LSB = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] word,     // control action, sign-magnitude
  input  logic         xx,
  input  logic         load_u,
  input  logic         co_u,
  output logic         pulse
);

  logic             run_q;   // CO_U was high in the previous clock
  logic [CNT_W-1:0] cnt_q;
  logic             run;
  logic [CNT_W-1:0] duty;    // normalised duty value

  assign duty = word[W-1] ? '0 : word[DUTY_LSB +: CNT_W];
  assign run  = co_u && run_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q <= 1'b0;
      cnt_q <= '0;
    end else begin
      run_q <= co_u;
      if (xx || load_u) cnt_q <= '0;
      else if (run)     cnt_q <= cnt_q + 1'b1;
    end
  end

  // Comparator: pulse while the duty value exceeds the count.
  assign pulse = run && (duty > cnt_q);

endmodule
