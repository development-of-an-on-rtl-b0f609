// Control unit of the PID-PWM controller: the strobe sequencer.
//
// A 16-bit one-hot shift register walks a single 1 through its bits, one
// bit per clock, and each bit is one strobe of the controller, in this
// order: Load_E, CO_E, Clear, CS1..CS10, XX, Load_U, CO_U (see ctrl_t).
// When the 1 reaches the last bit (CO_U) the register stops shifting and
// holds CO_U high while an 8-bit counter runs one full PWM period; when the
// counter reaches its last value the register is reloaded with the 1 in bit
// 0 and the next sample starts.
//
// Timing: after reset the sequence starts at Load_E. Steps 0..14 last one
// clock each, CO_U lasts 1 + 2**PWM_W clocks (the clock in which the output
// converter loads, then the PWM period), so a sample takes
// 16 + 2**PWM_W = 272 clocks at the default PWM_W = 8.
// The strobe order, the 16-bit shift register, the 8-bit counter and the
// 272-clock sample follow the original design; the exact restart rule (counter
// enabled from the second CO_U clock, restart on its terminal count) is this
// design's choice. rst_n is active low.
module digital_cont
  import pid_pwm_pkg::*;
#(
  parameter int unsigned CNT_W = PWM_W
) (
  input  logic  clk,
  input  logic  rst_n,
  output ctrl_t ctrl
);

  logic [SEQ_LEN-1:0] sr_q;      // one-hot strobe shift register
  logic               hold_q;    // CO_U has been high for at least one clock
  logic [CNT_W-1:0]   cnt_q;     // dwell counter for the PWM period
  logic               last;      // final clock of the sample

  assign last = hold_q && (cnt_q == '1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr_q <= SEQ_LEN'(1);
    end else if (last) begin
      sr_q <= SEQ_LEN'(1);
    end else if (!sr_q[SEQ_LEN-1]) begin
      sr_q <= sr_q << 1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold_q <= 1'b0;
      cnt_q  <= '0;
    end else begin
      hold_q <= sr_q[SEQ_LEN-1] && !last;
      if (hold_q) cnt_q <= cnt_q + 1'b1;
      else        cnt_q <= '0;
    end
  end

  assign ctrl = ctrl_t'(sr_q);

  // Exactly one strobe is active at any time.
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(sr_q));

endmodule
