// FPGA-PID-PWM controller for a synchronous DC-DC buck converter.
//
// Every sample the controller reads the output-voltage error, runs it
// through a PID law whose three coefficients are supplied from outside (by
// an on-line tuner) and turns the control action into one period of a PWM
// gate signal. Data path:
//   Error (sign-magnitude) -> auto_2s_comp (to two's complement)
//     -> digital_pid -> auto_2s_comp (back to sign-magnitude) -> pwm -> Pulses
// All stages are sequenced by digital_cont, which fires 16 one-clock
// strobes (Load_E, CO_E, Clear, CS1..CS10, XX, Load_U, CO_U) and then holds
// CO_U for one 256-clock PWM period: one sample every 272 clocks
// (3.94 us at the 14.5 ns clock the original design uses).
//
// Interface: CLK; Reset, active low; Error, Kp, Ki, Kd as 16-bit Q4.11
// words, Error in sign-magnitude form, the coefficients in two's complement
// with Ki = ki*Ts/2 and Kd = kd/Ts; Pulses, the gate drive. Error and the
// coefficients are sampled at the Load_E and CS1 strobes of each sample
// (clocks 0 and 3 of the 272) and must be stable then. Pulses is high
// for duty clocks of clocks 16..271 of the sample that computed it.
// The structure and the port names follow the original design's top-level
// schematic; the active-low reset follows its simulation waveform.
module fpga_pid_pwm
  import pid_pwm_pkg::*;
(
  input  logic              CLK,
  input  logic              Reset,
  input  logic [WORD_W-1:0] Error,
  input  logic [WORD_W-1:0] Kp,
  input  logic [WORD_W-1:0] Ki,
  input  logic [WORD_W-1:0] Kd,
  output logic              Pulses
);

  ctrl_t             ctrl;
  logic [WORD_W-1:0] e_tc;     // error, two's complement
  logic [WORD_W-1:0] u_tc;     // control action, two's complement
  logic [WORD_W-1:0] u_sm;     // control action, sign-magnitude

  digital_cont u_cont (
    .clk   (CLK),
    .rst_n (Reset),
    .ctrl  (ctrl)
  );

  auto_2s_comp u_comp_e (
    .clk   (CLK),
    .rst_n (Reset),
    .load  (ctrl.load_e),
    .co    (ctrl.co_e),
    .eee   (Error),
    .oo    (e_tc)
  );

  digital_pid u_pid (
    .clk   (CLK),
    .rst_n (Reset),
    .clear (ctrl.clear),
    .cs    (ctrl.cs),
    .e     (e_tc),
    .kp    (Kp),
    .ki    (Ki),
    .kd    (Kd),
    .u     (u_tc)
  );

  auto_2s_comp u_comp_u (
    .clk   (CLK),
    .rst_n (Reset),
    .load  (ctrl.load_u),
    .co    (ctrl.co_u),
    .eee   (u_tc),
    .oo    (u_sm)
  );

  pwm u_pwm (
    .clk    (CLK),
    .rst_n  (Reset),
    .word   (u_sm),
    .xx     (ctrl.xx),
    .load_u (ctrl.load_u),
    .co_u   (ctrl.co_u),
    .pulse  (Pulses)
  );

endmodule
