// Digital PID controller datapath, stepped one register stage per strobe.
//
// Computes the discrete PID law with trapezoidal integration and a backward
// difference derivative:
//   u(k) = kp*e(k) + F(k) + kd*(e(k) - e(k-1))
//   F(k) = F(k-1) + ki*(e(k) + e(k-1))
// where the ki and kd inputs already hold the scaled coefficients ki*Ts/2
// and kd/Ts. The integral coefficient is applied before the accumulator,
// as in the original design's difference equation (its block diagram
// places the multiplier after the accumulator), so F holds the integral
// term itself (in volts) and stays within the +-16 range of the word;
// accumulating the unscaled e(k)+e(k-1) and multiplying afterwards would
// overflow F at the coefficients a tuned loop uses (ki*Ts/2 = 0.1 needs an
// unscaled sum near 27 for a 2.7 V action).
// The hardware is registers, four adders, one subtractor and three
// multipliers.
//
// Arithmetic is 16-bit two's complement, Q4.11 by default. A product is
// formed at full width, shifted right by FRAC and truncated to 16 bits;
// sums wrap. With FRAC = 0 the multipliers are plain integer multipliers.
//
// Sequence (one strobe per clock, from the control unit):
//   Clear  clear the working registers (not F, e(k-1) or u)
//   CS1    load e(k) and the three coefficients
//   CS2    P  <= kp*e(k)
//   CS3    S  <= e(k)+e(k-1),  Dif <= e(k)-e(k-1)
//   CS4    D  <= kd*Dif
//   CS5    I  <= ki*S
//   CS6    F  <= F + I
//   CS7    PI <= P + F
//   CS8    PID <= PI + D
//   CS9    e(k-1) <= e(k)
//   CS10   u <= PID  (the output register)
// The strobe names, their count and the role of Clear and CS10 follow the
// original design; which stage each of CS1..CS9 loads is this design's choice.
// u holds its value between samples. rst_n clears everything, including the
// controller state F and e(k-1).
module digital_pid
  import pid_pwm_pkg::*;
#(
  parameter int unsigned W    = WORD_W,
  parameter int unsigned FRAC = FRAC_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic [N_CS:1]       cs,
  input  logic signed [W-1:0] e,
  input  logic signed [W-1:0] kp,
  input  logic signed [W-1:0] ki,
  input  logic signed [W-1:0] kd,
  output logic signed [W-1:0] u
);

  typedef logic signed [W-1:0] w_t;

  // Fixed-point multiply: full product, rescale, truncate.
  function automatic w_t fx_mul(input w_t a, input w_t b);
    logic signed [2*W-1:0] prod;
    prod = a * b;
    return w_t'(prod >>> FRAC);
  endfunction

  w_t e_q, kp_q, ki_q, kd_q;   // input registers
  w_t p_q, s_q, dif_q, d_q;    // working registers
  w_t i_q, pi_q, pid_q;
  w_t f_q, e1_q;               // controller state F(k) and e(k-1)

  // Working registers: cleared by reset and by Clear.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {e_q, kp_q, ki_q, kd_q} <= '0;
      {p_q, s_q, dif_q, d_q, i_q, pi_q, pid_q} <= '0;
    end else if (clear) begin
      {e_q, kp_q, ki_q, kd_q} <= '0;
      {p_q, s_q, dif_q, d_q, i_q, pi_q, pid_q} <= '0;
    end else begin
      if (cs[1]) begin
        e_q  <= e;
        kp_q <= kp;
        ki_q <= ki;
        kd_q <= kd;
      end
      if (cs[2]) p_q <= fx_mul(kp_q, e_q);
      if (cs[3]) begin
        s_q   <= e_q + e1_q;
        dif_q <= e_q - e1_q;
      end
      if (cs[4]) d_q   <= fx_mul(kd_q, dif_q);
      if (cs[5]) i_q   <= fx_mul(ki_q, s_q);
      if (cs[7]) pi_q  <= p_q + f_q;
      if (cs[8]) pid_q <= pi_q + d_q;
    end
  end

  // Controller state and output: cleared only by reset.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_q  <= '0;
      e1_q <= '0;
      u    <= '0;
    end else begin
      if (cs[6])  f_q  <= f_q + i_q;
      if (cs[9])  e1_q <= e_q;
      if (cs[10]) u    <= pid_q;
    end
  end

endmodule
