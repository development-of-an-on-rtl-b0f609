// Behavioural model of the synchronous buck power stage (not synthesizable).
//
// Q1 conducts while `gate` is high and the synchronous rectifier Q2 while
// it is low, so the inductor sees gate*Vs at its switch node. State
// equations, integrated with forward Euler once per clock of period DT:
//   L di/dt  = gate*Vs - Vout - i*(r_son + r_L)
//   C dvc/dt = (Vout - vc) / r_C
//   Vout     = R (r_C i + vc) / (R + r_C)
// (capacitor C with series resistance r_C in parallel with the load R).
// Default values are the converter of the controller's design example:
// L = 33 uH, C = 47 uF, R = 2.345 ohm, r_L = 66 mohm, r_C = 70 mohm,
// r_son = 2.1 ohm, Vs = 3.75 V. The load resistance is an input so that a
// load step can be applied during a run.
module buck_model #(
  parameter real DT    = 14.5e-9,
  parameter real L     = 33.0e-6,
  parameter real C     = 47.0e-6,
  parameter real R_L   = 0.066,
  parameter real R_C   = 0.070,
  parameter real R_SON = 2.1,
  parameter real VS    = 3.75
) (
  input  logic clk,
  input  logic rst_n,
  input  logic gate,
  input  real  r_load,
  output real  vout,
  output real  il
);
  real vc;

  always_comb vout = r_load * (R_C * il + vc) / (r_load + R_C);

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      il <= 0.0;
      vc <= 0.0;
    end else begin
      il <= il + DT / L * ((gate ? VS : 0.0) - vout - il * (R_SON + R_L));
      vc <= vc + DT / C * (vout - vc) / R_C;
    end
  end
endmodule
