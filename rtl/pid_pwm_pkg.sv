// Shared constants and types of the FPGA PID-PWM buck-converter controller.
//
// Data words are 16-bit fixed point: one sign bit, four integer bits and
// eleven fraction bits (Q4.11), giving about three decimal places of
// fraction. The controller is driven by a 16-step sequence of one-hot
// strobes; ctrl_t names those strobes in the order they fire.
package pid_pwm_pkg;

  localparam int unsigned WORD_W   = 16;  // data word width
  localparam int unsigned FRAC_W   = 11;  // fraction bits of a data word
  localparam int unsigned PWM_W    = 8;   // PWM counter and duty width
  localparam int unsigned SEQ_LEN  = 16;  // strobes per sample
  localparam int unsigned N_CS     = 10;  // PID datapath strobes CS1..CS10

  typedef logic signed [WORD_W-1:0] word_t;

  // Strobe bundle of the control unit, one bit per step of the sequence.
  // The first field is the most significant bit; step 0 (load_e) is bit 0.
  typedef struct packed {
    logic             co_u;    // step 15: load the output converter (held through the PWM period)
    logic             load_u;  // step 14: load the output converter input register
    logic             xx;      // step 13: spare step between PID and output converter
    logic [N_CS:1]    cs;      // steps 3..12: PID datapath strobes CS1..CS10
    logic             clear;   // step 2: clear the PID working registers
    logic             co_e;    // step 1: load the input converter output register
    logic             load_e;  // step 0: load the input converter input register
  } ctrl_t;

endpackage
