// Registered sign-magnitude <-> two's complement converter.
//
// The controller takes its voltage error as a sign-magnitude word and the
// PID datapath works in two's complement, so one converter sits in front of
// the PID and a second one behind it. A word is captured into the input
// register when `load` is high (Load_E / Load_U); one or more cycles later
// `co` (CO_E / CO_U) captures the converted word into the output register.
// Conversion: when the sign bit is 0 the word passes unchanged; when it is 1
// the fifteen magnitude bits are inverted and one is added to the word,
// keeping the sign bit. The same mapping turns a two's complement word back
// into sign-magnitude, so the block is used unchanged in both places.
//
// Interface: eee is the word in, oo the converted word out. Latency: two
// clocks, one with `load` and one with `co`, as in the sequence of the
// controller. The bit-level behaviour (1000000000001010 -> 1111111111110110,
// positive words unchanged) follows the original design; the reset of both
// registers to zero is this design's choice. The "negative zero" word 0x8000
// converts to 0.
module auto_2s_comp
  import pid_pwm_pkg::*;
#(
  parameter int unsigned W = WORD_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,   // Load_E / Load_U
  input  logic         co,     // CO_E / CO_U
  input  logic [W-1:0] eee,
  output logic [W-1:0] oo
);

  logic [W-1:0] in_q;
  logic [W-1:0] conv;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    in_q <= '0;
    else if (load) in_q <= eee;
  end

  // Sign detect, inverters on the magnitude bits, incrementer.
  always_comb begin
    if (in_q[W-1]) conv = {1'b1, ~in_q[W-2:0]} + W'(1);
    else           conv = in_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  oo <= '0;
    else if (co) oo <= conv;
  end

endmodule
