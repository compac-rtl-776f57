// compac_pulse_sel: pulse-selection module, a 16:1 multiplexer.
//
// The 4-bit activation value drives the select lines and picks the PWM signal
// whose width equals its magnitude, giving the time-encoded activation. Four of
// these serve X1..X4. Purely combinational; follows the published design.
module compac_pulse_sel #(
  parameter int unsigned N_PULSES = 16
) (
  input  logic [N_PULSES-1:0]         pwm,
  input  logic [$clog2(N_PULSES)-1:0] x,
  output logic                        pwm_x
);

  assign pwm_x = pwm[x];

endmodule
