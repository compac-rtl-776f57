// compac_pulse_gen: pulse generation module of the compressed time-domain encoder.
//
// Produces 16 PWM signals; pwm[k] is high for the first k cycles after the
// generator is started, so the pulse widths are 0 .. 15 t0. One clock cycle of
// this design stands for t0, half a period of the input clock. While run is low
// the generator is stopped and its time base returns to zero; raising run starts
// all 16 pulses together in the same cycle.
//
// Interface: run from the CTD controller; pwm is combinational from run and a
// 5-bit time base that saturates at 16.
//
// Sixteen signals stepping by t0 follow the published design; deriving them from
// a counter is this design's choice (the circuit is not given).
module compac_pulse_gen #(
  parameter int unsigned N_PULSES = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                run,
  output logic [N_PULSES-1:0] pwm
);

  localparam int unsigned TW = $clog2(N_PULSES) + 1;

  logic [TW-1:0] t;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      t <= '0;
    else if (!run)                   t <= '0;
    else if (t != TW'(N_PULSES))     t <= t + 1'b1;
  end

  always_comb begin
    for (int k = 0; k < N_PULSES; k++)
      pwm[k] = run & (t < TW'(k));
  end

endmodule
