// compac_ctd_ctrl: compressed time-domain (CTD) controller, i.e. the OR gate and
// the negative-edge / zero-value detector that remove the dead time of PWM input
// encoding.
//
// Four activations X1..X4 are encoded at once. Their pulses start together; the
// OR of the four (or_signal) stays high for the widest one. As soon as
// or_signal is seen low (its negative edge, or a set whose four values are all
// zero) the set is finished: stop_pulse is raised in the next t0, the pulse
// generator is stopped in the t0 after, apply_inputs shifts the next activations
// in during the following t0, and the generator restarts one t0 later. An input
// set therefore takes max(X1..X4) + 4 cycles of t0 = max * t0 + two input-clock
// periods, instead of the full-scale width of plain PWM encoding.
//
// Interface: start (one cycle, while idle) launches n_sets input sets; done is
// high in the last apply_inputs cycle; busy covers the sequence. gen_run drives
// the pulse generator.
//
// The event sequence and its two-input-clock overhead follow the published
// design; the state encoding and the start/done handshake are this design's.
module compac_ctd_ctrl #(
  parameter int unsigned SET_W = 10
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [SET_W-1:0] n_sets,
  input  logic [3:0]       pwm_x,
  output logic             gen_run,
  output logic             or_signal,
  output logic             stop_pulse,
  output logic             apply_inputs,
  output logic             busy,
  output logic             done
);

  typedef enum logic [2:0] {S_IDLE, S_PULSE, S_STOP, S_HALT, S_APPLY} state_e;

  state_e           st;
  logic [SET_W-1:0] left;

  assign or_signal    = |pwm_x;
  assign gen_run      = (st == S_PULSE) || (st == S_STOP);
  assign stop_pulse   = (st == S_STOP);
  assign apply_inputs = (st == S_APPLY);
  assign busy         = (st != S_IDLE);
  assign done         = (st == S_APPLY) && (left == SET_W'(1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= S_IDLE;
      left <= '0;
    end else begin
      unique case (st)
        S_IDLE:  if (start && n_sets != '0) begin st <= S_PULSE; left <= n_sets; end
        S_PULSE: if (!or_signal) st <= S_STOP;
        S_STOP:  st <= S_HALT;
        S_HALT:  st <= S_APPLY;
        S_APPLY: begin
          left <= left - 1'b1;
          st   <= (left == SET_W'(1)) ? S_IDLE : S_PULSE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
