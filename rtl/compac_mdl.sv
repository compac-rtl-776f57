// compac_mdl: 16-unit bidirectional memory delay line (MDL) with time residue
// scaling load.
//
// The MDL stores elapsed time as the position of a 0->1 front in a string of
// delay units. This synchronous model advances the pattern by one unit for every
// clock cycle in which EN is high: forward (towards node E) for a positive
// weight, backward (towards node A) for a negative one; the inverted end value
// re-enters at the opposite end, as through the feedback inverters between E and
// A. A full length is 32 unit steps: from all ones, 16 steps fill the line with
// zeros and 16 more with ones again. A 0->1 arriving at E (forward) or at A
// (backward) marks one full length and is reported to the counter logic. During
// the TRS phase the units are forced to a new state (the S4/S5 switches).
//
// Interface: state[0] is unit 1 (node A), state[7] unit 8 (node M), state[15]
// unit 16 (node E). e_rise / a_rise are combinational and refer to the step taken
// at the next clock edge. Reset and force have priority over stepping.
//
// The unit structure, the nodes and the two directions follow the published MDL;
// stepping once per clock (one unit per t0 of pulse width) and the all-ones reset
// state are this design's choices.
module compac_mdl #(
  parameter int unsigned UNITS = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,      // back to the all-ones (zero residue) state
  input  logic             en,
  input  logic             neg,
  input  logic             force_en,
  input  logic [UNITS-1:0] force_val,
  output logic [UNITS-1:0] state,
  output logic             e_rise,
  output logic             a_rise
);

  logic [UNITS-1:0] fwd_next, bwd_next;

  always_comb begin
    fwd_next = {state[UNITS-2:0], ~state[UNITS-1]};
    bwd_next = {~state[0], state[UNITS-1:1]};
  end

  assign e_rise = en & ~neg & ~state[UNITS-1] & fwd_next[UNITS-1];
  assign a_rise = en &  neg & ~state[0]       & bwd_next[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        state <= '1;
    else if (clear)    state <= '1;
    else if (force_en) state <= force_val;
    else if (en)       state <= neg ? bwd_next : fwd_next;
  end

endmodule
