// compac_trs_lut: time residue scaling (TRS) lookup for the 16-unit MDL.
//
// Before the product with the next, less significant weight bit is accumulated,
// the time residue left on the MDL must be doubled. Only nodes A, M and E are
// observed; together with the residue sign (phase) they place the residue in one
// quarter of the full MDL length, and the line is forced to the stored state
// closest to twice that residue: 25% (8 zeros then 8 ones), 75% (8 ones then 8
// zeros), or the near-50% states of the last quarter. When the doubled residue
// passes a full length the counter is incremented (positive) or decremented
// (negative).
//
// Interface: purely combinational. new_state[0] is unit 1. change is 1 when the
// MDL must be forced.
//
// The eight rows come from the published TRS lookup table; its S4/S5 pair "1/0"
// is taken to drive a unit to 0 and "0/1" to 1. The table does not list the
// all-ones (zero residue) and all-zeros (exactly half) codes: here all ones is
// kept and all zeros becomes all ones with a counter carry, a choice of this design.
module compac_trs_lut #(
  parameter int unsigned UNITS = 16
) (
  input  logic             a,
  input  logic             m,
  input  logic             e,
  input  logic             pos,
  output logic [UNITS-1:0] new_state,
  output logic             incr,
  output logic             decr,
  output logic             change
);

  localparam int unsigned HALF = UNITS / 2;

  // Unit groups of the table: unit 1, units 2..HALF, units HALF+1..UNITS-1, unit UNITS.
  function automatic logic [UNITS-1:0] pattern(logic u1, logic ul, logic ur, logic un);
    logic [UNITS-1:0] p;
    p[0]                   = u1;
    p[HALF-1:1]            = {(HALF-1){ul}};
    p[UNITS-2:HALF]        = {(HALF-1){ur}};
    p[UNITS-1]             = un;
    return p;
  endfunction

  always_comb begin
    new_state = '1;
    incr      = 1'b0;
    decr      = 1'b0;
    change    = 1'b1;
    unique case ({pos, a, m, e})
      // positive residue
      4'b1_011: new_state = pattern(1'b0, 1'b0, 1'b1, 1'b1);                 // 0-25%  -> 25%
      4'b1_001: new_state = pattern(1'b1, 1'b1, 1'b0, 1'b0);                 // 25-50% -> 75%
      4'b1_100: begin new_state = pattern(1'b0, 1'b0, 1'b1, 1'b1); incr = 1'b1; end  // 50-75%
      4'b1_110: begin new_state = pattern(1'b0, 1'b0, 1'b0, 1'b1); incr = 1'b1; end  // 75-100%
      4'b1_000: begin new_state = '1; incr = 1'b1; end                       // exactly 50%
      // negative residue
      4'b0_110: new_state = pattern(1'b1, 1'b1, 1'b0, 1'b0);                 // 0-25%  -> -25%
      4'b0_100: new_state = pattern(1'b0, 1'b0, 1'b1, 1'b1);                 // 25-50% -> -75%
      4'b0_001: begin new_state = pattern(1'b1, 1'b1, 1'b0, 1'b0); decr = 1'b1; end  // 50-75%
      4'b0_011: begin new_state = pattern(1'b1, 1'b0, 1'b0, 1'b0); decr = 1'b1; end  // 75-100%
      4'b0_000: begin new_state = '1; decr = 1'b1; end                       // exactly -50%
      default:  change = 1'b0;                                               // zero residue
    endcase
  end

endmodule
