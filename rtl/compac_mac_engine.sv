// compac_mac_engine: one time-domain MAC unit (MDL + TRS + residue control +
// 24-bit up/down counter + 24-bit shifter).
//
// The MAC value is held as count * 32 + residue, in units of one t0 of input
// pulse width: the counter holds whole MDL lengths, the MDL the remainder. While
// op = OP_NOP, every cycle with en high moves the MDL one unit forward (positive
// weight) or backward (negative weight). The residue controller keeps the phase
// of the residue (START_POS / START_NEG): a 0->1 front reaching node E while the
// residue is positive increments the counter, a 0->1 reaching node A while it is
// negative decrements it; a front reaching the "wrong" end only flips the phase.
// Leaving the all-ones (zero residue) state sets the phase from the direction.
// A weight-bit boundary takes two cycles: OP_SHL1 doubles the counter, OP_TRS
// doubles the residue through the lookup table and adds its carry. OP_SHR is an
// arithmetic right shift of the counter by shamt and clears the residue; it
// aligns the accumulated value between input-nibble phases.
//
// Interface: count is the signed counter (the MAC result, in units of one MDL
// length). clear has priority over op.
//
// The counter rules follow the published MDL switch logic, the doubling steps the
// published MAC flow; the two-cycle doubling, the phase set on leaving the zero
// state and the right-shift alignment are this design's choices.
module compac_mac_engine
  import compac_pkg::*;
#(
  parameter int unsigned UNITS = MDL_UNITS,
  parameter int unsigned CW    = CNT_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 en,
  input  logic                 neg,
  input  mac_op_e              op,
  input  logic [4:0]           shamt,
  output logic signed [CW-1:0] count,
  output logic [UNITS-1:0]     mdl_state,
  output logic                 pos
);

  localparam int unsigned MID = UNITS / 2 - 1;

  logic             step_en;
  logic             e_rise, a_rise;
  logic [UNITS-1:0] trs_state;
  logic             trs_incr, trs_decr, trs_change;
  logic             force_en, mdl_clear;

  assign step_en   = en & (op == OP_NOP) & ~clear;
  assign force_en  = (op == OP_TRS) & trs_change;
  assign mdl_clear = clear | (op == OP_SHR);

  compac_mdl #(.UNITS(UNITS)) u_mdl (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (mdl_clear),
    .en        (step_en),
    .neg       (neg),
    .force_en  (force_en),
    .force_val (trs_state),
    .state     (mdl_state),
    .e_rise    (e_rise),
    .a_rise    (a_rise)
  );

  compac_trs_lut #(.UNITS(UNITS)) u_trs (
    .a         (mdl_state[0]),
    .m         (mdl_state[MID]),
    .e         (mdl_state[UNITS-1]),
    .pos       (pos),
    .new_state (trs_state),
    .incr      (trs_incr),
    .decr      (trs_decr),
    .change    (trs_change)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      pos   <= 1'b1;
    end else if (clear) begin
      count <= '0;
      pos   <= 1'b1;
    end else begin
      unique case (op)
        OP_SHL1: count <= count <<< 1;
        OP_TRS:  begin
          if (trs_incr)      count <= count + 1'b1;
          else if (trs_decr) count <= count - 1'b1;
        end
        OP_SHR:  begin
          count <= count >>> shamt;
          pos   <= 1'b1;
        end
        default: begin
          if (step_en) begin
            if (&mdl_state)  pos <= ~neg;
            else if (e_rise) begin
              if (pos) count <= count + 1'b1;
              else     pos   <= 1'b1;
            end else if (a_rise) begin
              if (!pos) count <= count - 1'b1;
              else      pos   <= 1'b0;
            end
          end
        end
      endcase
    end
  end

endmodule
