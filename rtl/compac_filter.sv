// compac_filter: one of the 32 filters of the COMPAC engine.
//
// A filter computes the four MACs of one 2x2 max-pooling window at once: the four
// MAC engines receive the time-encoded activations X1..X4 and share the same
// weight bit and weight sign (weight reuse). The current weight-bit plane of the
// 3x3x32 window is held in nine 32-bit weight shift registers and the sign plane
// wt[7] in nine 32-bit cyclic sign registers, which rotate through the window once
// per weight bit and are reused for all seven magnitude bits. Each engine's EN is
// PWM_i AND weight bit AND MAC_i_ACTIVE; the sign selects the MDL direction. The
// PAC/pooling comparators switch off lagging MACs after a PAC phase and give the
// ReLU'd maximum at the end.
//
// Interface: wld/sld load one 32-bit word (tap group ld_group) of the weight or
// sign plane; shift (apply_inputs) advances both registers by one tap; op is the
// engine operation, applied only to active engines; pac_start launches the
// two-cycle comparator evaluation, pac_apply lets its result switch MACs off;
// clear starts a new MAC window (all four active).
//
// The register counts, the weight and sign reuse, and EN follow the published
// filter; bit 0 of each register as the current tap is this design's choice.
module compac_filter
  import compac_pkg::*;
#(
  parameter int unsigned GROUPS = TAP_GROUPS,
  parameter int unsigned CH     = CH_PER_ROW
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              wld,
  input  logic              sld,
  input  logic [3:0]        ld_group,
  input  logic [CH-1:0]     ld_data,
  input  logic              shift,
  input  logic [3:0]        pwm_x,
  input  mac_op_e           op,
  input  logic [4:0]        shamt,
  input  logic              pac_start,
  input  logic              pac_apply,
  input  logic [4:0]        thr_shift,
  output logic [CNT_W-1:0]  pooled,
  output logic [3:0]        active,
  output logic signed [CNT_W-1:0] mac [4]
);

  localparam int unsigned TAPS = GROUPS * CH;

  logic [TAPS-1:0] wbits, sbits;
  logic [3:0]      kill;
  logic            kill_valid;

  always_ff @(posedge clk) begin
    if (wld)        wbits[int'(ld_group)*CH +: CH] <= ld_data;
    else if (shift) wbits <= {1'b0, wbits[TAPS-1:1]};
    if (sld)        sbits[int'(ld_group)*CH +: CH] <= ld_data;
    else if (shift) sbits <= {sbits[0], sbits[TAPS-1:1]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                        active <= '1;
    else if (clear)                    active <= '1;
    else if (pac_apply && kill_valid)  active <= active & ~kill;
  end

  for (genvar i = 0; i < 4; i++) begin : g_mac
    compac_mac_engine u_eng (
      .clk       (clk),
      .rst_n     (rst_n),
      .clear     (clear),
      .en        (pwm_x[i] & wbits[0] & active[i]),
      .neg       (sbits[0]),
      .op        (active[i] ? op : OP_NOP),
      .shamt     (shamt),
      .count     (mac[i]),
      .mdl_state (),
      .pos       ()
    );
  end

  compac_pac_pool u_pac (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (pac_start),
    .mac        (mac),
    .active     (active),
    .thr_shift  (thr_shift),
    .kill       (kill),
    .kill_valid (kill_valid),
    .pooled     (pooled)
  );

endmodule
