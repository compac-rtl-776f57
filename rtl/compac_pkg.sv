// compac_pkg: constants and types shared by the COMPAC time-domain CNN engine.
//
// The engine computes 8-bit activation x 8-bit sign-magnitude weight MACs in the
// time domain. Activations are encoded as pulse widths in two 4-bit nibbles
// (X[7:4], then X[3:0]); every weight magnitude bit is applied MSB first, with a
// x2 scaling of the accumulated value between bits. This package holds the sizes
// (16-unit memory delay line, 24-bit counter, 32 filters of 4 MACs, 288 taps per
// window, 11 SRAM banks), the MAC-phase schedule of each pooling-aware
// convolution (PAC) mode, and the configuration word loaded through the scan chain.
//
// The sizes, the phase order of the PAC modes and the bank capacities follow the
// published design. The configuration word layout, the no-PAC schedule and the
// alignment shifts between nibble phases are this design's own choices.
package compac_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned MDL_UNITS   = 16;             // units per memory delay line
  localparam int unsigned MDL_STEPS   = 2 * MDL_UNITS;  // unit steps in one full MDL length
  localparam int unsigned MDL_LOG2    = 5;              // log2(MDL_STEPS)
  localparam int unsigned CNT_W       = 24;             // up/down counter and shifter width
  localparam int unsigned N_FILT      = 32;             // filters
  localparam int unsigned N_MAC       = 4;              // MACs (MDLs) per filter = 2x2 pool window
  localparam int unsigned CH_PER_ROW  = 32;             // channels in one 256-bit SRAM row
  localparam int unsigned TAP_GROUPS  = 9;              // 3x3 window positions
  localparam int unsigned N_TAPS      = TAP_GROUPS * CH_PER_ROW;  // 288 products per MAC window
  localparam int unsigned NIB_W       = 4;              // bits per time-encoded input phase
  localparam int unsigned N_PULSES    = 1 << NIB_W;     // 16 PWM signals
  localparam int unsigned ROW_W       = 256;            // SRAM row (columns)
  localparam int unsigned WORDS_ROW   = ROW_W / 32;     // 32-bit words per row
  localparam int unsigned N_BANKS     = 11;

  // Bank sizes in rows of 32 bytes: B1..B11 = 8,8,8,8,8,8,8,4,4,2,1 KB (67 KB).
  localparam int unsigned BANK_ROWS [N_BANKS] = '{256, 256, 256, 256, 256, 256, 256, 128, 128, 64, 32};

  // Banks (bit b = bank B(b+1)) given to each region for AlexNet conv layers 1..5.
  // Within a region the banks are concatenated in ascending bank order.
  function automatic logic [N_BANKS-1:0] bank_mask(logic [2:0] layer, logic [1:0] region);
    logic [N_BANKS-1:0] m;
    unique case (layer)
      3'd1:    m = (region == 2'd0) ? 11'b000_1001_1111 : (region == 2'd1) ? 11'b010_0110_0000 : 11'b101_0000_0000;
      3'd2:    m = (region == 2'd0) ? 11'b000_1000_0001 : (region == 2'd1) ? 11'b010_0111_1110 : 11'b101_0000_0000;
      3'd3:    m = (region == 2'd0) ? 11'b001_1000_0001 : (region == 2'd1) ? 11'b010_0111_1110 : 11'b100_0000_0000;
      default: m = (region == 2'd0) ? 11'b000_1000_0001 : (region == 2'd1) ? 11'b011_0111_1110 : 11'b100_0000_0000;
    endcase
    if (region == 2'd3) m = '0;
    return m;
  endfunction

  // ---------------------------------------------------------------- MAC engine ops
  typedef enum logic [1:0] {
    OP_NOP  = 2'd0,   // accumulate EN pulses on the MDL
    OP_SHL1 = 2'd1,   // counter x2 (shifter)
    OP_TRS  = 2'd2,   // time residue x2 (TRS lookup) and counter correction
    OP_SHR  = 2'd3    // counter arithmetic right shift (phase alignment), residue cleared
  } mac_op_e;

  // ---------------------------------------------------------------- PAC modes
  typedef enum logic [1:0] {
    PAC_OFF = 2'd0,
    PAC_M1  = 2'd1,   // four MAC phases, three PAC phases
    PAC_M2  = 2'd2    // two MAC phases, one PAC phase
  } pac_mode_e;

  typedef struct packed {
    logic       hi;       // 1: X[7:4], 0: X[3:0]
    logic [2:0] bit_hi;   // first (most significant) weight bit of the phase
    logic [2:0] bit_lo;   // last weight bit of the phase
  } phase_t;

  function automatic int unsigned n_phases(pac_mode_e m);
    return (m == PAC_M1) ? 4 : 2;
  endfunction

  function automatic phase_t phase_of(pac_mode_e m, int unsigned p);
    phase_t r;
    if (m == PAC_M1) begin
      case (p)
        0:       r = '{hi: 1'b1, bit_hi: 3'd6, bit_lo: 3'd4};
        1:       r = '{hi: 1'b0, bit_hi: 3'd6, bit_lo: 3'd4};
        2:       r = '{hi: 1'b1, bit_hi: 3'd3, bit_lo: 3'd0};
        default: r = '{hi: 1'b0, bit_hi: 3'd3, bit_lo: 3'd0};
      endcase
    end else begin
      case (p)
        0:       r = '{hi: 1'b1, bit_hi: 3'd6, bit_lo: 3'd0};
        default: r = '{hi: 1'b0, bit_hi: 3'd6, bit_lo: 3'd0};
      endcase
    end
    return r;
  endfunction

  // Significance (log2) of the product of a phase's nibble with weight bit b.
  function automatic int signed sig_of(phase_t ph, int unsigned b);
    return (ph.hi ? 4 : 0) + int'(b);
  endfunction

  // Scaling applied to the accumulated value before phase p (p >= 1):
  // positive = number of x2 steps, negative = right shift.
  function automatic int signed align_of(pac_mode_e m, int unsigned p);
    phase_t prv, cur;
    prv = phase_of(m, p - 1);
    cur = phase_of(m, p);
    return sig_of(prv, 32'(prv.bit_lo)) - sig_of(cur, 32'(cur.bit_hi));
  endfunction

  // ---------------------------------------------------------------- buffer regions
  typedef enum logic [1:0] {
    REG_ACT = 2'd0,
    REG_WT  = 2'd1,
    REG_OUT = 2'd2
  } region_e;

  // ---------------------------------------------------------------- configuration
  typedef struct packed {
    logic [2:0]      layer;      // AlexNet conv layer 1..5: bank allocation
    pac_mode_e       pac_mode;
    logic [4:0]      thr0;       // log2 PAC thresholds (MAC units), PAC phases 1..3
    logic [4:0]      thr1;
    logic [4:0]      thr2;
    logic [2:0]      stride;     // convolution stride (1..4)
    logic [5:0]      tile_w;     // stored input tile width (pixels)
    logic [5:0]      tile_h;     // stored input tile height (pixels)
    logic [5:0]      y0;         // top-left pixel of window X1
    logic [5:0]      x0;
    logic [3:0]      groups;     // 32-channel groups per window (1..15)
  } cfg_t;

  localparam int unsigned CFG_W = $bits(cfg_t);

endpackage
