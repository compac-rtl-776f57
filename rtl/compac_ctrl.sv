// compac_ctrl: top-level control of the COMPAC engine with its address generators
// for input activations, weights and output activations.
//
// One job computes, for all 32 filters, the four MACs of one 2x2 max-pooling
// window and writes the 32 pooled results. The job follows the MAC-phase schedule
// of the selected PAC mode (package compac_pkg). Per phase:
//   * the input-activation address generator walks once over the pixels covered
//     by the four overlapping 3x3 windows (stride S) and broadcasts each SRAM row
//     (32 channels) into every stream X1..X4 whose window contains it, taking the
//     phase's nibble: every activation is read once per phase;
//   * before each weight bit except the first of a phase the four MAC engines of
//     every filter double their value (counter shift, then time residue scaling);
//     before a new phase the value is aligned (doubling or right shift);
//   * the weight address generator loads the bit plane of that weight bit, 9 words
//     per filter; the sign plane wt[7] is loaded only once per job (sign reuse);
//   * the compressed time-domain controller encodes the 288 input sets;
//   * between phases, if PAC is on, the two-cycle PAC phase switches off lagging MACs.
// With more than one 32-channel group the activations and signs are reloaded per
// group and weight bit. At the end the comparators give the ReLU'd pooled value,
// the output address generator writes it to the output region (no partial sums
// ever leave the counters) and the 32 words are sent on the 32-bit output bus.
//
// Buffer layout (word addresses): activation pixel (y, x) of group g is row
// (g*tile_h + y)*tile_w + x; weight plane (filter f, group g, bit b, 7 = sign) is
// words ((g*32 + f)*8 + b)*9 .. +8, word t = tap group t (ky*3 + kx), bit c =
// channel c; output word f = {8'b0, pooled value of filter f}.
//
// Timing: a buffer read issued in one cycle is captured in the next, so each row
// or word takes two cycles. busy is high from start to the last output word.
//
// The phase schedule, reuse schemes and zero partial-sum movement follow the
// published data flow; the layouts, the 3x3x32 window shape and the alignment are
// this design's choices.
module compac_ctrl
  import compac_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  cfg_t               cfg,
  output logic               busy,
  // global buffer
  output logic               buf_en,
  output logic               buf_we,
  output logic [1:0]         buf_region,
  output logic [15:0]        buf_addr,
  output logic [31:0]        buf_wdata,
  input  logic [255:0]       buf_rdata,
  // input activation registers
  output logic [3:0]         act_load,
  output logic [3:0]         act_group [4],
  output logic               act_hi,
  // filters
  output logic               fil_clear,
  output logic               fil_wld,
  output logic               fil_sld,
  output logic [4:0]         fil_sel,
  output logic [3:0]         fil_group,
  output logic [31:0]        fil_data,
  output mac_op_e            fil_op,
  output logic [4:0]         fil_shamt,
  output logic               fil_pac_start,
  output logic               fil_pac_apply,
  output logic [4:0]         fil_thr,
  input  logic [CNT_W-1:0]   pooled [N_FILT],
  // CTD controller
  output logic               ctd_start,
  input  logic               ctd_done,
  // output bus
  output logic               out_valid,
  output logic [31:0]        out_data
);

  typedef enum logic [3:0] {
    S_IDLE, S_CLEAR, S_ALIGN, S_BIT, S_DBL, S_GROUP, S_LDACT, S_LDSGN, S_LDWT,
    S_RUN, S_PAC1, S_PAC2, S_POOL, S_WROUT, S_RDOUT
  } state_e;

  state_e      st;
  logic [1:0]  p;          // MAC phase
  logic [2:0]  b;          // weight bit
  logic [3:0]  g;          // channel group
  logic [4:0]  f;          // filter
  logic [3:0]  t;          // tap group / word in plane
  logic [2:0]  uy, ux;     // pixel of the union of the four windows
  logic        half;       // 0: issue read, 1: capture
  logic        ctd_wait;
  logic [2:0]  dcnt;       // doublings left
  logic        dtrs;       // second cycle of a doubling
  logic        sgn_loaded;
  logic [2:0]  wsel_q;

  pac_mode_e   mode;
  phase_t      ph;
  logic [2:0]  s;
  logic [2:0]  span;       // union width - 1 = S + 2
  logic        last_phase;
  int signed   align;
  int signed   thr_sh;
  logic [4:0]  thr_log;

  assign mode       = cfg.pac_mode;
  assign ph         = phase_of(mode, 32'(p));
  assign s          = cfg.stride;
  assign span       = s + 3'd2;
  assign last_phase = (32'(p) == n_phases(mode) - 1);
  assign align      = (p == 2'd0) ? 0 : align_of(mode, 32'(p));

  always_comb begin
    thr_log = (p == 2'd0) ? cfg.thr0 : (p == 2'd1) ? cfg.thr1 : cfg.thr2;
    thr_sh  = int'(thr_log) - int'(MDL_LOG2) - sig_of(ph, 32'(ph.bit_lo));
  end

  // --------------------------------------------------------- address generators
  logic [15:0] act_row, wt_word;
  always_comb begin
    act_row = 16'((32'(g) * 32'(cfg.tile_h) + 32'(cfg.y0) + 32'(uy)) * 32'(cfg.tile_w)
                  + 32'(cfg.x0) + 32'(ux));
    wt_word = 16'(((32'(g) * N_FILT + 32'(f)) * 8 + 32'((st == S_LDSGN) ? 3'd7 : b)) * TAP_GROUPS
                  + 32'(t));
  end

  // which streams use the current union pixel, and at which tap group
  always_comb begin
    for (int i = 0; i < 4; i++) begin
      logic [3:0] oy, ox, ky, kx;
      oy = (i >= 2) ? 4'(s) : 4'd0;
      ox = (i[0])   ? 4'(s) : 4'd0;
      ky = 4'(uy) - oy;
      kx = 4'(ux) - ox;
      act_load[i]  = (st == S_LDACT) && half && (4'(uy) >= oy) && (4'(ux) >= ox)
                     && (ky < 4'd3) && (kx < 4'd3);
      act_group[i] = 4'(ky * 4'd3 + kx);
    end
  end
  assign act_hi = ph.hi;

  // --------------------------------------------------------- outputs
  always_comb begin
    buf_en        = 1'b0;
    buf_we        = 1'b0;
    buf_region    = REG_ACT;
    buf_addr      = '0;
    buf_wdata     = '0;
    fil_clear     = (st == S_CLEAR);
    fil_wld       = (st == S_LDWT) && half;
    fil_sld       = (st == S_LDSGN) && half;
    fil_sel       = f;
    fil_group     = t;
    fil_data      = buf_rdata[int'(wsel_q)*32 +: 32];
    fil_op        = OP_NOP;
    fil_shamt     = '0;
    fil_pac_start = (st == S_PAC1) || (st == S_POOL);
    fil_pac_apply = (st == S_PAC2);
    fil_thr       = (thr_sh < 0) ? 5'd0 : 5'(thr_sh);
    ctd_start     = (st == S_RUN) && !ctd_wait;
    out_valid     = (st == S_RDOUT) && half;
    out_data      = buf_rdata[int'(wsel_q)*32 +: 32];
    unique case (st)
      S_ALIGN: begin
        if (align < 0) begin fil_op = OP_SHR; fil_shamt = 5'(-align); end
        else if (dcnt != 0) fil_op = dtrs ? OP_TRS : OP_SHL1;
      end
      S_DBL:   fil_op = dtrs ? OP_TRS : OP_SHL1;
      S_LDACT: if (!half) begin buf_en = 1'b1; buf_region = REG_ACT; buf_addr = {act_row[12:0], 3'd0}; end
      S_LDSGN, S_LDWT:
               if (!half) begin buf_en = 1'b1; buf_region = REG_WT; buf_addr = wt_word; end
      S_WROUT: begin
        buf_en = 1'b1; buf_we = 1'b1; buf_region = REG_OUT;
        buf_addr = 16'(f); buf_wdata = {8'd0, pooled[f]};
      end
      S_RDOUT: if (!half) begin buf_en = 1'b1; buf_region = REG_OUT; buf_addr = 16'(f); end
      default: ;
    endcase
  end

  assign busy = (st != S_IDLE);

  // --------------------------------------------------------- sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; p <= '0; b <= '0; g <= '0; f <= '0; t <= '0; uy <= '0; ux <= '0;
      half <= 1'b0; ctd_wait <= 1'b0; dcnt <= '0; dtrs <= 1'b0; sgn_loaded <= 1'b0;
      wsel_q <= '0;
    end else begin
      if (buf_en && !buf_we) wsel_q <= buf_addr[2:0];
      unique case (st)
        S_IDLE: if (start) st <= S_CLEAR;
        S_CLEAR: begin
          p <= '0; g <= '0; sgn_loaded <= 1'b0;
          b <= phase_of(mode, 0).bit_hi;
          st <= S_GROUP;
        end
        S_ALIGN: begin
          if (align < 0) begin
            st <= S_GROUP;
          end else if (dcnt == 0) begin
            st <= S_GROUP;
          end else begin
            dtrs <= ~dtrs;
            if (dtrs) begin
              dcnt <= dcnt - 1'b1;
              if (dcnt == 3'd1) st <= S_GROUP;
            end
          end
        end
        S_BIT: begin
          // next weight bit of the phase: double first
          dtrs <= 1'b0;
          st   <= S_DBL;
        end
        S_DBL: begin
          dtrs <= ~dtrs;
          if (dtrs) st <= S_GROUP;
        end
        S_GROUP: begin
          uy <= '0; ux <= '0; f <= '0; t <= '0; half <= 1'b0;
          if (b == ph.bit_hi || cfg.groups > 4'd1)             st <= S_LDACT;
          else if (!sgn_loaded || cfg.groups > 4'd1)           st <= S_LDSGN;
          else                                                 st <= S_LDWT;
        end
        S_LDACT: begin
          half <= ~half;
          if (half) begin
            if (ux == span) begin
              ux <= '0;
              if (uy == span) begin
                uy <= '0;
                st <= (!sgn_loaded || cfg.groups > 4'd1) ? S_LDSGN : S_LDWT;
              end else uy <= uy + 1'b1;
            end else ux <= ux + 1'b1;
          end
        end
        S_LDSGN, S_LDWT: begin
          half <= ~half;
          if (half) begin
            if (t == 4'(TAP_GROUPS - 1)) begin
              t <= '0;
              if (f == 5'(N_FILT - 1)) begin
                f <= '0;
                if (st == S_LDSGN) begin sgn_loaded <= 1'b1; st <= S_LDWT; end
                else begin st <= S_RUN; ctd_wait <= 1'b0; end
              end else f <= f + 1'b1;
            end else t <= t + 1'b1;
          end
        end
        S_RUN: begin
          if (!ctd_wait) ctd_wait <= 1'b1;
          else if (ctd_done) begin
            ctd_wait <= 1'b0;
            if (g + 1'b1 < cfg.groups) begin
              g  <= g + 1'b1;
              st <= S_GROUP;
            end else begin
              g <= '0;
              if (b != ph.bit_lo) begin
                b  <= b - 1'b1;
                st <= S_BIT;
              end else if (last_phase) begin
                st <= S_POOL;
              end else if (mode != PAC_OFF) begin
                st <= S_PAC1;
              end else begin
                p <= p + 1'b1; b <= phase_of(mode, 32'(p) + 1).bit_hi;
                dtrs <= 1'b0; dcnt <= 3'(align_of(mode, 32'(p) + 1));
                st <= S_ALIGN;
              end
            end
          end
        end
        S_PAC1: st <= S_PAC2;
        S_PAC2: begin
          p <= p + 1'b1; b <= phase_of(mode, 32'(p) + 1).bit_hi;
          dtrs <= 1'b0; dcnt <= 3'(align_of(mode, 32'(p) + 1));
          st <= S_ALIGN;
        end
        S_POOL: begin f <= '0; st <= S_WROUT; end
        S_WROUT: begin
          if (f == 5'(N_FILT - 1)) begin f <= '0; half <= 1'b0; st <= S_RDOUT; end
          else f <= f + 1'b1;
        end
        S_RDOUT: begin
          half <= ~half;
          if (half) begin
            if (f == 5'(N_FILT - 1)) begin f <= '0; st <= S_IDLE; end
            else f <= f + 1'b1;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
