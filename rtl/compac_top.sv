// compac_top: COMPAC compressed time-domain, pooling-aware convolution engine.
//
// The engine evaluates convolution layers followed by 2x2 max pooling with
// multiply-accumulates done in the time domain. Activations are sent as pulse
// widths (one 4-bit nibble at a time, selected from 16 free-running PWM signals);
// each of the 128 MAC units (32 filters x 4) integrates pulse AND weight bit on a
// 16-unit memory delay line whose overflows drive a 24-bit up/down counter. The
// weight is applied bit-serially, MSB first, doubling counter and time residue
// between bits. The compressed time-domain controller ends each input set as soon
// as the widest of the four pulses has finished, and pooling-aware convolution
// stops computing MACs of a pooling window that lag the leader by a threshold.
//
// Blocks: configuration scan chain, 32-bit input bus (raw words, or run-length
// coded in RLC mode 1 or 2) into the 67 KB eleven-bank global buffer, 144 x 32-bit
// input activation registers, pulse generator, four pulse selectors, CTD
// controller, 32 filters, top-level controller, 32-bit output bus.
//
// Interface and timing:
//   * one clk period stands for t0, half a period of the input clock;
//   * configuration: shift cfg_t in on scan_in while scan_en is high, MSB first;
//   * input bus (only while busy is low): in_valid/in_ready handshake; in_rlc = 0
//     writes in_data at word in_addr of region in_region; in_rlc = 1 or 2 decodes
//     the word and writes the decoded nibbles, eight per word with the first in
//     bits [31:28], from word in_addr on (address and region taken with in_first);
//   * start (while idle) runs one job; busy stays high until the 32 results
//     {8'b0, pooled[23:0]}, filter 0 first, have been sent with out_valid.
//
// The structure follows the published block diagram; the bus protocol, the RLC
// nibble packing and the configuration contents are this design's choices.
module compac_top
  import compac_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        scan_en,
  input  logic        scan_in,
  output logic        scan_out,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [31:0] in_data,
  input  logic [1:0]  in_region,
  input  logic [15:0] in_addr,
  input  logic        in_first,
  input  logic [1:0]  in_rlc,
  input  logic        start,
  output logic        busy,
  output logic        out_valid,
  output logic [31:0] out_data
);

  cfg_t cfg;

  compac_scan_cfg u_scan (
    .clk (clk), .rst_n (rst_n), .scan_en (scan_en), .scan_in (scan_in),
    .scan_out (scan_out), .cfg (cfg)
  );

  // ------------------------------------------------------------ input bus + RLC
  logic        dec_valid, dec_ready;
  logic [3:0]  dec_nib;
  logic [31:0] pack_q;
  logic [2:0]  pack_n;
  logic [15:0] ptr_q;
  logic [1:0]  preg_q;
  logic        pack_wr;
  logic        rlc_sel;

  assign rlc_sel  = (in_rlc != 2'd0);
  assign in_ready = !busy && (rlc_sel ? dec_ready : 1'b1);

  compac_rlc_dec u_rlc (
    .clk (clk), .rst_n (rst_n), .mode (in_rlc == 2'd2),
    .in_valid (in_valid && rlc_sel && !busy), .in_ready (dec_ready), .in_data (in_data),
    .out_valid (dec_valid), .out_nib (dec_nib)
  );

  assign pack_wr = dec_valid && (pack_n == 3'd7);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pack_q <= '0; pack_n <= '0; ptr_q <= '0; preg_q <= '0;
    end else begin
      if (in_valid && in_ready && rlc_sel && in_first) begin
        ptr_q  <= in_addr;
        preg_q <= in_region;
        pack_n <= '0;
      end else if (pack_wr) begin
        ptr_q <= ptr_q + 1'b1;
      end
      if (dec_valid) begin
        pack_q <= {pack_q[27:0], dec_nib};
        pack_n <= pack_n + 1'b1;
      end
    end
  end

  // ------------------------------------------------------------ global buffer
  logic         c_en, c_we;
  logic [1:0]   c_region;
  logic [15:0]  c_addr;
  logic [31:0]  c_wdata;
  logic         g_en, g_we;
  logic [1:0]   g_region;
  logic [15:0]  g_addr;
  logic [31:0]  g_wdata;
  logic [255:0] g_rdata;
  logic         g_oob;

  always_comb begin
    if (busy) begin
      g_en = c_en; g_we = c_we; g_region = c_region; g_addr = c_addr; g_wdata = c_wdata;
    end else if (pack_wr) begin
      g_en = 1'b1; g_we = 1'b1; g_region = preg_q; g_addr = ptr_q; g_wdata = {pack_q[27:0], dec_nib};
    end else begin
      g_en = in_valid && in_ready && !rlc_sel; g_we = 1'b1; g_region = in_region;
      g_addr = in_addr; g_wdata = in_data;
    end
  end

  compac_global_buffer u_buf (
    .clk (clk), .layer (cfg.layer), .en (g_en), .we (g_we), .region (g_region),
    .addr (g_addr), .wdata (g_wdata), .rdata (g_rdata), .oob (g_oob)
  );

  // ------------------------------------------------------------ controller
  logic [3:0]       act_load;
  logic [3:0]       act_group [4];
  logic             act_hi;
  logic             fil_clear, fil_wld, fil_sld, fil_pac_start, fil_pac_apply;
  logic [4:0]       fil_sel, fil_shamt, fil_thr;
  logic [3:0]       fil_group;
  logic [31:0]      fil_data;
  mac_op_e          fil_op;
  logic [CNT_W-1:0] pooled [N_FILT];
  logic             ctd_start, ctd_done;

  compac_ctrl u_ctrl (
    .clk (clk), .rst_n (rst_n), .start (start), .cfg (cfg), .busy (busy),
    .buf_en (c_en), .buf_we (c_we), .buf_region (c_region), .buf_addr (c_addr),
    .buf_wdata (c_wdata), .buf_rdata (g_rdata),
    .act_load (act_load), .act_group (act_group), .act_hi (act_hi),
    .fil_clear (fil_clear), .fil_wld (fil_wld), .fil_sld (fil_sld), .fil_sel (fil_sel),
    .fil_group (fil_group), .fil_data (fil_data), .fil_op (fil_op), .fil_shamt (fil_shamt),
    .fil_pac_start (fil_pac_start), .fil_pac_apply (fil_pac_apply), .fil_thr (fil_thr),
    .pooled (pooled), .ctd_start (ctd_start), .ctd_done (ctd_done),
    .out_valid (out_valid), .out_data (out_data)
  );

  // ------------------------------------------------------------ time encoding
  logic [3:0]          x [4];
  logic [N_PULSES-1:0] pwm;
  logic [3:0]          pwm_x;
  logic                gen_run, apply_inputs;

  compac_act_regs u_act (
    .clk (clk), .load (act_load), .load_group (act_group), .load_hi (act_hi),
    .load_data (g_rdata), .rotate (apply_inputs), .x (x)
  );

  compac_pulse_gen u_pgen (.clk (clk), .rst_n (rst_n), .run (gen_run), .pwm (pwm));

  for (genvar i = 0; i < 4; i++) begin : g_sel
    compac_pulse_sel u_sel (.pwm (pwm), .x (x[i]), .pwm_x (pwm_x[i]));
  end

  compac_ctd_ctrl u_ctd (
    .clk (clk), .rst_n (rst_n), .start (ctd_start), .n_sets (10'(N_TAPS)),
    .pwm_x (pwm_x), .gen_run (gen_run), .or_signal (), .stop_pulse (),
    .apply_inputs (apply_inputs), .busy (), .done (ctd_done)
  );

  // ------------------------------------------------------------ filters
  for (genvar fi = 0; fi < N_FILT; fi++) begin : g_fil
    compac_filter u_fil (
      .clk (clk), .rst_n (rst_n), .clear (fil_clear),
      .wld (fil_wld && fil_sel == 5'(fi)), .sld (fil_sld && fil_sel == 5'(fi)),
      .ld_group (fil_group), .ld_data (fil_data), .shift (apply_inputs),
      .pwm_x (pwm_x), .op (fil_op), .shamt (fil_shamt),
      .pac_start (fil_pac_start), .pac_apply (fil_pac_apply), .thr_shift (fil_thr),
      .pooled (pooled[fi]), .active (), .mac ()
    );
  end

endmodule
