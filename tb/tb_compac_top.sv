// tb_compac_top: end-to-end test of the COMPAC engine at its full, published size
// (32 filters x 4 MACs, 16-unit MDLs, 288-product windows, 67 KB buffer; no
// parameter overrides). For each job the testbench
//   * shifts the configuration in through the scan chain and checks the previous
//     word coming out of scan_out;
//   * writes random sparse activations and random sign-magnitude weights into the
//     global buffer, raw or run-length coded (activations in RLC mode 2, weights
//     in RLC mode 1);
//   * starts the job and compares the 32 pooled outputs with a value-level model
//     of the whole data flow: MDL residue and counter, TRS doubling between weight
//     bits, nibble-phase alignment, PAC kills, max pooling and ReLU
//     (compac_model.svh).
// It counts how often each mechanism happened and fails if one never did:
// zero-skipped and early-stopped input sets (CTD), broadcast activation loads,
// negative-weight pulses, TRS carries, right-shift alignment, PAC switch-offs,
// ReLU clamps, RLC mode 1 and mode 2 words, and scan read-back.
module tb_compac_top;
  import compac_pkg::*;
  `include "compac_model.svh"

  logic clk = 0, rst_n = 0;
  logic scan_en = 0, scan_in = 0, scan_out;
  logic in_valid = 0, in_ready, in_first = 0, start = 0, busy, out_valid;
  logic [31:0] in_data = '0, out_data;
  logic [1:0] in_region = '0, in_rlc = '0;
  logic [15:0] in_addr = '0;

  compac_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    #200ms;
    failures++; $display("TB watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ------------------------------------------------------------ mechanism counters
  int n_zero_sets = 0, n_early_sets = 0, n_bcast = 0, n_neg = 0, n_carry = 0;
  int n_shr = 0, n_kill = 0, n_relu = 0, n_rlc1 = 0, n_rlc2 = 0, n_scan = 0;
  int set_len = 0;

  always @(posedge clk) begin
    if (dut.u_ctd.busy) begin
      set_len++;
      if (dut.apply_inputs) begin
        if (set_len <= 4) n_zero_sets++;
        else if (set_len < 19) n_early_sets++;
        set_len = 0;
      end
    end else set_len = 0;
    if (dut.busy && $countones(dut.act_load) > 1) n_bcast++;
    if (dut.busy && dut.fil_op == OP_SHR) n_shr++;
    if (in_valid && in_ready && in_rlc == 2'd1) n_rlc1++;
    if (in_valid && in_ready && in_rlc == 2'd2) n_rlc2++;
  end

  // ------------------------------------------------------------ data
  logic [7:0] act [4][8][8][32];      // [group][y][x][channel]
  logic [7:0] wt  [4][32][9][32];     // [group][filter][tap group][channel]

  // ------------------------------------------------------------ host tasks
  task automatic scan_cfg(cfg_t c, cfg_t prev);
    logic [CFG_W-1:0] w, got;
    w = c; got = '0;
    for (int i = CFG_W - 1; i >= 0; i--) begin
      scan_en = 1; scan_in = w[i]; #1; got = {got[CFG_W-2:0], scan_out};
      @(negedge clk);
    end
    scan_en = 0;
    checks++;
    if (got !== prev) begin failures++; $display("FAIL scan read-back %h want %h", got, prev); end
    else n_scan++;
  endtask

  task automatic bus_word(logic [31:0] d, logic [1:0] rg, logic [15:0] a, logic [1:0] rlc, logic first);
    in_valid = 1; in_data = d; in_region = rg; in_addr = a; in_rlc = rlc; in_first = first;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk);
    in_valid = 0; in_first = 0;
  endtask

  // run-length encodes whole words (nibbles MSB first) and sends them
  task automatic send_rlc(ref logic [31:0] words [$], input logic [1:0] rg, input logic [1:0] rlc);
    int nib [$];
    int i;
    bit first;
    foreach (words[k]) for (int j = 7; j >= 0; j--) nib.push_back(int'(words[k][4*j +: 4]));
    i = 0; first = 1;
    while (i < nib.size()) begin
      logic [31:0] w;
      w = '0;
      for (int k = 0; k < 8; k++) begin
        int f; bit run;
        run = (rlc == 2'd2) ? (k % 2 == 1) : (k == 2 || k == 5);
        f = 0;
        if (run) while (i < nib.size() && nib[i] == 0 && f < 15) begin f++; i++; end
        else if (i < nib.size()) begin f = nib[i]; i++; end
        w[31 - 4*k -: 4] = 4'(f);
      end
      bus_word(w, rg, 16'd0, rlc, first);
      first = 0;
    end
    repeat (40) @(negedge clk);   // let the decoder drain
  endtask

  task automatic load_data(cfg_t c, bit use_rlc);
    logic [31:0] words [$];
    int ng;
    ng = int'(c.groups);
    words = {};
    for (int g = 0; g < ng; g++)
      for (int y = 0; y < int'(c.tile_h); y++)
        for (int x = 0; x < int'(c.tile_w); x++)
          for (int w = 0; w < 8; w++)
            words.push_back({act[g][y][x][4*w+3], act[g][y][x][4*w+2], act[g][y][x][4*w+1], act[g][y][x][4*w]});
    if (use_rlc) send_rlc(words, REG_ACT, 2'd2);
    else foreach (words[k]) bus_word(words[k], REG_ACT, 16'(k), 2'd0, 1'b0);
    words = {};
    for (int g = 0; g < ng; g++)
      for (int f = 0; f < 32; f++)
        for (int b = 0; b < 8; b++)
          for (int t = 0; t < 9; t++) begin
            logic [31:0] w;
            for (int ch = 0; ch < 32; ch++) w[ch] = wt[g][f][t][ch][b];
            words.push_back(w);
          end
    if (use_rlc) send_rlc(words, REG_WT, 2'd1);
    else foreach (words[k]) bus_word(words[k], REG_WT, 16'(k), 2'd0, 1'b0);
  endtask

  // ------------------------------------------------------------ reference model
  int exp_out [32];
  int exp_kills;

  task automatic model(cfg_t c);
    mac_val_t mv [4];
    bit mact [4];
    int s, np;
    s = int'(c.stride);
    np = int'(n_phases(c.pac_mode));
    exp_kills = 0;
    for (int f = 0; f < 32; f++) begin
      int mx, imx;
      for (int i = 0; i < 4; i++) begin mv[i] = '{0, 0}; mact[i] = 1; end
      for (int p = 0; p < np; p++) begin
        phase_t ph;
        ph = phase_of(c.pac_mode, p);
        if (p > 0) begin
          int al;
          if (c.pac_mode != PAC_OFF) begin
            phase_t pp;
            int thr, sh;
            pp = phase_of(c.pac_mode, p - 1);
            thr = (p == 1) ? int'(c.thr0) : (p == 2) ? int'(c.thr1) : int'(c.thr2);
            sh = thr - 5 - sig_of(pp, 32'(pp.bit_lo));
            if (sh < 0) sh = 0;
            mx = -(1 << 30); imx = 0;
            for (int i = 0; i < 4; i++) if (mact[i] && mv[i].C > mx) begin mx = mv[i].C; imx = i; end
            for (int i = 0; i < 4; i++)
              if (mact[i] && i != imx && ((mx >>> sh) > (mv[i].C >>> sh))) begin mact[i] = 0; exp_kills++; end
          end
          al = align_of(c.pac_mode, p);
          for (int i = 0; i < 4; i++) if (mact[i]) begin
            if (al < 0) mv_shr(mv[i], -al);
            else for (int k = 0; k < al; k++) begin int c0; c0 = mv[i].C; mv_dbl(mv[i]); if (mv[i].C != 2*c0) n_carry++; end
          end
        end
        for (int b = int'(ph.bit_hi); b >= int'(ph.bit_lo); b--) begin
          if (b != int'(ph.bit_hi))
            for (int i = 0; i < 4; i++) if (mact[i]) begin
              int c0; c0 = mv[i].C; mv_dbl(mv[i]); if (mv[i].C != 2*c0) n_carry++;
            end
          for (int g = 0; g < int'(c.groups); g++)
            for (int t = 0; t < 9; t++)
              for (int ch = 0; ch < 32; ch++)
                for (int i = 0; i < 4; i++) begin
                  int oy, ox, yy, xx;
                  logic [7:0] a, w;
                  oy = (i >= 2) ? s : 0; ox = (i % 2 == 1) ? s : 0;
                  yy = int'(c.y0) + oy + t / 3; xx = int'(c.x0) + ox + t % 3;
                  a = act[g][yy][xx][ch];
                  w = wt[g][f][t][ch];
                  if (mact[i] && w[b]) begin
                    int nb;
                    nb = ph.hi ? int'(a[7:4]) : int'(a[3:0]);
                    if (w[7] && nb > 0) n_neg++;
                    mv_pulse(mv[i], nb, w[7]);
                  end
                end
        end
      end
      mx = -(1 << 30);
      for (int i = 0; i < 4; i++) if (mact[i] && mv[i].C > mx) mx = mv[i].C;
      if (mx < 0) begin n_relu++; mx = 0; end
      exp_out[f] = mx;
    end
  endtask

  // ------------------------------------------------------------ one job
  task automatic run_job(cfg_t c, cfg_t prev, bit use_rlc, int zero_pct, int neg_pct, int wmax);
    int got [$];
    int cyc;
    for (int g = 0; g < 4; g++)
      for (int y = 0; y < 8; y++)
        for (int x = 0; x < 8; x++)
          for (int ch = 0; ch < 32; ch++)
            act[g][y][x][ch] = ($urandom_range(0, 99) < zero_pct) ? 8'd0 : 8'($urandom_range(1, 255));
    for (int g = 0; g < 4; g++)
      for (int f = 0; f < 32; f++)
        for (int t = 0; t < 9; t++)
          for (int ch = 0; ch < 32; ch++)
            wt[g][f][t][ch] = {1'($urandom_range(0, 99) < neg_pct), 7'($urandom_range(0, wmax))};
    scan_cfg(c, prev);
    load_data(c, use_rlc);
    model(c);
    @(negedge clk);
    start = 1; @(negedge clk); start = 0;
    cyc = 0;
    while (busy || got.size() == 0) begin
      if (out_valid) got.push_back(int'(out_data));
      @(negedge clk); cyc++;
    end
    checks++;
    if (got.size() != 32) begin failures++; $display("FAIL %0d outputs", got.size()); end
    for (int f = 0; f < 32 && f < got.size(); f++) begin
      checks++;
      if (got[f] != exp_out[f]) begin
        failures++;
        if (failures < 20) $display("FAIL filter %0d: got %0d want %0d", f, got[f], exp_out[f]);
      end
    end
    n_kill += exp_kills;
    $display("job layer %0d pac %0d stride %0d groups %0d rlc %0b: %0d cycles, %0d PAC switch-offs",
             c.layer, c.pac_mode, c.stride, c.groups, use_rlc, cyc, exp_kills);
  endtask

  task automatic mech(string name, int n);
    checks++;
    $display("mechanism %-28s %0d", name, n);
    if (n == 0) begin failures++; $display("FAIL mechanism %s never happened", name); end
  endtask

  initial begin
    cfg_t c0, c1, c2, c3, c4;
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    c0 = dut.u_scan.cfg;   // reset value
    // 1: PAC off, stride 1, one group, raw loads, layer 3
    c1 = '{layer: 3'd3, pac_mode: PAC_OFF, thr0: 5'd0, thr1: 5'd0, thr2: 5'd0, stride: 3'd1,
           tile_w: 6'd5, tile_h: 6'd5, y0: 6'd1, x0: 6'd0, groups: 4'd1};
    run_job(c1, c0, 1'b0, 40, 30, 127);
    // 2: PAC mode 2, stride 2, two groups, RLC loads, layer 2
    c2 = '{layer: 3'd2, pac_mode: PAC_M2, thr0: 5'd13, thr1: 5'd0, thr2: 5'd0, stride: 3'd2,
           tile_w: 6'd6, tile_h: 6'd5, y0: 6'd0, x0: 6'd1, groups: 4'd2};
    run_job(c2, c1, 1'b1, 60, 50, 127);
    // 3: PAC mode 1, stride 1, layer 4, mostly negative weights (ReLU)
    c3 = '{layer: 3'd4, pac_mode: PAC_M1, thr0: 5'd14, thr1: 5'd13, thr2: 5'd11, stride: 3'd1,
           tile_w: 6'd4, tile_h: 6'd4, y0: 6'd0, x0: 6'd0, groups: 4'd1};
    run_job(c3, c2, 1'b1, 50, 65, 127);
    // 4: PAC mode 1, stride 3, layer 1, small weights, raw
    c4 = '{layer: 3'd1, pac_mode: PAC_M1, thr0: 5'd11, thr1: 5'd10, thr2: 5'd9, stride: 3'd3,
           tile_w: 6'd6, tile_h: 6'd6, y0: 6'd0, x0: 6'd0, groups: 4'd1};
    run_job(c4, c3, 1'b0, 30, 40, 15);
    mech("CTD zero-skipped input sets", n_zero_sets);
    mech("CTD early-stopped input sets", n_early_sets);
    mech("broadcast activation loads", n_bcast);
    mech("negative-weight pulses", n_neg);
    mech("TRS carries", n_carry);
    mech("right-shift alignments", n_shr);
    mech("PAC switch-offs", n_kill);
    mech("ReLU clamps", n_relu);
    mech("RLC mode 1 words", n_rlc1);
    mech("RLC mode 2 words", n_rlc2);
    mech("scan read-backs", n_scan);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
