// tb_compac_filter: drives one filter like the controller does: loads random
// weight-bit and sign planes of a 3x3x32 window, feeds four random pulse streams
// one tap per set, doubles between weight bits, runs a PAC evaluation and the
// final pooling, and compares the four MAC counters, the kill decision and the
// pooled value with the value-level model (compac_model.svh). Also checks that a
// switched-off MAC no longer changes and that clear re-activates all four.
module tb_compac_filter;
  import compac_pkg::*;
  `include "compac_model.svh"
  logic clk = 0, rst_n = 0, clear = 0, wld = 0, sld = 0, shift = 0;
  logic [3:0] ld_group = '0;
  logic [31:0] ld_data = '0;
  logic [3:0] pwm_x = '0;
  mac_op_e op = OP_NOP;
  logic [4:0] shamt = '0;
  logic pac_start = 0, pac_apply = 0;
  logic [4:0] thr_shift = '0;
  logic [23:0] pooled;
  logic [3:0] active;
  logic signed [23:0] mac [4];
  int checks = 0, failures = 0;

  compac_filter dut (.*);
  always #5 clk = ~clk;
  initial begin #20000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  mac_val_t mv [4];
  bit mact [4];
  bit sgn [288];
  int kills = 0;

  task automatic chk_macs(string what);
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (mac[i] !== 24'(mv[i].C) || active[i] !== mact[i]) begin
        failures++; $display("FAIL %s mac%0d=%0d model=%0d active=%b/%b", what, i, mac[i], mv[i].C, active[i], mact[i]);
      end
    end
  endtask

  task automatic load_plane(bit s, ref bit bits [288]);
    for (int gr = 0; gr < 9; gr++) begin
      for (int c = 0; c < 32; c++) ld_data[c] = bits[gr*32 + c];
      ld_group = 4'(gr); wld = !s; sld = s; @(negedge clk);
    end
    wld = 0; sld = 0;
  endtask

  task automatic run_bit(int maxx);
    bit wb [288];
    int x [4];
    for (int t = 0; t < 288; t++) wb[t] = $urandom_range(0, 1);
    load_plane(0, wb);
    for (int t = 0; t < 288; t++) begin
      int mx; mx = 0;
      for (int i = 0; i < 4; i++) begin x[i] = $urandom_range(0, maxx); if (x[i] > mx) mx = x[i]; end
      for (int k = 0; k < mx; k++) begin
        for (int i = 0; i < 4; i++) pwm_x[i] = (k < x[i]);
        @(negedge clk);
      end
      pwm_x = '0;
      for (int i = 0; i < 4; i++) if (mact[i] && wb[t]) mv_pulse(mv[i], x[i], sgn[t]);
      shift = 1; @(negedge clk); shift = 0;
    end
  endtask

  task automatic dbl();
    op = OP_SHL1; @(negedge clk); op = OP_TRS; @(negedge clk); op = OP_NOP;
    for (int i = 0; i < 4; i++) if (mact[i]) mv_dbl(mv[i]);
  endtask

  task automatic pac(int sh, bit apply);
    int mx, imx;
    mx = -(1 << 30); imx = 0;
    for (int i = 0; i < 4; i++) if (mact[i] && mv[i].C > mx) begin mx = mv[i].C; imx = i; end
    thr_shift = 5'(sh);
    pac_start = 1; @(negedge clk); pac_start = 0;
    checks++;
    if (pooled !== 24'((mx < 0) ? 0 : mx)) begin failures++; $display("FAIL pooled %0d want %0d", pooled, mx); end
    pac_apply = apply; @(negedge clk); pac_apply = 0;
    if (apply)
      for (int i = 0; i < 4; i++)
        if (mact[i] && i != imx && ((mx >>> sh) > (mv[i].C >>> sh))) begin mact[i] = 0; kills++; end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    for (int job = 0; job < 6; job++) begin
      clear = 1; @(negedge clk); clear = 0;
      for (int i = 0; i < 4; i++) begin mv[i] = '{0, 0}; mact[i] = 1; end
      for (int t = 0; t < 288; t++) sgn[t] = ($urandom_range(0, 3) == 0);
      load_plane(1, sgn);
      run_bit(15); chk_macs("bit 1");
      dbl();       chk_macs("double");
      run_bit(15); chk_macs("bit 2");
      pac(job, 1); chk_macs("pac");
      dbl();
      run_bit(15); chk_macs("bit 3");
      op = OP_SHR; shamt = 5'd2; @(negedge clk); op = OP_NOP;
      for (int i = 0; i < 4; i++) if (mact[i]) mv_shr(mv[i], 2);
      chk_macs("shift right");
      pac(0, 0);
    end
    checks++;
    if (kills == 0) begin failures++; $display("FAIL no PAC kill exercised"); end
    $display("filter: %0d MACs switched off by PAC", kills);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
