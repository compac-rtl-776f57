// tb_compac_ctrl: runs the top-level controller against a behavioural buffer, a
// stand-in CTD controller (done a few cycles after start) and fixed pooled values,
// and checks the job sequence for each PAC mode, stride and group count: number
// of CTD runs (7 weight bits x 2 nibbles x groups), doublings (SHL1 + TRS pairs),
// right-shift alignments and their amount, PAC evaluations, activation row reads
// per load ((S+3)^2, each broadcast into every stream that uses it), sign and
// weight plane reads (sign plane once per job for one group), read addresses
// inside the tile, and the 32 output words written and sent in filter order.
module tb_compac_ctrl;
  import compac_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy;
  cfg_t cfg;
  logic buf_en, buf_we;
  logic [1:0] buf_region;
  logic [15:0] buf_addr;
  logic [31:0] buf_wdata;
  logic [255:0] buf_rdata;
  logic [3:0] act_load;
  logic [3:0] act_group [4];
  logic act_hi, fil_clear, fil_wld, fil_sld, fil_pac_start, fil_pac_apply;
  logic [4:0] fil_sel, fil_shamt, fil_thr;
  logic [3:0] fil_group;
  logic [31:0] fil_data;
  mac_op_e fil_op;
  logic [CNT_W-1:0] pooled [N_FILT];
  logic ctd_start, ctd_done = 0, out_valid;
  logic [31:0] out_data;
  int checks = 0, failures = 0;

  compac_ctrl dut (.*);
  always #5 clk = ~clk;
  initial begin #50ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // behavioural buffer: output words hold their address, read data = written data
  logic [31:0] outmem [32];
  always @(posedge clk) if (buf_en) begin
    if (buf_we && buf_region == REG_OUT) outmem[buf_addr[4:0]] <= buf_wdata;
    for (int w = 0; w < 8; w++)
      buf_rdata[w*32 +: 32] <= (buf_region == REG_OUT) ? outmem[buf_addr[4:0] & 5'h18 | 5'(w)] : {buf_region, 14'd0, buf_addr};
  end

  // stand-in CTD controller
  int ctd_cnt = -1;
  always @(posedge clk) begin
    ctd_done <= 1'b0;
    if (ctd_start) ctd_cnt <= 5;
    else if (ctd_cnt > 0) ctd_cnt <= ctd_cnt - 1;
    else if (ctd_cnt == 0) begin ctd_done <= 1'b1; ctd_cnt <= -1; end
  end

  int n_runs, n_shl, n_trs, n_shr, shr_amt, n_pac, n_act, n_bc, n_sgn, n_wt, n_wr, n_bad;
  int outs [$];
  always @(posedge clk) if (busy) begin
    if (ctd_start) n_runs++;
    if (fil_op == OP_SHL1) n_shl++;
    if (fil_op == OP_TRS) n_trs++;
    if (fil_op == OP_SHR) begin n_shr++; shr_amt = int'(fil_shamt); end
    if (fil_pac_start) n_pac++;
    if (act_load != 0) begin n_act++; n_bc += $countones(act_load); end
    if (fil_sld) n_sgn++;
    if (fil_wld) n_wt++;
    if (buf_en && buf_we) n_wr++;
    if (buf_en && !buf_we && buf_region == REG_ACT &&
        int'(buf_addr) >= 8 * int'(cfg.groups) * int'(cfg.tile_w) * int'(cfg.tile_h)) n_bad++;
    if (out_valid) outs.push_back(int'(out_data));
  end

  task automatic chk(bit c, string s); checks++; if (!c) begin failures++; $display("FAIL %s", s); end endtask

  task automatic job(pac_mode_e m, int s, int g);
    int runs, dbl, shr, pacs, loads, rows, bc;
    cfg = '{layer: 3'd3, pac_mode: m, thr0: 5'd12, thr1: 5'd10, thr2: 5'd8, stride: 3'(s),
            tile_w: 6'(s + 3), tile_h: 6'(s + 4), y0: 6'd1, x0: 6'd0, groups: 4'(g)};
    for (int f = 0; f < 32; f++) pooled[f] = 24'(f * 1000 + s * 10 + g);
    n_runs = 0; n_shl = 0; n_trs = 0; n_shr = 0; shr_amt = 0; n_pac = 0; n_act = 0; n_bc = 0;
    n_sgn = 0; n_wt = 0; n_wr = 0; n_bad = 0; outs = {};
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (busy) @(negedge clk);
    runs = 14 * g;
    dbl  = (m == PAC_M1) ? 13 : 12;
    shr  = (m == PAC_M1) ? 3 : 2;
    pacs = (m == PAC_M1) ? 4 : (m == PAC_M2) ? 2 : 1;
    loads = (g == 1) ? int'(n_phases(m)) : runs;
    rows = (s + 3) * (s + 3);
    bc = 0;
    for (int uy = 0; uy < s + 3; uy++) for (int ux = 0; ux < s + 3; ux++)
      for (int i = 0; i < 4; i++) begin
        int oy, ox; oy = (i >= 2) ? s : 0; ox = (i % 2) ? s : 0;
        if (uy >= oy && uy < oy + 3 && ux >= ox && ux < ox + 3) bc++;
      end
    chk(n_runs == runs, $sformatf("mode %0d s %0d g %0d: CTD runs %0d want %0d", m, s, g, n_runs, runs));
    chk(n_shl == dbl && n_trs == dbl, $sformatf("doublings %0d/%0d want %0d", n_shl, n_trs, dbl));
    chk(n_shr == 1 && shr_amt == shr, $sformatf("right shifts %0d by %0d", n_shr, shr_amt));
    chk(n_pac == pacs, $sformatf("PAC evaluations %0d want %0d", n_pac, pacs));
    chk(n_act == loads * rows, $sformatf("activation rows %0d want %0d", n_act, loads * rows));
    chk(n_bc == loads * bc, $sformatf("stream loads %0d want %0d", n_bc, loads * bc));
    chk(n_sgn == ((g == 1) ? 288 : runs * 288), $sformatf("sign words %0d", n_sgn));
    chk(n_wt == runs * 288, $sformatf("weight words %0d", n_wt));
    chk(n_wr == 32, $sformatf("output writes %0d", n_wr));
    chk(n_bad == 0, "activation read outside the tile");
    chk(outs.size() == 32, $sformatf("output words %0d", outs.size()));
    for (int f = 0; f < 32 && f < outs.size(); f++)
      chk(outs[f] == int'(pooled[f]), $sformatf("output %0d = %0d", f, outs[f]));
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    job(PAC_OFF, 1, 1);
    job(PAC_M2, 2, 1);
    job(PAC_M1, 1, 2);
    job(PAC_M1, 3, 1);
    job(PAC_M2, 1, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
