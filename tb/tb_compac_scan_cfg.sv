// tb_compac_scan_cfg: checks the reset configuration, shifts random words in MSB
// first and checks they appear on cfg and leave on scan_out in the same order,
// and that the word holds while scan_en is low.
module tb_compac_scan_cfg;
  import compac_pkg::*;
  logic clk = 0, rst_n = 0, scan_en = 0, scan_in = 0, scan_out;
  cfg_t cfg;
  int checks = 0, failures = 0;

  compac_scan_cfg dut (.*);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    logic [CFG_W-1:0] w, prev, got;
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    checks++;
    if (cfg.layer != 3'd3 || cfg.pac_mode != PAC_OFF || cfg.stride != 3'd1 || cfg.groups != 4'd1) begin
      failures++; $display("FAIL reset value");
    end
    prev = cfg;
    for (int rep = 0; rep < 10; rep++) begin
      w = {$urandom, $urandom};
      got = '0;
      for (int i = CFG_W - 1; i >= 0; i--) begin
        scan_en = 1; scan_in = w[i];
        #1; got = {got[CFG_W-2:0], scan_out};
        @(negedge clk);
      end
      scan_en = 0;
      checks++;
      if (cfg !== w) begin failures++; $display("FAIL load %h got %h", w, cfg); end
      checks++;
      if (got !== prev) begin failures++; $display("FAIL scan_out %h want %h", got, prev); end
      repeat (5) @(negedge clk);
      checks++;
      if (cfg !== w) begin failures++; $display("FAIL hold"); end
      prev = w;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
