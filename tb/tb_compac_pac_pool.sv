// tb_compac_pac_pool: checks the PAC decision and the pooled output. First the
// printed example: partial MACs 0, 16, 96, 80 with threshold 64 keep MAC3 and
// MAC4 only; then random MAC values, masks and shifts against a direct model:
// kill_i = i is not the maximum and (max >>> s) > (mac_i >>> s); pooled =
// ReLU(max over active MACs).
module tb_compac_pac_pool;
  import compac_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic signed [23:0] mac [4];
  logic [3:0] active, kill;
  logic [4:0] thr_shift;
  logic kill_valid;
  logic [23:0] pooled;
  int checks = 0, failures = 0;

  compac_pac_pool dut (.*);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic run_one(string what);
    int mx, imx;
    logic [3:0] ek;
    int ep;
    mx = -(1 << 23); imx = 0;
    for (int i = 0; i < 4; i++) if (active[i] && int'(mac[i]) > mx) begin mx = int'(mac[i]); imx = i; end
    for (int i = 0; i < 4; i++) ek[i] = (i != imx) && ((mx >>> thr_shift) > (int'(mac[i]) >>> thr_shift));
    ep = (mx < 0) ? 0 : mx;
    start = 1; @(negedge clk); start = 0;
    checks++;
    if (!kill_valid || kill !== ek) begin failures++; $display("FAIL %s kill=%b want %b", what, kill, ek); end
    checks++;
    if (pooled !== 24'(ep)) begin failures++; $display("FAIL %s pooled=%0d want %0d", what, pooled, ep); end
    @(negedge clk);
    checks++;
    if (kill_valid) begin failures++; $display("FAIL kill_valid stuck"); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    mac = '{24'sd0, 24'sd16, 24'sd96, 24'sd80}; active = 4'b1111; thr_shift = 5'd6;
    run_one("figure example");
    mac = '{24'sd0, 24'sd16, 24'sd96, 24'sd80};
    start = 1; @(negedge clk); start = 0;
    checks++;
    if (kill !== 4'b0011) begin failures++; $display("FAIL example: kill=%b", kill); end
    @(negedge clk);
    for (int k = 0; k < 300; k++) begin
      for (int i = 0; i < 4; i++) mac[i] = 24'($signed($urandom_range(0, 2000)) - 600);
      active = 4'($urandom_range(1, 15));
      thr_shift = 5'($urandom_range(0, 9));
      run_one($sformatf("random %0d", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
