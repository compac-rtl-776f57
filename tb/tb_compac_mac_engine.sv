// tb_compac_mac_engine: drives compac_mac_engine with random signed pulse trains,
// doublings (SHL1 + TRS) and right shifts, and compares its counter with a
// value-level model: value = 32*C + r with |r| < 32; a pulse of d steps adds
// +-d to r with a carry into C at |r| = 32; a doubling maps the residue by
// quarters (see tb_compac_trs_lut) and doubles C; a right shift shifts C and
// clears r. Also checks that a pure accumulation is exact.
module tb_compac_mac_engine;
  import compac_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, en = 0, neg = 0;
  mac_op_e op = OP_NOP;
  logic [4:0] shamt = '0;
  logic signed [23:0] count;
  logic [15:0] mdl_state;
  logic pos;
  int checks = 0, failures = 0;

  compac_mac_engine dut (.*);

  always #5 clk = ~clk;
  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  int C, r;

  task automatic pulse(int d, bit n);
    en = 1; neg = n;
    repeat (d) @(negedge clk);
    en = 0;
    if (n) r -= d; else r += d;
    while (r >= 32) begin r -= 32; C++; end
    while (r <= -32) begin r += 32; C--; end
  endtask

  task automatic dbl();
    int nr, c;
    op = OP_SHL1; @(negedge clk);
    op = OP_TRS;  @(negedge clk);
    op = OP_NOP;
    c = 0;
    if (r > 0) begin
      if (r < 8) nr = 8; else if (r < 16) nr = 24; else if (r == 16) begin nr = 0; c = 1; end
      else if (r < 24) begin nr = 8; c = 1; end else begin nr = 15; c = 1; end
    end else if (r < 0) begin
      if (-r <= 8) nr = -8; else if (-r < 16) nr = -24; else if (-r == 16) begin nr = 0; c = -1; end
      else if (-r <= 24) begin nr = -8; c = -1; end else begin nr = -15; c = -1; end
    end else nr = 0;
    C = 2*C + c; r = nr;
  endtask

  task automatic chk(string what);
    checks++;
    if (count !== 24'(C)) begin failures++; $display("FAIL %s: count=%0d model=%0d (r=%0d)", what, count, C, r); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1; @(negedge clk);
    // exact accumulation: 20 pulses of 15 forward, 7 of 9 backward -> 300 - 63 = 237
    C = 0; r = 0;
    for (int i = 0; i < 20; i++) pulse(15, 0);
    for (int i = 0; i < 7; i++) pulse(9, 1);
    chk("exact accumulation");
    checks++;
    if (32*C + r != 237) begin failures++; $display("FAIL model sum"); end
    // random sequences of bit-serial MACs
    for (int trial = 0; trial < 40; trial++) begin
      clear = 1; @(negedge clk); clear = 0; C = 0; r = 0;
      for (int bitn = 0; bitn < 7; bitn++) begin
        if (bitn != 0) dbl();
        for (int k = 0; k < 12; k++) pulse($urandom_range(0, 15), $urandom_range(0, 2) == 0);
        chk($sformatf("trial %0d bit %0d", trial, bitn));
      end
      op = OP_SHR; shamt = 5'($urandom_range(1, 3)); @(negedge clk); op = OP_NOP;
      C = C >>> shamt; r = 0;
      chk($sformatf("trial %0d shr", trial));
      for (int k = 0; k < 5; k++) pulse($urandom_range(0, 15), $urandom_range(0, 1));
      chk($sformatf("trial %0d after shr", trial));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
