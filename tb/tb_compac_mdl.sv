// tb_compac_mdl: checks the delay-line stepping, the full-length events and the
// TRS force of compac_mdl against a step-count model: after k forward steps from
// all ones the line holds min(k,16) zeros from unit 1, then ones re-enter from
// unit 1; a backward step undoes a forward one.
module tb_compac_mdl;
  logic clk = 0, rst_n = 0, clear = 0, en = 0, neg = 0, force_en = 0;
  logic [15:0] force_val = '0, state;
  logic e_rise, a_rise;
  int checks = 0, failures = 0;

  compac_mdl #(.UNITS(16)) dut (.*);

  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic logic [15:0] expect_state(int s);
    logic [15:0] v;
    s = ((s % 32) + 32) % 32;
    for (int i = 0; i < 16; i++) v[i] = (s <= 16) ? (i >= s) : (i < s - 16);
    return v;
  endfunction

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s state=%h", what, state); end
  endtask

  int s_model, erises, arises;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(state == 16'hFFFF, "reset all ones");
    s_model = 0; erises = 0; arises = 0;
    // 70 forward steps: two full lengths -> two E rises
    for (int k = 0; k < 70; k++) begin
      en = 1; neg = 0;
      #1; if (e_rise) erises++;
      @(negedge clk); s_model++;
      chk(state == expect_state(s_model), $sformatf("fwd step %0d", k));
    end
    chk(erises == 2, "two E rises in 70 forward steps");
    // hold
    en = 0; repeat (3) @(negedge clk);
    chk(state == expect_state(s_model), "hold when EN low");
    // 80 backward steps: passes zero residue twice more (A rises at s=0 arrivals)
    for (int k = 0; k < 80; k++) begin
      en = 1; neg = 1;
      #1; if (a_rise) arises++;
      @(negedge clk); s_model--;
      chk(state == expect_state(s_model), $sformatf("bwd step %0d", k));
    end
    chk(arises == 3, $sformatf("A rises in 80 backward steps from 6 (got %0d)", arises));
    en = 0;
    // force
    force_en = 1; force_val = 16'h00FF; @(negedge clk); force_en = 0;
    chk(state == 16'h00FF, "force TRS state");
    clear = 1; @(negedge clk); clear = 0;
    chk(state == 16'hFFFF, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
