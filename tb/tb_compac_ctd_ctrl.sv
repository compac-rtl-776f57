// tb_compac_ctd_ctrl: runs the CTD controller with the pulse generator and four
// selectors on random input sets (including the sets printed in the chip
// measurement: (4,7,13,9), (5,6,1,3), (0,0,0,0), (12,0,8,3)). Checks per set:
// the encoding takes max(X) + 4 cycles of t0 (max/2 + 2 input clocks: 8.5, 5, 2
// and 8 for those sets), each PWM is high exactly X_i cycles, stop_pulse,
// generator stop and apply_inputs follow each other in that order.
module tb_compac_ctd_ctrl;
  logic clk = 0, rst_n = 0, start = 0;
  logic [9:0] n_sets;
  logic [3:0] pwm_x;
  logic gen_run, or_signal, stop_pulse, apply_inputs, busy, done;
  logic [15:0] pwm;
  logic [3:0] xv [4];
  int checks = 0, failures = 0;
  localparam int NS = 64;
  logic [3:0] xs [NS][4];

  compac_pulse_gen #(.N_PULSES(16)) u_gen (.clk, .rst_n, .run(gen_run), .pwm);
  for (genvar i = 0; i < 4; i++) begin : g
    compac_pulse_sel #(.N_PULSES(16)) u_sel (.pwm, .x(xv[i]), .pwm_x(pwm_x[i]));
  end
  compac_ctd_ctrl #(.SET_W(10)) dut (.*);

  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  int set_i, cyc, hi [4], total, expect_total, zeros;
  // input shift register model: apply_inputs moves to the next set
  always_ff @(posedge clk) if (apply_inputs) set_i <= set_i + 1;
  always_comb for (int i = 0; i < 4; i++) xv[i] = xs[(set_i < NS) ? set_i : 0][i];

  initial begin
    xs[0] = '{4'd4, 4'd7, 4'd13, 4'd9};
    xs[1] = '{4'd5, 4'd6, 4'd1, 4'd3};
    xs[2] = '{4'd0, 4'd0, 4'd0, 4'd0};
    xs[3] = '{4'd12, 4'd0, 4'd8, 4'd3};
    for (int k = 4; k < NS; k++)
      for (int i = 0; i < 4; i++) xs[k][i] = ($urandom_range(0, 3) == 0) ? 4'd0 : 4'($urandom_range(0, 15));
    xs[10] = '{4'd0, 4'd0, 4'd0, 4'd0};
    xs[11] = '{4'd15, 4'd15, 4'd15, 4'd15};
    set_i = 0; expect_total = 0; zeros = 0;
    for (int k = 0; k < NS; k++) begin
      int mx; mx = 0;
      for (int i = 0; i < 4; i++) if (xs[k][i] > mx) mx = xs[k][i];
      expect_total += mx + 4;
      if (mx == 0) zeros++;
    end
    repeat (2) @(negedge clk); rst_n = 1;
    n_sets = 10'(NS);
    start = 1; @(negedge clk); start = 0;
    total = 1;
    for (int k = 0; k < NS; k++) begin
      int mx, c, seen_stop, seen_halt, seen_apply;
      mx = 0;
      for (int i = 0; i < 4; i++) begin hi[i] = 0; if (xs[k][i] > mx) mx = xs[k][i]; end
      c = 0; seen_stop = -1; seen_halt = -1; seen_apply = -1;
      while (1) begin
        #1;
        for (int i = 0; i < 4; i++) if (pwm_x[i]) hi[i]++;
        if (stop_pulse) seen_stop = c;
        if (!gen_run && seen_stop >= 0 && seen_halt < 0) seen_halt = c;
        if (apply_inputs) seen_apply = c;
        c++;
        @(negedge clk);
        if (seen_apply >= 0) break;
        if (c > 40) break;
      end
      checks++;
      if (c != mx + 4) begin failures++; $display("FAIL set %0d: %0d cycles, want %0d", k, c, mx + 4); end
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (hi[i] != xs[k][i]) begin failures++; $display("FAIL set %0d X%0d width %0d", k, i + 1, hi[i]); end
      end
      checks++;
      if (!(seen_stop == mx + 1 && seen_halt == mx + 2 && seen_apply == mx + 3)) begin
        failures++; $display("FAIL set %0d order stop=%0d halt=%0d apply=%0d", k, seen_stop, seen_halt, seen_apply);
      end
    end
    #1;
    checks++;
    if (busy) begin failures++; $display("FAIL still busy"); end
    checks++;
    if (zeros < 2) begin failures++; $display("FAIL zero-value sets not exercised"); end
    $display("CTD: %0d sets in %0d t0 (%0d zero sets)", NS, expect_total, zeros);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
