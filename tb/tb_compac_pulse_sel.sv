// tb_compac_pulse_sel: exhaustive check of the 16:1 selection against a one-hot
// and a random set of generator patterns.
module tb_compac_pulse_sel;
  logic [15:0] pwm;
  logic [3:0] x;
  logic pwm_x;
  int checks = 0, failures = 0;
  compac_pulse_sel #(.N_PULSES(16)) dut (.*);
  initial begin
    for (int rep = 0; rep < 40; rep++) begin
      pwm = (rep < 16) ? (16'h1 << rep) : 16'($urandom);
      for (int k = 0; k < 16; k++) begin
        x = 4'(k); #1;
        checks++;
        if (pwm_x !== ((pwm >> k) & 1)) begin failures++; $display("FAIL pwm=%h x=%0d", pwm, k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
