// tb_compac_pulse_gen: after each start, pwm[k] must be high for exactly k
// consecutive cycles, all together from the first run cycle; stopped, all low.
module tb_compac_pulse_gen;
  logic clk = 0, rst_n = 0, run = 0;
  logic [15:0] pwm;
  int checks = 0, failures = 0;
  int hi [16];

  compac_pulse_gen #(.N_PULSES(16)) dut (.*);
  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int rep = 0; rep < 3; rep++) begin
      int len;
      len = 5 + rep * 7;           // run for 5, 12, 19 cycles
      for (int k = 0; k < 16; k++) hi[k] = 0;
      run = 1;
      for (int c = 0; c < len; c++) begin
        #1;
        for (int k = 0; k < 16; k++) begin
          if (pwm[k]) hi[k]++;
          checks++;
          if (pwm[k] !== (c < k)) begin failures++; $display("FAIL rep %0d cyc %0d pwm[%0d]=%b", rep, c, k, pwm[k]); end
        end
        @(negedge clk);
      end
      run = 0; #1;
      checks++; if (pwm !== '0) begin failures++; $display("FAIL stopped not low"); end
      for (int k = 0; k < 16; k++) begin
        checks++;
        if (hi[k] != ((k < len) ? k : len)) begin failures++; $display("FAIL width %0d = %0d", k, hi[k]); end
      end
      repeat (3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
