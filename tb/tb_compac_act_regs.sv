// tb_compac_act_regs: loads random rows into the four streams (some rows into
// several streams at once, as the broadcast does), then rotates through the whole
// window twice and checks every head nibble against a model array, for the high
// and the low nibble.
module tb_compac_act_regs;
  logic clk = 0;
  logic [3:0] load = '0;
  logic [3:0] load_group [4];
  logic load_hi = 0;
  logic [255:0] load_data;
  logic rotate = 0;
  logic [3:0] x [4];
  int checks = 0, failures = 0;
  logic [7:0] model [4][288];

  compac_act_regs #(.GROUPS(9), .CH(32)) dut (.*);
  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int pass = 0; pass < 2; pass++) begin
      load_hi = (pass == 0);
      @(negedge clk);
      // each group of each stream: broadcast the same row to a random extra stream
      for (int gr = 0; gr < 9; gr++) begin
        for (int s = 0; s < 4; s++) begin
          logic [255:0] row;
          int s2;
          for (int w = 0; w < 8; w++) row[w*32 +: 32] = $urandom;
          s2 = $urandom_range(0, 3);
          load = '0; load[s] = 1'b1; load[s2] = 1'b1;
          load_group[s] = 4'(gr); load_group[s2] = 4'(gr);
          load_data = row;
          for (int c = 0; c < 32; c++) begin model[s][gr*32+c] = row[c*8 +: 8]; model[s2][gr*32+c] = row[c*8 +: 8]; end
          @(negedge clk);
        end
      end
      load = '0;
      for (int rep = 0; rep < 2; rep++) begin
        for (int t = 0; t < 288; t++) begin
          for (int s = 0; s < 4; s++) begin
            checks++;
            if (x[s] !== (load_hi ? model[s][t][7:4] : model[s][t][3:0])) begin
              failures++;
              if (failures < 10) $display("FAIL pass %0d rep %0d tap %0d stream %0d: %h", pass, rep, t, s, x[s]);
            end
          end
          rotate = 1; @(negedge clk); rotate = 0;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
