// tb_compac_sram_bank: writes random words to every word of a bank, then reads all
// rows back and compares with a model; also checks a partial word update.
module tb_compac_sram_bank;
  localparam int ROWS = 64;
  logic clk = 0, en = 0, we = 0;
  logic [5:0] row;
  logic [2:0] word;
  logic [31:0] wdata;
  logic [255:0] rdata;
  logic [255:0] model [ROWS];
  int checks = 0, failures = 0;

  compac_sram_bank #(.ROWS(ROWS)) dut (.*);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    @(negedge clk);
    for (int r = 0; r < ROWS; r++)
      for (int w = 0; w < 8; w++) begin
        en = 1; we = 1; row = 6'(r); word = 3'(w); wdata = $urandom;
        model[r][w*32 +: 32] = wdata;
        @(negedge clk);
      end
    // overwrite one word
    row = 6'd5; word = 3'd3; wdata = 32'hDEADBEEF; model[5][3*32 +: 32] = wdata; @(negedge clk);
    we = 0;
    for (int r = ROWS - 1; r >= 0; r--) begin
      en = 1; row = 6'(r); @(negedge clk); en = 0;
      checks++;
      if (rdata !== model[r]) begin failures++; $display("FAIL row %0d", r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
