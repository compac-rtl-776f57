// tb_compac_global_buffer: for every layer configuration, fills each region to its
// capacity (44/18/5 KB for layer 1, 12/50/5 KB for layer 2, 16/50/1 KB for layer 3,
// 12/54/1 KB for layers 4-5), checks that the next address is flagged out of
// range, and reads back samples of every region. Then checks that regions share
// the physical banks as allocated: with layer 2, B2 holds weights; written as
// weights under layer 2 and read as activations under layer 1 (where B2 follows B1).
module tb_compac_global_buffer;
  logic clk = 0, en = 0, we = 0, oob;
  logic [2:0] layer;
  logic [1:0] region;
  logic [15:0] addr;
  logic [31:0] wdata;
  logic [255:0] rdata;
  int checks = 0, failures = 0;

  compac_global_buffer dut (.*);
  always #5 clk = ~clk;
  initial begin #50000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic int cap_kb(int l, int rg);
    case (l)
      1: return (rg == 0) ? 44 : (rg == 1) ? 18 : 5;
      2: return (rg == 0) ? 12 : (rg == 1) ? 50 : 5;
      3: return (rg == 0) ? 16 : (rg == 1) ? 50 : 1;
      default: return (rg == 0) ? 12 : (rg == 1) ? 54 : 1;
    endcase
  endfunction

  function automatic logic [31:0] pat(int l, int rg, int a);
    return 32'((l << 28) ^ (rg << 24) ^ (a * 32'h9E37) ^ a);
  endfunction

  initial begin
    @(negedge clk);
    for (int l = 1; l <= 5; l++) begin
      layer = 3'(l);
      for (int rg = 0; rg < 3; rg++) begin
        int words;
        words = cap_kb(l, rg) * 1024 / 4;
        for (int a = 0; a < words; a++) begin
          en = 1; we = 1; region = 2'(rg); addr = 16'(a); wdata = pat(l, rg, a);
          #1;
          if (oob) begin checks++; failures++; $display("FAIL oob inside layer %0d region %0d addr %0d", l, rg, a); end
          @(negedge clk);
        end
        addr = 16'(words); #1;
        checks++;
        if (!oob) begin failures++; $display("FAIL no oob at capacity layer %0d region %0d", l, rg); end
        @(negedge clk);
      end
      we = 0;
      for (int rg = 0; rg < 3; rg++) begin
        int words;
        words = cap_kb(l, rg) * 1024 / 4;
        for (int k = 0; k < 40; k++) begin
          int a;
          a = (k == 0) ? 0 : (k == 1) ? words - 1 : $urandom_range(0, words - 1);
          en = 1; region = 2'(rg); addr = 16'(a); @(negedge clk); en = 0;
          checks++;
          if (rdata[(a % 8) * 32 +: 32] !== pat(l, rg, a)) begin
            failures++; $display("FAIL layer %0d region %0d addr %0d", l, rg, a);
          end
        end
      end
    end
    // bank sharing: layer 2 weights word 0 is B2 row 0; layer 1 activations B2 row 0 is word 256*8
    layer = 3'd2; en = 1; we = 1; region = 2'd1; addr = 16'd0; wdata = 32'h12345678; @(negedge clk);
    layer = 3'd1; we = 0; region = 2'd0; addr = 16'd2048; @(negedge clk); en = 0;
    checks++;
    if (rdata[31:0] !== 32'h12345678) begin failures++; $display("FAIL bank reallocation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
