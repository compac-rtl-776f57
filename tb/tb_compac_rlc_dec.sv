// tb_compac_rlc_dec: decodes the two example words of the RLC figure
// (mode 1: 12,0,[2],4,1,[4],11,8; mode 2: 12,[3],4,[0],1,[4],11,[0]) and random
// words of both modes, comparing the nibble stream with a software expansion
// of the field layout (level: the value; run: that many zeros).
module tb_compac_rlc_dec;
  logic clk = 0, rst_n = 0, mode = 0, in_valid = 0, in_ready, out_valid;
  logic [31:0] in_data;
  logic [3:0] out_nib;
  int checks = 0, failures = 0;
  int q [$];

  compac_rlc_dec dut (.*);
  always #5 clk = ~clk;
  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (q.size() == 0) begin failures++; $display("FAIL extra nibble %0d", out_nib); end
    else begin
      int e; e = q.pop_front();
      if (out_nib !== 4'(e)) begin failures++; $display("FAIL nibble %0d want %0d", out_nib, e); end
    end
  end

  task automatic send(logic m, logic [31:0] w);
    for (int k = 0; k < 8; k++) begin
      int f; bit run;
      f = int'(w[31 - 4*k -: 4]);
      run = m ? (k % 2 == 1) : (k == 2 || k == 5);
      if (run) for (int z = 0; z < f; z++) q.push_back(0);
      else q.push_back(f);
    end
    while (!in_ready) @(negedge clk);
    mode = m; in_data = w; in_valid = 1;
    @(negedge clk);  // taken at this edge, in_ready was high
    in_valid = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    send(1'b0, 32'hC0_24_14_B8);   // 12 0 2 4 1 4 11 8
    send(1'b1, 32'hC3_40_14_B0);   // 12 3 4 0 1 4 11 0
    for (int k = 0; k < 60; k++) send(1'($urandom_range(0, 1)), $urandom);
    repeat (80) @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d nibbles missing", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
