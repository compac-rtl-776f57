// tb_compac_trs_lut: for every residue of the 16-unit MDL (0..31 steps, both
// phases) builds the line state, applies the TRS lookup and checks that the
// resulting state and carry follow the quarter-based doubling rule worked out
// from the residue value: positive 1-7 -> 8, 8-15 -> 24, 16 -> carry+0,
// 17-23 -> carry+8, 24-31 -> carry+15 steps; negative: 1-8 -> -8, 9-15 -> -24, 16 -> carry-0, 17-24 -> carry-8, 25-31 -> carry-15.
module tb_compac_trs_lut;
  logic a, m, e, pos, incr, decr, change;
  logic [15:0] new_state, st;
  int checks = 0, failures = 0;

  compac_trs_lut #(.UNITS(16)) dut (.*);

  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic logic [15:0] st_of(int s);
    logic [15:0] v;
    for (int i = 0; i < 16; i++) v[i] = (s <= 16) ? (i >= s) : (i < s - 16);
    return v;
  endfunction

  function automatic int steps_of(logic [15:0] v);
    for (int s = 0; s < 32; s++) if (st_of(s) == v) return s;
    return -1;
  endfunction

  initial begin
    for (int ph = 0; ph < 2; ph++) begin
      for (int s = 0; s < 32; s++) begin
        int r, exp_r, exp_c, got_r, got_c;
        st  = st_of(s);
        a = st[0]; m = st[7]; e = st[15]; pos = (ph == 0);
        #1;
        if (pos) r = s; else r = (s == 0) ? 0 : -(32 - s);
        // expected doubled residue and carry
        if (r == 0) begin exp_r = 0; exp_c = 0; end
        else if (r > 0) begin
          if (r < 8) begin exp_r = 8; exp_c = 0; end
          else if (r < 16) begin exp_r = 24; exp_c = 0; end
          else if (r == 16) begin exp_r = 0; exp_c = 1; end
          else if (r < 24) begin exp_r = 8; exp_c = 1; end
          else begin exp_r = 15; exp_c = 1; end
        end else begin
          int q; q = -r;
          if (q <= 8) begin exp_r = -8; exp_c = 0; end
          else if (q < 16) begin exp_r = -24; exp_c = 0; end
          else if (q == 16) begin exp_r = 0; exp_c = -1; end
          else if (q <= 24) begin exp_r = -8; exp_c = -1; end
          else begin exp_r = -15; exp_c = -1; end
        end
        got_c = incr ? 1 : decr ? -1 : 0;
        got_r = change ? steps_of(new_state) : s;
        if (!pos && got_r != 0) got_r = got_r - 32;
        checks++;
        if (got_r != exp_r || got_c != exp_c) begin
          failures++;
          $display("FAIL pos=%0d s=%0d r=%0d: got r=%0d c=%0d, want r=%0d c=%0d", pos, s, r, got_r, got_c, exp_r, exp_c);
        end
        // the scaled residue is within 25% (8 steps) of 2r, or within 50% in the last quarter
        checks++;
        if ((2*r - (32*got_c + got_r)) > 16 || (2*r - (32*got_c + got_r)) < -16) begin
          failures++; $display("FAIL residue loss too large at r=%0d", r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
