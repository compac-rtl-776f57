// tb_compac_pkg: checks the package's derived values: 288 taps, 67 KB of banks,
// the per-layer bank capacities, the phase schedules and their alignment shifts
// (mode 2 / off: -2; mode 1: +2, -3, +1), by recomputing them from the weight of
// each phase's first and last product.
module tb_compac_pkg;
  import compac_pkg::*;
  int checks = 0, failures = 0;
  task automatic chk(bit c, string s); checks++; if (!c) begin failures++; $display("FAIL %s", s); end endtask
  initial begin
    int tot;
    chk(N_TAPS == 288, "taps");
    tot = 0; for (int b = 0; b < N_BANKS; b++) tot += BANK_ROWS[b] * 32;
    chk(tot == 67 * 1024, "67 KB");
    for (int l = 1; l <= 5; l++) begin
      int kb [3];
      for (int rg = 0; rg < 3; rg++) begin
        logic [10:0] m; m = bank_mask(3'(l), 2'(rg)); kb[rg] = 0;
        for (int b = 0; b < N_BANKS; b++) if (m[b]) kb[rg] += BANK_ROWS[b] * 32 / 1024;
      end
      chk(kb[0] + kb[1] + kb[2] == 67, $sformatf("layer %0d uses all banks", l));
      chk((l == 1) ? (kb[0] == 44 && kb[1] == 18 && kb[2] == 5) :
          (l == 2) ? (kb[0] == 12 && kb[1] == 50 && kb[2] == 5) :
          (l == 3) ? (kb[0] == 16 && kb[1] == 50 && kb[2] == 1) :
                     (kb[0] == 12 && kb[1] == 54 && kb[2] == 1), $sformatf("layer %0d capacities", l));
    end
    chk(n_phases(PAC_M1) == 4 && n_phases(PAC_M2) == 2 && n_phases(PAC_OFF) == 2, "phase counts");
    chk(align_of(PAC_M2, 1) == -2 && align_of(PAC_OFF, 1) == -2, "mode 2 alignment");
    chk(align_of(PAC_M1, 1) == 2 && align_of(PAC_M1, 2) == -3 && align_of(PAC_M1, 3) == 1, "mode 1 alignment");
    // every (nibble, weight bit) product appears exactly once per schedule
    for (int m = 0; m < 3; m++) begin
      int seen [2][7];
      for (int i = 0; i < 2; i++) for (int j = 0; j < 7; j++) seen[i][j] = 0;
      for (int p = 0; p < int'(n_phases(pac_mode_e'(m))); p++) begin
        phase_t ph; ph = phase_of(pac_mode_e'(m), p);
        for (int b = int'(ph.bit_lo); b <= int'(ph.bit_hi); b++) seen[ph.hi][b]++;
      end
      for (int i = 0; i < 2; i++) for (int j = 0; j < 7; j++) chk(seen[i][j] == 1, $sformatf("mode %0d product %0d/%0d", m, i, j));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
