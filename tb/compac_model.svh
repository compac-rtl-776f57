// compac_model.svh: value-level reference of one time-domain MAC unit, shared by
// the filter and top-level testbenches. A MAC is (C, r): value = 32*C + r with
// |r| < 32. A pulse of d t0 adds +-d to r, carrying into C at |r| = 32; a
// doubling maps the residue by quarters (the TRS lookup table) and doubles C; a
// right shift by n shifts C and clears r.
typedef struct { int C; int r; } mac_val_t;

function automatic void mv_pulse(ref mac_val_t m, input int d, input bit n);
  if (n) m.r -= d; else m.r += d;
  while (m.r >= 32)  begin m.r -= 32; m.C++; end
  while (m.r <= -32) begin m.r += 32; m.C--; end
endfunction

function automatic void mv_dbl(ref mac_val_t m);
  int nr, c;
  c = 0; nr = 0;
  if (m.r > 0) begin
    if (m.r < 8) nr = 8; else if (m.r < 16) nr = 24; else if (m.r == 16) begin nr = 0; c = 1; end
    else if (m.r < 24) begin nr = 8; c = 1; end else begin nr = 15; c = 1; end
  end else if (m.r < 0) begin
    if (-m.r <= 8) nr = -8; else if (-m.r < 16) nr = -24; else if (-m.r == 16) begin nr = 0; c = -1; end
    else if (-m.r <= 24) begin nr = -8; c = -1; end else begin nr = -15; c = -1; end
  end
  m.C = 2 * m.C + c; m.r = nr;
endfunction

function automatic void mv_shr(ref mac_val_t m, input int n);
  m.C = m.C >>> n; m.r = 0;
endfunction
