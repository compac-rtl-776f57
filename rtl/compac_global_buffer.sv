// compac_global_buffer: the 67 KB on-chip global buffer, eleven banks B1..B11,
// with the configurable bank allocation of the COMPAC data flow.
//
// Depending on the convolution layer, each bank belongs to the input activation,
// the weight or the output activation region, so that layer 1 gets most space for
// activations and layers 2..5 most space for weights. An access names a region
// and a 32-bit word address inside it; the region's banks are concatenated in
// ascending order, rows of 8 words. Writes store one word, reads return the
// addressed 256-bit row on the next cycle. oob flags an address beyond the
// region's capacity (the access is then dropped).
//
// The bank sizes (8,8,8,8,8,8,8,4,4,2,1 KB) and the per-layer allocation follow
// the published design; the address map within a region is this design's choice.
module compac_global_buffer
  import compac_pkg::*;
(
  input  logic         clk,
  input  logic [2:0]   layer,
  input  logic         en,
  input  logic         we,
  input  logic [1:0]   region,
  input  logic [15:0]  addr,
  input  logic [31:0]  wdata,
  output logic [255:0] rdata,
  output logic         oob
);

  logic [N_BANKS-1:0] mask, sel;
  logic [12:0]        lrow [N_BANKS];
  logic [255:0]       bank_q [N_BANKS];
  logic [3:0]         rsel_q;

  always_comb begin
    int unsigned base;
    int unsigned r;
    mask = bank_mask(layer, region);
    r    = 32'(addr[15:3]);
    base = 0;
    sel  = '0;
    for (int b = 0; b < N_BANKS; b++) begin
      lrow[b] = 13'(r - base);
      if (mask[b]) begin
        if (r >= base && r < base + BANK_ROWS[b]) sel[b] = 1'b1;
        base += BANK_ROWS[b];
      end
    end
    oob = en && (sel == '0);
  end

  for (genvar b = 0; b < N_BANKS; b++) begin : g_bank
    compac_sram_bank #(.ROWS(BANK_ROWS[b])) u_bank (
      .clk   (clk),
      .en    (en & sel[b]),
      .we    (we),
      .row   (lrow[b][$clog2(BANK_ROWS[b])-1:0]),
      .word  (addr[2:0]),
      .wdata (wdata),
      .rdata (bank_q[b])
    );
  end

  always_ff @(posedge clk) begin
    if (en && !we) begin
      rsel_q <= '0;
      for (int b = 0; b < N_BANKS; b++) if (sel[b]) rsel_q <= 4'(b);
    end
  end

  assign rdata = bank_q[rsel_q];

endmodule
