// compac_sram_bank: one bank of the on-chip global buffer.
//
// Rows are 256 bits wide (32 bytes). A write stores one 32-bit word of a row; a
// read returns the whole row on the cycle after the access. Single port: one
// access per cycle. The array stands for the SRAM macro of the chip.
//
// The 256-column rows follow the published bank organisation; the word-wide write
// and the one-cycle read latency are this design's choices.
module compac_sram_bank #(
  parameter int unsigned ROWS = 256
) (
  input  logic                    clk,
  input  logic                    en,
  input  logic                    we,
  input  logic [$clog2(ROWS)-1:0] row,
  input  logic [2:0]              word,
  input  logic [31:0]             wdata,
  output logic [255:0]            rdata
);

  logic [255:0] mem [ROWS];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[row][int'(word)*32 +: 32] <= wdata;
      else    rdata <= mem[row];
    end
  end

endmodule
