// compac_act_regs: the 144 32-bit input activation cyclic shift registers.
//
// They are organised as four streams, one per concurrently computed MAC of the
// 2x2 pooling window (X1..X4). Each stream is a cyclic shift register of 288
// 4-bit entries: one nibble (X[7:4] or X[3:0]) of each of the 9 x 32 activations
// of a 3x3 window over 32 channels; 4 x 288 x 4 bits = 144 x 32 bits. A load
// writes one SRAM row (32 channels x 8 bits) as the 32 nibbles of one tap group,
// and may write the same row into several streams in the same cycle, so an
// activation shared by overlapping windows is read from the SRAM only once.
// rotate (apply_inputs) moves every stream by one tap; after 288 rotations the
// registers are back in place and are reused for the next weight bit.
//
// Interface: load[i] writes stream i at tap group load_group[i]; x[i] is the
// current (head) nibble of stream i. Loads have priority over rotate.
//
// The register count and the broadcast follow the published design; the
// nibble-wide organisation is this design's reading of the published size.
module compac_act_regs #(
  parameter int unsigned GROUPS = 9,
  parameter int unsigned CH     = 32
) (
  input  logic            clk,
  input  logic [3:0]      load,
  input  logic [3:0]      load_group [4],
  input  logic            load_hi,
  input  logic [CH*8-1:0] load_data,
  input  logic            rotate,
  output logic [3:0]      x [4]
);

  localparam int unsigned TAPS = GROUPS * CH;

  // stream s: sr[s][4*t +: 4] = nibble of tap t; tap 0 is the head
  logic [4*TAPS-1:0] sr [4];
  logic [4*CH-1:0]   nib_row;

  always_comb begin
    for (int c = 0; c < CH; c++)
      nib_row[4*c +: 4] = load_hi ? load_data[c*8+4 +: 4] : load_data[c*8 +: 4];
  end

  for (genvar s = 0; s < 4; s++) begin : g_stream
    logic [4*TAPS-1:0] rot;
    assign rot = {sr[s][3:0], sr[s][4*TAPS-1:4]};
    for (genvar gr = 0; gr < GROUPS; gr++) begin : g_grp
      always_ff @(posedge clk) begin
        if (load[s]) begin
          if (load_group[s] == 4'(gr)) sr[s][4*CH*gr +: 4*CH] <= nib_row;
        end else if (rotate) begin
          sr[s][4*CH*gr +: 4*CH] <= rot[4*CH*gr +: 4*CH];
        end
      end
    end
    assign x[s] = sr[s][3:0];
  end

endmodule
