// compac_scan_cfg: configuration scan chain.
//
// A serial shift register holding the engine configuration (cfg_t: layer for the
// bank allocation, PAC mode and thresholds, stride, tile size, window origin,
// channel groups). While scan_en is high the chain shifts one bit per clock,
// scan_in entering at the least significant end and the most significant bit
// leaving on scan_out, so a word is loaded MSB first in CFG_W clocks. While
// scan_en is low the configuration holds. Reset loads a default: layer 3, PAC off,
// stride 1, a 4x4 tile, origin 0, one channel group.
//
// The chain is only named in the published block diagram; its contents and
// protocol are this design's choices.
module compac_scan_cfg
  import compac_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic scan_en,
  input  logic scan_in,
  output logic scan_out,
  output cfg_t cfg
);

  localparam cfg_t CFG_RESET = '{layer: 3'd3, pac_mode: PAC_OFF, thr0: 5'd0, thr1: 5'd0,
                                 thr2: 5'd0, stride: 3'd1, tile_w: 6'd4, tile_h: 6'd4,
                                 y0: 6'd0, x0: 6'd0, groups: 4'd1};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       cfg <= CFG_RESET;
    else if (scan_en) cfg <= {cfg[CFG_W-2:0], scan_in};
  end

  assign scan_out = cfg[CFG_W-1];

endmodule
