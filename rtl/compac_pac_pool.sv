// compac_pac_pool: the three 24-bit comparators of a filter, shared by the
// pooling-aware convolution (PAC) phase and the final ReLU + 2x2 max pooling.
//
// Evaluation takes two cycles after start. Cycle 1: a tree of three comparators
// finds the largest of the four MAC counters (MACs already switched off are left
// out) and registers it with its index; the ReLU of that maximum is the pooled
// output. Cycle 2 (kill_valid): the same three comparators compare the maximum,
// divided by the power-of-two threshold (an arithmetic right shift by
// thr_shift), against each of the other three MACs divided the same way; a MAC
// whose quotient is smaller is flagged in kill and is not computed any further.
//
// Interface: mac/active are sampled in cycle 1 only; pooled holds until the next
// start. kill is meaningful while kill_valid is high.
//
// The comparison rule and the power-of-two thresholds follow the published PAC
// scheme; the two-cycle split of the comparator use is this design's reading of
// the stated two-cycle PAC phase.
module compac_pac_pool
  import compac_pkg::*;
#(
  parameter int unsigned CW = CNT_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [CW-1:0] mac [4],
  input  logic [3:0]           active,
  input  logic [4:0]           thr_shift,
  output logic [3:0]           kill,
  output logic                 kill_valid,
  output logic [CW-1:0]        pooled
);

  localparam logic signed [CW-1:0] MIN_V = {1'b1, {(CW-1){1'b0}}};

  logic signed [CW-1:0] v [4];
  logic signed [CW-1:0] w01, w23, wmax;
  logic [1:0]           i01, i23, imax;
  logic signed [CW-1:0] mx_q;
  logic [1:0]           idx_q;
  logic                 ph2;

  // comparator tree (cycle 1)
  always_comb begin
    for (int i = 0; i < 4; i++) v[i] = active[i] ? mac[i] : MIN_V;
    {w01, i01} = (v[1] > v[0]) ? {v[1], 2'd1} : {v[0], 2'd0};
    {w23, i23} = (v[3] > v[2]) ? {v[3], 2'd3} : {v[2], 2'd2};
    {wmax, imax} = (w23 > w01) ? {w23, i23} : {w01, i01};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mx_q  <= '0;
      idx_q <= '0;
      ph2   <= 1'b0;
    end else begin
      ph2 <= start;
      if (start) begin
        mx_q  <= wmax;
        idx_q <= imax;
      end
    end
  end

  assign pooled     = mx_q[CW-1] ? '0 : mx_q;   // ReLU
  assign kill_valid = ph2;

  // threshold comparisons (cycle 2); the maximum is never compared with itself
  always_comb begin
    logic signed [CW-1:0] mq;
    mq = mx_q >>> thr_shift;
    for (int i = 0; i < 4; i++)
      kill[i] = (2'(i) != idx_q) && (mq > (mac[i] >>> thr_shift));
  end

endmodule
