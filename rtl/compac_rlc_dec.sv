// compac_rlc_dec: run-length decoder for compressed words on the 32-bit input bus.
//
// A compressed word holds eight 4-bit fields, from bits [31:28] down to [3:0].
// A "level" field is a 4-bit value passed on as it is; a "run" field stands for
// that many (0..15) zero values. In RLC mode 1 the fields are
// level, level, run, level, level, run, level, level (two runs, six levels; used
// for weights and for layer-1 activations); in mode 2 they alternate level, run
// (four each; for the sparse activations of later layers). The decoder takes one
// word when in_ready is high and then emits one decoded nibble per cycle, one
// cycle per zero of a run and one cycle per level; an empty run costs a cycle
// without output.
//
// The field layouts follow the published RLC codes; the bit order, the
// valid/ready handshake and the one-nibble-per-cycle rate are this design's.
module compac_rlc_dec (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        mode,       // 0: RLC mode 1, 1: RLC mode 2
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [31:0] in_data,
  output logic        out_valid,
  output logic [3:0]  out_nib
);

  logic [31:0] word_q;
  logic        mode_q;
  logic        have;
  logic [2:0]  k;
  logic [3:0]  run_cnt;
  logic [3:0]  field;
  logic        is_run;

  assign field  = word_q[31 - 4*int'(k) -: 4];
  assign is_run = mode_q ? k[0] : (k == 3'd2 || k == 3'd5);

  assign in_ready  = !have;
  assign out_valid = have && (!is_run || field != 4'd0);
  assign out_nib   = is_run ? 4'd0 : field;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have    <= 1'b0;
      k       <= '0;
      run_cnt <= '0;
      word_q  <= '0;
      mode_q  <= 1'b0;
    end else if (!have) begin
      if (in_valid) begin
        have    <= 1'b1;
        word_q  <= in_data;
        mode_q  <= mode;
        k       <= '0;
        run_cnt <= '0;
      end
    end else begin
      if (is_run && field != 4'd0 && run_cnt != field - 1'b1) begin
        run_cnt <= run_cnt + 1'b1;
      end else begin
        run_cnt <= '0;
        k       <= k + 1'b1;
        if (k == 3'd7) have <= 1'b0;
      end
    end
  end

endmodule
