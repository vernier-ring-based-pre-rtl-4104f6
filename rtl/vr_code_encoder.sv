`timescale 1ps/1ps
// Digital code encoder of the Vernier ring.
//
// The code is the number of delay stages at which the lead edge was still
// ahead of the lag edge. With a stage resolution R = TS - TF it equals
// floor(t_M / R) for a measured interval t_M (rounded down; an interval that
// is an exact multiple of R sits on a decision boundary). It is formed as
//   code = (laps - 1) * NS + ones(chain of the catch lap)
// where laps = laps_r + laps_f counts the fast laps up to and including the
// catch lap, and the catch lap's chain is qb for an odd lap, qa for an even
// one. If no catch was seen, or the result does not fit in CODE_W bits, the
// code saturates at all ones and overflow is set. Purely combinational; the
// code is valid once the capture block has frozen.
module vr_code_encoder #(
  parameter int unsigned NS     = 8,
  parameter int unsigned LAP_W  = 4,
  parameter int unsigned CODE_W = 7
) (
  input  logic [NS-1:0]     qa,
  input  logic [NS-1:0]     qb,
  input  logic [LAP_W-1:0]  laps_r,
  input  logic [LAP_W-1:0]  laps_f,
  input  logic              caught_r,
  input  logic              caught_f,
  output logic [CODE_W-1:0] code,
  output logic              overflow
);

  localparam int unsigned SUM_W = LAP_W + $clog2(NS) + 2;

  logic [NS-1:0]    chain;
  logic [SUM_W-1:0] ones;
  logic [SUM_W-1:0] laps;
  logic [SUM_W-1:0] stages;

  always_comb begin
    chain = caught_f ? qb : qa;
    ones  = '0;
    for (int i = 0; i < NS; i++) ones += SUM_W'(chain[i]);
    laps   = SUM_W'(laps_r) + SUM_W'(laps_f);
    stages = (laps == '0) ? ones : (laps - 1'b1) * SUM_W'(NS) + ones;
    if (!(caught_r || caught_f) || stages > SUM_W'({CODE_W{1'b1}})) begin
      overflow = 1'b1;
      code     = '1;
    end else begin
      overflow = 1'b0;
      code     = stages[CODE_W-1:0];
    end
  end

endmodule
