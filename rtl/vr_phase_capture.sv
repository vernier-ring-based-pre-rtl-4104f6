`timescale 1ps/1ps
// Phase capture of the Vernier ring: two chains of D flip-flops, lap counters
// and the freeze that ends a measurement.
//
// At every ring stage i one flip-flop of each type is clocked by the fast-ring
// tap fast_tap[i] and samples the slow-ring tap slow_tap[i]. The lead edge
// runs in the slow ring and the lag edge in the fast ring, so a flip-flop
// that captures 1 means "the lead edge was still ahead at this stage". Laps
// alternate in polarity because the entry NAND inverts: the first lap carries
// falling edges and is recorded by the type-B chain (qb, falling-edge
// clocked, data inverted), the second lap carries rising edges and is
// recorded by the type-A chain (qa, rising-edge clocked), and so on.
//
// The lag edge gains TS-TF per stage. At the end of every fast lap (an edge on
// fast_tap[NS-1]) the slow tap of the same stage shows whether the lag edge
// has caught up during that lap; if so the matching caught flag is set and
// every flip-flop stops sampling (frozen). The lap counters count fast laps,
// the catch lap included: laps_f counts odd laps (falling edges), laps_r even
// laps (rising edges). The chain of the catch lap then holds a thermometer
// code: ones for the stages where the lead edge was still ahead. If no catch
// happens within LAP_LIMIT laps the counters stop and no caught flag is set.
//
// A stage's flip-flop compares levels, so it is only correct while the lead
// edge is less than one slow lap ahead; the ring delays are chosen so that
// the whole code range stays within that.
//
// Timing: clr is an asynchronous clear from the test controller, applied
// while the rings are idle. All other flip-flops run on the ring taps; the
// freeze takes effect one NAND plus one buffer delay before the next lap's
// first stage samples. Clearing every flip-flop to 0 follows the reference
// initialisation step; the per-lap-end catch test, the lap counters and the
// freeze are this implementation's realisation of how the ring is turned off.
module vr_phase_capture #(
  parameter int unsigned NS        = 8,
  parameter int unsigned LAP_W     = 4,
  parameter int unsigned LAP_LIMIT = 16
) (
  input  logic             clr,          // asynchronous clear, active high
  input  logic [NS-1:0]    slow_tap,     // lead edge ring
  input  logic [NS-1:0]    fast_tap,     // lag edge ring
  output logic [NS-1:0]    qa,           // type A chain (even laps)
  output logic [NS-1:0]    qb,           // type B chain (odd laps)
  output logic [LAP_W-1:0] laps_r,       // completed even laps
  output logic [LAP_W-1:0] laps_f,       // completed odd laps
  output logic             caught_r,     // caught on an even lap
  output logic             caught_f      // caught on an odd lap
);

  logic         frozen;
  logic [LAP_W:0] laps_total;
  logic         counting;

  assign frozen     = caught_r | caught_f;
  assign laps_total = {1'b0, laps_r} + {1'b0, laps_f};
  assign counting   = !frozen && (laps_total < (LAP_W+1)'(LAP_LIMIT));

  for (genvar i = 0; i < NS; i++) begin : g_stage
    logic dff_a, dff_b;
    // Type B: falling edges of odd laps; lead ahead means slow tap already low.
    always_ff @(negedge fast_tap[i] or posedge clr) begin
      if (clr)          dff_b <= 1'b0;
      else if (!frozen) dff_b <= ~slow_tap[i];
    end
    // Type A: rising edges of even laps; lead ahead means slow tap already high.
    always_ff @(posedge fast_tap[i] or posedge clr) begin
      if (clr)          dff_a <= 1'b0;
      else if (!frozen) dff_a <= slow_tap[i];
    end
    assign qa[i] = dff_a;
    assign qb[i] = dff_b;
  end

  // End of an odd lap: the slow tap still high means the lag edge got there first.
  always_ff @(negedge fast_tap[NS-1] or posedge clr) begin
    if (clr) begin
      laps_f   <= '0;
      caught_f <= 1'b0;
    end else if (counting) begin
      laps_f   <= laps_f + 1'b1;
      caught_f <= slow_tap[NS-1];
    end
  end

  // End of an even lap: the slow tap still low means the lag edge got there first.
  always_ff @(posedge fast_tap[NS-1] or posedge clr) begin
    if (clr) begin
      laps_r   <= '0;
      caught_r <= 1'b0;
    end else if (counting) begin
      laps_r   <= laps_r + 1'b1;
      caught_r <= ~slow_tap[NS-1];
    end
  end

endmodule
