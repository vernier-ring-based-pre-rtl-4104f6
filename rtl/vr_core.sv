`timescale 1ps/1ps
// Vernier ring core: a time-to-digital converter that measures how far the
// lead edge is ahead of the lag edge.
//
// The lead edge (from the TSV under test) enters the slow ring, whose buffers
// take TS_PS each; the lag edge (from the fault-free reference) enters the
// fast ring, whose buffers take TF_PS. Each stage the lag edge gains
// R = TS_PS - TF_PS; the stage at which it overtakes the lead edge, counted
// across laps, is the digital code, so code = floor(t_M / R). Reusing the
// eight stages lap after lap is what keeps the circuit small compared with a
// straight Vernier delay line of equal range.
//
// Interface: clr clears the capture flip-flops (assert while lead and lag are
// low). After rising edges on lead and then lag, code and overflow settle
// within LAP_LIMIT fast laps (about 21 ns with the default delays) and hold
// until the next clr. The rings are delay models; the capture and encoder are
// synthesizable logic clocked by the ring taps.
module vr_core
#(
  parameter int unsigned NS      = vr_pkg::NS,
  parameter int unsigned TS_PS   = vr_pkg::TS_PS,
  parameter int unsigned TF_PS   = vr_pkg::TF_PS,
  parameter int unsigned NAND_PS = vr_pkg::NAND_PS,
  parameter int unsigned CODE_W  = vr_pkg::CODE_W
) (
  input  logic              clr,
  input  logic              lead,       // earlier edge, to the slow ring
  input  logic              lag,        // later edge, to the fast ring
  output logic [CODE_W-1:0] code,
  output logic              overflow
);

  // Enough laps to cover every code value, one counter holding half of them.
  localparam int unsigned LAP_LIMIT_C = ((1 << CODE_W) + NS - 1) / NS + 1;
  localparam int unsigned LAP_W_C     = $clog2(LAP_LIMIT_C / 2 + 2);

  logic [NS-1:0]      slow_tap, fast_tap;
  logic [NS-1:0]      qa, qb;
  logic [LAP_W_C-1:0] laps_r, laps_f;
  logic               caught_r, caught_f;

  delay_ring #(.NS(NS), .BUF_PS(TS_PS), .NAND_PS(NAND_PS)) u_slow (
    .start(lead), .tap(slow_tap));

  delay_ring #(.NS(NS), .BUF_PS(TF_PS), .NAND_PS(NAND_PS)) u_fast (
    .start(lag), .tap(fast_tap));

  vr_phase_capture #(.NS(NS), .LAP_W(LAP_W_C), .LAP_LIMIT(LAP_LIMIT_C)) u_cap (
    .clr, .slow_tap, .fast_tap, .qa, .qb, .laps_r, .laps_f, .caught_r, .caught_f);

  vr_code_encoder #(.NS(NS), .LAP_W(LAP_W_C), .CODE_W(CODE_W)) u_enc (
    .qa, .qb, .laps_r, .laps_f, .caught_r, .caught_f, .code, .overflow);

endmodule
