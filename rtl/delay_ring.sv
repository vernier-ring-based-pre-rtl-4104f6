`timescale 1ps/1ps
// Behavioural model (delay-based, not synthesizable logic) of one cyclic
// delay line of the Vernier ring.
//
// A 2-input NAND is the entry cell: one input takes the signal under test,
// the other the output of the last buffer. NS buffers follow; their outputs
// are the ring taps at which the phase-capture flip-flops sit. While start is
// low the NAND output is high and every tap settles high. A rising edge on
// start sends a falling edge round the ring; because the NAND inverts, the
// edge comes back rising on the second lap, falling on the third, and so on,
// until start falls again. One lap takes NAND_PS + NS*BUF_PS.
//
// In silicon the cells are standard-cell buffers and a NAND sized to the
// wanted delays; the slow ring and the fast ring are two instances with
// different BUF_PS and the same NAND_PS. The loop through tap[NS-1] is the
// ring oscillator itself and is intended; each cell carries a delay, so the
// loop is never a zero-delay loop.
module delay_ring #(
  parameter int unsigned NS      = 8,     // delay buffers per ring
  parameter int unsigned BUF_PS  = 160,   // buffer delay
  parameter int unsigned NAND_PS = 30     // entry NAND delay
) (
  input  logic          start,            // signal under test, rising edge
  output logic [NS-1:0] tap               // buffer outputs, tap[0] first
);

  logic entry;                            // NAND output

  assign #(NAND_PS) entry  = ~(start & tap[NS-1]);
  assign #(BUF_PS)  tap[0] = entry;

  for (genvar i = 1; i < NS; i++) begin : g_buf
    assign #(BUF_PS) tap[i] = tap[i-1];
  end

endmodule
