`timescale 1ps/1ps
// Shared constants and types of the Vernier-ring TSV test circuit.
//
// The numbers that set the size of the test circuit (16 TSVs per test
// circuit, a 4-bit Sel code, 8 delay buffers per ring, a code read out in 7
// test clock cycles, 10 ps resolution) are those of the reference
// configuration. The absolute gate delays (TS_PS, TF_PS, NAND_PS) are this
// implementation's choice: only their difference, the 10 ps resolution, is
// fixed by the configuration. They are chosen so that one lap of the slow
// ring (NAND_PS + NS*TS_PS = 1310 ps) is longer than the largest interval
// the 7-bit code can express, which keeps the per-stage flip-flops from
// aliasing (see vr_phase_capture).
package vr_pkg;

  // Test-circuit sharing and selection
  localparam int unsigned N_TSV  = 16;            // TSVs sharing one ring pair
  localparam int unsigned SEL_W  = 4;             // width of the Sel code

  // Vernier ring
  localparam int unsigned NS        = 8;          // delay buffers per ring
  localparam int unsigned TS_PS     = 160;        // slow-ring buffer delay
  localparam int unsigned TF_PS     = 150;        // fast-ring buffer delay
  localparam int unsigned NAND_PS   = 30;         // matched entry NAND delay
  localparam int unsigned CODE_W    = 7;          // digital code width

  typedef enum logic [2:0] {
    ST_IDLE,     // normal operating mode, all TSVs carry functional signals
    ST_SELECT,   // Sel code shifted in, one bit per cycle
    ST_INIT,     // all capture flip-flops cleared, rings settle
    ST_MEASURE,  // rising test transition applied, rings race
    ST_SCAN      // digital code shifted out, MSB first
  } tc_state_e;

endpackage
