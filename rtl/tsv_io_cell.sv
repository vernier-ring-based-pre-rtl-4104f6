`timescale 1ps/1ps
// Behavioural model (not synthesizable logic) of an I/O TSV cell.
//
// The cell is a driver inverter (INV1) whose output net is the TSV, and a
// receiver inverter (INV2) that reads the TSV net back. Before wafer thinning
// the far end of the TSV is buried in the substrate, so the TSV acts only as a
// capacitive load on INV1. A rising edge on drv_in discharges the TSV; the
// time until rcv_out rises depends on that load. A resistive-open defect
// (micro-void) hides part of the capacitance behind the void resistance and a
// leakage defect (pinhole) adds a discharge path to the substrate; both make
// the falling TSV transition, and so the rising receiver output, earlier than
// for a fault-free TSV.
//
// The electrical behaviour is not computed here. The input delay_ps carries
// the driver-to-receiver propagation delay the analog cell would have; it
// exists for simulation only and stands in for the TSV's physical state.
// A fixed RCV_PS of that total is spent in INV2, the rest on the TSV node.
// Logically the cell is a non-inverting buffer (two inversions).
module tsv_io_cell #(
  parameter int unsigned RCV_PS = 15      // receiver inverter delay
) (
  input  logic        drv_in,     // input of driver INV1
  input  int unsigned delay_ps,   // total drv_in -> rcv_out delay (model only)
  output logic        rcv_out     // output of receiver INV2
);

  logic        tsv_node;          // TSV net, output of INV1
  int unsigned drv_dly;

  assign drv_dly = (delay_ps > RCV_PS) ? delay_ps - RCV_PS : 1;

  initial begin
    #1 tsv_node = ~drv_in;
  end

  always @(drv_in) tsv_node <= #(drv_dly) ~drv_in;

  assign #(RCV_PS) rcv_out = ~tsv_node;

endmodule
