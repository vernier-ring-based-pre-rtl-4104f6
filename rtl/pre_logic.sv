`timescale 1ps/1ps
// Pre-logic unit: routes the test transition into the TSV under test and
// hands its receiver output to the Vernier ring.
//
// Each of the N_TSV I/O TSV cells has a 2:1 multiplexer in front of its
// driver. Its select is the test enable s_n[i] (S1..Sn): 1 passes the
// functional signal from the internal logic, 0 passes the test transition
// test_in. With every s_n bit high the circuit is in normal operating mode;
// clearing exactly one bit puts that TSV into test mode. An N_TSV:1
// multiplexer addressed by sel passes the receiver output of the TSV under
// test on as lead (to the slow ring); the receiver of the fault-free
// reference path is passed on as lag (to the fast ring). A defect makes the
// TSV under test faster than the reference, so its edge leads.
//
// Purely combinational. The multiplexer structure follows the reference
// design; taking the lag edge from a dedicated reference cell driven by
// test_in is this implementation's reading of where the fault-free edge
// comes from.
module pre_logic #(
  parameter int unsigned N_TSV = 16,
  parameter int unsigned SEL_W = $clog2(N_TSV)
) (
  input  logic [N_TSV-1:0] func_in,    // functional signals from internal logic
  input  logic             test_in,    // test transition 'in'
  input  logic [N_TSV-1:0] s_n,        // test enables, 1 = functional
  input  logic [SEL_W-1:0] sel,        // TSV under test
  input  logic [N_TSV-1:0] tsv_rcv,    // receiver outputs of the I/O TSV cells
  input  logic             ref_rcv,    // receiver output of the reference path
  output logic [N_TSV-1:0] tsv_drv,    // driver inputs of the I/O TSV cells
  output logic             lead,       // to the slow ring
  output logic             lag         // to the fast ring
);

  always_comb begin
    for (int i = 0; i < N_TSV; i++)
      tsv_drv[i] = s_n[i] ? func_in[i] : test_in;
  end

  assign lead = tsv_rcv[sel];
  assign lag  = ref_rcv;

endmodule
