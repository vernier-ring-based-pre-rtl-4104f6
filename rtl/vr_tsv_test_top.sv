`timescale 1ps/1ps
// Pre-bond TSV test circuit built around a Vernier ring time-to-digital
// converter.
//
// N_TSV I/O TSV cells share one Vernier ring core. In normal operating mode
// every TSV driver carries its functional signal (func_in -> func_out). A
// test is started with test_req; the controller then shifts in the Sel code
// of the TSV under test from sel_si (MSB first, SEL_W cycles), clears the
// ring's capture flip-flops, applies a rising test transition to the selected
// TSV and to a fault-free reference path at the same time, and shifts the
// resulting CODE_W-bit digital code out on code_so (MSB first, code_so_valid
// high). A complete test takes 13 test clock cycles; done pulses after the
// last bit. A fault-free TSV gives a small code set by the reference path's
// extra delay; a resistive-open or leakage defect speeds up the TSV under
// test, the interval grows and the code grows with the severity of the
// defect, one step per TS_PS - TF_PS (10 ps).
//
// The I/O TSV cells, the reference path and the two delay rings are delay
// models; tsv_delay_ps and ref_delay_ps carry their analog propagation
// delays and exist for simulation only. Everything else is synthesizable
// logic clocked by tck, except the capture flip-flops, which are clocked by
// the ring taps.
module vr_tsv_test_top
#(
  parameter int unsigned N_TSV   = vr_pkg::N_TSV,
  parameter int unsigned SEL_W   = vr_pkg::SEL_W,
  parameter int unsigned NS      = vr_pkg::NS,
  parameter int unsigned TS_PS   = vr_pkg::TS_PS,
  parameter int unsigned TF_PS   = vr_pkg::TF_PS,
  parameter int unsigned NAND_PS = vr_pkg::NAND_PS,
  parameter int unsigned CODE_W  = vr_pkg::CODE_W
) (
  input  logic              tck,            // test clock
  input  logic              trst_n,         // asynchronous reset, active low
  input  logic              test_req,       // start one TSV test
  input  logic              sel_si,         // serial Sel code, MSB first
  input  logic [N_TSV-1:0]  func_in,        // functional signals to the TSVs
  output logic [N_TSV-1:0]  func_out,       // TSV receiver outputs
  input  int unsigned       tsv_delay_ps [N_TSV],  // model only: cell delays
  input  int unsigned       ref_delay_ps,   // model only: reference path delay
  output logic              code_so,        // serial digital code, MSB first
  output logic              code_so_valid,
  output logic              meas_overflow,  // no catch within the code range
  output logic              busy,
  output logic              done
);

  logic [N_TSV-1:0]  tsv_drv, tsv_rcv, s_n;
  logic              ref_rcv, lead, lag;
  logic              test_in, clr, sel_shift, code_load, code_shift;
  logic [SEL_W-1:0]  sel;
  logic [CODE_W-1:0] code;

  for (genvar i = 0; i < N_TSV; i++) begin : g_tsv
    tsv_io_cell u_cell (.drv_in(tsv_drv[i]), .delay_ps(tsv_delay_ps[i]), .rcv_out(tsv_rcv[i]));
  end

  // Fault-free reference path driven by the test transition directly.
  tsv_io_cell u_ref (.drv_in(test_in), .delay_ps(ref_delay_ps), .rcv_out(ref_rcv));

  assign func_out = tsv_rcv;

  pre_logic #(.N_TSV(N_TSV), .SEL_W(SEL_W)) u_pre (
    .func_in, .test_in, .s_n, .sel, .tsv_rcv, .ref_rcv, .tsv_drv, .lead, .lag);

  vr_core #(.NS(NS), .TS_PS(TS_PS), .TF_PS(TF_PS), .NAND_PS(NAND_PS), .CODE_W(CODE_W)) u_core (
    .clr, .lead, .lag, .code, .overflow(meas_overflow));

  sel_config_reg #(.SEL_W(SEL_W)) u_sel (
    .clk(tck), .rst_n(trst_n), .shift_en(sel_shift), .si(sel_si), .sel);

  code_scan_reg #(.CODE_W(CODE_W)) u_scan (
    .clk(tck), .rst_n(trst_n), .load(code_load), .shift_en(code_shift), .d(code), .so(code_so));

  test_controller #(.N_TSV(N_TSV), .SEL_W(SEL_W), .CODE_W(CODE_W)) u_ctrl (
    .clk(tck), .rst_n(trst_n), .test_req, .sel, .clr, .sel_shift, .test_in, .s_n,
    .code_load, .code_shift, .busy, .done);

  assign code_so_valid = code_shift;

endmodule
