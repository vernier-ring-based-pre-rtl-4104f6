`timescale 1ps/1ps
// Test controller: runs the per-TSV test sequence on the test clock.
//
// A pulse (or level) on test_req in normal mode starts one test of
// TEST_CYCLES = 13 cycles:
//   SELECT  4 cycles  sel_shift high: the Sel code is shifted in serially
//   INIT    1 cycle   clr high: every capture flip-flop is cleared to 0
//   MEASURE 1 cycle   test_in high: the rising test transition is applied;
//                     code_load high, so the code is captured at its end
//   SCAN    7 cycles  code_shift high: the code leaves MSB first
// then the controller pulses done for one cycle and returns to IDLE, or, if
// test_req is still high, starts the next test at once, so back-to-back
// tests take 13 cycles each.
// test_in and clr come straight from flip-flops so the rings and the
// asynchronous clear never see a decoding glitch. In every state but IDLE the
// test enable of the addressed TSV, s_n[sel], is 0 (test mode) and all other
// enables are 1; in IDLE all are 1 (normal operating mode).
//
// The four phases and their lengths follow the reference test-time budget
// (1 + 4 + 1 + 7 cycles). The reference lists initialisation before
// selection; here it comes after, because changing Sel moves the ring input
// between TSVs and can disturb the rings, so the clear must follow the last
// change of Sel.
module test_controller
#(
  parameter int unsigned N_TSV  = vr_pkg::N_TSV,
  parameter int unsigned SEL_W  = vr_pkg::SEL_W,
  parameter int unsigned CODE_W = vr_pkg::CODE_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             test_req,    // start one TSV test
  input  logic [SEL_W-1:0] sel,         // TSV under test, from the Sel register
  output logic             clr,         // clear of the capture flip-flops
  output logic             sel_shift,   // shift enable of the Sel register
  output logic             test_in,     // test transition 'in'
  output logic [N_TSV-1:0] s_n,         // test enables S1..Sn, 1 = functional
  output logic             code_load,   // load the code into the scan register
  output logic             code_shift,  // shift the scan register
  output logic             busy,
  output logic             done         // one cycle after the last code bit
);

  localparam int unsigned CNT_W = $clog2(SEL_W > CODE_W ? SEL_W : CODE_W) + 1;

  vr_pkg::tc_state_e state, state_n;
  logic [CNT_W-1:0] cnt, cnt_n;

  always_comb begin
    state_n = state;
    cnt_n   = cnt + 1'b1;
    unique case (state)
      vr_pkg::ST_IDLE: begin
        cnt_n = '0;
        if (test_req) state_n = vr_pkg::ST_SELECT;
      end
      vr_pkg::ST_SELECT: if (cnt == CNT_W'(SEL_W - 1)) begin
        state_n = vr_pkg::ST_INIT;
        cnt_n   = '0;
      end
      vr_pkg::ST_INIT: begin
        state_n = vr_pkg::ST_MEASURE;
        cnt_n   = '0;
      end
      vr_pkg::ST_MEASURE: begin
        state_n = vr_pkg::ST_SCAN;
        cnt_n   = '0;
      end
      // With test_req held, the next test follows without an idle cycle.
      vr_pkg::ST_SCAN: if (cnt == CNT_W'(CODE_W - 1)) begin
        state_n = test_req ? vr_pkg::ST_SELECT : vr_pkg::ST_IDLE;
        cnt_n   = '0;
      end
      default: begin
        state_n = vr_pkg::ST_IDLE;
        cnt_n   = '0;
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= vr_pkg::ST_IDLE;
      cnt     <= '0;
      clr     <= 1'b0;
      test_in <= 1'b0;
      done    <= 1'b0;
    end else begin
      state   <= state_n;
      cnt     <= cnt_n;
      clr     <= (state_n == vr_pkg::ST_INIT);
      test_in <= (state_n == vr_pkg::ST_MEASURE);
      done    <= (state == vr_pkg::ST_SCAN) && (state_n != vr_pkg::ST_SCAN);
    end
  end

  assign sel_shift  = (state == vr_pkg::ST_SELECT);
  assign code_load  = (state == vr_pkg::ST_MEASURE);
  assign code_shift = (state == vr_pkg::ST_SCAN);
  assign busy       = (state != vr_pkg::ST_IDLE);

  always_comb begin
    for (int i = 0; i < N_TSV; i++)
      s_n[i] = !(busy && (sel == SEL_W'(i)));
  end

  // The test transition is only ever applied after a clear.
  a_clear_before_measure: assert property (@(posedge clk) disable iff (!rst_n)
    (state == vr_pkg::ST_MEASURE) |-> $past(state == vr_pkg::ST_INIT));

endmodule
