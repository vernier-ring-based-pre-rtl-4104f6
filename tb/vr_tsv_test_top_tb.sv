`timescale 1ps/1ps
// End-to-end testbench for vr_tsv_test_top at its default parameters
// (16 TSVs, 8-stage rings, 10 ps resolution, 7-bit code, 20 MHz test clock).
//
// Every I/O TSV cell gets a propagation delay; a fault-free TSV has NOM_PS,
// a defective one is faster by some amount d, and the reference path is
// REF_OFFSET_PS slower than a fault-free TSV, so the interval between lead
// and lag is t_M = REF_OFFSET_PS + d. The expected code is worked out here
// as the number of stages n >= 1 with n*10 ps < t_M (saturating at 127).
// Each test is run through the serial interface: the Sel code is shifted
// in on sel_si, the code is collected from code_so, and the test must take
// exactly 13 test clock cycles. Normal mode (functional signals passing the
// TSVs) is checked between tests and, for the TSVs not under test, during
// them. Each mechanism of the design is counted and must occur at least
// once: normal mode, selection of every one of the 16 TSVs, a fault-free
// code, a catch on an odd lap, a catch on an even lap, a code of 0 (TSV
// slower than the reference) and an overflow.
module vr_tsv_test_top_tb;
  localparam int unsigned N = 16;
  localparam int NOM_PS        = 2000;
  localparam int REF_OFFSET_PS = 45;
  localparam int R_PS          = 10;
  localparam time TCK_HALF     = 25000;   // 20 MHz

  int checks = 0, failures = 0;
  logic tck = 0, trst_n = 0, test_req = 0, sel_si = 0;
  logic [N-1:0] func_in = '0, func_out;
  int unsigned tsv_delay_ps [N];
  int unsigned ref_delay_ps;
  logic code_so, code_so_valid, meas_overflow, busy, done;

  int n_normal = 0, n_faultfree = 0, n_odd = 0, n_even = 0, n_zero = 0, n_ovf = 0;
  bit selected [N];

  vr_tsv_test_top dut (.*);

  always #(TCK_HALF) tck = ~tck;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int expected_code(input int tm);
    int c = 0;
    for (int n = 1; n <= 200; n++) if (n * R_PS < tm) c++;
    return c;
  endfunction

  // One complete test of TSV idx whose delay is NOM_PS - d.
  task automatic run_test(input int idx, input int d);
    int tm, exp, cycles, nbits;
    logic [6:0] got;
    tsv_delay_ps[idx] = NOM_PS - d;
    tm  = REF_OFFSET_PS + d;
    exp = expected_code(tm);
    @(negedge tck);
    test_req = 1;
    @(negedge tck);
    test_req = 0;
    cycles = 0; nbits = 0; got = '0;
    for (int b = 3; b >= 0; b--) begin
      sel_si = idx[b];
      if (busy) cycles++;
      @(negedge tck);
    end
    while (!done && cycles < 40) begin
      if (busy) cycles++;
      if (code_so_valid) begin
        got = {got[5:0], code_so};
        nbits++;
        // Functional signals still pass the TSVs that are not under test.
        func_in = N'($urandom);
        func_in[idx] = 1'b0;
      end
      @(negedge tck);
      if (busy && cycles > 6) begin
        logic [N-1:0] mask;
        mask = ~(N'(1) << idx);
        chk((func_out & mask) == (func_in & mask), "other TSVs stay functional during a test");
      end
    end
    chk(cycles == 13, $sformatf("TSV %0d test took %0d cycles", idx, cycles));
    chk(nbits == 7, $sformatf("TSV %0d code has %0d bits", idx, nbits));
    selected[idx] = 1;
    if (exp > 127) begin
      n_ovf++;
      chk(got == 7'h7f, $sformatf("TSV %0d d=%0d overflow code %0d", idx, d, got));
    end else begin
      chk(int'(got) == exp, $sformatf("TSV %0d d=%0d code %0d expected %0d", idx, d, got, exp));
      if (exp == 0) n_zero++;
      else if ((exp / 8) % 2 == 0) n_odd++;
      else n_even++;
      if (d == 0) n_faultfree++;
    end
    tsv_delay_ps[idx] = NOM_PS;
  endtask

  task automatic check_normal_mode();
    repeat (3) begin
      func_in = N'($urandom);
      #5000;
      chk(!busy && func_out == func_in, "normal mode: functional signals pass every TSV");
      n_normal++;
    end
  endtask

  initial begin
    #(2000 * 2 * TCK_HALF) $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int ds[8] = '{0, 2, 41, 816, -100, 87, 1250, 399};
    foreach (tsv_delay_ps[i]) tsv_delay_ps[i] = NOM_PS;
    ref_delay_ps = NOM_PS + REF_OFFSET_PS;
    #(5 * TCK_HALF);
    trst_n = 1;
    check_normal_mode();
    // Fixed cases: fault-free, small, medium, the largest code reported for
    // real defects, slower than reference, and overflow.
    foreach (ds[k]) begin
      run_test(k, ds[k]);
      check_normal_mode();
    end
    // Every TSV once more with a random defect size.
    for (int i = 0; i < int'(N); i++) begin
      int d;
      d = int'($urandom_range(1230, 0));
      if ((d + REF_OFFSET_PS) % R_PS == 0) d++;
      run_test(i, d);
    end
    check_normal_mode();
    chk(n_normal > 0,    "normal mode exercised");
    chk(n_faultfree > 0, "fault-free TSV measured");
    chk(n_odd > 0,       "catch on an odd lap");
    chk(n_even > 0,      "catch on an even lap");
    chk(n_zero > 0,      "zero code (TSV slower than reference)");
    chk(n_ovf > 0,       "overflow");
    for (int i = 0; i < int'(N); i++) chk(selected[i], $sformatf("TSV %0d selected", i));
    $display("mechanisms: normal=%0d faultfree=%0d odd=%0d even=%0d zero=%0d overflow=%0d",
             n_normal, n_faultfree, n_odd, n_even, n_zero, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
