`timescale 1ps/1ps
// Workload testbench for vr_tsv_test_top at its default parameters.
//
// Part 1, fault-degree sweep: TSV 5 is made faster than a fault-free TSV in
// 1 ps steps, from 60 ps slower to 900 ps faster, the span that covers the
// codes reported for resistive-open and leakage defects (4 for a fault-free
// TSV up to 86 for the strongest leakage). Every scanned code is compared
// with floor(t_M / 10 ps) (either neighbour where t_M is an exact multiple of
// 10 ps), the codes must never decrease as the defect grows, and every code
// from 0 to 94 must appear, i.e. each extra 10 ps of speed-up is resolved.
//
// Part 2, test time: all 16 TSVs, each with a different defect, are tested
// back to back with test_req held. The batch must take 16 * 13 = 208 test
// clock cycles, 0.65 us per TSV at 20 MHz, and every code must be right.
module tsv_workload_tb;
  localparam int unsigned N = 16;
  localparam int NOM_PS        = 2000;
  localparam int REF_OFFSET_PS = 45;
  localparam int R_PS          = 10;
  localparam time TCK_HALF     = 25000;

  int checks = 0, failures = 0;
  logic tck = 0, trst_n = 0, test_req = 0, sel_si = 0;
  logic [N-1:0] func_in = '0, func_out;
  int unsigned tsv_delay_ps [N];
  int unsigned ref_delay_ps;
  logic code_so, code_so_valid, meas_overflow, busy, done;

  vr_tsv_test_top dut (.*);

  always #(TCK_HALF) tck = ~tck;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int expected_code(input int tm);
    int c = 0;
    for (int n = 1; n <= 127; n++) if (n * R_PS < tm) c++;
    return c;
  endfunction

  // Shift in the Sel code and collect the scanned code of one test whose
  // SELECT phase starts at the next clock edge; returns the cycle count.
  task automatic serve_test(input int idx, output logic [6:0] got, output int cycles);
    cycles = 0; got = '0;
    for (int b = 3; b >= 0; b--) begin
      sel_si = idx[b];
      cycles++;
      @(negedge tck);
    end
    do begin
      if (code_so_valid) got = {got[5:0], code_so};
      cycles++;
      @(negedge tck);
    end while (!done && cycles < 40);
  endtask

  function automatic bit code_ok(input int d, input logic [6:0] got);
    int tm, e;
    tm = REF_OFFSET_PS + d;
    e  = expected_code(tm);
    if (tm > 0 && tm % R_PS == 0 && tm / R_PS <= 127) return int'(got) == e || int'(got) == e + 1;
    return int'(got) == e;
  endfunction

  initial begin
    #(40000 * 2 * TCK_HALF) $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int prev, cycles;
    logic [6:0] got;
    bit seen [128];
    foreach (tsv_delay_ps[i]) tsv_delay_ps[i] = NOM_PS;
    ref_delay_ps = NOM_PS + REF_OFFSET_PS;
    #(5 * TCK_HALF);
    trst_n = 1;

    // Part 1: fault-degree sweep on TSV 5.
    prev = 0;
    for (int d = -60; d <= 900; d++) begin
      tsv_delay_ps[5] = NOM_PS - d;
      @(negedge tck); test_req = 1;
      @(negedge tck); test_req = 0;
      serve_test(5, got, cycles);
      chk(cycles == 13, $sformatf("d=%0d took %0d cycles", d, cycles));
      chk(code_ok(d, got), $sformatf("d=%0d code %0d expected %0d", d, got,
                                     expected_code(REF_OFFSET_PS + d)));
      chk(int'(got) >= prev, $sformatf("d=%0d code %0d below previous %0d", d, got, prev));
      if (d == 0) chk(got == 7'd4, "fault-free TSV reads code 4");
      prev = int'(got);
      seen[got] = 1;
    end
    for (int c = 0; c <= 94; c++) chk(seen[c], $sformatf("code %0d produced", c));
    chk(seen[86], "largest reported defect code 86 produced");
    tsv_delay_ps[5] = NOM_PS;

    // Part 2: 16 TSVs back to back.
    begin
      int total, dd [N];
      for (int i = 0; i < int'(N); i++) begin
        dd[i] = (i * 53 + 7) % 900;
        tsv_delay_ps[i] = NOM_PS - dd[i];
      end
      @(negedge tck); test_req = 1;
      @(negedge tck);
      total = 0;
      for (int i = 0; i < int'(N); i++) begin
        if (i == int'(N) - 1) test_req = 0;
        serve_test(i, got, cycles);
        total += cycles;
        chk(code_ok(dd[i], got), $sformatf("batch TSV %0d code %0d expected %0d", i, got,
                                           expected_code(REF_OFFSET_PS + dd[i])));
      end
      chk(total == 16 * 13, $sformatf("16 TSVs took %0d cycles", total));
      chk(!busy, "idle after the batch");
      $display("16 TSVs in %0d cycles = %0d ns per TSV", total, total * 2 * TCK_HALF / 16 / 1000);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
