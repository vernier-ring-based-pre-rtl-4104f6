`timescale 1ps/1ps
// Testbench for test_controller: runs several tests and checks, cycle by
// cycle, the 4 select cycles, 1 clear cycle, 1 measurement cycle (test_in
// high, code_load high) and 7 scan cycles, the done pulse after the 13th
// cycle, and the test enables: all 1 when idle, exactly s_n[sel] = 0 during
// a test. Finally three tests run back to back with test_req held must take
// 39 cycles with busy high throughout.
module test_controller_tb;
  localparam int unsigned N = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, test_req = 0;
  logic [3:0] sel = '0;
  logic clr, sel_shift, test_in, code_load, code_shift, busy, done;
  logic [N-1:0] s_n;

  test_controller #(.N_TSV(N), .SEL_W(4), .CODE_W(7)) dut (.*);
  always #25000 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #100000000 $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #60000 rst_n = 1;
    for (int t = 0; t < 5; t++) begin
      sel = 4'($urandom);
      @(negedge clk);
      chk(!busy && s_n == '1 && !test_in && !clr, "idle: normal mode");
      test_req = 1;
      @(negedge clk); test_req = 0;
      for (int c = 0; c < 13; c++) begin
        // phase of cycle c: 0-3 select, 4 init, 5 measure, 6-12 scan
        bit p_sel, p_init, p_meas, p_scan;
        p_sel  = (c < 4);
        p_init = (c == 4);
        p_meas = (c == 5);
        p_scan = (c >= 6);
        chk(busy && sel_shift == p_sel && clr == p_init && test_in == p_meas &&
            code_load == p_meas && code_shift == p_scan && !done,
            $sformatf("cycle %0d outputs sh=%b clr=%b in=%b ld=%b sc=%b", c,
                      sel_shift, clr, test_in, code_load, code_shift));
        chk(s_n == ~(N'(1) << sel), $sformatf("cycle %0d test enables %h", c, s_n));
        @(negedge clk);
      end
      chk(done && !busy && s_n == '1, "done pulse after 13 cycles, back to normal mode");
      @(negedge clk);
      chk(!done, "done lasts one cycle");
    end
    // Back-to-back: test_req held, three tests in 3*13 cycles, done after each.
    @(negedge clk);
    test_req = 1;
    @(negedge clk);
    begin
      int cyc, dones;
      cyc = 0; dones = 0;
      while (dones < 3 && cyc < 100) begin
        if (dones == 2) test_req = 0;
        cyc++;
        @(negedge clk);
        if (done) dones++;
        if (dones < 3) chk(busy, "busy throughout back-to-back tests");
      end
      chk(cyc == 39, $sformatf("three back-to-back tests took %0d cycles", cyc));
      chk(!busy, "idle after the last back-to-back test");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
