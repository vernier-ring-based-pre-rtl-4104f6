`timescale 1ps/1ps
// Testbench for vr_core at its default delays (R = 10 ps). For each interval
// t_M between the lead and lag edges the code must be floor(t_M / R) (the
// number of stages n >= 1 with n*R < t_M), 0 when the lag edge comes first,
// and all ones with overflow when the code would exceed 127. The settling
// time is checked too: the code must be final 21 ns after the lag edge.
module vr_core_tb;
  localparam int R = 10;
  int checks = 0, failures = 0;
  logic clr = 1'b0, lead = 1'b0, lag = 1'b0;
  logic [6:0] code;
  logic overflow;
  int n_zero = 0, n_ovf = 0, n_mid = 0;

  vr_core dut (.clr, .lead, .lag, .code, .overflow);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic measure(input int tm);
    int exp;
    exp = 0;
    for (int n = 1; n < 200; n++) if (n * R < tm) exp++;
    lead = 0; lag = 0;
    #5000 clr = 1; #1000 clr = 0; #1000;
    if (tm >= 0) begin lead = 1; #(tm); lag = 1; end
    else         begin lag = 1; #(-tm); lead = 1; end
    #21000;
    if (exp > 127) begin
      n_ovf++;
      chk(overflow && code == '1, $sformatf("tm=%0d overflow", tm));
    end else begin
      if (exp == 0) n_zero++; else n_mid++;
      chk(!overflow && int'(code) == exp, $sformatf("tm=%0d code=%0d exp=%0d", tm, code, exp));
    end
    lead = 0; lag = 0;
    #5000;
    chk(overflow == (exp > 127) && (exp > 127 || int'(code) == exp), $sformatf("tm=%0d code held after rings stop", tm));
  endtask

  initial begin
    #10000000 $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int tms[10] = '{-100, 2, 45, 49, 51, 203, 861, 1273, 1285, 1299};
    foreach (tms[i]) measure(tms[i]);
    for (int i = 0; i < 30; i++) begin
      int t;
      t = int'($urandom_range(1270, 0));
      if (t % R == 0) t++;
      measure(t);
    end
    chk(n_zero > 0 && n_mid > 0 && n_ovf > 0, "zero, in-range and overflow codes all seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
