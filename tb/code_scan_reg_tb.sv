`timescale 1ps/1ps
// Testbench for code_scan_reg: loads random 7-bit codes and checks that they
// leave MSB first, one bit per cycle, in seven cycles, with load taking
// priority over shift.
module code_scan_reg_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0, shift_en = 0;
  logic [6:0] d;
  logic so;

  code_scan_reg #(.CODE_W(7)) dut (.*);
  always #500 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #10000000 $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    #1200 chk(so == 1'b0, "reset");
    rst_n = 1;
    for (int it = 0; it < 40; it++) begin
      logic [6:0] v, got;
      v = (it == 0) ? 7'd4 : (it == 1) ? 7'd86 : 7'($urandom);
      @(negedge clk); d = v; load = 1; shift_en = (it % 2 == 1);
      @(negedge clk); load = 0; shift_en = 1; d = 7'($urandom);
      for (int b = 6; b >= 0; b--) begin
        got[b] = so;
        @(negedge clk);
      end
      shift_en = 0;
      chk(got == v, $sformatf("sent %0d received %0d", v, got));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
