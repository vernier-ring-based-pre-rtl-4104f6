`timescale 1ps/1ps
// Testbench for sel_config_reg: shifts every 4-bit code in, MSB first, over
// four clock cycles and checks the register afterwards; also checks that it
// holds while shift_en is low and that reset clears it.
module sel_config_reg_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, shift_en = 0, si = 0;
  logic [3:0] sel;

  sel_config_reg #(.SEL_W(4)) dut (.*);
  always #500 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000 $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1200;
    chk(sel == 4'd0, "reset value");
    rst_n = 1;
    for (int v = 0; v < 16; v++) begin
      int pick;
      pick = (v * 7 + 3) % 16;
      for (int b = 3; b >= 0; b--) begin
        @(negedge clk); shift_en = 1; si = pick[b];
      end
      @(negedge clk); shift_en = 0; si = 1'($urandom);
      chk(sel == 4'(pick), $sformatf("loaded %0d got %0d", pick, sel));
      repeat (3) @(negedge clk);
      chk(sel == 4'(pick), "holds without shift_en");
    end
    rst_n = 0; #10;
    chk(sel == 4'd0, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
