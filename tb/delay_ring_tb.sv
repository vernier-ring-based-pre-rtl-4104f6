`timescale 1ps/1ps
// Testbench for delay_ring: checks that all taps idle high, that a rising
// start edge reaches tap i falling after NAND_PS + (i+1)*BUF_PS, that the
// edge returns with alternating polarity every lap of NAND_PS + NS*BUF_PS,
// and that the ring stops and settles high once start falls.
module delay_ring_tb;
  localparam int unsigned NS = 8, BUF_PS = 160, NAND_PS = 30;
  localparam int unsigned LAP = NAND_PS + NS*BUF_PS;
  int checks = 0, failures = 0;
  logic start = 1'b0;
  logic [NS-1:0] tap;
  int edges [NS];
  time t0;

  delay_ring #(.NS(NS), .BUF_PS(BUF_PS), .NAND_PS(NAND_PS)) dut (.start, .tap);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  for (genvar i = 0; i < NS; i++) begin : g_mon
    always @(tap[i]) if (start) edges[i]++;
  end

  initial begin
    #200000 $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000;
    chk(tap == '1, "idle taps high");
    start = 1'b1; t0 = $time;
    for (int lap = 0; lap < 4; lap++) begin
      for (int i = 0; i < NS; i++) begin
        time t;
        logic lvl_pre;
        t = t0 + NAND_PS + (i+1)*BUF_PS + lap*LAP;
        lvl_pre = (lap % 2 == 0) ? 1'b1 : 1'b0;
        #(t - 1 - $time);
        chk(tap[i] == lvl_pre, $sformatf("lap %0d tap %0d before edge", lap, i));
        #2;
        chk(tap[i] == ~lvl_pre, $sformatf("lap %0d tap %0d after edge", lap, i));
      end
    end
    start = 1'b0;
    #(3*LAP);
    chk(tap == '1, "settled high after stop");
    for (int i = 0; i < NS; i++) chk(edges[i] >= 4, $sformatf("tap %0d toggled", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
