`timescale 1ps/1ps
// Testbench for tsv_io_cell: applies rising and falling edges with several
// cell delays and checks that the receiver output follows the driver input
// exactly delay_ps later (not before, not after).
module tsv_io_cell_tb;
  int checks = 0, failures = 0;
  logic drv = 1'b0, rcv;
  int unsigned dly = 200;

  tsv_io_cell dut (.drv_in(drv), .delay_ps(dly), .rcv_out(rcv));

  task automatic check(input logic exp, input string what);
    checks++;
    if (rcv !== exp) begin
      failures++;
      $display("FAIL %s: rcv=%b expected %b at %0t", what, rcv, exp, $time);
    end
  endtask

  initial begin
    #100000 $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned delays[5] = '{200, 300, 255, 120, 45};
    #2000;
    check(1'b0, "settled low");
    foreach (delays[k]) begin
      dly = delays[k];
      #1000;
      drv = 1'b1;
      #(dly - 2) check(1'b0, "rise not early");
      #4         check(1'b1, "rise on time");
      #1000;
      drv = 1'b0;
      #(dly - 2) check(1'b1, "fall not early");
      #4         check(1'b0, "fall on time");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
